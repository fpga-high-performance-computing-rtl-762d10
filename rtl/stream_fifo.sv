// Stream FIFO: the hardware behind a dataflow stream between two tasks.
//
// A fixed-depth first-in first-out queue with valid/ready handshakes on
// both sides, used between the memory readers, the compute units and the
// memory writer of both kernels. The document describes the streams only as
// compile-time-sized FIFOs; depth, handshake and reset are this design's.
//
// Interface: an item moves in when in_valid && in_ready and out when
// out_valid && out_ready on a rising clock edge. in_ready is high while the
// FIFO holds fewer than DEPTH items; out_data shows the oldest item with no
// extra latency (the storage is read combinationally). A write and a read may
// happen in the same cycle. Synchronous active-high reset empties it.
module stream_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 16     // power of two, at least 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (count < (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // a stream never exceeds its depth and is never read while empty
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
