// Vector-addition kernel: out[i] = in1[i] + in2[i] on 32-bit floats.
//
// The kernel is a dataflow of four tasks joined by streams, following the
// optimised design of the document: two burst readers fetch in1 and in2 as
// 512-bit beats (sixteen floats each), a sixteen-lane adder adds one beat
// pair per clock, and a burst writer stores the sums. Each task runs as soon
// as its input stream holds data, so reading, adding and writing overlap and
// the kernel moves one beat per port per clock when the memory keeps up.
// Three separate memory ports let in1, in2 and out sit in different memory
// banks. Stream depths and the start/done control are this design's own.
//
// Interface: pulse start for one cycle with the byte addresses in1_addr,
// in2_addr, out_addr (aligned to 64 bytes) and the item count size, which
// must be a multiple of 16. busy is high until the last write is
// acknowledged; done then pulses for one cycle. Each port is an AXI4 subset
// master (see axi_read_master / axi_write_master).
// The readers' busy/done outputs are left unused on purpose: the job ends
// when the writer has all its responses, which implies both readers are done.
module vadd_kernel
  import hpc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  addr_t             in1_addr,
  input  addr_t             in2_addr,
  input  addr_t             out_addr,
  input  logic [31:0]       size,
  output logic              busy,
  output logic              done,
  // in1 read port
  output logic              in1_arvalid,
  input  logic              in1_arready,
  output addr_t             in1_araddr,
  output logic [7:0]        in1_arlen,
  input  logic              in1_rvalid,
  output logic              in1_rready,
  input  logic [BEAT_W-1:0] in1_rdata,
  input  logic              in1_rlast,
  // in2 read port
  output logic              in2_arvalid,
  input  logic              in2_arready,
  output addr_t             in2_araddr,
  output logic [7:0]        in2_arlen,
  input  logic              in2_rvalid,
  output logic              in2_rready,
  input  logic [BEAT_W-1:0] in2_rdata,
  input  logic              in2_rlast,
  // out write port
  output logic              out_awvalid,
  input  logic              out_awready,
  output addr_t             out_awaddr,
  output logic [7:0]        out_awlen,
  output logic              out_wvalid,
  input  logic              out_wready,
  output logic [BEAT_W-1:0] out_wdata,
  output logic              out_wlast,
  input  logic              out_bvalid,
  output logic              out_bready
);

  logic [31:0] n_beats;
  logic        go;
  logic        r1_busy, r1_done, r2_busy, r2_done, w_busy, w_done;

  logic        s1_valid, s1_ready, s2_valid, s2_ready;
  logic [BEAT_W-1:0] s1_data, s2_data;
  logic        a_valid, a_ready, b_valid, b_ready;
  beat_t       a_data, b_data;
  logic        y_valid, y_ready, o_valid, o_ready;
  beat_t       y_data;
  logic [BEAT_W-1:0] o_data;

  assign n_beats = size / LANES;
  assign go      = start && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) busy <= 1'b1;
      else if (busy && w_done) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // read_input(in1), read_input(in2)
  axi_read_master u_rd1 (
    .clk, .rst, .start(go), .base_addr(in1_addr), .n_beats, .busy(r1_busy), .done(r1_done),
    .arvalid(in1_arvalid), .arready(in1_arready), .araddr(in1_araddr), .arlen(in1_arlen),
    .rvalid(in1_rvalid), .rready(in1_rready), .rdata(in1_rdata), .rlast(in1_rlast),
    .m_valid(s1_valid), .m_ready(s1_ready), .m_data(s1_data));

  axi_read_master u_rd2 (
    .clk, .rst, .start(go), .base_addr(in2_addr), .n_beats, .busy(r2_busy), .done(r2_done),
    .arvalid(in2_arvalid), .arready(in2_arready), .araddr(in2_araddr), .arlen(in2_arlen),
    .rvalid(in2_rvalid), .rready(in2_rready), .rdata(in2_rdata), .rlast(in2_rlast),
    .m_valid(s2_valid), .m_ready(s2_ready), .m_data(s2_data));

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_in_stream1 (
    .clk, .rst, .in_valid(s1_valid), .in_ready(s1_ready), .in_data(s1_data),
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data));

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_in_stream2 (
    .clk, .rst, .in_valid(s2_valid), .in_ready(s2_ready), .in_data(s2_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data));

  // add_streams
  vadd_lanes u_add (
    .clk, .rst, .a_valid, .a_ready, .a_data, .b_valid, .b_ready, .b_data,
    .y_valid, .y_ready, .y_data);

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_out_stream (
    .clk, .rst, .in_valid(y_valid), .in_ready(y_ready), .in_data(y_data),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data));

  // write_result
  axi_write_master u_wr (
    .clk, .rst, .start(go), .base_addr(out_addr), .n_beats, .busy(w_busy), .done(w_done),
    .s_valid(o_valid), .s_ready(o_ready), .s_data(o_data),
    .awvalid(out_awvalid), .awready(out_awready), .awaddr(out_awaddr), .awlen(out_awlen),
    .wvalid(out_wvalid), .wready(out_wready), .wdata(out_wdata), .wlast(out_wlast),
    .bvalid(out_bvalid), .bready(out_bready));

  // the item count must fill whole 512-bit beats
  a_size_multiple: assert property (@(posedge clk) disable iff (rst) go |-> (size % LANES) == 0);

endmodule
