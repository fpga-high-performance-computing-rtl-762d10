// AXI4 burst read master (the "read_input" task of a dataflow kernel).
//
// Reads n_beats consecutive data beats starting at byte address base_addr
// and hands them, in order, to a stream. It cuts the region into bursts of
// at most BURST_LEN beats that never cross a 4 KiB boundary, and keeps up to
// MAX_OUT bursts in flight, so the memory can stream data back-to-back
// instead of the kernel waiting a full memory latency per item. Burst reads,
// wide ports and a limit on outstanding requests are what the document
// describes; the burst length, the limit and the control handshake are this
// design's own choices.
//
// Interface: a one-cycle start pulse (ignored while busy) latches base_addr
// and n_beats; busy stays high until the last beat has left on the stream,
// and done pulses for one cycle then. base_addr must be aligned to the beat
// size. AR/R are a subset of AXI4: arlen is beats minus one, full-width
// INCR bursts, no IDs, response codes ignored. rready follows the stream's
// m_ready, so a full downstream FIFO stalls the memory rather than losing data.
module axi_read_master
  import hpc_pkg::*;
#(
  parameter int unsigned DATA_W  = BEAT_W,
  parameter int unsigned BURST   = BURST_LEN,
  parameter int unsigned MAX_OUT = MAX_OUTSTANDING
) (
  input  logic              clk,
  input  logic              rst,
  // control
  input  logic              start,
  input  addr_t             base_addr,
  input  logic [31:0]       n_beats,
  output logic              busy,
  output logic              done,
  // AXI read address channel
  output logic              arvalid,
  input  logic              arready,
  output addr_t             araddr,
  output logic [7:0]        arlen,
  // AXI read data channel
  input  logic              rvalid,
  output logic              rready,
  input  logic [DATA_W-1:0] rdata,
  input  logic              rlast,
  // output stream
  output logic              m_valid,
  input  logic              m_ready,
  output logic [DATA_W-1:0] m_data
);

  localparam int unsigned BYTES   = DATA_W / 8;
  localparam int unsigned BSHIFT  = $clog2(BYTES);

  logic [31:0] ar_left;            // beats not yet requested
  logic [31:0] r_left;             // beats not yet received
  logic [$clog2(MAX_OUT+1)-1:0] outstanding;
  logic [31:0] to_4k, burst_beats;
  logic        ar_hs, r_hs, rl_hs;

  // beats up to the next 4 KiB boundary, then the burst size
  always_comb begin
    to_4k = (32'h1000 - {20'd0, araddr[11:0]}) >> BSHIFT;
    burst_beats = ar_left;
    if (burst_beats > 32'(BURST)) burst_beats = 32'(BURST);
    if (burst_beats > to_4k)      burst_beats = to_4k;
  end

  assign arvalid = busy && (ar_left != 0) && (outstanding < ($bits(outstanding))'(MAX_OUT));
  assign arlen   = 8'(burst_beats - 1);
  assign ar_hs   = arvalid && arready;

  assign m_valid = rvalid && busy;
  assign m_data  = rdata;
  assign rready  = m_ready && busy;
  assign r_hs    = rvalid && rready;
  assign rl_hs   = r_hs && rlast;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      ar_left     <= '0;
      r_left      <= '0;
      outstanding <= '0;
      araddr      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          araddr  <= base_addr;
          ar_left <= n_beats;
          r_left  <= n_beats;
          busy    <= 1'b1;
          if (n_beats == 0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        if (ar_hs) begin
          araddr  <= araddr + (addr_t'(burst_beats) << BSHIFT);
          ar_left <= ar_left - burst_beats;
        end
        outstanding <= outstanding + ($bits(outstanding))'(ar_hs) - ($bits(outstanding))'(rl_hs);
        if (r_hs) begin
          r_left <= r_left - 1;
          if (r_left == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // AXI: a request stays on the bus, unchanged, until it is accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (rst)
    arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen));
  a_no_excess: assert property (@(posedge clk) disable iff (rst)
    rvalid && busy |-> r_left != 0);

endmodule
