// AXI4 burst write master (the "write_result" task of a dataflow kernel).
//
// Takes n_beats data beats from a stream and writes them to consecutive
// addresses starting at base_addr, as bursts of at most BURST_LEN beats that
// never cross a 4 KiB boundary, with up to MAX_OUT bursts awaiting their
// write response. The document describes burst transfers over wide ports;
// burst length, outstanding limit and control handshake are this design's.
//
// Interface: a one-cycle start pulse (ignored while busy) latches base_addr
// and n_beats; busy stays high until every burst's write response has come
// back, and done pulses for one cycle then. Data beats of a burst are sent
// only after that burst's address has been issued. wstrb is not modelled:
// every beat writes all bytes. bready is held high.
module axi_write_master
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
  // input stream
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  // AXI write address channel
  output logic              awvalid,
  input  logic              awready,
  output addr_t             awaddr,
  output logic [7:0]        awlen,
  // AXI write data channel
  output logic              wvalid,
  input  logic              wready,
  output logic [DATA_W-1:0] wdata,
  output logic              wlast,
  // AXI write response channel
  input  logic              bvalid,
  output logic              bready
);

  localparam int unsigned BYTES  = DATA_W / 8;
  localparam int unsigned BSHIFT = $clog2(BYTES);
  localparam int unsigned OW     = $clog2(MAX_OUT + 1);

  logic [31:0] aw_left, w_left, b_left_bursts;
  logic [31:0] to_4k, aw_beats;
  addr_t       wb_addr;               // start address of the burst being written
  logic [31:0] to_4k_w, w_beats;      // length of the burst being written
  logic [7:0]  w_cnt;                 // beats of the current burst already sent
  logic [OW-1:0] aw_pending;          // addresses issued, data not yet complete
  logic [OW-1:0] outstanding;         // addresses issued, response not yet back
  logic        aw_hs, w_hs, wl_hs, b_hs;

  always_comb begin
    to_4k = (32'h1000 - {20'd0, awaddr[11:0]}) >> BSHIFT;
    aw_beats = aw_left;
    if (aw_beats > 32'(BURST)) aw_beats = 32'(BURST);
    if (aw_beats > to_4k)      aw_beats = to_4k;
    // the data side recomputes the same burst cut from its own address
    to_4k_w = (32'h1000 - {20'd0, wb_addr[11:0]}) >> BSHIFT;
    w_beats = w_left + 32'(w_cnt);
    if (w_beats > 32'(BURST)) w_beats = 32'(BURST);
    if (w_beats > to_4k_w)    w_beats = to_4k_w;
  end

  assign awvalid = busy && (aw_left != 0) && (outstanding < OW'(MAX_OUT));
  assign awlen   = 8'(aw_beats - 1);
  assign aw_hs   = awvalid && awready;

  assign wvalid  = busy && (aw_pending != 0) && (w_left != 0) && s_valid;
  assign s_ready = busy && (aw_pending != 0) && (w_left != 0) && wready;
  assign wdata   = s_data;
  assign wlast   = (32'(w_cnt) + 1 == w_beats);
  assign w_hs    = wvalid && wready;
  assign wl_hs   = w_hs && wlast;

  assign bready  = 1'b1;
  assign b_hs    = bvalid && bready && busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      aw_left       <= '0;
      w_left        <= '0;
      b_left_bursts <= '0;
      awaddr        <= '0;
      wb_addr       <= '0;
      w_cnt         <= '0;
      aw_pending    <= '0;
      outstanding   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          awaddr        <= base_addr;
          wb_addr       <= base_addr;
          aw_left       <= n_beats;
          w_left        <= n_beats;
          w_cnt         <= '0;
          b_left_bursts <= '0;
          busy          <= (n_beats != 0);
          done          <= (n_beats == 0);
        end
      end else begin
        if (aw_hs) begin
          awaddr  <= awaddr + (addr_t'(aw_beats) << BSHIFT);
          aw_left <= aw_left - aw_beats;
        end
        if (w_hs) begin
          w_left <= w_left - 1;
          if (wl_hs) wb_addr <= wb_addr + (addr_t'(w_beats) << BSHIFT);
          w_cnt  <= wl_hs ? 8'd0 : w_cnt + 8'd1;
        end
        aw_pending  <= aw_pending + OW'(aw_hs) - OW'(wl_hs);
        outstanding <= outstanding + OW'(aw_hs) - OW'(b_hs);
        // bursts issued minus responses seen; finished when nothing is left
        b_left_bursts <= b_left_bursts + 32'(aw_hs) - 32'(b_hs);
        if (b_hs && (b_left_bursts == 1) && (aw_left == 0) && !aw_hs) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    awvalid && !awready |=> awvalid && $stable(awaddr) && $stable(awlen));
  a_w_stable: assert property (@(posedge clk) disable iff (rst)
    wvalid && !wready |=> wvalid && $stable(wdata) && $stable(wlast));

endmodule
