// 5-point stencil kernel: out = stencil(in) over a width x width image of
// 32-bit unsigned integers, sixteen points per clock.
//
// The kernel first copies the five coefficients from the coefficient memory
// (PLRAM) into registers, so the hot loop never touches that port again.
// It then runs a dataflow of three tasks joined by streams: a burst reader
// fetches the image once, sequentially, as 512-bit beats; the sliding-window
// core (stencil_core) turns each beat into sixteen results, reusing every
// item from its line FIFOs; a burst writer stores the result beats. After
// the last image beat the kernel feeds zero beats itself, instead of reading
// padding from memory, until every result has left the window.
//
// Result layout: the output buffer receives ceil((width^2 + width + 17) / 16)
// beats; the result for image position p (row-major) is at item
// p + width + 17 (width + P + 1 with P = 16); the first width + 17 items are
// not results and are skipped by the host. The input buffer is read in whole
// beats: ceil(width^2 / 16) of them, so up to 15 items past the image are
// read (they only ever meet border points, whose results ignore them).
// Requires 32 <= width <= 16384, all addresses aligned to their port width.
//
// Interface: start (one clock, while not busy) latches in_addr, out_addr,
// coef_addr (byte addresses) and width; busy stays high until the last
// write is acknowledged; done pulses for one clock. Three AXI4-subset
// masters: coefficient reads (32-bit), image reads and result writes (512-bit).
// Some busy/done outputs of the masters are unused on purpose: the state
// machine counts beats itself and ends on the writer's done.
module stencil_kernel
  import hpc_pkg::*;
#(
  parameter int unsigned P          = LANES,
  parameter int unsigned MAX_W      = MAX_WIDTH,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  addr_t             in_addr,
  input  addr_t             out_addr,
  input  addr_t             coef_addr,
  input  logic [15:0]       width,
  output logic              busy,
  output logic              done,
  // coefficient read port (PLRAM)
  output logic              c_arvalid,
  input  logic              c_arready,
  output addr_t             c_araddr,
  output logic [7:0]        c_arlen,
  input  logic              c_rvalid,
  output logic              c_rready,
  input  word_t             c_rdata,
  input  logic              c_rlast,
  // image read port
  output logic              in_arvalid,
  input  logic              in_arready,
  output addr_t             in_araddr,
  output logic [7:0]        in_arlen,
  input  logic              in_rvalid,
  output logic              in_rready,
  input  logic [P*WORD_W-1:0] in_rdata,
  input  logic              in_rlast,
  // result write port
  output logic              out_awvalid,
  input  logic              out_awready,
  output addr_t             out_awaddr,
  output logic [7:0]        out_awlen,
  output logic              out_wvalid,
  input  logic              out_wready,
  output logic [P*WORD_W-1:0] out_wdata,
  output logic              out_wlast,
  input  logic              out_bvalid,
  output logic              out_bready
);

  localparam int unsigned BW = P * WORD_W;

  kstate_e     state;
  addr_t       in_addr_q, out_addr_q;
  logic [15:0] width_q;
  logic [31:0] n_items, nbeats_in, nbeats_out, total_adv, fed;
  word_t       coef [STENCIL_SIZE];
  logic [2:0]  coef_idx;

  logic        c_start, c_busy, c_done, c_valid, c_ready;
  word_t       c_data;
  logic        run_go, core_init;
  logic        rd_busy, rd_done, wr_busy, wr_done;

  logic        s_valid, s_ready, f_valid, f_ready;
  logic [BW-1:0] s_data, f_data;
  logic        ci_valid, ci_ready, co_valid, co_ready, o_valid, o_ready;
  logic [P-1:0][WORD_W-1:0] ci_data, co_data;
  logic [BW-1:0] o_data;
  logic        from_mem;

  assign n_items    = 32'(width_q) * 32'(width_q);
  assign nbeats_in  = (n_items + 32'(P) - 1) / 32'(P);
  assign nbeats_out = (n_items + 32'(width_q) + 32'(P) + 1 + 32'(P) - 1) / 32'(P);
  assign total_adv  = nbeats_out + 32'd2;

  assign busy = (state != K_IDLE);

  // control
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= K_IDLE;
      done       <= 1'b0;
      c_start    <= 1'b0;
      run_go     <= 1'b0;
      core_init  <= 1'b0;
      width_q    <= 16'(2 * P);
      in_addr_q  <= '0;
      out_addr_q <= '0;
    end else begin
      done      <= 1'b0;
      c_start   <= 1'b0;
      run_go    <= 1'b0;
      core_init <= 1'b0;
      case (state)
        K_IDLE: if (start) begin
          state      <= K_LOAD_COEF;
          width_q    <= width;
          in_addr_q  <= in_addr;
          out_addr_q <= out_addr;
          c_start    <= 1'b1;
        end
        K_LOAD_COEF: if (c_done) begin
          state     <= K_RUN;
          core_init <= 1'b1;
          run_go    <= 1'b1;
        end
        K_RUN: if (wr_done) begin
          state <= K_DONE;
        end
        default: begin
          state <= K_IDLE;
          done  <= 1'b1;
        end
      endcase
    end
  end

  // load_coefficients: five words from the coefficient port into registers
  axi_read_master #(.DATA_W(WORD_W)) u_coef_rd (
    .clk, .rst, .start(c_start), .base_addr(coef_addr), .n_beats(32'(STENCIL_SIZE)),
    .busy(c_busy), .done(c_done),
    .arvalid(c_arvalid), .arready(c_arready), .araddr(c_araddr), .arlen(c_arlen),
    .rvalid(c_rvalid), .rready(c_rready), .rdata(c_rdata), .rlast(c_rlast),
    .m_valid(c_valid), .m_ready(c_ready), .m_data(c_data));

  assign c_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      coef_idx <= '0;
      for (int i = 0; i < STENCIL_SIZE; i++) coef[i] <= '0;
    end else begin
      if (c_start) coef_idx <= '0;
      else if (c_valid && c_ready) begin
        coef[coef_idx] <= c_data;
        coef_idx <= coef_idx + 3'd1;
      end
    end
  end

  // read_input
  axi_read_master u_in_rd (
    .clk, .rst, .start(run_go), .base_addr(in_addr_q), .n_beats(nbeats_in),
    .busy(rd_busy), .done(rd_done),
    .arvalid(in_arvalid), .arready(in_arready), .araddr(in_araddr), .arlen(in_arlen),
    .rvalid(in_rvalid), .rready(in_rready), .rdata(in_rdata), .rlast(in_rlast),
    .m_valid(s_valid), .m_ready(s_ready), .m_data(s_data));

  stream_fifo #(.WIDTH(BW), .DEPTH(FIFO_DEPTH)) u_in_stream (
    .clk, .rst, .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data));

  // image beats first, then zero beats until every result is out
  always_ff @(posedge clk) begin
    if (rst || core_init) fed <= '0;
    else if (ci_valid && ci_ready) fed <= fed + 1;
  end

  assign from_mem = (fed < nbeats_in);
  assign ci_valid = (state == K_RUN) && (fed < total_adv) && (from_mem ? f_valid : 1'b1);
  assign ci_data  = from_mem ? f_data : '0;
  assign f_ready  = (state == K_RUN) && from_mem && (fed < total_adv) && ci_ready;

  stencil_core #(.P(P), .MAX_W(MAX_W)) u_core (
    .clk, .rst, .init(core_init), .width(width_q), .coef,
    .in_valid(ci_valid), .in_ready(ci_ready), .in_data(ci_data),
    .out_valid(co_valid), .out_ready(co_ready), .out_data(co_data));

  stream_fifo #(.WIDTH(BW), .DEPTH(FIFO_DEPTH)) u_out_stream (
    .clk, .rst, .in_valid(co_valid), .in_ready(co_ready), .in_data(co_data),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data));

  // write_result
  axi_write_master u_out_wr (
    .clk, .rst, .start(run_go), .base_addr(out_addr_q), .n_beats(nbeats_out),
    .busy(wr_busy), .done(wr_done),
    .s_valid(o_valid), .s_ready(o_ready), .s_data(o_data),
    .awvalid(out_awvalid), .awready(out_awready), .awaddr(out_awaddr), .awlen(out_awlen),
    .wvalid(out_wvalid), .wready(out_wready), .wdata(out_wdata), .wlast(out_wlast),
    .bvalid(out_bvalid), .bready(out_bready));

  a_width_legal: assert property (@(posedge clk) disable iff (rst)
    (state == K_IDLE) && start |-> (32'(width) >= 2 * P) && (32'(width) <= MAX_W));

endmodule
