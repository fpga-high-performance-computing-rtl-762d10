// Wide sliding-window core of the 5-point stencil.
//
// The image (width x width items, row-major) enters as a stream of beats of
// P consecutive items, and one beat of P results leaves per beat that
// enters. Every input item is read from memory once and reused from
// on-chip storage for all five stencil points that need it.
//
// The window holds three rows of P+2 items: `bot` (newest items), `mid`
// (one image row earlier) and `top` (two rows earlier). Two line FIFOs keep
// the items between them: fifo_down delays `bot` by one row into `mid`,
// fifo_up delays `mid` by one row into `top`. On each advancing clock,
// as in the document's wide window update:
//   1. fifo_up takes mid[0..P-1], fifo_down takes bot[0..P-1];
//   2. the last two items of each window row move to positions 0 and 1;
//   3. top[2..P+1] comes from fifo_up, mid[2..P+1] from fifo_down and
//      bot[2..P+1] from the input beat.
// Each FIFO is filled to width - P - 2 items, which makes the window rows
// exactly one image row apart. P stencil elements then work on the window:
// lane i uses up = top[i+1], left = mid[i], centre = mid[i+1],
// right = mid[i+2], down = bot[i+1]. A position counter tells each lane
// whether its centre lies on the image border, where the input passes
// through unchanged.
//
// Timing and stream layout (this design's own bookkeeping): the elements are
// two stages deep, so the first two beats produce nothing; after that, the
// j-th output beat (j = 0, 1, ...) holds, in lane i, the result for image
// position  P*j + i - (width + P + 1).  The output stream therefore starts
// with width + P + 1 items that belong to no image position, which the host
// skips, as it does in the document (where the skipped count differs by the
// loop bookkeeping). After the last image beat, the kernel feeds zero beats
// until all results are out. Requires 2*P <= width <= MAX_W.
//
// Interface: init (one clock, while no beat is moving) loads width and the
// coefficients and clears the window. A beat moves when in_valid and
// in_ready are both high; in_ready = out_ready once results are flowing.
// out_valid is high with in_valid once the pipeline is full: the output beat
// leaves in the same clock as the input beat that pushes it out.
module stencil_core
  import hpc_pkg::*;
#(
  parameter int unsigned P     = LANES,
  parameter int unsigned MAX_W = MAX_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 init,
  input  logic [15:0]          width,
  input  word_t                coef [STENCIL_SIZE],
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [P-1:0][WORD_W-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [P-1:0][WORD_W-1:0] out_data
);

  localparam int unsigned S     = P + 2;       // window row length (SLICE_SIZE)
  localparam int unsigned PIPE  = 2;           // stencil_pe stages
  localparam int unsigned FW    = $clog2(MAX_W) + 1;

  word_t top [S];
  word_t mid [S];
  word_t bot [S];
  word_t up_wr [P], dn_wr [P], up_rd [P], dn_rd [P];
  word_t coef_q [STENCIL_SIZE];
  logic [15:0] width_q;
  logic [FW-1:0] fill;
  logic [1:0]  primed;                          // advances seen, saturating at PIPE
  logic        emit, adv;
  logic signed [17:0] x0, y0;                   // position of lane 0's centre

  assign emit      = (primed == 2'(PIPE));
  assign in_ready  = out_ready || !emit;
  assign adv       = in_valid && in_ready;
  assign out_valid = in_valid && emit;
  assign fill      = FW'(width) - FW'(P) - FW'(2);

  always_comb begin
    for (int j = 0; j < P; j++) begin
      up_wr[j] = mid[j];
      dn_wr[j] = bot[j];
    end
  end

  line_fifo #(.P(P), .DEPTH(MAX_W)) u_fifo_up (
    .clk, .rst, .init, .fill, .adv, .wdata(up_wr), .rdata(up_rd));

  line_fifo #(.P(P), .DEPTH(MAX_W)) u_fifo_down (
    .clk, .rst, .init, .fill, .adv, .wdata(dn_wr), .rdata(dn_rd));

  // window registers and position counter
  always_ff @(posedge clk) begin
    if (rst || init) begin
      for (int j = 0; j < S; j++) begin
        top[j] <= '0;
        mid[j] <= '0;
        bot[j] <= '0;
      end
      primed <= '0;
      x0 <= 18'(width) - 18'(P) - 18'sd1;
      y0 <= -18'sd2;
    end else if (adv) begin
      top[0] <= top[S-2]; top[1] <= top[S-1];
      mid[0] <= mid[S-2]; mid[1] <= mid[S-1];
      bot[0] <= bot[S-2]; bot[1] <= bot[S-1];
      for (int j = 0; j < P; j++) begin
        top[j+2] <= up_rd[j];
        mid[j+2] <= dn_rd[j];
        bot[j+2] <= in_data[j];
      end
      if (!emit) primed <= primed + 2'd1;
      if (x0 + 18'sd0 + 18'(P) >= 18'(width_q)) begin
        x0 <= x0 + 18'(P) - 18'(width_q);
        y0 <= y0 + 18'sd1;
      end else begin
        x0 <= x0 + 18'(P);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      width_q <= 16'(2 * P);
      for (int i = 0; i < STENCIL_SIZE; i++) coef_q[i] <= '0;
    end else if (init) begin
      width_q <= width;
      coef_q  <= coef;
    end
  end

  // P stencil elements on the window
  for (genvar i = 0; i < P; i++) begin : g_pe
    logic signed [17:0] xi, yi;
    logic  border;
    word_t v [STENCIL_SIZE];
    word_t y;

    always_comb begin
      xi = x0 + 18'(i);
      yi = y0;
      if (xi >= 18'(width_q)) begin
        xi = xi - 18'(width_q);
        yi = y0 + 18'sd1;
      end
      // outside the image counts as border: those results are skipped anyway
      border = (yi <= 18'sd0) || (yi >= 18'(width_q) - 18'sd1) ||
               (xi == 18'sd0) || (xi == 18'(width_q) - 18'sd1);
      v[0] = top[i+1];
      v[1] = mid[i];
      v[2] = mid[i+1];
      v[3] = mid[i+2];
      v[4] = bot[i+1];
    end

    stencil_pe u_pe (.clk, .en(adv), .coef(coef_q), .v, .border, .y);
    assign out_data[i] = y;
  end

  a_width_range: assert property (@(posedge clk) disable iff (rst)
    init |-> (32'(width) >= 2 * P) && (32'(width) <= MAX_W));

endmodule
