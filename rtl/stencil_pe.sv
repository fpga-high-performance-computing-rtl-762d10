// One 5-point stencil processing element (calc_stencil_point).
//
// Computes  y = c0*up + c1*left + c2*centre + c3*right + c4*down  on 32-bit
// unsigned integers (products and sum wrap modulo 2^32), or passes the centre
// value through unchanged when the point lies on the border of the array.
// The coefficient order (0 above, 1-3 the row, 4 below) and the 32-bit
// integer data type follow the published kernel; the border rule follows the
// problem statement (border outputs equal their inputs).
//
// The element is pipelined in two stages, as the document recommends for the
// compute step so that its long multiply-add path does not limit the clock:
// stage 1 registers the five products, stage 2 registers their sum. Both
// stages advance only when en is high, so a stalled kernel freezes them; y
// holds the result of the operands presented two enabled clocks earlier.
module stencil_pe
  import hpc_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  word_t coef [STENCIL_SIZE],
  input  word_t v    [STENCIL_SIZE],    // up, left, centre, right, down
  input  logic  border,
  output word_t y
);

  word_t prod [STENCIL_SIZE];
  word_t centre_q;
  logic  border_q;

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < STENCIL_SIZE; i++) prod[i] <= coef[i] * v[i];
      centre_q <= v[2];
      border_q <= border;
    end
  end

  always_ff @(posedge clk) begin
    if (en) y <= border_q ? centre_q : (prod[0] + prod[1] + prod[2] + prod[3] + prod[4]);
  end

endmodule
