// Sixteen-lane single-precision vector adder (the "add_streams" task).
//
// Joins two input streams of 512-bit beats, each holding sixteen 32-bit
// floats, adds them lane by lane with sixteen fp32_add units working in
// parallel, and offers the sum beat on the output stream. This is the
// widened datapath of the vector-addition kernel: one beat, i.e. sixteen
// additions, per clock. The lane count follows the document (512-bit ports,
// 16 items per beat); the single output register stage and the handshake are
// this design's own.
//
// Interface: a beat is consumed from both inputs at once when a_valid and
// b_valid are high and the output register is free or being emptied
// (a_ready = b_ready = that condition and the other input's valid). The sum
// appears on y one clock later. Full throughput: one beat per clock when
// y_ready stays high.
module vadd_lanes
  import hpc_pkg::*;
#(
  parameter int unsigned NLANES = LANES
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          a_valid,
  output logic                          a_ready,
  input  logic [NLANES-1:0][WORD_W-1:0] a_data,
  input  logic                          b_valid,
  output logic                          b_ready,
  input  logic [NLANES-1:0][WORD_W-1:0] b_data,
  output logic                          y_valid,
  input  logic                          y_ready,
  output logic [NLANES-1:0][WORD_W-1:0] y_data
);

  logic [NLANES-1:0][WORD_W-1:0] sum;
  logic                          take, room;

  for (genvar i = 0; i < NLANES; i++) begin : g_lane
    fp32_add u_add (.a(a_data[i]), .b(b_data[i]), .y(sum[i]));
  end

  assign room    = !y_valid || y_ready;
  assign take    = a_valid && b_valid && room;
  assign a_ready = b_valid && room;
  assign b_ready = a_valid && room;

  always_ff @(posedge clk) begin
    if (rst) begin
      y_valid <= 1'b0;
    end else if (room) begin
      y_valid <= take;
    end
  end

  always_ff @(posedge clk) begin
    if (take) y_data <= sum;
  end

  a_y_stable: assert property (@(posedge clk) disable iff (rst)
    y_valid && !y_ready |=> y_valid && $stable(y_data));

endmodule
