// Self-checking testbench for stencil_kernel.
//
// The coefficients sit in a plram instance, the image in one DDR bank
// model and the results go to a second one, as in the kernel's port
// mapping. Runs: a 32 x 32 image holding 10*row + column with all
// coefficients 1 (so an inner point equals five times its own value), a
// 45 x 45 random image with random coefficients, and a 64 x 64 one. The
// expected results are computed by the testbench from the stencil
// definition (border points keep their input). Checks every image position
// at its place in the output buffer (offset width + 17 items), that the
// buffer is not written past its end, the done pulse, and that a run takes
// about one clock per beat (the input and output banks are separate).
module tb_stencil_kernel;
  import hpc_pkg::*;

  localparam int P = LANES;
  localparam int DEPTH = 2048;
  localparam int LAT = 20;

  logic clk = 0, rst = 1;
  logic start, busy, done;
  addr_t in_addr, out_addr, coef_addr;
  logic [15:0] width;
  logic c_arvalid, c_arready, c_rvalid, c_rready, c_rlast;
  addr_t c_araddr; logic [7:0] c_arlen; word_t c_rdata;
  logic in_arvalid, in_arready, in_rvalid, in_rready, in_rlast;
  addr_t in_araddr; logic [7:0] in_arlen; logic [BEAT_W-1:0] in_rdata;
  logic out_awvalid, out_awready, out_wvalid, out_wready, out_wlast, out_bvalid, out_bready;
  addr_t out_awaddr; logic [7:0] out_awlen; logic [BEAT_W-1:0] out_wdata;
  int checks = 0, failures = 0;

  stencil_kernel dut (.*);

  logic host_we = 0;
  logic [14:0] host_addr = 0;
  word_t host_wdata = 0;
  plram u_plram (.clk, .rst, .host_we, .host_addr, .host_wdata,
    .arvalid(c_arvalid), .arready(c_arready), .araddr(c_araddr), .arlen(c_arlen),
    .rvalid(c_rvalid), .rready(c_rready), .rdata(c_rdata), .rlast(c_rlast));

  logic n0_awready, n0_wready, n0_bvalid, n1_arready, n1_rvalid, n1_rlast;
  logic [BEAT_W-1:0] n1_rdata;
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT)) u_ddr0 (
    .clk, .rst,
    .arvalid(in_arvalid), .arready(in_arready), .araddr(in_araddr), .arlen(in_arlen),
    .rvalid(in_rvalid), .rready(in_rready), .rdata(in_rdata), .rlast(in_rlast),
    .awvalid(1'b0), .awready(n0_awready), .awaddr(64'd0), .awlen(8'd0),
    .wvalid(1'b0), .wready(n0_wready), .wdata('0), .wlast(1'b0),
    .bvalid(n0_bvalid), .bready(1'b1));
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT)) u_ddr1 (
    .clk, .rst,
    .arvalid(1'b0), .arready(n1_arready), .araddr(64'd0), .arlen(8'd0),
    .rvalid(n1_rvalid), .rready(1'b1), .rdata(n1_rdata), .rlast(n1_rlast),
    .awvalid(out_awvalid), .awready(out_awready), .awaddr(out_awaddr), .awlen(out_awlen),
    .wvalid(out_wvalid), .wready(out_wready), .wdata(out_wdata), .wlast(out_wlast),
    .bvalid(out_bvalid), .bready(out_bready));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input bit pattern, input int coef_word, output int cycles);
    word_t img [];
    word_t ref_out [];
    word_t c [STENCIL_SIZE];
    int n, skew, nb_out;
    n = w * w;
    img = new[n];
    ref_out = new[n];
    for (int i = 0; i < n; i++) img[i] = pattern ? word_t'((i / w) * 10 + i % w) : $urandom;
    for (int i = 0; i < STENCIL_SIZE; i++) c[i] = pattern ? 1 : $urandom;
    for (int y = 0; y < w; y++)
      for (int x = 0; x < w; x++) begin
        int k;
        k = y * w + x;
        if (y == 0 || y == w - 1 || x == 0 || x == w - 1) ref_out[k] = img[k];
        else ref_out[k] = c[0] * img[k - w] + c[1] * img[k - 1] + c[2] * img[k]
                          + c[3] * img[k + 1] + c[4] * img[k + w];
      end
    for (int i = 0; i < n; i++) u_ddr0.mem[i / P][(i % P) * 32 +: 32] = img[i];
    skew = w + P + 1;
    nb_out = (n + skew + P - 1) / P;
    for (int i = 0; i < DEPTH; i++) u_ddr1.mem[i] = '1;
    // coefficients into the PLRAM through its host port
    for (int i = 0; i < STENCIL_SIZE; i++) begin
      @(negedge clk);
      host_we = 1;
      host_addr = 15'(coef_word + i);
      host_wdata = c[i];
    end
    @(negedge clk);
    host_we = 0;
    in_addr = 0;
    out_addr = 0;
    coef_addr = addr_t'(coef_word) * 4;
    width = 16'(w);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 100000) begin
      @(posedge clk);
      cycles++;
    end
    @(negedge clk);
    for (int k = 0; k < n; k++) begin
      int q;
      q = k + skew;
      checks++;
      if (u_ddr1.mem[q / P][(q % P) * 32 +: 32] !== ref_out[k]) begin
        failures++;
        if (failures < 10) $display("FAIL width %0d point (%0d,%0d): %0d expected %0d", w, k % w, k / w,
                                    u_ddr1.mem[q / P][(q % P) * 32 +: 32], ref_out[k]);
      end
    end
    checks++;
    if (u_ddr1.mem[nb_out] !== '1 || busy) begin
      failures++;
      $display("FAIL width %0d: wrote past %0d beats or still busy", w, nb_out);
    end
    if (pattern) begin
      // the point (1,1) of the 10*row + column image: 1 + 10 + 11 + 12 + 21
      checks++;
      if (u_ddr1.mem[(w + 1 + skew) / P][((w + 1 + skew) % P) * 32 +: 32] !== 32'd55) begin
        failures++;
        $display("FAIL point (1,1) is not 55");
      end
    end
  endtask

  initial begin
    int cyc;
    start = 0; in_addr = 0; out_addr = 0; coef_addr = 0; width = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(32, 1, 0, cyc);
    run(45, 0, 100, cyc);
    run(64, 0, 7, cyc);
    checks++;
    // 64*64 image: 258 result beats; allow the memory latencies and start-up
    $display("stencil 64x64: %0d clocks for %0d result beats", cyc, (64 * 64 + 64 + P + 1 + P - 1) / P);
    if (cyc > (64 * 64 + 64 + P + 1 + P - 1) / P + 2 * LAT + 60) begin
      failures++;
      $display("FAIL rate: %0d clocks", cyc);
    end
    // AXI protocol violations seen by the memory models count as failures
    checks++;
    failures += int'(u_ddr0.protocol_errors + u_ddr1.protocol_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
