// Self-checking testbench for stencil_core at its default size (P = 16,
// line FIFOs of 16384 items).
//
// For several image widths (the smallest legal one, 2*P; widths that are not
// multiples of P; a wider one) it streams a random image, followed by zero
// beats, through the core with random gaps on the input and random
// back-pressure on the output. The reference result is computed by the
// testbench from the stencil definition: inner points get
// c0*up + c1*left + c2*centre + c3*right + c4*down (mod 2^32), border points
// keep their input. Every output item at stream position p >= width + P + 1
// is compared with the reference for image position p - (width + P + 1).
// Also checks that the core moves one beat per clock with no gaps and no
// back-pressure.
module tb_stencil_core;
  import hpc_pkg::*;

  localparam int P = LANES;

  logic clk = 0, rst = 1, init = 0;
  logic [15:0] width;
  word_t coef [STENCIL_SIZE];
  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_data, out_data;
  int checks = 0, failures = 0;
  int gap_pct = 25, bp_pct = 25;

  stencil_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, output int cycles);
    word_t img [];
    word_t ref_out [];
    int n, nbeats_in, jbeats, total, sent, got, skew;
    n = w * w;
    img = new[n];
    ref_out = new[n];
    for (int i = 0; i < n; i++) img[i] = (w == 2 * P) ? word_t'(i / w * 10 + i % w) : $urandom;
    for (int i = 0; i < STENCIL_SIZE; i++) coef[i] = (w == 2 * P) ? 1 : $urandom;
    for (int y = 0; y < w; y++)
      for (int x = 0; x < w; x++) begin
        int c;
        c = y * w + x;
        if (y == 0 || y == w - 1 || x == 0 || x == w - 1) ref_out[c] = img[c];
        else ref_out[c] = coef[0] * img[c - w] + coef[1] * img[c - 1] + coef[2] * img[c]
                          + coef[3] * img[c + 1] + coef[4] * img[c + w];
      end
    skew = w + P + 1;
    nbeats_in = (n + P - 1) / P;
    jbeats = (n + skew + P - 1) / P;
    total = jbeats + 2;
    @(negedge clk);
    width = 16'(w);
    init = 1;
    @(negedge clk);
    init = 0;
    sent = 0; got = 0; cycles = 0;
    in_valid = 0; out_ready = 0;
    while (got < jbeats && cycles < 200000) begin
      in_valid = (sent < total) && ($urandom_range(0, 99) >= gap_pct);
      out_ready = ($urandom_range(0, 99) >= bp_pct);
      for (int j = 0; j < P; j++) begin
        int idx;
        idx = sent * P + j;
        in_data[j] = (sent < nbeats_in && idx < n) ? img[idx] : '0;
      end
      #1;
      if (out_valid && out_ready) begin
        for (int j = 0; j < P; j++) begin
          int p;
          p = got * P + j - skew;
          if (p >= 0 && p < n) begin
            checks++;
            if (out_data[j] !== ref_out[p]) begin
              failures++;
              if (failures < 10) $display("FAIL width %0d point (%0d,%0d): %0d expected %0d", w, p % w, p / w, out_data[j], ref_out[p]);
            end
          end
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
      cycles++;
    end
    in_valid = 0;
    checks++;
    if (got != jbeats) begin
      failures++;
      $display("FAIL width %0d: %0d of %0d output beats", w, got, jbeats);
    end
  endtask

  initial begin
    int cyc;
    width = 16'(2 * P);
    for (int i = 0; i < STENCIL_SIZE; i++) coef[i] = 0;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    run(2 * P, cyc);
    run(37, cyc);
    run(50, cyc);
    run(100, cyc);
    gap_pct = 0; bp_pct = 0;
    run(64, cyc);
    checks++;
    if (cyc != (64 * 64 + 64 + P + 1 + P - 1) / P + 2) begin
      failures++;
      $display("FAIL rate: width 64 took %0d clocks", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
