// Self-checking testbench for stencil_pe.
//
// Presents random operands (full 32-bit range, so products wrap), random
// coefficient sets and a random border flag on every clock, with random
// clocks where en is low. The expected output, computed by the testbench
// with 64-bit arithmetic reduced modulo 2^32, is compared two enabled clocks
// later, which also checks the pipeline latency and that a low en freezes it.
module tb_stencil_pe;
  import hpc_pkg::*;

  logic clk = 0, en;
  word_t coef [STENCIL_SIZE];
  word_t v [STENCIL_SIZE];
  logic border;
  word_t y;
  int checks = 0, failures = 0;
  word_t expq [$];

  stencil_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nen = 0;
    en = 0; border = 0;
    for (int i = 0; i < STENCIL_SIZE; i++) begin coef[i] = 0; v[i] = 0; end
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (cyc % 1000 == 0)
        for (int i = 0; i < STENCIL_SIZE; i++) coef[i] = (cyc < 10000) ? word_t'($urandom_range(0, 9)) : $urandom;
      en = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < STENCIL_SIZE; i++) v[i] = (cyc % 2) ? $urandom : word_t'($urandom_range(0, 1000));
      border = ($urandom_range(0, 4) == 0);
      if (en) begin
        longint unsigned acc;
        acc = 0;
        for (int i = 0; i < STENCIL_SIZE; i++) acc += longint'(coef[i]) * longint'(v[i]);
        expq.push_back(border ? v[2] : word_t'(acc));
        nen++;
        // after this edge the output shows the operands of two enables ago
        @(posedge clk);
        #1;
        if (nen >= 2) begin
          checks++;
          if (y !== expq[0]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d: y=%0d expected %0d", cyc, y, expq[0]);
          end
          void'(expq.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
