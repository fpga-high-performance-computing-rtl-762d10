// Self-checking testbench for line_fifo at its full size (16384 items in
// 16 banks).
//
// For several fill levels (below P, so that items are read in the clock they
// are written; just at and above P; one row of a large image; the largest
// legal fill) it streams random items in, advancing on random clocks, and
// compares every output item with a reference delay line kept by the
// testbench: the item read at stream position n must be the item written at
// position n - fill. Positions before the first written item are not checked.
module tb_line_fifo;
  import hpc_pkg::*;

  localparam int P = LANES;
  localparam int D = MAX_WIDTH;

  logic clk = 0, rst = 1, init = 0, adv = 0;
  logic [$clog2(D):0] fill;
  word_t wdata [P];
  word_t rdata [P];
  int checks = 0, failures = 0;

  line_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int f, input int beats);
    word_t hist [$];            // every item written, in stream order
    int pos;
    @(negedge clk);
    fill = ($clog2(D)+1)'(f);
    init = 1;
    @(negedge clk);
    init = 0;
    pos = 0;
    for (int k = 0; k < beats; k++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);   // idle clocks
      for (int j = 0; j < P; j++) begin
        wdata[j] = $urandom;
        hist.push_back(wdata[j]);
      end
      adv = 1;
      #1;
      for (int j = 0; j < P; j++) begin
        int src;
        src = pos + j - f;
        if (src >= 0) begin
          checks++;
          if (rdata[j] !== hist[src]) begin
            failures++;
            if (failures < 10) $display("FAIL fill %0d pos %0d: %h expected %h", f, pos + j, rdata[j], hist[src]);
          end
        end
      end
      @(negedge clk);
      adv = 0;
      pos += P;
    end
  endtask

  initial begin
    for (int j = 0; j < P; j++) wdata[j] = 0;
    fill = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(14, 200);
    run(15, 100);
    run(16, 100);
    run(37, 100);
    run(1000 - P - 2, 300);
    run(D - P, D / P * 2 + 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
