// Self-checking testbench for plram.
//
// Writes random words through the host port, then reads bursts of 1, 5
// (the stencil coefficient set) and 40 words, at several addresses, with a
// reader that is randomly not ready. Checks every beat's data, that rlast
// marks exactly the last beat, that the burst lengths are respected, and
// that with the reader always ready a burst of n words takes n + 1 clocks.
module tb_plram;
  import hpc_pkg::*;

  localparam int D = 32768;

  logic clk = 0, rst = 1;
  logic host_we;
  logic [$clog2(D)-1:0] host_addr;
  word_t host_wdata;
  logic arvalid, arready, rvalid, rready, rlast;
  addr_t araddr;
  logic [7:0] arlen;
  word_t rdata;
  int checks = 0, failures = 0;
  word_t shadow [D];
  int nrdy = 30;

  plram dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) rready <= ($urandom_range(0, 99) >= nrdy);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(input int word, input int n, output int cycles);
    int got;
    @(negedge clk);
    araddr = addr_t'(word) * 4;
    arlen = 8'(n - 1);
    arvalid = 1;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!arready);
    @(negedge clk);
    arvalid = 0;
    got = 0;
    while (got < n && cycles < 1000) begin
      @(posedge clk);
      if (rvalid && rready) begin
        checks++;
        if (rdata !== shadow[word + got] || rlast !== (got == n - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %h expected %h, rlast %b", word + got, rdata, shadow[word + got], rlast);
        end
        got++;
      end
      if (got < n) cycles++;
    end
    checks++;
    if (got != n) begin
      failures++;
      $display("FAIL burst of %0d returned %0d words", n, got);
    end
  endtask

  initial begin
    int cyc;
    host_we = 0; host_addr = 0; host_wdata = 0; arvalid = 0; araddr = 0; arlen = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      host_we = 1;
      host_addr = ($clog2(D))'(i < 200 ? i : D - 300 + i);
      host_wdata = $urandom;
      shadow[host_addr] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    burst(0, 1, cyc);
    burst(7, 5, cyc);
    burst(100, 40, cyc);
    burst(D - 90, 60, cyc);
    nrdy = 0;
    @(negedge clk);
    burst(3, 5, cyc);
    checks++;
    if (cyc != 5 + 1) begin
      failures++;
      $display("FAIL 5-word burst took %0d clocks", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
