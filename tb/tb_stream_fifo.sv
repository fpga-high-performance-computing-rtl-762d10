// Self-checking testbench for stream_fifo.
//
// Pushes and pops at random rates (including simultaneous push and pop, a
// full FIFO and an empty one) and compares every popped item, in order,
// with a queue kept by the testbench. Also checks that in_ready falls
// exactly when DEPTH items are held and that the FIFO fills to DEPTH.
module tb_stream_fifo;

  localparam int W = 32;
  localparam int D = 8;

  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int full_seen = 0;

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int phase;
      phase = (cyc / 500) % 3;             // fill-biased, drain-biased, balanced
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5));
      in_data   = $urandom;
      out_ready = ($urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 8 : 5));
      #1;
      checks++;
      if (in_ready !== (model.size() < D)) begin
        failures++;
        $display("FAIL in_ready=%0d with %0d held", in_ready, model.size());
      end
      if (model.size() == D) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (model.size() == 0 || out_data !== model[0]) begin
          failures++;
          if (failures < 10) $display("FAIL pop %h", out_data);
        end
        if (model.size() != 0) void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL the FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
