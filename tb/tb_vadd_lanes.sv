// Self-checking testbench for vadd_lanes.
//
// Sends 2000 beat pairs through the 16-lane adder with random valid and
// ready patterns on all three streams. Each lane carries floats that hold
// whole numbers below 2^21 in magnitude, so every sum is exact and the
// expected result is the integer sum converted to a float by the testbench.
// Checks every output lane, the order of the beats, and that with all
// handshakes held high the unit accepts one beat per clock.
module tb_vadd_lanes;
  import hpc_pkg::*;

  localparam int NB = 2000;

  logic clk = 0, rst = 1;
  logic a_valid, a_ready, b_valid, b_ready, y_valid, y_ready;
  beat_t a_data, b_data, y_data;
  int checks = 0, failures = 0;
  beat_t a_mem [NB], b_mem [NB], e_mem [NB];
  int ai = 0, bi = 0, yi = 0;
  bit full_rate = 0;

  vadd_lanes dut (.*);

  always #5 clk = ~clk;

  // exact conversion of an integer with magnitude below 2^24 to binary32
  function automatic logic [31:0] i2f(input int n);
    logic [31:0] m;
    int e;
    if (n == 0) return 32'd0;
    m = (n < 0) ? 32'(-n) : 32'(n);
    e = 0;
    for (int i = 0; i < 32; i++) if (m[i]) e = i;
    return {(n < 0), 8'(127 + e), 23'((m << (23 - e)) & 32'h007F_FFFF)};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NB; k++)
      for (int l = 0; l < LANES; l++) begin
        int x, z;
        x = $urandom_range(0, 2097151) - 1048576;
        z = $urandom_range(0, 2097151) - 1048576;
        a_mem[k][l] = i2f(x);
        b_mem[k][l] = i2f(z);
        e_mem[k][l] = i2f(x + z);
      end
  end

  // drivers: change only after the clock edge, hold data until taken
  always @(negedge clk) begin
    if (!rst) begin
      a_valid <= (ai < NB) && (full_rate || $urandom_range(0, 3) != 0);
      b_valid <= (bi < NB) && (full_rate || $urandom_range(0, 3) != 0);
      y_ready <= full_rate || ($urandom_range(0, 3) != 0);
    end
  end
  assign a_data = a_mem[ai % NB];
  assign b_data = b_mem[bi % NB];

  int fr_cycles = 0, fr_beats = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (a_valid && a_ready) ai <= ai + 1;
      if (b_valid && b_ready) bi <= bi + 1;
      if (full_rate && ai < NB) begin
        fr_cycles <= fr_cycles + 1;
        if (a_valid && a_ready) fr_beats <= fr_beats + 1;
      end
      if (y_valid && y_ready) begin
        checks++;
        if (y_data !== e_mem[yi]) begin
          failures++;
          if (failures < 10) $display("FAIL beat %0d: %h expected %h", yi, y_data, e_mem[yi]);
        end
        yi <= yi + 1;
      end
    end
  end

  initial begin
    a_valid = 0; b_valid = 0; y_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (ai >= NB / 2);
    full_rate = 1;
    wait (yi == NB);
    repeat (2) @(posedge clk);
    checks++;
    // after the first cycle of full rate every clock takes a beat
    if (fr_beats + 2 < fr_cycles) begin
      failures++;
      $display("FAIL rate: %0d beats in %0d cycles", fr_beats, fr_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
