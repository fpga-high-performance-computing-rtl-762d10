// Self-checking testbench for fp32_add.
//
// Drives special cases (zeros of both signs, infinities, NaN, subnormals,
// overflow, exact cancellation, ties for rounding) and random operands drawn
// from several exponent ranges. The reference adds the operands in double
// precision (exact enough that one later rounding is correct) and rounds the
// double to single precision, ties to even, with a function of its own.
// NaN results are compared as "any NaN".
module tb_fp32_add;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  // Round a double to the nearest binary32, ties to even.
  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic        sg;
    int          ex, sft;
    logic [52:0] m;
    logic [63:0] q, rem, half;
    logic [31:0] bits;
    d  = $realtobits(r);
    sg = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {sg, 31'h7F80_0000};
    if (d[62:0] == 63'd0) return {sg, 31'd0};
    ex = int'(d[62:52]) - 1023;
    m  = {1'b1, d[51:0]};
    if (ex > 127) return {sg, 31'h7F80_0000};
    sft = (ex >= -126) ? 29 : 29 + (-126 - ex);
    if (sft > 60) return {sg, 31'd0};
    q    = 64'(m) >> sft;
    rem  = 64'(m) & ((64'd1 << sft) - 64'd1);
    half = 64'd1 << (sft - 1);
    if ((rem > half) || ((rem == half) && q[0])) q = q + 64'd1;
    if (ex >= -126) bits = 32'(ex + 126) * 32'h0080_0000 + 32'(q);
    else            bits = 32'(q);
    if (bits[30:23] == 8'hFF) bits[22:0] = 23'd0;
    if (bits > 32'h7F80_0000) bits = 32'h7F80_0000;
    return {sg, bits[30:0]};
  endfunction

  function automatic real from_single(input logic [31:0] x);
    logic [63:0] d;
    int e;
    if (x[30:23] == 8'hFF) return (x[22:0] != 0) ? 0.0 : (x[31] ? -1.0e300 * 1.0e300 : 1.0e300 * 1.0e300);
    if (x[30:23] == 8'd0) begin
      // subnormal: mantissa * 2^-149
      return (x[31] ? -1.0 : 1.0) * real'(x[22:0]) * (2.0 ** -149);
    end
    e = int'(x[30:23]) - 127 + 1023;
    d = {x[31], 11'(e), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z);
    logic xn, zn;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    if (xn || zn) return 32'h7FC0_0000;
    if ((x[30:0] == 31'h7F80_0000) && (z[30:0] == 31'h7F80_0000))
      return (x[31] != z[31]) ? 32'h7FC0_0000 : x;
    if (x[30:0] == 31'h7F80_0000) return x;
    if (z[30:0] == 31'h7F80_0000) return z;
    if ((x[30:0] == 0) && (z[30:0] == 0)) return {x[31] & z[31], 31'd0};
    if ((x[30:0] == z[30:0]) && (x[31] != z[31])) return 32'd0;
    return to_single(from_single(x) + from_single(z));
  endfunction

  function automatic logic is_nan(input logic [31:0] v);
    return (v[30:23] == 8'hFF) && (v[22:0] != 0);
  endfunction

  function automatic logic [31:0] rnd_operand();
    logic [31:0] r;
    r = $urandom;
    case ($urandom_range(0, 4))
      0: r[30:23] = 8'(127 + $urandom_range(0, 8) - 4);    // close exponents
      1: r[30:23] = 8'($urandom_range(0, 3));              // subnormal region
      2: r[30:23] = 8'($urandom_range(250, 254));          // near overflow
      default: ;                                           // anything
    endcase
    return r;
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = ref_add(x, z);
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y !== exp_y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h: got %h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed cases
    check(32'h3F80_0000, 32'h4000_0000);   // 1 + 2
    check(32'h3F99_999A, 32'h4099_999A);   // 1.2 + 4.8
    check(32'h0000_0000, 32'h8000_0000);   // +0 + -0
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h3F80_0000, 32'hBF80_0000);   // exact cancellation
    check(32'h7F80_0000, 32'h3F80_0000);   // inf + 1
    check(32'h7F80_0000, 32'hFF80_0000);   // inf - inf
    check(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    check(32'h0000_0001, 32'h0000_0001);   // subnormals
    check(32'h007F_FFFF, 32'h0000_0001);   // subnormal to normal
    check(32'h0080_0000, 32'h8000_0001);   // normal to subnormal
    check(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1: tie, round to even
    check(32'h4B80_0001, 32'h3F80_0000);   // tie, round up to even
    check(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24
    check(32'h3F80_0000, 32'hB380_0000);   // 1 - 2^-24
    check(32'h3F80_0000, 32'h0000_0001);   // huge exponent difference
    for (int i = 0; i < 200000; i++) check(rnd_operand(), rnd_operand());
    // same-magnitude pairs with opposite signs and small differences
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x;
      x = rnd_operand();
      check(x, {~x[31], x[30:0]} + 32'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
