// Single-precision (IEEE 754 binary32) adder, combinational.
//
// This is the "add block" of the vector-addition datapath: the kernel puts
// sixteen of them side by side so that a whole 512-bit beat is added per
// clock. The document only names the operation (float addition); the
// arithmetic below is this design's own: full IEEE behaviour with
// round-to-nearest-even, subnormal inputs and outputs, infinities and NaN
// (any NaN input gives the quiet NaN 0x7FC00000).
//
// How it works: operands are ordered by magnitude, the smaller significand
// is aligned right with three extra bits (guard, round, sticky), the two are
// added or subtracted, the result is normalised (left by the leading-zero
// count, limited so the exponent does not fall below the subnormal range, or
// right by one on carry) and rounded to nearest even.
//
// Interface: a, b in, y out, no clock. The caller registers the result.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic        swap;
  logic [9:0]  ea_eff, eb_eff;
  logic [9:0]  el, es, ediff;          // effective exponents (subnormal -> 1)
  logic [23:0] ml, ms;                 // significands with hidden bit
  logic [49:0] ms_wide;
  logic [26:0] al, as_;                // aligned, with guard/round/sticky
  logic [27:0] sum;
  logic [26:0] norm;
  logic [9:0]  e;
  logic [4:0]  lz;
  logic [9:0]  sh;
  logic [23:0] mant;
  logic [24:0] mrnd;
  logic        rnd_up;
  logic [9:0]  efin;
  logic [22:0] ffin;
  logic        is_zero;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    a_nan = (ea == 8'hFF) && (fa != 0);
    b_nan = (eb == 8'hFF) && (fb != 0);
    a_inf = (ea == 8'hFF) && (fa == 0);
    b_inf = (eb == 8'hFF) && (fb == 0);

    // order by magnitude: l is the larger operand
    swap = (b[30:0] > a[30:0]);
    sl   = swap ? sb : sa;
    ss   = swap ? sa : sb;
    ea_eff = (ea == 8'd0) ? 10'd1 : {2'b00, ea};
    eb_eff = (eb == 8'd0) ? 10'd1 : {2'b00, eb};
    el   = swap ? eb_eff : ea_eff;
    es   = swap ? ea_eff : eb_eff;
    ml   = swap ? {(eb != 0), fb} : {(ea != 0), fa};
    ms   = swap ? {(ea != 0), fa} : {(eb != 0), fb};
    ediff = el - es;

    // align the smaller significand, collecting shifted-out bits as sticky
    ms_wide = (ediff >= 10'd50) ? 50'd0 : ({ms, 26'd0} >> ediff);
    as_ = {ms_wide[49:24], (|ms_wide[23:0]) | ((ediff >= 10'd50) && (ms != 0))};
    al  = {ml, 3'b000};

    if (sl == ss) sum = {1'b0, al} + {1'b0, as_};
    else          sum = {1'b0, al} - {1'b0, as_};

    // normalise
    e  = el;
    lz = 5'd0;
    sh = 10'd0;
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      e    = el + 10'd1;
    end else begin
      lz = 5'd27;
      for (int i = 0; i < 27; i++) begin
        if (sum[i]) lz = 5'(26 - i);
      end
      sh   = (10'(lz) < (el - 10'd1)) ? 10'(lz) : (el - 10'd1);
      norm = sum[26:0] << sh;
      e    = el - sh;
    end
    is_zero = (sum == 28'd0);

    // round to nearest, ties to even
    mant   = norm[26:3];
    rnd_up = norm[2] & (norm[1] | norm[0] | mant[0]);
    mrnd   = {1'b0, mant} + {24'd0, rnd_up};
    if (mrnd[24]) begin
      efin = e + 10'd1;
      ffin = mrnd[23:1];
    end else begin
      efin = mrnd[23] ? e : 10'd0;
      ffin = mrnd[22:0];
    end

    // results, special cases first
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) y = QNAN;
    else if (a_inf)                                        y = a;
    else if (b_inf)                                        y = b;
    else if (is_zero)                                      y = {sa & sb, 31'd0};
    else if (efin >= 10'd255)                              y = {sl, 8'hFF, 23'd0};
    else                                                   y = {sl, efin[7:0], ffin};
  end

endmodule
