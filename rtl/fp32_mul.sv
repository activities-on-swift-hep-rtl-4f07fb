// fp32_mul: IEEE-754 binary32 multiplier, combinational.
//
// The kernel's inner loop multiplies a float weight by two integer samples
// converted to float, one rounded multiply at a time, exactly as the C source
// of the algorithm evaluates it. This unit does one such multiply.
//
// How it works: the two 24-bit significands (hidden one restored) are
// multiplied into a 48-bit product in [2^46, 2^48). The top 24 bits after a
// one-place normalisation form the result significand; the next bit is the
// guard bit and the rest fold into a sticky bit for round-to-nearest-even.
// The exponent is checked after rounding.
//
// Interface: a, b in; y = a*b out, no clock, no latency.
//
// Choices of this design (the algorithm only says "float"): round to
// nearest even; subnormal inputs are read as zero and results below the
// smallest normal are flushed to a zero of the right sign (as FPGA float cores
// usually do); any NaN result is the quiet NaN 0x7fc00000; 0 * inf is NaN.
module fp32_mul
  import varr_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (fa == '0);
    b_inf  = (eb == 8'hff) && (fb == '0);
    a_nan  = (ea == 8'hff) && (fa != '0);
    b_nan  = (eb == 8'hff) && (fb != '0);

    prod = {1'b1, fa} * {1'b1, fb};
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd126;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      exp_s  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP32_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hff, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (exp_s >= 11'sd255) begin
      y = {sy, 8'hff, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
