// fp32_add: IEEE-754 binary32 adder, combinational.
//
// Used for the two running sums of the kernel (sumA and sumT), which add one
// rounded product per sample in sample order, as the C loop does.
//
// How it works: the operands are ordered so that |big| >= |small|. The small
// significand is shifted right by the exponent difference into a 27-bit field
// (24 significand bits plus guard, round and sticky), with every bit shifted
// out ORed into the sticky bit. The two are added or subtracted, the result is
// renormalised (one place right on a carry, or left by its leading-zero
// count) and rounded to nearest even. Three extra bits are enough: a left
// shift of more than one place only happens when the exponents differ by at
// most one, and then no bit has been lost to the sticky bit.
//
// Interface: a, b in; y = a+b out, no clock, no latency.
//
// Choices of this design (the algorithm only says "float"): round to
// nearest even; subnormal inputs are read as zero and results below the
// smallest normal flush to zero; x + (-x) is +0, (-0) + (-0) is -0; any NaN
// result is 0x7fc00000; inf + (-inf) is NaN.
module fp32_add
  import varr_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, s_big, s_small;
  logic [7:0]  ea, eb, e_big, e_small, diff;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [26:0] m_big, m_small, m_shift;
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        lz_found;
  logic signed [10:0] exp_s;
  logic [24:0] mant_r;
  logic        round_up;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (fa == '0);
    b_inf  = (eb == 8'hff) && (fb == '0);
    a_nan  = (ea == 8'hff) && (fa != '0);
    b_nan  = (eb == 8'hff) && (fb != '0);

    // Order by magnitude.
    if ({ea, fa} >= {eb, fb}) begin
      s_big = sa; e_big = ea; m_big = {1'b1, fa, 3'b000};
      s_small = sb; e_small = eb; m_small = {1'b1, fb, 3'b000};
    end else begin
      s_big = sb; e_big = eb; m_big = {1'b1, fb, 3'b000};
      s_small = sa; e_small = ea; m_small = {1'b1, fa, 3'b000};
    end
    diff = e_big - e_small;
    sticky   = 1'b0;
    lz_found = 1'b0;

    // Align with sticky.
    if (diff >= 8'd27) begin
      m_shift = {26'd0, 1'b1};
    end else begin
      m_shift = m_small >> diff;
      sticky  = |(m_small & ~({27{1'b1}} << diff));
      m_shift[0] = m_shift[0] | sticky;
    end

    if (s_big == s_small) sum = {1'b0, m_big} + {1'b0, m_shift};
    else                  sum = {1'b0, m_big} - {1'b0, m_shift};

    exp_s = 11'(signed'({3'b0, e_big}));
    norm  = '0;
    lz    = '0;
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = sum[1] | sum[0];
      exp_s = exp_s + 11'sd1;
    end else begin
      for (int k = 26; k >= 0; k--) begin
        if (!lz_found && sum[k]) begin
          lz       = 5'(26 - k);
          lz_found = 1'b1;
        end
      end
      norm  = sum[26:0] << lz;
      exp_s = exp_s - 11'(signed'({6'd0, lz}));
    end

    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP32_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hff, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hff, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if (sum == '0) begin
      y = 32'd0;
    end else if (exp_s >= 11'sd255) begin
      y = {s_big, 8'hff, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {s_big, 31'd0};
    end else begin
      y = {s_big, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
