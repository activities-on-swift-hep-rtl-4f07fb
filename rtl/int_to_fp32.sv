// int_to_fp32: signed 32-bit integer to IEEE-754 binary32, combinational.
//
// The kernel's sample array (in1a) and gain array (in2a) are C ints that the
// algorithm casts to float before multiplying; this unit is that cast.
//
// How it works: the magnitude of x is taken (the most negative int is exact),
// shifted left by its leading-zero count so that its top bit is set, and its
// upper 24 bits are rounded to nearest even using the next bit as guard and
// the rest as sticky. The exponent is 127 + 31 - leading zeros, plus one if
// rounding carries out.
//
// Interface: x in; y = (float)x out, no clock, no latency.
// Round to nearest even is the C cast's behaviour; nothing here is a choice
// beyond doing it in one combinational step.
module int_to_fp32
  import varr_pkg::*;
(
  input  logic [31:0] x,
  output fp32_t       y
);

  logic        s;
  logic [31:0] mag, norm;
  logic [4:0]  lz;
  logic        lz_found;
  logic [24:0] mant_r;
  logic        round_up;
  logic [8:0]  exp_b;

  always_comb begin
    s   = x[31];
    mag = s ? (~x + 32'd1) : x;
    lz  = '0;
    lz_found = 1'b0;
    for (int k = 31; k >= 0; k--) begin
      if (!lz_found && mag[k]) begin
        lz       = 5'(31 - k);
        lz_found = 1'b1;
      end
    end
    norm     = mag << lz;
    round_up = norm[7] && ((|norm[6:0]) || norm[8]);
    mant_r   = {1'b0, norm[31:8]} + 25'(round_up);
    exp_b    = 9'd158 - 9'(lz);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_b  = exp_b + 9'd1;
    end
    if (mag == '0) y = 32'd0;
    else           y = {s, exp_b[7:0], mant_r[22:0]};
  end

endmodule
