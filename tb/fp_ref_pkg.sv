// fp_ref_pkg: reference binary32 arithmetic for the testbenches.
//
// The reference does not share any logic with the RTL: it widens binary32 to
// the simulator's 64-bit real, does the operation there, and rounds the real
// result back to binary32. A product of two binary32 values is exact in a
// double, and a double-rounded binary32 sum is always correctly rounded since
// 53 >= 2*24+2, so these results are the correctly rounded ones. The same
// conventions as the RTL apply: subnormal inputs read as zero, results below
// 2^-126 after rounding flush to a signed zero, NaN is 0x7fc00000.
package fp_ref_pkg;

  function automatic real f2d(logic [31:0] f);
    logic [63:0] d;
    logic [10:0] e;
    if (f[30:23] == 8'd0) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hff) begin
      d = {f[31], 11'h7ff, (f[22:0] != 0) ? 52'h8_0000_0000_0000 : 52'd0};
    end else begin
      e = 11'(f[30:23]) + 11'd896;   // -127 + 1023
      d = {f[31], e, f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] d2f(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] q;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {s, 8'hff, 23'd0};
    if (d[62:52] == 11'd0)   return {s, 31'd0};
    e = int'(d[62:52]) - 1023;
    m = {1'b1, d[51:0]};
    q = {1'b0, m[52:29]};
    if (m[28] && ((m[27:0] != 0) || m[29])) q = q + 25'd1;
    if (q[24]) begin
      q = q >> 1;
      e = e + 1;
    end
    if (e > 127)  return {s, 8'hff, 23'd0};
    if (e < -126) return {s, 31'd0};
    return {s, 8'(e + 127), q[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return d2f(f2d(a) * f2d(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return d2f(f2d(a) + f2d(b));
  endfunction

  function automatic logic [31:0] ref_i2f(logic [31:0] x);
    return d2f(real'($signed(x)));
  endfunction

  // Random binary32 with exponent field in [lo, hi].
  function automatic logic [31:0] rand_fp(int lo, int hi);
    logic [7:0] e;
    e = 8'(lo + int'($urandom % 32'(hi - lo + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // Random binary32 whose significand has only its top `bits` fraction bits
  // random: products and sums of such values often land exactly on a
  // rounding tie.
  function automatic logic [31:0] rand_fp_short(int lo, int hi, int bits);
    logic [31:0] r;
    r = rand_fp(lo, hi);
    r[22:0] = r[22:0] & ~(23'h7f_ffff >> bits);
    return r;
  endfunction

endpackage
