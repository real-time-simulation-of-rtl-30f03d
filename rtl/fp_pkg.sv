// fp_pkg: IEEE-754 binary64 helpers shared by the solver datapath.
//
// The model runs entirely in double precision. This package holds the
// word type, a few exact operations that need no arithmetic unit (sign flip,
// multiply by a power of two, ordered comparison) and the conversion of a
// double into a saturated fixed-point code for the analog outputs.
// Subnormal numbers are treated as zero everywhere in this design; NaN is
// not expected in the model and is not handled specially.
package fp_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;

  function automatic logic fp_is_zero(fp64_t a);
    return a[62:52] == 11'd0;
  endfunction

  function automatic fp64_t fp_neg(fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  // Multiply by coef in {-2,-1,0,1,2}: sign flip and exponent increment,
  // exact for normal numbers below the overflow limit.
  function automatic fp64_t fp_scale2(fp64_t a, logic signed [2:0] coef);
    fp64_t r;
    if (coef == 3'sd0 || fp_is_zero(a)) return FP_ZERO;
    r = a;
    if (coef < 0) r[63] = ~a[63];
    if (coef == 3'sd2 || coef == -3'sd2) r[62:52] = a[62:52] + 11'd1;
    return r;
  endfunction

  // Small integer constant as a double (used for the coefficient tables).
  function automatic fp64_t fp_const(logic signed [2:0] coef);
    return fp_scale2(FP_ONE, coef);
  endfunction

  // Ordered key: larger double -> larger unsigned key; both zeros map to
  // the same key.
  function automatic logic [63:0] fp_key(fp64_t a);
    if (fp_is_zero(a)) return 64'h8000_0000_0000_0000;
    if (a[63]) return ~a;
    return {1'b1, a[62:0]};
  endfunction

  function automatic logic fp_ge(fp64_t a, fp64_t b);
    return fp_key(a) >= fp_key(b);
  endfunction

  function automatic logic fp_le(fp64_t a, fp64_t b);
    return fp_key(a) <= fp_key(b);
  endfunction

  // Round a double times 2^shift to the nearest integer (ties away from
  // zero) and saturate to a signed 16-bit code.
  function automatic logic signed [15:0] fp_to_fix16(fp64_t a, logic signed [7:0] shift);
    logic signed [12:0] e;
    logic [52:0] man;
    logic [69:0] mag;   // integer part (16 bits + headroom) and rounding bit
    logic [16:0] ival;
    logic signed [16:0] res;
    if (fp_is_zero(a)) return 16'sd0;
    e   = $signed({2'b00, a[62:52]}) - 13'sd1023 + 13'(shift);
    man = {1'b1, a[51:0]};
    // value = man * 2^(e-52); keep one fraction bit for rounding
    if (e >= 13'sd16) return a[63] ? -16'sd32768 : 16'sd32767;
    if (e < -13'sd2) return 16'sd0;
    mag  = {17'd0, man} >> (13'sd51 - e);   // integer*2 + round bit
    ival = mag[17:1] + {16'd0, mag[0]};
    if (!a[63]) begin
      if (ival > 17'd32767) return 16'sd32767;
      res = $signed(ival);
    end else begin
      if (ival > 17'd32768) return -16'sd32768;
      res = -$signed(ival);
    end
    return res[15:0];
  endfunction

endpackage
