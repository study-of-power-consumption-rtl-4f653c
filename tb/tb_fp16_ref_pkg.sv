// tb_fp16_ref_pkg: reference arithmetic for the testbenches.
//
// Works on real numbers rather than on the bit-level steps of the RTL:
// an operand is turned into its value, the operation is done exactly in
// double precision (every 16-bit value and every product or aligned sum of
// two of them is exact there) and the result is turned back into the
// 16-bit format by truncating the magnitude to 11 fraction bits. Values
// below 2^-6 become zero and values of 2^8 and above become infinity.
// The adder reference first drops the bits the smaller operand loses when it
// is aligned, as the hardware does, and then adds exactly.
package tb_fp16_ref_pkg;
  import fp16_pkg::*;

  function automatic real pow2(int n);
    real r;
    r = 1.0;
    for (int i = 0; i < n; i++)  r = r * 2.0;
    for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp_val(fp16_t a);
    real m;
    if (a.exp == EXP_ZERO) return 0.0;
    m = (2048.0 + real'(a.man)) / 2048.0;
    m = m * pow2(int'(a.exp) - 7);
    return a.sign ? -m : m;
  endfunction

  function automatic fp16_t fp_from_real(real r);
    fp16_t y;
    real   mag;
    int    e;
    y = '0;
    if (r == 0.0) return y;
    y.sign = (r < 0.0);
    mag = y.sign ? -r : r;
    e = 0;
    while (mag >= 2.0) begin mag = mag / 2.0; e++; end
    while (mag <  1.0) begin mag = mag * 2.0; e--; end
    if (e + 7 <= 0) return '0;
    if (e + 7 >= 15) begin
      y.exp = EXP_INF;
      return y;
    end
    y.exp = 4'(e + 7);
    y.man = 11'($rtoi((mag - 1.0) * 2048.0));
    return y;
  endfunction

  function automatic fp16_t ref_mul(fp16_t a, fp16_t b);
    fp16_t y;
    if (a.exp == EXP_INF || b.exp == EXP_INF) begin
      y = '0; y.sign = a.sign ^ b.sign; y.exp = EXP_INF; return y;
    end
    if (a.exp == EXP_ZERO || b.exp == EXP_ZERO) begin
      y = '0; y.sign = a.sign ^ b.sign; return y;
    end
    y = fp_from_real(fp_val(a) * fp_val(b));
    // an underflowed product keeps its sign; zero from the rules above too
    y.sign = a.sign ^ b.sign;
    return y;
  endfunction

  function automatic fp16_t ref_add(fp16_t a, fp16_t b);
    fp16_t y;
    int    ea, eb, emax;
    real   sa, sb;
    if (a.exp == EXP_INF || b.exp == EXP_INF) begin
      y = '0; y.exp = EXP_INF;
      y.sign = (a.exp == EXP_INF) ? a.sign : b.sign;
      return y;
    end
    ea = int'(a.exp); eb = int'(b.exp);
    emax = (ea > eb) ? ea : eb;
    // significands in units of 2^-11, truncated to the larger exponent
    sa = (a.exp == EXP_ZERO) ? 0.0 : 2048.0 + real'(a.man);
    sb = (b.exp == EXP_ZERO) ? 0.0 : 2048.0 + real'(b.man);
    sa = $floor(sa / pow2(emax - ea));
    sb = $floor(sb / pow2(emax - eb));
    if (a.sign) sa = -sa;
    if (b.sign) sb = -sb;
    return fp_from_real((sa + sb) / 2048.0 * pow2(emax - 7));
  endfunction

  // Random operand: mostly normal values, sometimes zero or infinity.
  function automatic fp16_t rand_fp(int special_pct);
    fp16_t y;
    y = fp16_t'($urandom);
    if (int'($urandom_range(99)) < special_pct)
      y.exp = $urandom_range(1) != 0 ? EXP_ZERO : EXP_INF;
    else
      y.exp = 4'($urandom_range(14, 1));
    if (y.exp == EXP_ZERO || y.exp == EXP_INF) y.man = '0;
    return y;
  endfunction

  // Random operand with a narrow exponent range, for sums that stay normal.
  function automatic fp16_t rand_fp_range(int lo, int hi);
    fp16_t y;
    y = fp16_t'($urandom);
    y.exp = 4'($urandom_range(hi, lo));
    return y;
  endfunction

endpackage
