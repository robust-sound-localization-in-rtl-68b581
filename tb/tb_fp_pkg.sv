// tb_fp_pkg: reference conversions between real numbers and the 32-bit word
// format (sign, 6-bit exponent with bias 31, 25-bit mantissa with a hidden
// one), written independently of the RTL for use by the testbenches.
package tb_fp_pkg;
  import tdoa_pkg::*;

  function automatic real fp_to_real(input fp_t f);
    real m;
    if (f.exp == 0) return 0.0;
    m = 1.0 + real'(f.man) / real'(1 << 25);
    m = m * $pow(2.0, real'(int'(f.exp) - 31));
    return f.sign ? -m : m;
  endfunction

  function automatic fp_t real_to_fp(input real r);
    fp_t f;
    real a;
    int  e;
    f = '0;
    if (r == 0.0) return f;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e + 31 <= 0 || e + 31 >= 64) return f;
    f.sign = (r < 0.0);
    f.exp  = 6'(e + 31);
    f.man  = 25'($rtoi((a - 1.0) * real'(1 << 25)));
    return f;
  endfunction

  // random real with magnitude 2**lo .. 2**hi and random sign
  function automatic real rand_real(input int lo, input int hi);
    real m;
    int  e;
    m = 1.0 + real'($urandom_range(0, 1 << 24)) / real'(1 << 24);
    e = $urandom_range(0, hi - lo) + lo;
    m = m * $pow(2.0, real'(e));
    return ($urandom_range(0, 1) == 1) ? -m : m;
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction
endpackage
