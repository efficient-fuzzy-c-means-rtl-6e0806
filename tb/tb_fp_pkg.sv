// tb_fp_pkg: conversions between fcm_pkg::fp_t and real for testbenches, and
// a relative-error check helper. Reference values in the testbenches are
// computed in double precision with these.
package tb_fp_pkg;
  import fcm_pkg::*;

  function automatic real fp2real(input fp_t a);
    real m;
    int e;
    if (a.zero) return 0.0;
    m = 1.0 + real'(a.f) / real'(1 << FW);
    e = int'(a.e);
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return m;
  endfunction

  function automatic fp_t real2fp(input real r);
    int e;
    real m;
    fp_t a;
    if (r <= 0.0) return FP_ZERO;
    e = 0; m = r;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0) begin m = m * 2.0; e--; end
    a.zero = 1'b0;
    a.e = EW'(e);
    a.f = FW'($rtoi((m - 1.0) * real'(1 << FW)));
    return a;
  endfunction

  function automatic real relerr(input real got, input real exp);
    real d;
    d = got - exp;
    if (d < 0.0) d = -d;
    if (exp == 0.0) return d;
    return d / (exp < 0.0 ? -exp : exp);
  endfunction
endpackage
