// tb_fcm_ref_pkg: double-precision reference of the FCM-S equations for the
// testbenches. D = (x - v)^2 + alpha (xbar - v)^2 (clamped to 2^-20 like the
// hardware), P = sum_j D_j^(-r/n), u^m = (D_i^(1/n) P^(1/r))^-(n+r).
package tb_fcm_ref_pkg;

  function automatic real ref_d(input real x, input real xbar, input real v, input real alpha);
    real d;
    d = (x - v) * (x - v) + alpha * (xbar - v) * (xbar - v);
    if (d < 2.0 ** -20) d = 2.0 ** -20;
    return d;
  endfunction

  function automatic real ref_term(input real d, input int n, input int r);
    return d ** (-real'(r) / real'(n));
  endfunction

  function automatic real ref_um(input real d, input real p, input int n, input int r);
    return ((d ** (1.0 / real'(n))) * (p ** (1.0 / real'(r)))) ** (-real'(n + r));
  endfunction

endpackage
