// fp_divider: divider unit of the centroid updating module,
//     v = num / ((1 + alpha) * den),
// where num and den are the unsigned fixed-point accumulator contents
// (ACCFRAC fraction bits) and v is an 8.8 centroid.
//
// Both accumulators are converted to fcm_pkg::fp_t, the denominator is
// multiplied by (1 + alpha), its reciprocal is taken by fp_inverse and
// multiplied by the numerator; the quotient is converted back to 8.8 fixed
// point and clipped to the gray-level range. den_zero flags an empty cluster
// (no membership mass), for which the quotient is meaningless.
//
// Interface: combinational. Inputs num, den, alpha (Q4.4); outputs v and
// den_zero.
//
// From the document: the divider fed by the two accumulators and, for FCM-S,
// the multiplier by (1 + alpha) on the denominator path. The document does not
// say how the divider works; doing it as reciprocal-and-multiply with the same
// table-based inverse unit used elsewhere is this design's choice.
module fp_divider
  import fcm_pkg::*;
(
  input  logic [ACC_W-1:0] num,
  input  logic [ACC_W-1:0] den,
  input  logic [A_W-1:0]   alpha,
  output logic [V_W-1:0]   v,
  output logic             den_zero
);

  fp_t fnum, fden, fscale, fden_s, finv, fq;
  logic [ACC_W-1:0] q;

  always_comb begin
    fnum   = fp_from_fix(num, ACCFRAC);
    fden   = fp_from_fix(den, ACCFRAC);
    fscale = fp_from_fix(ACC_W'(alpha) + (ACC_W'(1) << AFRAC), AFRAC);
    fden_s = fp_mul(fden, fscale);
  end

  fp_inverse u_inv (.y(fden_s), .inv(finv));

  always_comb begin
    fq = fp_mul(fnum, finv);
    q  = fp_to_fix(fq, VFRAC);
    den_zero = (den == '0);
    v  = (q > ACC_W'({V_W{1'b1}})) ? {V_W{1'b1}} : q[V_W-1:0];
  end

endmodule
