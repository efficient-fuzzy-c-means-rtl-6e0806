// fp_inverse: reciprocal of a positive float by one table, one subtractor and
// one multiplier.
//
// With the same split of the mantissa as the n-th root unit, Y = Yh + Yl,
//     1/Y = 1/(Yh (1 + Yl/Yh)) ~= (Yh - Yl) / Yh^2,
// so a table of 1/Yh^2 (2^(q-1) entries, computed during elaboration), a
// subtractor and a multiplier give the mantissa of the result; the exponent
// is negated. The product lies in (0.5, 1], or a hair below 0.5 for Y close
// to 2 where the series undershoots, and is renormalised.
//
// Interface: combinational, y in, inv out (fcm_pkg::fp_t). The reciprocal of
// zero saturates to the largest float.
//
// The document says only that the inverse unit is "based on tables,
// multipliers and adders" (after its reference [14]); the first-order Taylor
// form above, the table precision and the zero handling are this design's own.
module fp_inverse
  import fcm_pkg::*;
(
  input  fp_t y,
  output fp_t inv
);

  localparam int FRAC = FW + 3;
  localparam int HB   = Q - 1;
  localparam int LB   = FW - HB;
  typedef logic [(1 << HB)-1:0][FRAC:0] th_t;

  function automatic th_t build_th();
    th_t t;
    real yh;
    for (int h = 0; h < (1 << HB); h++) begin
      yh = 1.0 + real'(h) / real'(1 << HB);
      t[h] = (FRAC + 1)'($rtoi(2.0 ** FRAC / (yh * yh) + 0.5));
    end
    return t;
  endfunction

  localparam th_t TH = build_th();
  localparam int RW  = 2 * (FRAC + 1);
  localparam int ONE = 2 * FRAC;

  logic [HB-1:0]  yh_idx;
  logic [FRAC:0]  yh_fix, yl_fix, sub;
  logic [RW-1:0]  r;

  always_comb begin
    yh_idx = y.f[FW-1 -: HB];
    yh_fix = (FRAC + 1)'({1'b1, yh_idx}) << (FRAC - HB);
    yl_fix = (FRAC + 1)'(y.f[LB-1:0]) << (FRAC - FW);
    sub    = yh_fix - yl_fix;
    r      = RW'(sub) * RW'(TH[yh_idx]);
    if (y.zero) begin
      inv = fp_pack(EMAX + 1, '1);
    end else if (r[ONE]) begin
      inv = fp_pack(-int'(y.e), r[ONE-1 -: FW]);
    end else if (r[ONE-1]) begin
      inv = fp_pack(-int'(y.e) - 1, r[ONE-2 -: FW]);
    end else begin
      // the first-order series falls just short of 0.5 for Y close to 2
      inv = fp_pack(-int'(y.e) - 2, r[ONE-3 -: FW]);
    end
  end

endmodule
