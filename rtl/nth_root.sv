// nth_root: n-th root of a non-negative float by two small tables, one
// subtractor and two multipliers.
//
// The mantissa Y = 1.y1..y(2q-1) is split into a high part Yh = 1.y1..y(q-1)
// and a low part Yl = 0.0..0 y(q)..y(2q-1), and the root is approximated by
// the first two terms of a Taylor series:
//     Y^(1/n) ~= Y * (Yh - (n-1)/n * Yl) / Yh^((2n-1)/n)
// Table TL holds (n-1)/n * Yl, table TH holds 1 / Yh^((2n-1)/n). Both tables
// are computed during elaboration from these formulas. The "alignment" step
// splits the exponent e into n*e' + rho with 0 <= rho < n; the factor
// 2^(rho/n) is folded into TH, which is therefore indexed by {rho, Yh}. The
// result is renormalised to [1, 2) and its exponent is e'.
//
// Interface: combinational, y in, root out, both fcm_pkg::fp_t. With N = 1
// the unit is a wire (the degenerate root the document's m = 1.5 case needs
// for n). Zero maps to zero.
//
// From the document: the Yh/Yl split, equation (19) and the table/subtractor/
// multiplier structure of its n-th root figure. This design's own choices:
// the float exponent handling (the document only shows an "alignment" box),
// y(q) counted in Yl so that Y = Yh + Yl holds exactly, the table precision
// (FW + 3 fraction bits), truncation everywhere, and no pipeline register
// inside (the enclosing pipeline stage registers the result).
module nth_root
  import fcm_pkg::*;
#(
  parameter int N = 2
) (
  input  fp_t y,
  output fp_t root
);

  localparam int FRAC = FW + 3;          // fraction bits of table entries
  localparam int HB   = Q - 1;           // index bits of Yh (fraction part)
  localparam int LB   = FW - HB;         // bits of Yl (= q)
  localparam int RB   = (N > 1) ? $clog2(N) : 1;

  typedef logic [(1 << LB)-1:0][FRAC:0]      tl_t;
  typedef logic [N*(1 << HB)-1:0][FRAC:0]    th_t;

  function automatic tl_t build_tl();
    tl_t t;
    real val;
    for (int i = 0; i < (1 << LB); i++) begin
      val = real'(N - 1) / real'(N) * real'(i) * (2.0 ** (FRAC - FW));
      t[i] = (FRAC + 1)'($rtoi(val + 0.5));
    end
    return t;
  endfunction

  function automatic th_t build_th();
    th_t t;
    real yh, val;
    for (int rho = 0; rho < N; rho++) begin
      for (int h = 0; h < (1 << HB); h++) begin
        yh = 1.0 + real'(h) / real'(1 << HB);
        val = (2.0 ** (real'(rho) / real'(N))) /
            (yh ** (real'(2 * N - 1) / real'(N))) * (2.0 ** FRAC);
        t[rho * (1 << HB) + h] = (FRAC + 1)'($rtoi(val + 0.5));
      end
    end
    return t;
  endfunction

  localparam tl_t TL = build_tl();
  localparam th_t TH = build_th();


  if (N == 1) begin : g_wire
    assign root = y;
  end else begin : g_root
    localparam int PW = MW + FRAC + 1;     // Y * S
    localparam int RW = PW + FRAC + 1;     // Y * S * TH
    localparam int ONE = FW + 2 * FRAC;    // weight of 1.0 in R

    logic [HB-1:0]   yh_idx;
    logic [LB-1:0]   yl;
    int              rho, eq;
    logic [RB-1:0]   rho_b;
    logic [FRAC:0]   yh_fix, sub, tl_v, th_v;
    logic [PW-1:0]   p1;
    logic [RW-1:0]   r;

    always_comb begin
      // alignment
      yh_idx = y.f[FW-1 -: HB];
      yl     = y.f[LB-1:0];
      rho    = ((int'(y.e) % N) + N) % N;
      eq     = (int'(y.e) - rho) / N;
      rho_b  = RB'(rho);
      // tables and subtractor
      tl_v   = TL[yl];
      th_v   = TH[int'(rho_b) * (1 << HB) + int'(yh_idx)];
      yh_fix = (FRAC + 1)'({1'b1, yh_idx}) << (FRAC - HB);
      sub    = yh_fix - tl_v;
      // two multipliers
      p1     = PW'({1'b1, y.f}) * PW'(sub);
      r      = RW'(p1) * RW'(th_v);
      // renormalise to [1, 2)
      if (y.zero) begin
        root = FP_ZERO;
      end else if (r[ONE+1]) begin
        root = fp_pack(eq + 1, r[ONE -: FW]);
      end else if (r[ONE]) begin
        root = fp_pack(eq, r[ONE-1 -: FW]);
      end else begin
        root = fp_pack(eq - 1, r[ONE-2 -: FW]);
      end
    end
  end

endmodule
