// fcm_pkg: number formats and arithmetic shared by the FCM-S datapath.
//
// The membership pipeline works on quantities with a very wide dynamic range
// (squared distances up to 2^17, their negative fractional powers down to
// 2^-40), so the datapath carries them in a small unsigned floating-point
// format, fp_t: value = 1.f * 2^e, with a separate zero flag. The mantissa
// 1.f has 2q bits (q = Q below), which is the operand width the n-th root
// circuit is defined for. The functions here are the plain combinational
// building blocks used by the pipeline stages: float multiply, float add
// (both operands non-negative), conversion from and to unsigned fixed point.
// Results are truncated, exponent overflow saturates and underflow flushes to
// zero. Pixel values, centroids and the neighbourhood mean are fixed point.
// The float format, the fixed-point widths and the rounding are this design's
// own choices; the document gives none of them.
//
// Lint notes: a block that uses only part of the package (for instance the
// n-th root unit checked on its own) leaves some of these parameters unused;
// fp_add reads only the exponent and fraction of its sorted copies (the zero
// flags were handled before), and fp_from_fix drops the leading one and the
// bits below the mantissa after normalising. None of this is logic lost.
package fcm_pkg;

  // q of the n-th root circuit: the mantissa 1.f has 2q bits.
  parameter int Q  = 8;
  parameter int FW = 2 * Q - 1;   // stored fraction bits
  parameter int MW = 2 * Q;       // mantissa width with the hidden one
  parameter int EW = 8;           // signed exponent width

  parameter int PIX_W  = 8;       // gray level 0..255
  parameter int VFRAC  = 8;       // fraction bits of a centroid
  parameter int V_W    = PIX_W + VFRAC;
  parameter int XBFRAC = 3;       // fraction bits of the mean of 8 neighbours
  parameter int XB_W   = PIX_W + XBFRAC;
  parameter int AFRAC  = 4;       // alpha is unsigned Q4.4
  parameter int A_W    = 8;
  parameter int DFRAC  = 2 * VFRAC + AFRAC;  // fraction bits of the distance
  parameter int ACCFRAC = 24;     // fraction bits of the accumulators
  parameter int ACC_W  = 64;

  localparam int EMAX = (1 <<< (EW - 1)) - 1;
  localparam int EMIN = -(1 <<< (EW - 1));

  typedef struct packed {
    logic                 zero;
    logic signed [EW-1:0] e;
    logic [FW-1:0]        f;
  } fp_t;

  // One data point travelling down the pipelines.
  typedef struct packed {
    logic              valid;
    logic              first;   // first pixel of a pass
    logic              last;    // last pixel of a pass
    logic [PIX_W-1:0]  x;       // x_k
    logic [XB_W-1:0]   xbar;    // mean of the neighbours, 8.3 fixed point
  } pix_t;

  localparam fp_t FP_ZERO = '{zero: 1'b1, e: '0, f: '0};

  // Pack exponent and fraction, saturating or flushing the exponent.
  function automatic fp_t fp_pack(input int e, input logic [FW-1:0] f);
    fp_t r;
    if (e > EMAX) begin
      r = '{zero: 1'b0, e: EW'(EMAX), f: '1};
    end else if (e < EMIN) begin
      r = FP_ZERO;
    end else begin
      r = '{zero: 1'b0, e: EW'(e), f: f};
    end
    return r;
  endfunction

  function automatic fp_t fp_mul(input fp_t a, input fp_t b);
    logic [2*MW-1:0] p;
    int e;
    if (a.zero || b.zero) return FP_ZERO;
    p = {1'b1, a.f} * {1'b1, b.f};
    e = int'(a.e) + int'(b.e);
    if (p[2*MW-1]) return fp_pack(e + 1, p[2*MW-2 -: FW]);
    return fp_pack(e, p[2*MW-3 -: FW]);
  endfunction

  // Sum of two non-negative floats; the smaller operand is aligned by a right
  // shift and its shifted-out bits are dropped.
  function automatic fp_t fp_add(input fp_t a, input fp_t b);
    fp_t hi, lo;
    logic [MW:0] s;
    logic [MW-1:0] ms;
    int d;
    if (a.zero) return b;
    if (b.zero) return a;
    if (a.e > b.e || (a.e == b.e && a.f >= b.f)) begin
      hi = a; lo = b;
    end else begin
      hi = b; lo = a;
    end
    d = int'(hi.e) - int'(lo.e);
    ms = (d >= MW) ? '0 : ({1'b1, lo.f} >> d);
    s = {1'b0, 1'b1, hi.f} + {1'b0, ms};
    if (s[MW]) return fp_pack(int'(hi.e) + 1, s[MW-1:1]);
    return fp_pack(int'(hi.e), s[MW-2:0]);
  endfunction

  // Unsigned fixed point (frac fraction bits) to float: leading-one search.
  function automatic fp_t fp_from_fix(input logic [ACC_W-1:0] v, input int frac);
    int lead;
    logic [ACC_W-1:0] n;
    if (v == '0) return FP_ZERO;
    lead = 0;
    for (int i = 0; i < ACC_W; i++) if (v[i]) lead = i;
    n = v << (ACC_W - 1 - lead);
    return fp_pack(lead - frac, n[ACC_W-2 -: FW]);
  endfunction

  // Float to unsigned fixed point with frac fraction bits, saturating.
  function automatic logic [ACC_W-1:0] fp_to_fix(input fp_t a, input int frac);
    logic [ACC_W-1:0] m;
    int sh;
    if (a.zero) return '0;
    m = ACC_W'({1'b1, a.f});
    sh = int'(a.e) - FW + frac;
    if (sh >= ACC_W - MW) return '1;
    if (sh >= 0) return m << sh;
    if (-sh >= ACC_W) return '0;
    return m >> (-sh);
  endfunction

endpackage
