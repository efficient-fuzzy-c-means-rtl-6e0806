// sq_dist_unit: the generalised squared distance of FCM-S,
//     D = ||x - v||^2 + alpha * ||xbar - v||^2,
// returned as a float for the root, power and inverse units that follow.
//
// Both squares are exact in fixed point: x is an 8-bit gray level, xbar the
// 8.3 mean of the neighbours, v an 8.8 centroid and alpha unsigned Q4.4, so D
// has 2*8 + 4 fraction bits. The sum is then converted to fcm_pkg::fp_t
// (leading-one search and shift). A distance of exactly zero is replaced by
// one LSB (2^-20) so that its negative powers stay finite.
//
// Interface: combinational. Inputs x, xbar, v, alpha; outputs d (float).
// Scalar (gray-level) data points, as in all of the document's experiments.
//
// From the document: the two squared distance units, the multiplier by alpha
// and the adder of the first pipeline stage of its FCM-S figures. The
// fixed-point widths and the zero clamp are this design's own choices.
module sq_dist_unit
  import fcm_pkg::*;
(
  input  logic [PIX_W-1:0] x,
  input  logic [XB_W-1:0]  xbar,
  input  logic [V_W-1:0]   v,
  input  logic [A_W-1:0]   alpha,
  output fp_t              d
);

  logic signed [V_W+1:0]  dx, dxb;   // 9.8 signed differences
  logic [2*V_W+1:0]       sx, sxb;   // squares, 16 fraction bits
  logic [ACC_W-1:0]       dsum;      // DFRAC fraction bits

  always_comb begin
    dx   = $signed({2'b00, x, {VFRAC{1'b0}}}) - $signed({2'b00, v});
    dxb  = $signed({2'b00, xbar, {(VFRAC-XBFRAC){1'b0}}}) - $signed({2'b00, v});
    sx   = (2*V_W+2)'(dx * dx);
    sxb  = (2*V_W+2)'(dxb * dxb);
    dsum = (ACC_W'(sx) << AFRAC) + ACC_W'(sxb) * ACC_W'(alpha);
    if (dsum == '0) dsum = ACC_W'(1);
    d = fp_from_fix(dsum, DFRAC);
  end

endmodule
