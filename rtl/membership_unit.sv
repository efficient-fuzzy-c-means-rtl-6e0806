// membership_unit: membership coefficients updating unit. c identical
// membership_module pipelines, one per cluster, share the data point and P_k
// and compute u_{1,k}^m .. u_{c,k}^m in parallel, five cycles after x_k and
// P_k are presented.
//
// Interface: in and p from the pre-computation unit, v[c], alpha; out (data
// point), um[c] and d[c] five cycles later. Synchronous active-low reset.
//
// From the document: c parallel modules and the 5-cycle latency.
module membership_unit
  import fcm_pkg::*;
#(
  parameter int C = 2,
  parameter int N = 1,
  parameter int R = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            in,
  input  fp_t             p,
  input  logic [V_W-1:0]  v [C],
  input  logic [A_W-1:0]  alpha,
  output pix_t            out,
  output fp_t             um [C],
  output fp_t             d  [C]
);

  pix_t po [C];

  for (genvar i = 0; i < C; i++) begin : g_mod
    membership_module #(.N(N), .R(R)) u_mod (
      .clk, .rst_n, .in, .p, .v(v[i]), .alpha,
      .out(po[i]), .um(um[i]), .d(d[i])
    );
  end

  // all modules carry the same data point; module 0's copy is used
  assign out = po[0];

endmodule
