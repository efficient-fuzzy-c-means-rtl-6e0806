// precomp_unit: pre-computation unit. It computes, for every data point,
//     P_k = sum_{j=1..c} (||x_k - v_j||^2 + alpha * ||xbar_k - v_j||^2)^(-r/n)
// which is common to all c membership coefficients of x_k.
//
// It is a cascade of c precomp_stage blocks, one per cluster, forming a
// 4c-stage pipeline: the block for cluster j takes the partial sum over
// clusters 1..j-1 from the block before it and passes on the sum over 1..j.
// A data point can enter every cycle; its P_k leaves 4c cycles later together
// with the data point itself.
//
// Interface: in (data point), v[c] (8.8 centroids), alpha; out (data point,
// delayed 4c cycles) and p (P_k). Synchronous active-low reset.
//
// From the document: the cascade and its 4c-stage latency. The number format
// is this design's own.
module precomp_unit
  import fcm_pkg::*;
#(
  parameter int C = 2,
  parameter int N = 1,
  parameter int R = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            in,
  input  logic [V_W-1:0]  v [C],
  input  logic [A_W-1:0]  alpha,
  output pix_t            out,
  output fp_t             p
);

  pix_t pc [C+1];
  fp_t  sc [C+1];

  assign pc[0] = in;
  assign sc[0] = FP_ZERO;

  for (genvar j = 0; j < C; j++) begin : g_stage
    precomp_stage #(.N(N), .R(R)) u_stage (
      .clk, .rst_n,
      .in(pc[j]), .sum_in(sc[j]), .v(v[j]), .alpha,
      .out(pc[j+1]), .sum_out(sc[j+1])
    );
  end

  assign out = pc[C];
  assign p   = sc[C];

endmodule
