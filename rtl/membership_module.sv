// membership_module: the 5-stage pipeline that computes the weighted
// membership u_{i,k}^m of data point x_k in cluster i from P_k:
//     u_{i,k}^m = ( D^(1/n) * P_k^(1/r) )^-(n+r),
//     D = ||x_k - v_i||^2 + alpha * ||xbar_k - v_i||^2.
//
//   stage 1  squared distance unit(s), alpha multiplier, adder -> D; P_k held
//   stage 2  r-th root of P_k and n-th root of D (in parallel)
//   stage 3  multiplier
//   stage 4  (n+r)-th exponent unit
//   stage 5  inverse unit -> u^m
//
// D also travels down the pipeline and leaves with u^m, since the cost
// function unit needs both. Results for the point that entered at cycle t
// leave at cycle t + 5; a new point can enter every cycle, no stall.
//
// Interface: in/p enter together; out (data point), um (u^m) and d (D) leave
// five cycles later. v and alpha are constant during a pass. Synchronous
// active-low reset clears the valid flags.
//
// From the document: stage contents and the 5-cycle latency. The number
// format and flags are this design's own.
module membership_module
  import fcm_pkg::*;
#(
  parameter int N = 1,
  parameter int R = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            in,
  input  fp_t             p,
  input  logic [V_W-1:0]  v,
  input  logic [A_W-1:0]  alpha,
  output pix_t            out,
  output fp_t             um,
  output fp_t             d
);

  pix_t q1, q2, q3, q4;
  fp_t  d0, d_1, d_2, d_3, d_4;
  fp_t  p_1, pr0, dr0, pr_2, dr_2, m0, m_3, pw0, pw_4, iv0;

  sq_dist_unit u_dist (.x(in.x), .xbar(in.xbar), .v(v), .alpha(alpha), .d(d0));
  nth_root #(.N(R)) u_rroot (.y(p_1), .root(pr0));
  nth_root #(.N(N)) u_nroot (.y(d_1), .root(dr0));
  fp_power #(.P(N + R)) u_pow (.y(m_3), .pw(pw0));
  fp_inverse u_inv (.y(pw_4), .inv(iv0));

  assign m0 = fp_mul(pr_2, dr_2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; q3 <= '0; q4 <= '0; out <= '0;
    end else begin
      q1 <= in; q2 <= q1; q3 <= q2; q4 <= q3; out <= q4;
    end
    d_1 <= d0;  d_2 <= d_1;  d_3 <= d_2;  d_4 <= d_3;  d <= d_4;
    p_1 <= p;
    pr_2 <= pr0;
    dr_2 <= dr0;
    m_3 <= m0;
    pw_4 <= pw0;
    um <= iv0;
  end

endmodule
