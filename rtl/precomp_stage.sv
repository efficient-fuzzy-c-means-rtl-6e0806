// precomp_stage: the four pipeline stages of the pre-computation unit that
// belong to one cluster j. They add the term
//     (||x_k - v_j||^2 + alpha * ||xbar_k - v_j||^2)^(-r/n)
// to the running sum of the terms of clusters 1..j-1 that arrives with x_k.
//
//   stage 1  squared distance unit(s), multiplier by alpha and adder -> D
//   stage 2  n-th root circuit                                 -> D^(1/n)
//   stage 3  r-th exponent unit                                -> D^(r/n)
//   stage 4  inverse unit and accumulator adder         -> sum + D^(-r/n)
//
// The data point (x_k, xbar_k and its flags) and the partial sum travel
// alongside in registers, so a new data point can enter every clock cycle and
// the result for the point that entered at cycle t leaves at cycle t + 4.
// There is no stall: the pipeline advances every cycle and the valid flag of
// the data point marks real work.
//
// Interface: in/sum_in enter, out/sum_out leave four cycles later; v (8.8)
// and alpha (Q4.4) are held constant during a pass. Synchronous active-low
// reset clears the valid flags.
//
// From the document: the four stages and what each computes, the registers
// between them. This design's own: the float number format, valid/first/last
// flags, and reset behaviour.
module precomp_stage
  import fcm_pkg::*;
#(
  parameter int N = 1,   // n = a - b for m = a/b
  parameter int R = 2    // r = b
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            in,
  input  fp_t             sum_in,
  input  logic [V_W-1:0]  v,
  input  logic [A_W-1:0]  alpha,
  output pix_t            out,
  output fp_t             sum_out
);

  pix_t p1, p2, p3;
  fp_t  s1, s2, s3;
  fp_t  d0, d1_q, rt0, rt_q, pw0, pw_q, iv0;

  sq_dist_unit u_dist (.x(in.x), .xbar(in.xbar), .v(v), .alpha(alpha), .d(d0));
  nth_root #(.N(N)) u_root (.y(d1_q), .root(rt0));
  fp_power #(.P(R)) u_pow  (.y(rt_q), .pw(pw0));
  fp_inverse        u_inv  (.y(pw_q), .inv(iv0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1 <= '0; p2 <= '0; p3 <= '0; out <= '0;
    end else begin
      p1 <= in; p2 <= p1; p3 <= p2; out <= p3;
    end
    s1 <= sum_in;  s2 <= s1;  s3 <= s2;
    d1_q <= d0;
    rt_q <= rt0;
    pw_q <= pw0;
    sum_out <= fp_add(s3, iv0);
  end

endmodule
