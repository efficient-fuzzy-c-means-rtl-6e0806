// centroid_module: incremental centroid of one cluster i,
//     v_i(k) = sum_{n<=k} u_{i,n}^m (x_n + alpha xbar_n)
//              / ((1 + alpha) sum_{n<=k} u_{i,n}^m),
// so no membership matrix has to be stored: two accumulators hold the running
// numerator and denominator, and a divider turns them into the centroid.
//
// Each valid data point adds u^m (x + alpha xbar) to the numerator and u^m
// to the denominator accumulator (both unsigned fixed point with ACCFRAC
// fraction bits). The first data point of a pass overwrites instead of adding,
// which clears the accumulators without a separate cycle. The divider reads
// the accumulator registers, so its output is v_i(k-1) while x_k is being
// added, and a register after it holds v_i(k-2). done pulses in the cycle in
// which v holds the final v_i(t) of the pass, two cycles after the last data
// point arrived; den_zero tells that the cluster received no membership.
//
// Interface: in (data point with valid/first/last), um (u_{i,k}^m), alpha;
// outputs v (8.8), den_zero, done. Synchronous active-low reset.
//
// From the document: the multiplier, the two adder/register accumulators,
// the multiplier by (1 + alpha), the divider and the output register. The
// fixed-point accumulator format and the first/last handling are this
// design's own.
module centroid_module
  import fcm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  pix_t            in,
  input  fp_t             um,
  input  logic [A_W-1:0]  alpha,
  output logic [V_W-1:0]  v,
  output logic            den_zero,
  output logic            done
);

  localparam int XSFRAC = AFRAC + XBFRAC;   // fraction bits of x + alpha xbar

  logic [ACC_W-1:0] acc_num, acc_den, t_num, t_den;
  logic [ACC_W-1:0] xs;
  logic [V_W-1:0]   q;
  logic             q_zero, last_d;

  always_comb begin
    xs    = (ACC_W'(in.x) << XSFRAC) + ACC_W'(in.xbar) * ACC_W'(alpha);
    t_num = fp_to_fix(fp_mul(um, fp_from_fix(xs, XSFRAC)), ACCFRAC);
    t_den = fp_to_fix(um, ACCFRAC);
  end

  fp_divider u_div (.num(acc_num), .den(acc_den), .alpha, .v(q), .den_zero(q_zero));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_num  <= '0;
      acc_den  <= '0;
      v        <= '0;
      den_zero <= 1'b1;
      last_d   <= 1'b0;
      done     <= 1'b0;
    end else begin
      if (in.valid) begin
        acc_num <= in.first ? t_num : acc_num + t_num;
        acc_den <= in.first ? t_den : acc_den + t_den;
      end
      v        <= q;
      den_zero <= q_zero;
      last_d   <= in.valid && in.last;
      done     <= last_d;
    end
  end

endmodule
