// tb_membership_unit: c = 3 clusters, m = 1.5. P_k is computed by the
// reference from the same data point, so the memberships of every point must
// satisfy sum_i u_i = 1 with u_i = (u_i^m)^(1/m); each u_i^m is also compared
// with the reference (2^-8 relative). Checks the 5-cycle latency and that all
// c outputs belong to the same point.
module tb_membership_unit;
  import fcm_pkg::*;
  import tb_fp_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int NT = 300, C = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in, out;
  fp_t p;
  fp_t um [C];
  fp_t d  [C];
  logic [V_W-1:0] v [C];
  logic [A_W-1:0] alpha;
  real eu [NT][C];
  pix_t sent [NT];

  membership_unit #(.C(C)) dut (.clk, .rst_n, .in, .p, .v, .alpha, .out, .um, .d);

  always #5 clk = ~clk;

  initial begin
    real rd [C];
    real rp, s;
    v[0] = 16'h1800; v[1] = 16'h7f80; v[2] = 16'hc8c0; alpha = 8'd8;
    in = '0; p = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT + 4; k++) begin
      #1;
      if (k < NT) begin
        in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
        in.x = 8'($urandom); in.xbar = 11'($urandom);
        rp = 0.0;
        for (int i = 0; i < C; i++) begin
          rd[i] = ref_d(real'(in.x), real'(in.xbar) / 8.0, real'(v[i]) / 256.0, real'(alpha) / 16.0);
          rp += ref_term(rd[i], 1, 2);
        end
        p = real2fp(rp);
        for (int i = 0; i < C; i++) eu[k][i] = ref_um(rd[i], fp2real(p), 1, 2);
        sent[k] = in;
      end else begin
        in = '0;
      end
      @(posedge clk);
      #1;
      if (k >= 4) begin
        s = 0.0;
        for (int i = 0; i < C; i++) begin
          s += fp2real(um[i]) ** (1.0 / 1.5);
          checks++;
          if (relerr(fp2real(um[i]), eu[k-4][i]) > 2.0 ** -8) begin
            failures++; $display("FAIL k=%0d i=%0d got %g exp %g x=%0d xb=%0d", k-4, i, fp2real(um[i]), eu[k-4][i], sent[k-4].x, sent[k-4].xbar);
          end
        end
        checks += 2;
        if (relerr(s, 1.0) > 2.0 ** -9) begin failures++; $display("FAIL sum u = %g", s); end
        if (out != sent[k-4]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
