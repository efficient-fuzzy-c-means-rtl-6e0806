// tb_membership_module: streams random data points with random P_k, one per
// cycle, through a membership module with m = 1.5 (n = 1, r = 2) and one
// with m = 2.5 (n = 3, r = 2) and checks, exactly 5 cycles after entry,
// u^m = (D^(1/n) P^(1/r))^-(n+r) within 2^-8 relative, D within 2^-14 and the
// data point unchanged.
module tb_membership_module;
  import fcm_pkg::*;
  import tb_fp_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int NT = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in, out_a, out_b;
  fp_t p, um_a, um_b, d_a, d_b;
  logic [V_W-1:0] v;
  logic [A_W-1:0] alpha;
  pix_t sent [NT];
  real  eu_a [NT], eu_b [NT], ed [NT];

  membership_module                 dut_a (.clk, .rst_n, .in, .p, .v, .alpha, .out(out_a), .um(um_a), .d(d_a));
  membership_module #(.N(3), .R(2)) dut_b (.clk, .rst_n, .in, .p, .v, .alpha, .out(out_b), .um(um_b), .d(d_b));

  always #5 clk = ~clk;

  initial begin
    real rp;
    v = 16'h5c40; alpha = 8'd40;
    in = '0; p = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT + 4; k++) begin
      #1;
      if (k < NT) begin
        in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
        in.x = 8'($urandom); in.xbar = 11'($urandom);
        p = real2fp(real'($urandom_range(1, 100000)) * 1e-7);
        rp = fp2real(p);
        ed[k] = ref_d(real'(in.x), real'(in.xbar) / 8.0, real'(v) / 256.0, real'(alpha) / 16.0);
        eu_a[k] = ref_um(ed[k], rp, 1, 2);
        eu_b[k] = ref_um(ed[k], rp, 3, 2);
        sent[k] = in;
      end else begin
        in = '0;
      end
      @(posedge clk);
      #1;
      if (k >= 4) begin
        checks += 4;
        if (relerr(fp2real(um_a), eu_a[k-4]) > 2.0 ** -8) begin
          failures++; $display("FAIL a k=%0d got %g exp %g", k-4, fp2real(um_a), eu_a[k-4]);
        end
        if (relerr(fp2real(um_b), eu_b[k-4]) > 2.0 ** -8) begin
          failures++; $display("FAIL b k=%0d got %g exp %g", k-4, fp2real(um_b), eu_b[k-4]);
        end
        if (relerr(fp2real(d_a), ed[k-4]) > 2.0 ** -14) failures++;
        if (out_a != sent[k-4] || out_b != sent[k-4]) failures++;
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
