// tb_precomp_stage: feeds a random data point and a random partial sum every
// cycle into one pre-computation block (m = 1.5: n = 1, r = 2, and a second
// instance with n = 2, r = 1, i.e. m = 3) and checks, exactly 4 cycles
// later, sum_out = sum_in + D^(-r/n) within 2^-10 relative, and that the data
// point and its flags come out unchanged.
module tb_precomp_stage;
  import fcm_pkg::*;
  import tb_fp_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int NT = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in, out_a, out_b;
  fp_t sum_in, sum_a, sum_b;
  logic [V_W-1:0] v;
  logic [A_W-1:0] alpha;
  pix_t sent [NT];
  real  exp_a [NT], exp_b [NT];
  int   t_in = 0;

  precomp_stage                  dut_a (.clk, .rst_n, .in, .sum_in, .v, .alpha, .out(out_a), .sum_out(sum_a));
  precomp_stage #(.N(2), .R(1))  dut_b (.clk, .rst_n, .in, .sum_in, .v, .alpha, .out(out_b), .sum_out(sum_b));

  always #5 clk = ~clk;

  initial begin
    real d;
    v = 16'(100 << 8) + 16'd77; alpha = 8'd24;
    in = '0; sum_in = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT + 3; k++) begin
      #1;
      if (k < NT) begin
        in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
        in.x = 8'($urandom); in.xbar = 11'($urandom);
        if (k == 5) begin in.x = 8'd100; in.xbar = 11'(100 * 8); end
        sum_in = (k % 3 == 0) ? FP_ZERO : real2fp(real'($urandom_range(1, 1000)) * 1e-6);
        d = ref_d(real'(in.x), real'(in.xbar) / 8.0, real'(v) / 256.0, real'(alpha) / 16.0);
        exp_a[k] = fp2real(sum_in) + ref_term(d, 1, 2);
        exp_b[k] = fp2real(sum_in) + ref_term(d, 2, 1);
        sent[k] = in;
      end else begin
        in = '0;
      end
      @(posedge clk);
      // the point presented 4 cycles ago (captured 3 edges ago) is at the outputs
      if (k >= 3) begin
        #1;
        checks += 3;
        if (relerr(fp2real(sum_a), exp_a[k-3]) > 2.0 ** -10) begin
          failures++; $display("FAIL a k=%0d got %g exp %g", k-3, fp2real(sum_a), exp_a[k-3]);
        end
        if (relerr(fp2real(sum_b), exp_b[k-3]) > 2.0 ** -10) begin
          failures++; $display("FAIL b k=%0d got %g exp %g", k-3, fp2real(sum_b), exp_b[k-3]);
        end
        if (out_a != sent[k-3] || out_b != sent[k-3]) failures++;
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
