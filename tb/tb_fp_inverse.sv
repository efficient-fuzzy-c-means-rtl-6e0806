// tb_fp_inverse: checks the table-based reciprocal against 1/y in double
// precision over random floats (tolerance 2^-12 relative), exact powers of
// two, the 1024 mantissas just below 2, and the zero case (saturates to a huge value).
module tb_fp_inverse;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  fp_t y, inv;
  real worst = 0.0, e;

  fp_inverse dut (.y(y), .inv(inv));

  initial begin
    for (int k = 0; k < 4000; k++) begin
      y.zero = 1'b0;
      y.f = (k < 10) ? '0 : FW'($urandom);
      // mantissas just below 2, where the series undershoots 0.5
      if (k >= 10 && k < 1034) y.f = FW'((1 << FW) - (k - 9));
      y.e = EW'(int'($urandom_range(0, 100)) - 50);
      #1;
      e = relerr(fp2real(inv), 1.0 / fp2real(y));
      if (e > worst) worst = e;
      checks++;
      if (e > 2.0 ** -12) begin
        failures++;
        if (failures < 10) $display("FAIL y=%g inv=%g", fp2real(y), fp2real(inv));
      end
    end
    y = FP_ZERO; #1;
    checks++;
    if (inv.zero || int'(inv.e) != EMAX) failures++;
    $display("worst relative error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
