// tb_fp_power: checks y^2 (default) and y^3 from the multiplier chain against
// double precision (tolerance 2^-13 relative per multiply), and P = 1.
module tb_fp_power;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  fp_t y, p2, p3, p1;

  fp_power          dut2 (.y(y), .pw(p2));
  fp_power #(.P(3)) dut3 (.y(y), .pw(p3));
  fp_power #(.P(1)) dut1 (.y(y), .pw(p1));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      y.zero = 1'b0;
      y.f = FW'($urandom);
      y.e = EW'(int'($urandom_range(0, 40)) - 20);
      #1;
      checks += 3;
      if (relerr(fp2real(p2), fp2real(y) ** 2) > 2.0 ** -13) failures++;
      if (relerr(fp2real(p3), fp2real(y) ** 3) > 2.0 ** -12) failures++;
      if (p1 != y) failures++;
    end
    // overflow saturates instead of wrapping
    y.zero = 1'b0; y.f = '1; y.e = EW'(EMAX - 1); #1;
    checks++;
    if (p2.zero || int'(p2.e) != EMAX) failures++;
    y = FP_ZERO; #1;
    checks++;
    if (!p3.zero) failures++;
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
