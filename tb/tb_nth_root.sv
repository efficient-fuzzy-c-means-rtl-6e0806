// tb_nth_root: checks the table-based n-th root against double-precision
// pow() for the square root (default), the cube root and the wire case
// n = 1, over random mantissas and exponents of both signs, plus zero.
// Tolerance: relative error 2^-12 (the two-term Taylor series with q = 8
// has its worst case near Yl/Yh = 2^-7).
module tb_nth_root;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  fp_t y, r2, r3, r1;
  real worst2 = 0.0, worst3 = 0.0;

  nth_root           dut2 (.y(y), .root(r2));
  nth_root #(.N(3))  dut3 (.y(y), .root(r3));
  nth_root #(.N(1))  dut1 (.y(y), .root(r1));

  task automatic check(input real got, input real exp, input real tol, inout real worst);
    real e;
    e = relerr(got, exp);
    if (e > worst) worst = e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL y=%g got=%g exp=%g", fp2real(y), got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 4000; k++) begin
      y.zero = 1'b0;
      y.f = FW'($urandom);
      y.e = EW'(int'($urandom_range(0, 80)) - 40);
      if (k < 16) begin y.f = (k < 8) ? '0 : '1; y.e = EW'(k % 8 - 4); end
      #1;
      check(fp2real(r2), fp2real(y) ** 0.5, 2.0 ** -12, worst2);
      check(fp2real(r3), fp2real(y) ** (1.0 / 3.0), 2.0 ** -12, worst3);
      checks++;
      if (r1 != y) failures++;
    end
    y = FP_ZERO; #1;
    checks++;
    if (!r2.zero || !r3.zero) failures++;
    $display("worst relative error: sqrt %g, cbrt %g", worst2, worst3);
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
