// tb_fp_divider: checks v = num / ((1 + alpha) den) for accumulator contents
// of realistic size (den up to ~1e5 membership mass, num up to 270 times
// that) against double precision; tolerance 4 LSB of the 8.8 result (16-bit mantissas). Also
// checks clipping at 255.996 and the empty-cluster flag.
module tb_fp_divider;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  logic [ACC_W-1:0] num, den;
  logic [A_W-1:0] alpha;
  logic [V_W-1:0] v;
  logic den_zero;
  real rq, rden;

  fp_divider dut (.num, .den, .alpha, .v, .den_zero);

  initial begin
    for (int k = 0; k < 4000; k++) begin
      rden = real'($urandom_range(1, 1000000)) / 10.0;
      alpha = A_W'($urandom_range(0, 64));
      rq = real'($urandom_range(0, 65535)) / 256.0;
      den = ACC_W'(longint'(rden * (2.0 ** ACCFRAC)));
      num = ACC_W'(longint'(rq * (1.0 + real'(alpha) / 16.0) * rden * (2.0 ** ACCFRAC)));
      #1;
      checks++;
      if (den_zero || relerr(real'(v) / 256.0, rq) * rq > 4.0 / 256.0) begin
        failures++;
        if (failures < 10) $display("FAIL q=%g v=%g", rq, real'(v) / 256.0);
      end
    end
    num = 64'd1 << 40; den = 64'd1 << 20; alpha = 0; #1;
    checks++;
    if (v != 16'hffff) failures++;
    den = '0; #1;
    checks++;
    if (!den_zero) failures++;
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
