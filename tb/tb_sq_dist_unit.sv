// tb_sq_dist_unit: checks D = (x - v)^2 + alpha (xbar - v)^2 for random
// gray levels, 8.3 means, 8.8 centroids and Q4.4 alphas against a double
// precision reference (tolerance 2^-14 relative, the float mantissa), and the
// clamp of a zero distance to 2^-20.
module tb_sq_dist_unit;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  logic [PIX_W-1:0] x;
  logic [XB_W-1:0]  xbar;
  logic [V_W-1:0]   v;
  logic [A_W-1:0]   alpha;
  fp_t d;
  real rx, rxb, rv, ra, ref_d;

  sq_dist_unit dut (.x, .xbar, .v, .alpha, .d);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      x = PIX_W'($urandom); xbar = XB_W'($urandom); v = V_W'($urandom);
      alpha = A_W'($urandom);
      #1;
      rx = real'(x); rxb = real'(xbar) / 8.0; rv = real'(v) / 256.0; ra = real'(alpha) / 16.0;
      ref_d = (rx - rv) ** 2 + ra * (rxb - rv) ** 2;
      if (ref_d == 0.0) ref_d = 2.0 ** -20;
      checks++;
      if (relerr(fp2real(d), ref_d) > 2.0 ** -14) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d xbar=%g v=%g a=%g d=%g ref=%g", x, rxb, rv, ra, fp2real(d), ref_d);
      end
    end
    x = 8'd100; xbar = 11'd800; v = 16'd25600; alpha = 8'd16; #1;
    checks++;
    if (d.zero || int'(d.e) != -20 || d.f != '0) failures++;
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
