// tb_precomp_unit: streams random data points, one per cycle, through the
// pre-computation unit with its defaults (c = 2, m = 1.5) and with c = 3,
// and checks P_k = sum_j D_j^(-r/n) within 2^-9 relative, with the result
// and the data point leaving exactly 4c cycles after entry.
module tb_precomp_unit;
  import fcm_pkg::*;
  import tb_fp_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int NT = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in, out2, out3;
  fp_t p2, p3;
  logic [V_W-1:0] v2 [2];
  logic [V_W-1:0] v3 [3];
  logic [A_W-1:0] alpha;
  pix_t sent [NT];
  real  e2 [NT], e3 [NT];

  precomp_unit                 dut2 (.clk, .rst_n, .in, .v(v2), .alpha, .out(out2), .p(p2));
  precomp_unit #(.C(3), .N(2), .R(1)) dut3 (.clk, .rst_n, .in, .v(v3), .alpha, .out(out3), .p(p3));

  always #5 clk = ~clk;

  task automatic check(input int k);
    // dut2 latency 8 cycles, dut3 latency 12 cycles
    if (k - 7 >= 0 && k - 7 < NT) begin
      checks += 2;
      if (relerr(fp2real(p2), e2[k-7]) > 2.0 ** -9) begin
        failures++; $display("FAIL c=2 k=%0d got %g exp %g", k-7, fp2real(p2), e2[k-7]);
      end
      if (out2 != sent[k-7]) failures++;
    end
    if (k - 11 >= 0 && k - 11 < NT) begin
      checks += 2;
      if (relerr(fp2real(p3), e3[k-11]) > 2.0 ** -9) begin
        failures++; $display("FAIL c=3 k=%0d got %g exp %g", k-11, fp2real(p3), e3[k-11]);
      end
      if (out3 != sent[k-11]) failures++;
    end
  endtask

  initial begin
    real rv2 [2];
    real rv3 [3];
    real d, rx, rxb, ra;
    v2[0] = 16'h3a80; v2[1] = 16'hb4c0;
    v3[0] = 16'h2000; v3[1] = 16'h8010; v3[2] = 16'hd0ff;
    alpha = 8'd16;
    for (int i = 0; i < 2; i++) rv2[i] = real'(v2[i]) / 256.0;
    for (int i = 0; i < 3; i++) rv3[i] = real'(v3[i]) / 256.0;
    ra = 1.0;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT + 12; k++) begin
      #1;
      if (k < NT) begin
        in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
        in.x = 8'($urandom); in.xbar = 11'($urandom);
        rx = real'(in.x); rxb = real'(in.xbar) / 8.0;
        e2[k] = 0.0; e3[k] = 0.0;
        for (int i = 0; i < 2; i++) e2[k] += ref_term(ref_d(rx, rxb, rv2[i], ra), 1, 2);
        for (int i = 0; i < 3; i++) e3[k] += ref_term(ref_d(rx, rxb, rv3[i], ra), 2, 1);
        sent[k] = in;
      end else begin
        in = '0;
      end
      @(posedge clk);
      #1;
      check(k);
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
