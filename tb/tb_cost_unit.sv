// tb_cost_unit: two passes of random u^m and D for c = 2 and c = 4
// clusters; checks J(k) = sum_i sum_n u^m D after every point (relative
// 2^-12, the float products), that done pulses the cycle after the last
// point and that the first point of the second pass restarts the sum.
module tb_cost_unit;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  localparam int NT = 150;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in;
  fp_t um2 [2];
  fp_t d2  [2];
  fp_t um4 [4];
  fp_t d4  [4];
  logic [63:0] j2, j4;
  logic done2, done4;

  cost_unit            dut2 (.clk, .rst_n, .in, .um(um2), .d(d2), .j(j2), .done(done2));
  cost_unit #(.C(4))   dut4 (.clk, .rst_n, .in, .um(um4), .d(d4), .j(j4), .done(done4));

  always #5 clk = ~clk;

  initial begin
    real s2, s4;
    int done_at;
    in = '0;
    for (int i = 0; i < 4; i++) begin um4[i] = FP_ZERO; d4[i] = FP_ZERO; end
    um2 = '{FP_ZERO, FP_ZERO}; d2 = '{FP_ZERO, FP_ZERO};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      s2 = 0.0; s4 = 0.0; done_at = -1;
      for (int k = 0; k < NT + 1; k++) begin
        #1;
        if (k < NT) begin
          in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
          for (int i = 0; i < 4; i++) begin
            um4[i] = real2fp(real'($urandom_range(1, 1000)) / 1000.0);
            d4[i] = real2fp(real'($urandom_range(1, 6500000)) / 100.0);
            s4 += fp2real(um4[i]) * fp2real(d4[i]);
          end
          for (int i = 0; i < 2; i++) begin
            um2[i] = um4[i]; d2[i] = d4[i];
            s2 += fp2real(um2[i]) * fp2real(d2[i]);
          end
        end else begin
          in = '0;
        end
        @(posedge clk);
        #1;
        if (done2 && done4) done_at = k;
        if (k < NT) begin
          checks += 2;
          if (relerr(real'(j2) / 65536.0, s2) > 2.0 ** -12) begin
            failures++; $display("FAIL c=2 k=%0d J=%g exp %g", k, real'(j2) / 65536.0, s2);
          end
          if (relerr(real'(j4) / 65536.0, s4) > 2.0 ** -12) failures++;
        end
      end
      checks++;
      if (done_at != NT - 1) begin failures++; $display("FAIL done at %0d", done_at); end
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
