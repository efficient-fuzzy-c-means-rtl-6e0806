// tb_centroid_module: three passes of random (x, xbar, u^m) through one
// centroid module with different alphas. Checks the final centroid
// sum u^m (x + alpha xbar) / ((1 + alpha) sum u^m) against double precision
// (4 LSB of 8.8), that done pulses exactly two cycles after the last point,
// that v tracks v(k-2) while the pass runs, that the first point of a pass
// clears the accumulators, and the empty-cluster flag when all u^m are zero.
module tb_centroid_module;
  import fcm_pkg::*;
  import tb_fp_pkg::*;

  localparam int NT = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in;
  fp_t um;
  logic [A_W-1:0] alpha;
  logic [V_W-1:0] v;
  logic den_zero, done;
  real num_s [NT+1];
  real den_s [NT+1];

  centroid_module dut (.clk, .rst_n, .in, .um, .alpha, .v, .den_zero, .done);

  always #5 clk = ~clk;

  function automatic real vref(input int k, input real ra);
    return num_s[k] / ((1.0 + ra) * den_s[k]);
  endfunction

  initial begin
    real ra, u;
    int done_seen;
    in = '0; um = FP_ZERO; alpha = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      #1;
      alpha = (pass == 0) ? 8'd0 : 8'($urandom_range(1, 40));
      ra = real'(alpha) / 16.0;
      num_s[0] = 0.0; den_s[0] = 0.0;
      done_seen = -1;
      for (int k = 0; k < NT + 3; k++) begin
        if (k < NT) begin
          in.valid = ($urandom_range(0, 7) != 0) || k == 0 || k == NT - 1;
          in.first = (k == 0); in.last = (k == NT - 1);
          in.x = 8'($urandom); in.xbar = 11'($urandom);
          um = (pass == 3) ? FP_ZERO : real2fp(real'($urandom_range(1, 1000)) / 1000.0);
          u = fp2real(um);
          num_s[k+1] = num_s[k] + (in.valid ? u * (real'(in.x) + ra * real'(in.xbar) / 8.0) : 0.0);
          den_s[k+1] = den_s[k] + (in.valid ? u : 0.0);
        end else begin
          in = '0;
        end
        @(posedge clk);
        #1;
        if (done) done_seen = k;
        // v(k-2): after point k was accumulated, v shows the quotient of the
        // sums over points 0..k-1, i.e. the centroid two points back
        if (pass < 3 && k >= 3 && k < NT && (k % 17) == 0) begin
          checks++;
          if (relerr(real'(v) / 256.0, vref(k, ra)) * vref(k, ra) > 4.0 / 256.0) begin
            failures++; $display("FAIL running k=%0d v=%g exp %g", k, real'(v) / 256.0, vref(k, ra));
          end
        end
      end
      checks += 2;
      if (done_seen != NT) begin failures++; $display("FAIL done at %0d", done_seen); end
      if (pass < 3) begin
        if (relerr(real'(v) / 256.0, vref(NT, ra)) * vref(NT, ra) > 4.0 / 256.0 || den_zero) begin
          failures++; $display("FAIL pass %0d v=%g exp %g", pass, real'(v) / 256.0, vref(NT, ra));
        end
      end else if (!den_zero) begin
        failures++; $display("FAIL empty cluster not flagged");
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
