// tb_fuzzy_clustering_unit: runs FCM-S passes (c = 2, m = 1.5) over a stream
// of 400 synthetic data points drawn around two gray levels, and after each
// pass compares the new centroids and the cost J with a double-precision
// FCM-S pass computed from the same points and the centroids the unit used
// (centroids within 0.1 gray level, J within 0.5 %). Also checks the pass
// latency (pass_done 4c + 7 cycles after the last point entered), busy, the
// centroid write port, back-to-back points, and that a cluster that gets no
// membership keeps its centroid.
module tb_fuzzy_clustering_unit;
  import fcm_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int C = 2, NT = 400, LAT = 4 * C + 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pix_t in;
  logic [A_W-1:0] alpha;
  logic v_wr;
  logic [0:0] v_wr_idx;
  logic [V_W-1:0] v_wr_data;
  logic [V_W-1:0] v [C];
  logic [63:0] j;
  logic pass_done, busy;
  logic [7:0]  px [NT];
  logic [10:0] pxb [NT];

  fuzzy_clustering_unit dut (.clk, .rst_n, .in, .alpha, .v_wr, .v_wr_idx, .v_wr_data,
                             .v, .j, .pass_done, .busy);

  always #5 clk = ~clk;

  task automatic run_pass(input bit degenerate);
    real rv [C];
    real num [C];
    real den [C];
    real d [C];
    real rj, p, um, ra, rx, rxb, vexp;
    int done_at;
    ra = real'(alpha) / 16.0;
    for (int i = 0; i < C; i++) begin rv[i] = real'(v[i]) / 256.0; num[i] = 0.0; den[i] = 0.0; end
    rj = 0.0;
    for (int k = 0; k < NT; k++) begin
      if (degenerate) begin px[k] = v[0][15:8]; pxb[k] = {v[0][15:8], 3'b000}; end
      rx = real'(px[k]); rxb = real'(pxb[k]) / 8.0;
      p = 0.0;
      for (int i = 0; i < C; i++) begin d[i] = ref_d(rx, rxb, rv[i], ra); p += ref_term(d[i], 1, 2); end
      for (int i = 0; i < C; i++) begin
        um = ref_um(d[i], p, 1, 2);
        num[i] += um * (rx + ra * rxb); den[i] += um; rj += um * d[i];
      end
    end
    done_at = -1;
    for (int k = 0; k < NT + LAT + 2; k++) begin
      #1;
      if (k < NT) begin
        in.valid = 1'b1; in.first = (k == 0); in.last = (k == NT - 1);
        in.x = px[k]; in.xbar = pxb[k];
      end else begin
        in = '0;
      end
      @(posedge clk);
      #1;
      if (pass_done) done_at = k;
      if (k == NT + 2) begin checks++; if (!busy) begin failures++; $display("FAIL busy low"); end end
    end
    checks += 2;
    if (done_at != NT - 1 + LAT) begin failures++; $display("FAIL pass_done at %0d", done_at); end
    if (busy) begin failures++; $display("FAIL busy stuck"); end
    for (int i = 0; i < C; i++) begin
      vexp = (degenerate && i == 1) ? rv[1] : num[i] / ((1.0 + ra) * den[i]);
      checks++;
      if (real'(v[i]) / 256.0 - vexp > 0.1 || vexp - real'(v[i]) / 256.0 > 0.1) begin
        failures++; $display("FAIL v%0d = %g exp %g", i, real'(v[i]) / 256.0, vexp);
      end
    end
    checks++;
    if (!degenerate && (real'(j) / 65536.0 - rj > 0.005 * rj || rj - real'(j) / 65536.0 > 0.005 * rj)) begin
      failures++; $display("FAIL J = %g exp %g", real'(j) / 65536.0, rj);
    end
    $display("pass: v = %g %g  J = %g (ref %g)", real'(v[0]) / 256.0, real'(v[1]) / 256.0, real'(j) / 65536.0, rj);
  endtask

  initial begin
    int g;
    in = '0; alpha = 8'd16; v_wr = 0; v_wr_idx = '0; v_wr_data = '0;
    for (int k = 0; k < NT; k++) begin
      g = (k % 3 == 0) ? 70 : 180;
      px[k] = 8'(g + int'($urandom_range(0, 60)) - 30);
      pxb[k] = 11'((g + int'($urandom_range(0, 20)) - 10) * 8 + int'($urandom_range(0, 7)));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write initial centroids through the write port
    #1; v_wr = 1; v_wr_idx = 0; v_wr_data = 16'h2800; @(posedge clk);
    #1; v_wr_idx = 1; v_wr_data = 16'hf000; @(posedge clk);
    #1; v_wr = 0;
    checks++;
    if (v[0] != 16'h2800 || v[1] != 16'hf000) failures++;
    for (int it = 0; it < 4; it++) run_pass(1'b0);
    alpha = 8'd40;
    run_pass(1'b0);
    alpha = 8'd0;
    run_pass(1'b0);
    // all points exactly on centroid 0: cluster 1 gets no membership mass
    run_pass(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
