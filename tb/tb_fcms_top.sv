// tb_fcms_top: end-to-end test of the accelerator at its default size
// (320x320 image, c = 2, m = 1.5), driven like the processor and DMA engine
// of the target system would drive it: a bus master writes the initial
// centroids and alpha, then for every pass streams all pixels into DATA,
// polls STATUS until the pass is done, reads J and clears the flag, and
// repeats until J changes by less than 0.1 %. The second pass is chained
// into the third without waiting, as a DMA engine with chained transfers
// would do, so that DATA writes stall on the end of an image. The image is synthetic: a
// bright disc (190) on a dark background (70) with i.i.d. uniform noise in
// [-b, b], b = 40.
//
// Every pass is checked against a double-precision FCM-S pass computed here
// from the image, an independent 3x3 border-replicating neighbour mean and
// the centroids the hardware used (centroids within 0.1 gray level, J within
// 0.5 %). After convergence, alpha is set to 0 and two more passes run as
// plain FCM, checked the same way. Finally every pixel is classified by its
// nearest centroid under the FCM-S distance and the segmentation error rate
// against the disc mask is reported and required to be below 5 %.
//
// Mechanisms counted (each must occur): DATA writes stalled by the mean
// unit's end-of-image flush, stalled by the end-of-pass drain, completed
// passes, convergence, centroid writes, passes with alpha = 0.
module tb_fcms_top;
  import fcm_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int W = 320, H = 320, NP = W * H, C = 2, B_NOISE = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic avs_waitrequest;

  fcms_top dut (.clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
                .avs_readdata, .avs_waitrequest);

  always #5 clk = ~clk;

  logic [7:0] img [NP];
  bit         truth [NP];
  real        xbar [NP];
  int n_stall_flush = 0, n_stall_busy = 0, n_pass = 0, n_conv = 0, n_cwr = 0, n_fcm = 0;

  // stall classification, sampled at the clock edge
  always @(posedge clk) begin
    if (avs_write && avs_waitrequest && avs_address == 4'd0) begin
      if (dut.mu_ready) n_stall_busy++;
      else n_stall_flush++;
    end
  end

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1; avs_read = 0;
    #1;
    while (avs_waitrequest) begin @(negedge clk); #1; end
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_write = 0; avs_read = 1;
    #1;
    d = avs_readdata;
  endtask

  task automatic idle();
    @(negedge clk);
    avs_write = 0; avs_read = 0;
  endtask

  function automatic real rabs(input real a);
    return a < 0.0 ? -a : a;
  endfunction

  // one FCM-S pass in double precision from centroids rv, alpha ra
  task automatic ref_pass(input real rv [C], input real ra, output real nv [C], output real rj);
    real num [C];
    real den [C];
    real d [C];
    real p, um;
    for (int i = 0; i < C; i++) begin num[i] = 0.0; den[i] = 0.0; end
    rj = 0.0;
    for (int k = 0; k < NP; k++) begin
      p = 0.0;
      for (int i = 0; i < C; i++) begin
        d[i] = ref_d(real'(img[k]), xbar[k], rv[i], ra);
        p += ref_term(d[i], 1, 2);
      end
      for (int i = 0; i < C; i++) begin
        um = ref_um(d[i], p, 1, 2);
        num[i] += um * (real'(img[k]) + ra * xbar[k]);
        den[i] += um;
        rj += um * d[i];
      end
    end
    for (int i = 0; i < C; i++) nv[i] = num[i] / ((1.0 + ra) * den[i]);
  endtask

  // chain_in: pixel 0 of this pass was already written by the previous pass.
  // chain_out: write pixel 0 of the next pass right after the last pixel,
  // before waiting for the end of this pass (DMA with chained transfers).
  task automatic hw_pass(input real ra, input bit chain_in, input bit chain_out, output real rj_hw);
    logic [31:0] st, jl, jh, cv;
    real rv [C];
    real nv [C];
    real rj;
    for (int i = 0; i < C; i++) begin rd(4'(8 + i), cv); rv[i] = real'(cv[15:0]) / 256.0; end
    ref_pass(rv, ra, nv, rj);
    for (int k = chain_in ? 1 : 0; k < NP; k++) wr(4'd0, 32'(img[k]));
    if (chain_out) wr(4'd0, 32'(img[0]));
    idle();
    st = '0;
    while (!st[0]) rd(4'd1, st);
    rd(4'd3, jl); rd(4'd4, jh);
    wr(4'd1, 32'd1);
    idle();
    rj_hw = real'({jh, jl}) / 65536.0;
    n_pass++;
    if (ra == 0.0) n_fcm++;
    checks++;
    if (rabs(rj_hw - rj) > 0.005 * rj) begin failures++; $display("FAIL J %g exp %g", rj_hw, rj); end
    for (int i = 0; i < C; i++) begin
      rd(4'(8 + i), cv);
      checks++;
      if (rabs(real'(cv[15:0]) / 256.0 - nv[i]) > 0.1) begin
        failures++; $display("FAIL v%0d %g exp %g", i, real'(cv[15:0]) / 256.0, nv[i]);
      end
    end
    $display("pass %0d alpha %g: J = %g (ref %g)  v = %g %g (ref %g %g)", n_pass, ra, rj_hw, rj,
             rv[0], rv[1], nv[0], nv[1]);
  endtask

  initial begin
    int r, c, rr, cc, s, v, err, cls;
    logic [31:0] cv, st;
    real jprev, jcur, rv [C], d0, d1;
    // synthetic image: disc of radius 100 at the centre
    for (int k = 0; k < NP; k++) begin
      r = k / W; c = k % W;
      truth[k] = ((r - H / 2) * (r - H / 2) + (c - W / 2) * (c - W / 2)) < 100 * 100;
      v = (truth[k] ? 190 : 70) + int'($urandom_range(0, 2 * B_NOISE)) - B_NOISE;
      img[k] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
    end
    for (int k = 0; k < NP; k++) begin
      r = k / W; c = k % W; s = 0;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++)
          if (dr != 0 || dc != 0) begin
            rr = (r + dr < 0) ? 0 : (r + dr >= H) ? H - 1 : r + dr;
            cc = (c + dc < 0) ? 0 : (c + dc >= W) ? W - 1 : c + dc;
            s += int'(img[rr * W + cc]);
          end
      xbar[k] = real'(s) / 8.0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // software setup: initial centroids and alpha = 1.0
    wr(4'd8, 32'h0000_1000); n_cwr++;
    wr(4'd9, 32'h0000_f000); n_cwr++;
    wr(4'd2, 32'd16);
    idle();
    rd(4'd8, cv);
    checks++;
    if (cv[15:0] != 16'h1000) failures++;
    jprev = 0.0;
    for (int it = 0; it < 12; it++) begin
      hw_pass(1.0, it == 2, it == 1, jcur);
      if (it > 0 && rabs(jcur - jprev) < 0.001 * jcur) begin n_conv++; break; end
      jprev = jcur;
    end
    // segmentation result of FCM-S
    for (int i = 0; i < C; i++) begin rd(4'(8 + i), cv); rv[i] = real'(cv[15:0]) / 256.0; end
    err = 0;
    for (int k = 0; k < NP; k++) begin
      d0 = ref_d(real'(img[k]), xbar[k], rv[0], 1.0);
      d1 = ref_d(real'(img[k]), xbar[k], rv[1], 1.0);
      cls = ((d1 < d0) == (rv[1] > rv[0])) ? 1 : 0;
      if (cls != int'(truth[k])) err++;
    end
    $display("FCM-S segmentation error rate (b = %0d): %g", B_NOISE, real'(err) / real'(NP));
    checks++;
    if (real'(err) / real'(NP) > 0.05) failures++;
    // mode switch: alpha = 0 is the original FCM
    wr(4'd2, 32'd0);
    idle();
    for (int it = 0; it < 2; it++) hw_pass(0.0, 1'b0, 1'b0, jcur);
    rd(4'd5, st);
    checks++;
    if (st != 32'(n_pass)) begin failures++; $display("FAIL PASSES register %0d", st); end
    $display("mechanisms: flush stalls %0d, drain stalls %0d, passes %0d, converged %0d, centroid writes %0d, FCM passes %0d",
             n_stall_flush, n_stall_busy, n_pass, n_conv, n_cwr, n_fcm);
    checks += 6;
    if (n_stall_flush == 0) failures++;
    if (n_stall_busy == 0) failures++;
    if (n_pass == 0) failures++;
    if (n_conv == 0) failures++;
    if (n_cwr == 0) failures++;
    if (n_fcm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
