// tb_fcms_workloads: the segmentation experiments of the design's evaluation,
// on synthetic 320x320 gray-level images (the original photographs are not
// available): noise amplitudes b = 10, 20, 40, 60, 80 with c = 2 for the
// original FCM (alpha = 0) and FCM-S (alpha = 1), c = 3 with FCM-S, FCM-S
// with m = 2.0 and m = 2.5 at every b, and m = 1.75 and 2.25 at b = 40. Every pass of
// every run is checked against double precision (see fcms_seg_run). It
// prints the error-rate table and requires FCM-S to do no worse than FCM at
// every b, FCM-S to stay below 5 % error (c = 3: for b <= 40, where its three
// levels, 60 apart, do not yet overlap), and every run to converge.
module tb_fcms_workloads;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NB = 5;
  localparam int BV [NB] = '{10, 20, 40, 60, 80};
  localparam int NP = 320 * 320;

  logic done_f [NB];
  logic done_s [NB];
  logic done_3 [NB];
  int ck_f [NB], fl_f [NB], er_f [NB], ps_f [NB];
  int ck_s [NB], fl_s [NB], er_s [NB], ps_s [NB];
  int ck_3 [NB], fl_3 [NB], er_3 [NB], ps_3 [NB];
  logic done_m [2];
  int ck_m [2], fl_m [2], er_m [2], ps_m [2];
  logic done_2 [NB];
  logic done_5 [NB];
  int ck_2 [NB], fl_2 [NB], er_2 [NB], ps_2 [NB];
  int ck_5 [NB], fl_5 [NB], er_5 [NB], ps_5 [NB];

  for (genvar b = 0; b < NB; b++) begin : g_b
    fcms_seg_run #(.B_NOISE(BV[b]), .ALPHA16(0))  u_fcm  (.clk, .rst_n, .done(done_f[b]), .checks(ck_f[b]), .failures(fl_f[b]), .errors(er_f[b]), .passes(ps_f[b]));
    fcms_seg_run #(.B_NOISE(BV[b]), .ALPHA16(16)) u_fcms (.clk, .rst_n, .done(done_s[b]), .checks(ck_s[b]), .failures(fl_s[b]), .errors(er_s[b]), .passes(ps_s[b]));
    fcms_seg_run #(.C(3), .B_NOISE(BV[b]), .ALPHA16(16)) u_c3 (.clk, .rst_n, .done(done_3[b]), .checks(ck_3[b]), .failures(fl_3[b]), .errors(er_3[b]), .passes(ps_3[b]));
    fcms_seg_run #(.M_A(2), .M_B(1), .B_NOISE(BV[b])) u_m200 (.clk, .rst_n, .done(done_2[b]), .checks(ck_2[b]), .failures(fl_2[b]), .errors(er_2[b]), .passes(ps_2[b]));
    fcms_seg_run #(.M_A(5), .M_B(2), .B_NOISE(BV[b])) u_m250 (.clk, .rst_n, .done(done_5[b]), .checks(ck_5[b]), .failures(fl_5[b]), .errors(er_5[b]), .passes(ps_5[b]));
  end
  fcms_seg_run #(.M_A(7), .M_B(4)) u_m175 (.clk, .rst_n, .done(done_m[0]), .checks(ck_m[0]), .failures(fl_m[0]), .errors(er_m[0]), .passes(ps_m[0]));
  fcms_seg_run #(.M_A(9), .M_B(4)) u_m225 (.clk, .rst_n, .done(done_m[1]), .checks(ck_m[1]), .failures(fl_m[1]), .errors(er_m[1]), .passes(ps_m[1]));

  function automatic bit all_done();
    for (int b = 0; b < NB; b++) if (!done_f[b] || !done_s[b] || !done_3[b] || !done_2[b] || !done_5[b]) return 0;
    for (int i = 0; i < 2; i++) if (!done_m[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!all_done()) @(posedge clk);
    $display("b     FCM c=2     FCM-S c=2   FCM-S c=3   FCM-S m=2.0 FCM-S m=2.5 (error rate, passes)");
    for (int b = 0; b < NB; b++) begin
      $display("%2d    %.4f (%0d)  %.4f (%0d)  %.4f (%0d)  %.4f (%0d)  %.4f (%0d)", BV[b],
               real'(er_f[b]) / NP, ps_f[b], real'(er_s[b]) / NP, ps_s[b], real'(er_3[b]) / NP, ps_3[b],
               real'(er_2[b]) / NP, ps_2[b], real'(er_5[b]) / NP, ps_5[b]);
      checks += ck_f[b] + ck_s[b] + ck_3[b] + ck_2[b] + ck_5[b] + 6;
      failures += fl_f[b] + fl_s[b] + fl_3[b] + fl_2[b] + fl_5[b];
      if (er_2[b] > NP / 20 || er_5[b] > NP / 20) begin failures++; $display("FAIL m=2.0/2.5 error rate above 5%% at b=%0d", BV[b]); end
      if (ps_2[b] >= 12 || ps_5[b] >= 12) failures++;
      if (er_s[b] > er_f[b]) begin failures++; $display("FAIL FCM-S worse than FCM at b=%0d", BV[b]); end
      if (er_s[b] > NP / 20) begin failures++; $display("FAIL FCM-S error rate above 5%% at b=%0d", BV[b]); end
      // three regions only 60 gray levels apart overlap once b reaches 60
      if (BV[b] <= 40 && er_3[b] > NP / 20) begin failures++; $display("FAIL c=3 error rate above 5%% at b=%0d", BV[b]); end
      if (ps_s[b] >= 12 || ps_f[b] >= 12) failures++;
      if (ps_3[b] >= 12) failures++;
    end
    $display("m = 1.75, 2.25 at b = 40 (FCM-S): %.4f (%0d) %.4f (%0d)",
             real'(er_m[0]) / NP, ps_m[0], real'(er_m[1]) / NP, ps_m[1]);
    for (int i = 0; i < 2; i++) begin
      checks += ck_m[i] + 1;
      failures += fl_m[i];
      if (er_m[i] > NP / 20) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
