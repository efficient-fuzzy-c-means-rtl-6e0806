// fcms_seg_run: testbench component that runs one segmentation experiment on
// its own accelerator instance: a synthetic IMG_W x IMG_H image with C
// regions (dark background 70, a bright disc 190, and for C = 3 a mid-gray
// rectangle 130 that covers part of the disc), each pixel
// corrupted by i.i.d. uniform noise in [-B_NOISE, B_NOISE]. It drives the
// accelerator's bus like the processor and DMA engine, runs passes until J
// changes by less than 0.1 % (at most 12), checks every pass against a
// double-precision FCM-S pass with the same centroids, and finally reports
// the segmentation error rate (pixels whose nearest centroid under the
// distance used is not their true region). ALPHA16 is alpha in Q4.4 (0 runs
// the original FCM). Results leave on the output ports when done rises.
module fcms_seg_run #(
  parameter int C = 2,
  parameter int M_A = 3,
  parameter int M_B = 2,
  parameter int IMG_W = 320,
  parameter int IMG_H = 320,
  parameter int B_NOISE = 40,
  parameter int ALPHA16 = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   errors,
  output int   passes
);
  import fcm_pkg::*;
  import tb_fcm_ref_pkg::*;

  localparam int NP = IMG_W * IMG_H;
  localparam int N = M_A - M_B, R = M_B;
  localparam real RA = real'(ALPHA16) / 16.0;

  logic [3:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic avs_waitrequest;

  fcms_top #(.C(C), .M_A(M_A), .M_B(M_B), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata, .avs_waitrequest);

  logic [7:0] img [NP];
  int         truth [NP];
  real        xbar [NP];

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

  task automatic read_v(output real rv [C]);
    logic [31:0] cv;
    for (int i = 0; i < C; i++) begin rd(4'(8 + i), cv); rv[i] = real'(cv[15:0]) / 256.0; end
  endtask

  task automatic ref_pass(input real rv [C], output real nv [C], output real rj);
    real num [C];
    real den [C];
    real d [C];
    real p, um;
    for (int i = 0; i < C; i++) begin num[i] = 0.0; den[i] = 0.0; end
    rj = 0.0;
    for (int k = 0; k < NP; k++) begin
      p = 0.0;
      for (int i = 0; i < C; i++) begin
        d[i] = ref_d(real'(img[k]), xbar[k], rv[i], RA);
        p += ref_term(d[i], N, R);
      end
      for (int i = 0; i < C; i++) begin
        um = ref_um(d[i], p, N, R);
        num[i] += um * (real'(img[k]) + RA * xbar[k]);
        den[i] += um;
        rj += um * d[i];
      end
    end
    for (int i = 0; i < C; i++) nv[i] = num[i] / ((1.0 + RA) * den[i]);
  endtask

  initial begin
    int r, c, rr, cc, s, v, best;
    logic [31:0] st, jl, jh;
    real rv [C];
    real nv [C];
    real rj, jhw, jprev, dbest, dd;
    int lev [3];
    done = 0; checks = 0; failures = 0; errors = 0; passes = 0;
    lev = '{70, 190, 130};
    for (int k = 0; k < NP; k++) begin
      r = k / IMG_W; c = k % IMG_W;
      truth[k] = 0;
      if ((r - IMG_H / 2) * (r - IMG_H / 2) + (c - IMG_W / 3) * (c - IMG_W / 3) < (IMG_H / 3) * (IMG_H / 3)) truth[k] = 1;
      if (C == 3 && r > IMG_H / 4 && r < 3 * IMG_H / 4 && c > IMG_W / 2 && c < 7 * IMG_W / 8) truth[k] = 2;
      v = lev[truth[k]] + int'($urandom_range(0, 2 * B_NOISE)) - B_NOISE;
      img[k] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
    end
    for (int k = 0; k < NP; k++) begin
      r = k / IMG_W; c = k % IMG_W; s = 0;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++)
          if (dr != 0 || dc != 0) begin
            rr = (r + dr < 0) ? 0 : (r + dr >= IMG_H) ? IMG_H - 1 : r + dr;
            cc = (c + dc < 0) ? 0 : (c + dc >= IMG_W) ? IMG_W - 1 : c + dc;
            s += int'(img[rr * IMG_W + cc]);
          end
      xbar[k] = real'(s) / 8.0;
    end
    @(posedge rst_n);
    // initial centroids spread over the gray range, alpha
    for (int i = 0; i < C; i++) wr(4'(8 + i), 32'(((2 * i + 1) * 256 / (2 * C)) << 8));
    wr(4'd2, 32'(ALPHA16));
    idle();
    jprev = 0.0;
    for (int it = 0; it < 12; it++) begin
      read_v(rv);
      ref_pass(rv, nv, rj);
      for (int k = 0; k < NP; k++) wr(4'd0, 32'(img[k]));
      idle();
      st = '0;
      while (!st[0]) rd(4'd1, st);
      rd(4'd3, jl); rd(4'd4, jh);
      wr(4'd1, 32'd1);
      idle();
      passes++;
      jhw = real'({jh, jl}) / 65536.0;
      checks++;
      if (rabs(jhw - rj) > 0.005 * rj) begin failures++; $display("FAIL J %g exp %g", jhw, rj); end
      read_v(rv);
      for (int i = 0; i < C; i++) begin
        checks++;
        if (rabs(rv[i] - nv[i]) > 0.1) begin failures++; $display("FAIL v%0d %g exp %g", i, rv[i], nv[i]); end
      end
      if (it > 0 && rabs(jhw - jprev) < 0.001 * jhw) break;
      jprev = jhw;
    end
    // classify: centroid index sorted by gray level -> region level order
    read_v(rv);
    for (int k = 0; k < NP; k++) begin
      best = 0; dbest = 1e30;
      for (int i = 0; i < C; i++) begin
        dd = ref_d(real'(img[k]), xbar[k], rv[i], RA);
        if (dd < dbest) begin dbest = dd; best = i; end
      end
      // rank of the winning centroid among all centroids
      rr = 0;
      for (int i = 0; i < C; i++) if (rv[i] < rv[best]) rr++;
      // region levels in ascending order: 70 (0), 130 (2), 190 (1)
      cc = (C == 3) ? ((rr == 0) ? 0 : (rr == 1) ? 2 : 1) : rr;
      if (cc != truth[k]) errors++;
    end
    done = 1;
  end
endmodule
