// fuzzy_clustering_unit: the FCM-S clustering engine. It holds the c current
// centroids and, for a stream of data points (x_k, xbar_k), computes in one
// pipelined pass both the new centroids and the cost J, without storing the
// membership matrix:
//
//   pre-computation unit (4c stages)  -> P_k
//   membership updating unit (5)      -> u_{i,k}^m and D_{i,k}, i = 1..c
//   centroid updating unit (c modules, incremental)   -> v_i(k)
//   cost function computation unit (incremental)      -> J(k)
//
// All four run concurrently; a new data point can enter every clock cycle,
// and a data point's contributions reach the accumulators 4c + 5 cycles after
// it entered. The centroids used by the pipelines stay fixed during a pass;
// when the last data point of the pass (flag last) has gone through, v_i(t)
// replaces v_i (a cluster that received no membership keeps its centroid),
// J holds J(t), and pass_done pulses. busy is high from the last data point's
// entry to pass_done; the data source must not start the next pass before.
//
// Interface: in (fcm_pkg::pix_t), alpha (Q4.4); v_wr/v_wr_idx/v_wr_data write
// one centroid (8.8) while not busy; outputs v[c], j (JFRAC = 16 fraction
// bits), pass_done, busy. Synchronous active-low reset; centroids reset to
// evenly spread gray levels.
//
// From the document: the four units, their connection and concurrency, the
// pipeline depths and the rule that the centroids are replaced only once
// v_i(t) is known. The centroid write port, reset values, empty-cluster rule
// and busy flag are this design's own.
module fuzzy_clustering_unit
  import fcm_pkg::*;
#(
  parameter int C   = 2,
  parameter int M_A = 3,   // degree of fuzziness m = M_A / M_B
  parameter int M_B = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pix_t                 in,
  input  logic [A_W-1:0]       alpha,
  input  logic                 v_wr,
  input  logic [$clog2(C)-1:0] v_wr_idx,
  input  logic [V_W-1:0]       v_wr_data,
  output logic [V_W-1:0]       v [C],
  output logic [ACC_W-1:0]     j,
  output logic                 pass_done,
  output logic                 busy
);

  localparam int R = M_B;
  localparam int N = M_A - M_B;

  pix_t pc_out, mb_out;
  fp_t  p;
  fp_t  um [C];
  fp_t  d  [C];
  logic [V_W-1:0] v_new [C];
  logic [C-1:0]   empty, cdone;
  logic           jdone;

  precomp_unit #(.C(C), .N(N), .R(R)) u_pre (
    .clk, .rst_n, .in, .v, .alpha, .out(pc_out), .p
  );

  membership_unit #(.C(C), .N(N), .R(R)) u_mem (
    .clk, .rst_n, .in(pc_out), .p, .v, .alpha, .out(mb_out), .um, .d
  );

  for (genvar i = 0; i < C; i++) begin : g_cen
    centroid_module u_cen (
      .clk, .rst_n, .in(mb_out), .um(um[i]), .alpha,
      .v(v_new[i]), .den_zero(empty[i]), .done(cdone[i])
    );
  end

  cost_unit #(.C(C)) u_cost (
    .clk, .rst_n, .in(mb_out), .um, .d, .j, .done(jdone)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < C; i++) v[i] <= V_W'(((2 * i + 1) * 256 / (2 * C)) << VFRAC);
      busy      <= 1'b0;
      pass_done <= 1'b0;
    end else begin
      pass_done <= cdone[0];
      if (in.valid && in.last) busy <= 1'b1;
      if (cdone[0]) begin
        busy <= 1'b0;
        for (int i = 0; i < C; i++) if (!empty[i]) v[i] <= v_new[i];
      end else if (v_wr && !busy) begin
        v[v_wr_idx] <= v_wr_data;
      end
    end
  end

  // every centroid module finishes in the same cycle, one after the cost unit
  a_done_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    cdone[0] |-> (&cdone) && $past(jdone));

endmodule
