// fcms_top: FCM-S image segmentation accelerator as a memory-mapped slave
// for a soft-processor system. A DMA engine writes the pixels of a gray-level
// image, one per write, to the DATA register; the mean computation unit forms
// (x_k, xbar_k) pairs and the fuzzy clustering unit runs one FCM-S iteration
// over the image, leaving the cost J and the updated centroids for the
// processor to read. The processor repeats passes until J converges and then
// reads the centroids as the segmentation result.
//
// Register map (32-bit words, word addresses):
//   0  DATA    W   pixel gray level in bits 7:0 (stalls with waitrequest from
//                  the last pixel of an image until its pass has finished:
//                  first while the mean unit flushes the last row, then while
//                  the pipelines drain)
//   1  STATUS  R   bit 0 done (a pass finished since the flag was cleared),
//                  bit 1 busy (end of pass in progress)
//              W   writing 1 to bit 0 clears done
//   2  ALPHA   RW  spatial penalty alpha, unsigned Q4.4 in bits 7:0
//   3  J_LO    R   cost J of the last finished pass, bits 31:0 (16 fraction
//                  bits); latched at the end of a pass, so it can be read
//                  while the next pass is already streaming
//   4  J_HI    R   bits 63:32
//   5  PASSES  R   number of passes finished since reset
//   8+i CENT_i RW  centroid i, 8.8 fixed point in bits 15:0 (writes ignored
//                  while a pass is finishing)
// Reads have no wait states (readdata is valid in the cycle of read).
//
// The degree of fuzziness m = M_A/M_B and the number of clusters C are
// elaboration-time parameters; alpha = 0 gives the original FCM.
//
// From the document: the split into mean computation and fuzzy clustering
// units, the use as a slave of the processor's bus fed by DMA, J read by the
// processor after each pass, centroids read at the end. The register map,
// the latched copy of J,
// one pixel per write, the waitrequest stalls, the alpha register and its
// reset value 1.0 are this design's own.
module fcms_top
  import fcm_pkg::*;
#(
  parameter int C     = 2,
  parameter int M_A   = 3,
  parameter int M_B   = 2,
  parameter int IMG_W = 320,
  parameter int IMG_H = 320
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        avs_waitrequest
);

  localparam logic [3:0] A_DATA = 4'd0, A_STATUS = 4'd1, A_ALPHA = 4'd2,
                         A_JLO = 4'd3, A_JHI = 4'd4, A_PASSES = 4'd5, A_CENT = 4'd8;

  logic             mu_ready, pix_wr, busy, pass_done, done_flag;
  logic [A_W-1:0]   alpha;
  logic [31:0]      passes;
  logic [V_W-1:0]   v [C];
  logic [ACC_W-1:0] j, j_last;
  pix_t             xk;
  logic             cent_wr, data_wait, draining;

  // from the end of an image (mean unit flushing) to the end of its pass
  assign data_wait       = !mu_ready || draining;
  assign avs_waitrequest = avs_write && (avs_address == A_DATA) && data_wait;
  assign pix_wr          = avs_write && (avs_address == A_DATA) && !data_wait;
  assign cent_wr         = avs_write && (avs_address >= A_CENT) && (avs_address < A_CENT + 4'(C));

  mean_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mean (
    .clk, .rst_n, .in_valid(pix_wr), .in_ready(mu_ready),
    .in_pix(avs_writedata[PIX_W-1:0]), .out(xk)
  );

  fuzzy_clustering_unit #(.C(C), .M_A(M_A), .M_B(M_B)) u_fcu (
    .clk, .rst_n, .in(xk), .alpha,
    .v_wr(cent_wr), .v_wr_idx(($clog2(C))'(avs_address - A_CENT)),
    .v_wr_data(avs_writedata[V_W-1:0]),
    .v, .j, .pass_done, .busy
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alpha     <= A_W'(1 << AFRAC);
      done_flag <= 1'b0;
      passes    <= '0;
      j_last    <= '0;
      draining  <= 1'b0;
    end else begin
      if (!mu_ready) draining <= 1'b1;
      if (avs_write && avs_address == A_ALPHA) alpha <= avs_writedata[A_W-1:0];
      if (avs_write && avs_address == A_STATUS && avs_writedata[0]) done_flag <= 1'b0;
      if (pass_done) begin
        done_flag <= 1'b1;
        passes    <= passes + 1'b1;
        j_last    <= j;
        draining  <= 1'b0;
      end
    end
  end

  always_comb begin
    avs_readdata = '0;
    unique case (avs_address)
      A_STATUS: avs_readdata = {30'd0, draining || busy, done_flag};
      A_ALPHA:  avs_readdata = 32'(alpha);
      A_JLO:    avs_readdata = j_last[31:0];
      A_JHI:    avs_readdata = j_last[63:32];
      A_PASSES: avs_readdata = passes;
      default: begin
        for (int i = 0; i < C; i++)
          if (avs_address == A_CENT + 4'(i)) avs_readdata = 32'(v[i]);
      end
    endcase
    if (!avs_read) avs_readdata = '0;
  end

  // Avalon-MM master rule: a write held by waitrequest keeps its data
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (avs_write && avs_waitrequest) |=> (avs_write && $stable(avs_writedata) && $stable(avs_address)));

endmodule
