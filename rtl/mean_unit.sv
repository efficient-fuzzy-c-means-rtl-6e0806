// mean_unit: mean computation unit of the FCM-S architecture. It turns a
// raster-order stream of gray-level pixels into the stream of data points
// (x_k, xbar_k) the fuzzy clustering unit works on, where xbar_k is the mean
// of the 8 neighbours of pixel k in its 3x3 window.
//
// How it works: incoming pixels shift into a delay line of 2*IMG_W + 3
// entries, so that when pixel p arrives, pixel p - (IMG_W + 1) (the centre)
// and its whole 3x3 neighbourhood are in the line at fixed offsets. At the
// image border the missing neighbours are replaced by the nearest pixel
// inside the image (row and column are clamped), so every pixel has exactly 8
// neighbours and the mean is the sum shifted right by 3, i.e. the 8-bit sum
// read as an 8.3 fixed-point number. After the last pixel of an image the unit
// runs IMG_W + 1 flush beats without input (in_ready low) to emit the last
// row, then accepts the next image, which starts a new pass.
//
// Interface: in_valid/in_ready/in_pix (valid-ready handshake) in; out, a
// registered fcm_pkg::pix_t with valid, first (pixel 0) and last (pixel
// IMG_W*IMG_H - 1), one cycle after the beat that completes its window; no
// backpressure on the output. Synchronous active-low reset.
//
// The document only names the unit and defines xbar_k as the mean over the
// neighbour set; the 3x3 neighbourhood without the centre, the border
// replication, the delay line and the handshake are this design's own.
module mean_unit
  import fcm_pkg::*;
#(
  parameter int IMG_W = 320,
  parameter int IMG_H = 320
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix,
  output pix_t             out
);

  localparam int DL    = 2 * IMG_W + 3;
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int CW    = $clog2(NPIX + IMG_W + 2);
  localparam int ROWW  = $clog2(IMG_H + 1);
  localparam int COLW  = $clog2(IMG_W + 1);

  logic [PIX_W-1:0] line [DL];
  logic [PIX_W-1:0] nxt  [DL];
  logic [CW-1:0]    beat;          // beats taken in this image
  logic [ROWW-1:0]  cr;            // row of the centre pixel
  logic [COLW-1:0]  cc;            // column of the centre pixel
  logic             flushing, adv, centre_ok;
  logic [PIX_W+2:0] sum;

  assign in_ready = !flushing;
  assign adv      = (in_valid && in_ready) || flushing;
  assign centre_ok = (beat >= CW'(IMG_W + 1));

  always_comb begin
    nxt[0] = in_pix;
    for (int i = 1; i < DL; i++) nxt[i] = line[i-1];
  end

  // sum of the 8 neighbours of the centre, border pixels replicated
  always_comb begin
    int rr, cl;
    logic [$clog2(DL)-1:0] idx;
    sum = '0;
    for (int dr = -1; dr <= 1; dr++) begin
      for (int dc = -1; dc <= 1; dc++) begin
        if (dr != 0 || dc != 0) begin
          rr = int'(cr) + dr;
          cl = int'(cc) + dc;
          if (rr < 0) rr = 0;
          if (rr > IMG_H - 1) rr = IMG_H - 1;
          if (cl < 0) cl = 0;
          if (cl > IMG_W - 1) cl = IMG_W - 1;
          idx = $clog2(DL)'(IMG_W + 1 - ((rr - int'(cr)) * IMG_W + (cl - int'(cc))));
          sum += (PIX_W+3)'(nxt[idx]);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat     <= '0;
      cr       <= '0;
      cc       <= '0;
      flushing <= 1'b0;
      out      <= '0;
      for (int i = 0; i < DL; i++) line[i] <= '0;
    end else begin
      out.valid <= 1'b0;
      if (adv) begin
        line <= nxt;
        if (centre_ok) begin
          out.valid <= 1'b1;
          out.first <= (cr == '0) && (cc == '0);
          out.last  <= (cr == ROWW'(IMG_H - 1)) && (cc == COLW'(IMG_W - 1));
          out.x     <= nxt[IMG_W + 1];
          out.xbar  <= sum;
          if (cc == COLW'(IMG_W - 1)) begin
            cc <= '0;
            cr <= cr + 1'b1;
          end else begin
            cc <= cc + 1'b1;
          end
        end
        if (beat == CW'(NPIX - 1)) flushing <= 1'b1;
        if (beat == CW'(NPIX + IMG_W)) begin
          beat     <= '0;
          cr       <= '0;
          cc       <= '0;
          flushing <= 1'b0;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

endmodule
