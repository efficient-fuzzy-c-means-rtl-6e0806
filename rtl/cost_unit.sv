// cost_unit: cost function computation unit. It accumulates
//     J(k) = sum_{i=1..c} sum_{n<=k} u_{i,n}^m D_{i,n},
//     D_{i,n} = ||x_n - v_i||^2 + alpha ||xbar_n - v_i||^2,
// alongside the centroid updating unit, so that at the end of a pass J is
// the cost of the centroids used in that pass.
//
// c float multipliers form u^m * D for every cluster; each product is turned
// into unsigned fixed point (JFRAC fraction bits) and an adder sums the c
// products with the register holding J(k-1). The first data point of a pass
// overwrites the register instead of adding. done pulses in the cycle after
// the last data point of a pass, when j holds J(t).
//
// Interface: in (data point flags), um[c], d[c]; outputs j (64-bit, JFRAC
// fraction bits) and done. Synchronous active-low reset. Only the valid,
// first and last flags of the data point are used here; its x and xbar fields
// are carried on the same bus for the other units and left unread.
//
// From the document: c multipliers, one adder, one register. The fixed-point
// format is this design's own.
module cost_unit
  import fcm_pkg::*;
#(
  parameter int C     = 2,
  parameter int JFRAC = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pix_t             in,
  input  fp_t              um [C],
  input  fp_t              d  [C],
  output logic [ACC_W-1:0] j,
  output logic             done
);

  logic [ACC_W-1:0] term;

  always_comb begin
    term = '0;
    for (int i = 0; i < C; i++) term += fp_to_fix(fp_mul(um[i], d[i]), JFRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j    <= '0;
      done <= 1'b0;
    end else begin
      if (in.valid) j <= in.first ? term : j + term;
      done <= in.valid && in.last;
    end
  end

endmodule
