// fp_power: y^P for a small constant integer P >= 1, by a chain of P-1 float
// multipliers.
//
// Interface: combinational, y in, pw out (fcm_pkg::fp_t).
//
// The document says the r-th and (n+r)-th exponent units are "based on
// multipliers"; the straight chain (rather than square-and-multiply) is this
// design's choice, since P is at most a few for the usual degrees of
// fuzziness.
module fp_power
  import fcm_pkg::*;
#(
  parameter int P = 2
) (
  input  fp_t y,
  output fp_t pw
);

  fp_t chain [P];

  always_comb begin
    chain[0] = y;
    for (int i = 1; i < P; i++) chain[i] = fp_mul(chain[i-1], y);
  end

  assign pw = chain[P-1];

endmodule
