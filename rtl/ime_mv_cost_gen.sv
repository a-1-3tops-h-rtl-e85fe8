// MV cost generator.
//
// Gives the rate term of a motion-vector candidate, lambda times the number of
// bits of the MV difference, as the encoder adds it to a distortion before
// comparing candidates. The candidate mv is in units of 1/MV_SCALE pel
// (MV_SCALE = 4 for integer-pel candidates, 1 for quarter-pel ones) and the
// predictor pmv in quarter pel. Bits are counted as for the signed Exp-Golomb
// code se(v) of each quarter-pel difference component. The result saturates
// at the cost width.
//
// Combinational. The encoder names an MV cost generator; the bit count and
// the integer lambda are this design's reading of "rate-constrained".
module ime_mv_cost_gen
  import h264enc_pkg::*;
#(
  parameter int MV_SCALE = 4
) (
  input  mv_t        mv,
  input  mv_t        pmv,
  input  logic [7:0] lambda,
  output cost_t      cost
);

  int unsigned bits;
  int          dx, dy;
  logic [31:0] prod;

  always_comb begin
    dx   = int'(mv.x) * MV_SCALE - int'(pmv.x);
    dy   = int'(mv.y) * MV_SCALE - int'(pmv.y);
    bits = se_bits(dx) + se_bits(dy);
    prod = 32'(bits) * 32'(lambda);
    cost = (prod > 32'((1 << COST_W) - 1)) ? '1 : cost_t'(prod);
  end

endmodule
