// round_select: rounding selection for a compound adder.
//
// Given Sum and Sum+1 from compound_adder, the result sign and the guard g,
// round r and sticky s bits below the result LSB, picks the rounded result
// for the four IEEE rounding modes:
//   nearest even : Sum+1 if g & (LSB | r | s), else Sum
//   toward zero  : Sum (truncate)
//   toward +inf  : Sum+1 if the sign is positive and g | r | s, else Sum
//   toward -inf  : Sum+1 if the sign is negative and g | r | s, else Sum
// The carry out of the chosen word is passed on (c0 belongs to Sum, c1 to
// Sum+1) so that the caller can re-normalize. The Sum+2 candidate that an
// adder needs when the sum itself carries out is not part of this block.
// The per-mode rules are the lecture's; reading "any bits to the right of
// the LSB" as g | r | s is this design's. Purely combinational.
module round_select
  import fp_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]  sum,
  input  logic [W-1:0]  sum1,
  input  logic          c0,
  input  logic          c1,
  input  round_mode_t   mode,
  input  logic          sign,
  input  logic          g,
  input  logic          r,
  input  logic          s,
  output logic [W-1:0]  y,
  output logic          cout,
  output logic          inc
);
  always_comb begin
    unique case (mode)
      RND_NEAREST_EVEN: inc = g & (sum[0] | r | s);
      RND_TOWARD_ZERO:  inc = 1'b0;
      RND_TOWARD_POS:   inc = ~sign & (g | r | s);
      RND_TOWARD_NEG:   inc =  sign & (g | r | s);
      default:          inc = 1'b0;
    endcase
    y    = inc ? sum1 : sum;
    cout = inc ? c1 : c0;
  end
endmodule
