// round_rne: IEEE round-to-nearest-even step shared by the adder and the
// multiplier.
//
// The normalized significand arrives as P bits whose LSB is M0 (the p-th bit
// from the left), plus the round bit R (bit p+1) and the sticky bit S (OR of
// everything to the right of R). One is added at M0 when R & (M0 | S): above
// the halfway point always, exactly at halfway only when M0 is odd, which
// yields the even neighbour. If all P bits are ones the increment carries
// out; cout tells the caller to re-normalize (shift right by one and bump the
// exponent). Since the carried-out value is 1000...0, y is then already the
// correctly re-normalized significand (all zeros below the new leading one),
// so the caller only has to set the hidden one and add one to the exponent.
// The rounding rule and the re-normalization follow the lecture; the split
// of work between this block and its callers is this design's.
// Purely combinational.
module round_rne #(
  parameter int unsigned P = 24
) (
  input  logic [P-1:0] sig,
  input  logic         r,
  input  logic         s,
  output logic [P-1:0] y,
  output logic         cout,
  output logic         inexact
);
  logic round_up;

  always_comb begin
    round_up      = r & (sig[0] | s);
    {cout, y}     = {1'b0, sig} + {{P{1'b0}}, round_up};
    inexact       = r | s;
  end
endmodule
