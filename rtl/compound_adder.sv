// compound_adder: flagged prefix compound adder.
//
// Produces Sum = A + B' and Sum+1 = A + B' + 1 together, where B' is B for
// an effective addition and ~B for an effective subtraction. With sub = 1
// the two outputs are A - B - 1 and A - B; their complements are B - A and
// B - A - 1, so one carry-propagate pass yields every candidate a floating
// point adder needs before rounding selects among them.
//
// Structure: bitwise generate g = a & b' and propagate p = a ^ b' feed a
// Kogge-Stone prefix tree that forms, for every bit i, the group generate
// G[i-1:0] (the carry into bit i) and the group propagate P[i-1:0]. Then
//   sum[i]  = p[i] ^ G[i-1:0]
//   flag[i] = P[i-1:0]            (flag[0] = 1)
//   sum1    = sum ^ flag
// because sum+1 flips exactly the trailing ones of sum and their left
// neighbour, and the low i bits of sum are all ones exactly when the low i
// propagates are all ones. Carry outs: cout = G[W-1:0], cout1 = G | P over
// the whole word. The prefix tree type is this design's choice.
// Purely combinational.
module compound_adder #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic [W-1:0] sum1,
  output logic         cout,
  output logic         cout1
);
  logic [W-1:0] bb, g, p, gg, pp, flag;

  always_comb begin
    bb = sub ? ~b : b;
    g  = a & bb;
    p  = a ^ bb;
    gg = g;
    pp = p;
    // Kogge-Stone levels; descending i keeps the previous level's [i-d].
    for (int span = 1; span < W; span = span * 2) begin
      for (int i = W - 1; i >= span; i--) begin
        gg[i] = gg[i] | (pp[i] & gg[i - span]);
        pp[i] = pp[i] & pp[i - span];
      end
    end
    sum[0]  = p[0];
    flag[0] = 1'b1;
    for (int i = 1; i < W; i++) begin
      sum[i]  = p[i] ^ gg[i-1];
      flag[i] = pp[i-1];
    end
    sum1  = sum ^ flag;
    cout  = gg[W-1];
    cout1 = gg[W-1] | pp[W-1];
  end
endmodule
