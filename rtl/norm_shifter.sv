// norm_shifter: normalization shifter for floating point arithmetic
// (adder step 4, subtraction case).
//
// Counts the leading zeros of the W-bit significand sum and shifts the word
// left by that count so that its MSB becomes 1; the caller subtracts lzc
// from the tentative exponent. An all-zero input gives zero = 1, lzc = W and
// y = 0. The count is a priority encoder; the shift is a logarithmic shifter
// (one stage of 2:1 multiplexers per bit of the count). Both structures are
// this design's choice; the lecture fixes only what the shifter does.
// Purely combinational.
module norm_shifter #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0]           d,
  output logic [W-1:0]           y,
  output logic [$clog2(W+1)-1:0] lzc,
  output logic                   zero
);
  localparam int unsigned CW = $clog2(W + 1);

  always_comb begin
    lzc = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (d[i]) lzc = CW'(W - 1 - i);
    end
    zero = (d == '0);
  end

  always_comb begin
    logic [W-1:0] t;
    t = d;
    for (int k = 0; k < CW; k++) begin
      if (lzc[k]) t = t << (1 << k);
    end
    y = t;
  end
endmodule
