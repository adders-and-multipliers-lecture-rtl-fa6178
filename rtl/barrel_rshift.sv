// barrel_rshift: right shift barrel shifter.
//
// Shifts the W-bit word right by any amount 0..2**SHW-1 in a single level of
// logic: every output bit is its own multiplexer that picks input bit
// i+shamt, or zero when that index lies beyond the word (so any shamt >= W
// clears the word). The multiplexer-per-output organisation is this design's
// reading of the lecture's right-shift barrel shifter; the width is a
// parameter. Purely combinational.
module barrel_rshift #(
  parameter int unsigned W   = 8,
  parameter int unsigned SHW = 3
) (
  input  logic [W-1:0]   d,
  input  logic [SHW-1:0] shamt,
  output logic [W-1:0]   y
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (int'(shamt) + i < W) y[i] = d[int'(shamt) + i];
      else                     y[i] = 1'b0;
    end
  end
endmodule
