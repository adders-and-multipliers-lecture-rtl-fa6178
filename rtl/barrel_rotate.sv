// barrel_rotate: shift and rotate barrel shifter.
//
// A W-bit word D is moved toward the MSB by sel places in one level of
// multiplexers (one W:1 multiplexer per output bit). With rot = 1 the bits
// leaving the MSB re-enter at the LSB, which for W = 4 is exactly the
// lecture's select table:
//   S1 S0 = 00: Y = D3 D2 D1 D0 (no shift)   01: Y = D2 D1 D0 D3 (rotate once)
//           10: Y = D1 D0 D3 D2 (twice)       11: Y = D0 D3 D2 D1 (3 times)
// With rot = 0 the vacated low bits are filled with zeros instead (a plain
// shift); this shift mode is this design's reading of "shift and rotate",
// whose table shows only rotations. Purely combinational.
module barrel_rotate #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]         d,
  input  logic [$clog2(W)-1:0] sel,
  input  logic                 rot,
  output logic [W-1:0]         y
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (i >= int'(sel)) y[i] = d[i - int'(sel)];
      else                y[i] = rot ? d[W + i - int'(sel)] : 1'b0;
    end
  end
endmodule
