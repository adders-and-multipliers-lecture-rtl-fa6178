// align_shift_grs: alignment right shifter with guard, round and sticky
// generation (adder step 2).
//
// The significand of the operand with the smaller exponent (P bits, hidden
// one included) is shifted right by the exponent difference. The first two
// bits shifted out are kept as guard G and round R, so the aligned word is
// P+2 bits wide; a third bit, the sticky S, is the OR of every bit shifted
// out beyond R. Output: {aligned significand, G, R, S}, P+3 bits.
//
// Implementation: the significand is placed at the top of a 2P+2 bit word
// ({sig, G, R, P bits of sticky field}) and shifted by one barrel_rshift.
// The shift amount is first clamped to P+2: at that amount every significand
// bit already lies in the sticky field, so larger differences give the same
// G, R, S, and no set bit can fall off the end of the word. The sticky bit
// is then the OR of the low P bits. Purely combinational.
module align_shift_grs #(
  parameter int unsigned P   = 24,
  parameter int unsigned SHW = 8
) (
  input  logic [P-1:0]   sig,
  input  logic [SHW-1:0] shamt,
  output logic [P+2:0]   aligned
);
  localparam int unsigned WW  = 2 * P + 2;
  localparam int unsigned CSW = $clog2(P + 3);

  logic [CSW-1:0] sh;
  logic [WW-1:0]  wide;

  always_comb begin
    if (32'(shamt) > P + 2) sh = CSW'(P + 2);
    else                    sh = CSW'(shamt);
  end

  barrel_rshift #(.W(WW), .SHW(CSW)) u_shift (
    .d     ({sig, {(P + 2){1'b0}}}),
    .shamt (sh),
    .y     (wide)
  );

  assign aligned = {wide[WW-1 -: P+2], |wide[P-1:0]};
endmodule
