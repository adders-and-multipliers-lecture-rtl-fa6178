// barrel_dist: distributed (logarithmic) barrel shifter.
//
// The shift is spread over $clog2(W) stages of 2:1 multiplexers; stage k
// moves the word 2**k places toward the LSB when bit k of the shift amount
// is set. Multiplexer inputs that would come from beyond bit W-1 take the
// `fill` input, so the same structure gives a logical right shift (fill = 0)
// or fills with ones (fill = 1). Eight data bits, as in the lecture's
// example, is the default. Right as the shift direction is this design's
// choice. Purely combinational.
module barrel_dist #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]         d,
  input  logic [$clog2(W)-1:0] shamt,
  input  logic                 fill,
  output logic [W-1:0]         y
);
  localparam int unsigned S = $clog2(W);

  logic [W-1:0] stage [S+1];

  assign stage[0] = d;

  for (genvar k = 0; k < S; k++) begin : g_stage
    for (genvar i = 0; i < W; i++) begin : g_mux
      if (i + (1 << k) < W) begin : g_in
        assign stage[k+1][i] = shamt[k] ? stage[k][i + (1 << k)] : stage[k][i];
      end else begin : g_fill
        assign stage[k+1][i] = shamt[k] ? fill : stage[k][i];
      end
    end
  end

  assign y = stage[S];
endmodule
