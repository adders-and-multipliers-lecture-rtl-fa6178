// fp_mul: IEEE-754 floating point multiplier, round to nearest even.
//
// Five steps:
//  1. Tentative exponent = e_a + e_b - bias (bias 127 in single precision,
//     1023 in double), held in a signed word two bits wider than the field.
//  2. Sign = sign_a XOR sign_b.
//  3. The two p-bit significands (hidden one included) are multiplied into a
//     2p-bit product, which lies in [1, 4).
//  4. If the product's MSB is 1 (product >= 2) it is shifted right by one and
//     the exponent incremented. The p bits from the leading one down are the
//     significand, the next bit is R and the OR of the rest is the sticky S.
//  5. round_rne adds one at M0 when R & (M0 | S); a carry out re-normalizes.
// Exceptions use the final exponent: >= all-ones gives +/- infinity with
// overflow, <= 0 gives a signed zero with underflow; 0 x inf is invalid.
//
// Choices of this design where the lecture leaves freedom: subnormal
// operands are read as zero and subnormal results are flushed to zero;
// overflow returns infinity; any NaN result is the canonical quiet NaN.
//
// Interface: a, b -> y, flags. Purely combinational.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = SP_EXP_W,
  parameter int unsigned FRAC_W = SP_FRAC_W
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  output logic [EXP_W+FRAC_W:0] y,
  output fp_flags_t             flags
);
  localparam int unsigned N  = EXP_W + FRAC_W + 1;
  localparam int unsigned P  = FRAC_W + 1;
  localparam int unsigned XW = EXP_W + 2;
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam logic [XW-1:0]    BIAS = XW'((1 << (EXP_W - 1)) - 1);

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              za, zb, ia, ib, na, nb;

  always_comb begin
    sa = a[N-1];
    sb = b[N-1];
    ea = a[N-2 -: EXP_W];
    eb = b[N-2 -: EXP_W];
    fa = a[FRAC_W-1:0];
    fb = b[FRAC_W-1:0];
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EMAX) && (fa == '0);
    ib = (eb == EMAX) && (fb == '0);
    na = (ea == EMAX) && (fa != '0);
    nb = (eb == EMAX) && (fb != '0);
    sy = sa ^ sb;                                        // step 2
  end

  // step 1 and 3
  logic signed [XW-1:0] et;
  logic [2*P-1:0]       prod;

  assign et   = $signed({2'b00, ea}) + $signed({2'b00, eb}) - $signed(BIAS);
  assign prod = {1'b1, fa} * {1'b1, fb};

  // step 4: one-bit normalization
  logic [P-1:0]         nsig;
  logic                 nr, ns;
  logic signed [XW-1:0] en;

  always_comb begin
    if (prod[2*P-1]) begin
      nsig = prod[2*P-1 -: P];
      nr   = prod[P-1];
      ns   = |prod[P-2:0];
      en   = et + XW'(1);
    end else begin
      nsig = prod[2*P-2 -: P];
      nr   = prod[P-2];
      ns   = |prod[P-3:0];
      en   = et;
    end
  end

  // step 5: round and re-normalize
  logic [P-1:0]         rsig;
  logic                 rcout, rinexact;
  logic signed [XW-1:0] er;

  round_rne #(.P(P)) u_round (
    .sig     (nsig),
    .r       (nr),
    .s       (ns),
    .y       (rsig),
    .cout    (rcout),
    .inexact (rinexact)
  );

  assign er = en + XW'(rcout);

  always_comb begin
    flags = '0;
    if (na || nb || (ia && zb) || (za && ib)) begin
      y             = {1'b0, EMAX, 1'b1, {(FRAC_W - 1){1'b0}}};
      flags.invalid = !na && !nb;
    end else if (ia || ib) begin
      y = {sy, EMAX, {FRAC_W{1'b0}}};
    end else if (za || zb) begin
      y = {sy, {(N - 1){1'b0}}};
    end else if (er >= $signed({2'b00, EMAX})) begin
      y              = {sy, EMAX, {FRAC_W{1'b0}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else if (er <= 0) begin
      y               = {sy, {(N - 1){1'b0}}};
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
    end else begin
      y             = {sy, er[EXP_W-1:0], rsig[FRAC_W-1:0]};
      flags.inexact = rinexact;
    end
  end
endmodule
