// fp_add: IEEE-754 floating point adder/subtractor, round to nearest even.
//
// The datapath follows the classic five steps:
//  1. The operands are ordered by magnitude (exponent, then fraction); the
//     larger exponent is the tentative exponent and d = e_large - e_small.
//  2. The smaller significand is right-shifted by d in align_shift_grs,
//     keeping guard and round bits and a sticky bit (p+3 bits in all).
//  3. A p+3 bit adder adds or subtracts the signed-magnitude significands
//     (effective subtraction when the signs, after applying `sub`, differ).
//     Because the larger magnitude is always the minuend the difference is
//     never negative, so no result complement is needed.
//  4. A carry out shifts the sum right by one (the lost bit joins the
//     sticky) and increments the exponent; otherwise norm_shifter removes
//     leading zeros and the count is subtracted from the exponent.
//  5. round_rne adds one at M0 when R & (M0 | S); a carry out of the
//     rounding re-normalizes (exponent + 1, significand 1.000...).
// Exceptions are evaluated on the final exponent: >= all-ones gives
// +/- infinity with overflow, <= 0 gives a signed zero with underflow.
//
// Choices of this design where the lecture leaves freedom: subnormal
// operands are read as zero and subnormal results are flushed to zero; an
// overflow returns infinity (not the largest finite number); any NaN result
// is the canonical quiet NaN (sign 0, exponent all ones, fraction MSB set);
// inf - inf raises invalid; an exact zero sum is +0 unless both operands are
// zeros of the same sign.
//
// Interface: a, b, sub (1 gives a - b) -> y, flags. Purely combinational.
module fp_add
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = SP_EXP_W,
  parameter int unsigned FRAC_W = SP_FRAC_W
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  logic                  sub,
  output logic [EXP_W+FRAC_W:0] y,
  output fp_flags_t             flags
);
  localparam int unsigned N  = EXP_W + FRAC_W + 1;
  localparam int unsigned P  = FRAC_W + 1;
  localparam int unsigned XW = EXP_W + 2;            // signed exponent width
  localparam int unsigned LW = $clog2(P + 4);        // leading zero count width
  localparam logic [EXP_W-1:0] EMAX = '1;

  // ---- unpack -------------------------------------------------------------
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              za, zb, ia, ib, na, nb;

  always_comb begin
    sa = a[N-1];
    sb = b[N-1] ^ sub;
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
  end

  // ---- step 1: order by magnitude -----------------------------------------
  logic              a_big, eff_sub, sl;
  logic [EXP_W-1:0]  el, es, d;
  logic [P-1:0]      ml, ms;

  always_comb begin
    logic [N-2:0] ka, kb;
    ka    = za ? '0 : a[N-2:0];
    kb    = zb ? '0 : b[N-2:0];
    a_big = (ka >= kb);
    if (a_big) begin
      sl = sa;  el = ea;  ml = za ? '0 : {1'b1, fa};
      es = eb;  ms = zb ? '0 : {1'b1, fb};
    end else begin
      sl = sb;  el = eb;  ml = zb ? '0 : {1'b1, fb};
      es = ea;  ms = za ? '0 : {1'b1, fa};
    end
    d       = el - es;
    eff_sub = sa ^ sb;
  end

  // ---- step 2: align ------------------------------------------------------
  logic [P+2:0] aligned;

  align_shift_grs #(.P(P), .SHW(EXP_W)) u_align (
    .sig     (ms),
    .shamt   (d),
    .aligned (aligned)
  );

  // ---- step 3: p+3 bit add / subtract -------------------------------------
  logic [P+3:0] sum;   // carry out in the MSB

  always_comb begin
    if (eff_sub) sum = {1'b0, ml, 3'b000} - {1'b0, aligned};
    else         sum = {1'b0, ml, 3'b000} + {1'b0, aligned};
  end

  // ---- step 4: normalize --------------------------------------------------
  logic [P+2:0]    lsum;
  logic [LW-1:0]   lzc;
  logic            sum_zero;
  logic [P+2:0]    nsum;
  logic signed [XW-1:0] en;

  norm_shifter #(.W(P + 3)) u_norm (
    .d    (sum[P+2:0]),
    .y    (lsum),
    .lzc  (lzc),
    .zero (sum_zero)
  );

  always_comb begin
    if (sum[P+3]) begin
      nsum = {sum[P+3:2], sum[1] | sum[0]};
      en   = $signed({2'b00, el}) + XW'(1);
    end else begin
      nsum = lsum;
      en   = $signed({2'b00, el}) - $signed(XW'(lzc));
    end
  end

  // ---- step 5: round and re-normalize -------------------------------------
  logic [P-1:0] rsig;
  logic         rcout, rinexact;
  logic signed [XW-1:0] er;

  round_rne #(.P(P)) u_round (
    .sig     (nsum[P+2:3]),
    .r       (nsum[2]),
    .s       (nsum[1] | nsum[0]),
    .y       (rsig),
    .cout    (rcout),
    .inexact (rinexact)
  );

  assign er = en + XW'(rcout);

  // ---- exceptions and result ----------------------------------------------
  always_comb begin
    flags = '0;
    if (na || nb || (ia && ib && eff_sub)) begin
      y             = {1'b0, EMAX, 1'b1, {(FRAC_W - 1){1'b0}}};
      flags.invalid = ia && ib && eff_sub && !na && !nb;
    end else if (ia || ib) begin
      y = {ia ? sa : sb, EMAX, {FRAC_W{1'b0}}};
    end else if (!sum[P+3] && sum_zero) begin
      y = {(za && zb && !eff_sub) ? sa : 1'b0, {(N - 1){1'b0}}};
    end else if (er >= $signed({2'b00, EMAX})) begin
      y              = {sl, EMAX, {FRAC_W{1'b0}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else if (er <= 0) begin
      y               = {sl, {(N - 1){1'b0}}};
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
    end else begin
      y             = {sl, er[EXP_W-1:0], rsig[FRAC_W-1:0]};
      flags.inexact = rinexact;
    end
  end
endmodule
