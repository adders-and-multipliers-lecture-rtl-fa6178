// fp_ref_pkg: reference arithmetic for the floating point testbenches.
//
// fp_ref#(EXP_W, FRAC_W) computes sums and products with exact integer
// arithmetic and a generic round-to-nb_valest-even step, independently of the
// hardware's datapath (no guard/round/sticky bookkeeping, no normalization
// shifter): the exact significand result R and a base exponent are formed,
// R is cut down to p bits by a right shift whose discarded remainder is
// compared with one half, and the exponent follows from the shift. The
// special-value conventions are those of the hardware: subnormal operands
// read as zero, results below the normal range flushed to a signed zero,
// overflow to infinity, canonical quiet NaN 0 11..1 10..0.
// Exact intermediates use 128 bits, enough for p up to 60.
package fp_ref_pkg;

  typedef logic [127:0] wide_t;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } ref_flags_t;

  class fp_ref #(int EXP_W = 8, int FRAC_W = 23);
    localparam int N    = EXP_W + FRAC_W + 1;
    localparam int P    = FRAC_W + 1;
    localparam int EMAX = (1 << EXP_W) - 1;
    localparam int BIAS = (1 << (EXP_W - 1)) - 1;

    static function logic [N-1:0] qnan();
      logic [N-1:0] v;
      v = '0;
      v[N-2 -: EXP_W] = '1;
      v[FRAC_W-1] = 1'b1;
      return v;
    endfunction

    static function logic [N-1:0] pack(logic s, int e, logic [FRAC_W-1:0] f);
      logic [N-1:0] v;
      v = {s, EXP_W'(e), f};
      return v;
    endfunction

    static function int expo(logic [N-1:0] x);
      return int'(x[N-2 -: EXP_W]);
    endfunction

    static function wide_t mant(logic [N-1:0] x);
      wide_t m;
      if (expo(x) == 0) return '0;
      m = '0;
      m[FRAC_W-1:0] = x[FRAC_W-1:0];
      m[FRAC_W] = 1'b1;
      return m;
    endfunction

    static function bit is_inf(logic [N-1:0] x);
      return expo(x) == EMAX && x[FRAC_W-1:0] == '0;
    endfunction

    static function bit is_nan(logic [N-1:0] x);
      return expo(x) == EMAX && x[FRAC_W-1:0] != '0;
    endfunction

    // Round the exact positive integer r (value r * 2^(ebase - BIAS - FRAC_W))
    // to p bits, nb_valest even, and pack it with sign s.
    static function void round_pack(logic s, wide_t r, int ebase,
                                    output logic [N-1:0] y, output ref_flags_t fl);
      int    k, sh, e;
      wide_t q, rem, half;
      fl = '0;
      k = 127;
      while (k > 0 && !r[k]) k--;
      if (k >= P - 1) begin
        sh   = k - (P - 1);
        q    = r >> sh;
        rem  = (sh == 0) ? '0 : (r & ((wide_t'(1) << sh) - 1));
        half = (sh == 0) ? '0 : (wide_t'(1) << (sh - 1));
        if (rem > half || (rem == half && rem != 0 && q[0])) q = q + 1;
        if (q[P]) begin
          q  = q >> 1;
          sh = sh + 1;
        end
        e = ebase + sh;
        fl.inexact = (rem != 0);
      end else begin
        q = r << (P - 1 - k);
        e = ebase - (P - 1 - k);
      end
      if (e >= EMAX) begin
        y = pack(s, EMAX, '0);
        fl.overflow = 1'b1;
        fl.inexact  = 1'b1;
      end else if (e <= 0) begin
        y = pack(s, 0, '0);
        fl.underflow = 1'b1;
        fl.inexact   = 1'b1;
      end else begin
        y = pack(s, e, q[FRAC_W-1:0]);
      end
    endfunction

    static function void add(logic [N-1:0] a, logic [N-1:0] b, logic sub,
                             output logic [N-1:0] y, output ref_flags_t fl);
      logic  sa, sb, sr;
      int    ea, eb, eh, el, dd, sh;
      wide_t ma, mb, xh, xl, r;
      sa = a[N-1];
      sb = b[N-1] ^ sub;
      fl = '0;
      if (is_nan(a) || is_nan(b)) begin
        y = qnan();
        return;
      end
      if (is_inf(a) && is_inf(b) && sa != sb) begin
        y = qnan();
        fl.invalid = 1'b1;
        return;
      end
      if (is_inf(a)) begin y = pack(sa, EMAX, '0); return; end
      if (is_inf(b)) begin y = pack(sb, EMAX, '0); return; end
      ea = expo(a);  eb = expo(b);
      ma = mant(a);  mb = mant(b);
      if (ma == 0 && mb == 0) begin
        y = pack((sa == sb) ? sa : 1'b0, 0, '0);
        return;
      end
      if (ma == 0) begin ea = eb; end
      if (mb == 0) begin eb = ea; end
      // Exact alignment of the higher-exponent operand onto the lower one;
      // beyond P+6 places the smaller operand only matters as a tiny
      // nonzero amount, represented by the integer 1.
      if (ea >= eb) begin
        eh = ea; el = eb; xh = ma; xl = mb;
      end else begin
        eh = eb; el = ea; xh = mb; xl = ma;
      end
      dd = eh - el;
      if (dd <= P + 6) begin
        sh = dd;
      end else begin
        sh = P + 6;
        xl = (xl != 0) ? wide_t'(1) : wide_t'(0);
      end
      xh = xh << sh;
      if (ea >= eb) begin
        ma = xh; mb = xl;
      end else begin
        ma = xl; mb = xh;
      end
      if (sa == sb) begin
        r  = ma + mb;
        sr = sa;
      end else if (ma >= mb) begin
        r  = ma - mb;
        sr = sa;
      end else begin
        r  = mb - ma;
        sr = sb;
      end
      if (r == 0) begin
        y = pack(1'b0, 0, '0);
        return;
      end
      round_pack(sr, r, eh - sh, y, fl);
    endfunction

    static function void mul(logic [N-1:0] a, logic [N-1:0] b,
                             output logic [N-1:0] y, output ref_flags_t fl);
      logic s;
      s  = a[N-1] ^ b[N-1];
      fl = '0;
      if (is_nan(a) || is_nan(b)) begin
        y = qnan();
        return;
      end
      if ((is_inf(a) && mant(b) == 0) || (is_inf(b) && mant(a) == 0)) begin
        y = qnan();
        fl.invalid = 1'b1;
        return;
      end
      if (is_inf(a) || is_inf(b)) begin y = pack(s, EMAX, '0); return; end
      if (mant(a) == 0 || mant(b) == 0) begin y = pack(s, 0, '0); return; end
      round_pack(s, mant(a) * mant(b), expo(a) + expo(b) - BIAS - FRAC_W, y, fl);
    endfunction
    // Random operand. kind 0: any bit pattern; 1: exponent within 3 of
    // `nb_val`; 2: same exponent as `nb_val`, fraction close to it (deep
    // cancellation); 3: special value (zero, inf, NaN, subnormal); 4:
    // exponent nb_val the top or bottom of the range; 5: fraction of all ones
    // or nb_vally so (rounding carry-out).
    static function logic [N-1:0] rnd(int kind, logic [N-1:0] nb_val);
      logic [N-1:0]      v;
      logic [FRAC_W-1:0] f;
      int                e;
      v = N'({$urandom, $urandom});
      f = FRAC_W'({$urandom, $urandom});
      e = expo(v);
      case (kind)
        1: begin
          e = expo(nb_val) + int'($urandom_range(0, 6)) - 3;
          if (e < 1) e = 1;
          if (e > EMAX - 1) e = EMAX - 1;
        end
        2: begin
          e = expo(nb_val);
          if (e == 0 || e == EMAX) e = 1;
          f = nb_val[FRAC_W-1:0] ^ FRAC_W'($urandom_range(0, 15));
        end
        3: begin
          case ($urandom_range(0, 3))
            0: begin e = 0;    f = '0; end
            1: begin e = EMAX; f = '0; end
            2: begin e = EMAX; end
            default: e = 0;
          endcase
        end
        4: begin
          if ($urandom_range(0, 1) == 1) e = EMAX - 1 - int'($urandom_range(0, 3));
          else                           e = 1 + int'($urandom_range(0, 3));
        end
        5: begin
          f = '1;
          f[1:0] = 2'($urandom);
          if (e == 0 || e == EMAX) e = BIAS;
        end
        default: ;
      endcase
      if (kind != 3 && kind != 0 && e == EMAX) e = EMAX - 1;
      return {v[N-1], EXP_W'(e), f};
    endfunction
  endclass

endpackage
