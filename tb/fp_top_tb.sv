// fp_top_tb: end-to-end testbench of fp_top at its default parameters
// (single precision, 4-bit rotator, 8-bit distributed shifter, 24-bit
// compound adder).
//
// Every unit is driven each step with random operands drawn to exercise its
// mechanisms, and every output is checked: adder and multiplier against the
// exact-integer reference fp_ref, the shifters against arithmetic on
// integers, the compound adder against A + B (+1) and the rounding rules.
// Internal signals are watched to count how often each mechanism occurred:
// adder alignment with sticky, carry-out normalization, leading-zero
// normalization, rounding up, rounding carry-out re-normalization,
// overflow, underflow, invalid; multiplier one-bit normalization, rounding
// up, rounding re-normalization, overflow, underflow, invalid; each rotate
// amount and the shift mode; the distributed shifter's fill; Sum+1 chosen in
// each rounding mode and in subtraction. A mechanism never seen counts as a
// failure.
module fp_top_tb;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  typedef fp_ref#(8, 23) sp;

  int checks = 0, failures = 0;

  logic [31:0] add_a, add_b, add_y, mul_a, mul_b, mul_y;
  logic        add_sub;
  fp_flags_t   add_flags, mul_flags;
  logic [3:0]  rot_d, rot_y;
  logic [1:0]  rot_sel;
  logic        rot_en;
  logic [7:0]  dist_d, dist_y;
  logic [2:0]  dist_sh;
  logic        dist_fill;
  logic [23:0] ca_a, ca_b, ca_y;
  logic        ca_sub, ca_sign, ca_cout, ca_inc;
  round_mode_t ca_mode;
  logic [2:0]  ca_grs;

  fp_top dut (.*);

  typedef enum int {
    M_ADD_STICKY, M_ADD_CARRY_NORM, M_ADD_LZ_NORM, M_ADD_ROUND_UP, M_ADD_ROUND_RENORM,
    M_ADD_OVERFLOW, M_ADD_UNDERFLOW, M_ADD_INVALID,
    M_MUL_NORM, M_MUL_ROUND_UP, M_MUL_ROUND_RENORM, M_MUL_OVERFLOW, M_MUL_UNDERFLOW, M_MUL_INVALID,
    M_ROT_0, M_ROT_1, M_ROT_2, M_ROT_3, M_SHIFT_MODE, M_DIST_FILL,
    M_CA_RNE_UP, M_CA_RZ, M_CA_RUP_UP, M_CA_RDN_UP, M_CA_SUB,
    M_COUNT
  } mech_e;
  int seen [M_COUNT];
  string names [M_COUNT] = '{"add alignment sticky", "add carry-out normalization",
    "add leading-zero normalization", "add round up", "add rounding re-normalization",
    "add overflow", "add underflow", "add invalid", "mul normalization shift",
    "mul round up", "mul rounding re-normalization", "mul overflow", "mul underflow",
    "mul invalid", "rotate 0", "rotate 1", "rotate 2", "rotate 3", "shift mode",
    "distributed shifter fill", "compound RNE Sum+1", "compound toward zero",
    "compound +inf Sum+1", "compound -inf Sum+1", "compound subtraction"};

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("MISMATCH %s", what);
  endtask

  initial begin
    for (int i = 0; i < M_COUNT; i++) seen[i] = 0;
    for (int it = 0; it < 40000; it++) begin
      logic [31:0] ey;
      ref_flags_t  ef;
      logic [24:0] e0;
      logic [23:0] bb;
      logic        up;
      logic [15:0] w;
      int          ka, kb;
      ka = int'($urandom_range(0, 9));
      kb = int'($urandom_range(0, 9));
      if (ka > 5) ka = 0;
      if (kb > 5) kb = 1;
      add_a   = sp::rnd(ka, 32'h3f800000);
      add_b   = sp::rnd(kb, add_a);
      add_sub = 1'($urandom);
      if (kb == 2) mul_a = sp::rnd(ka, 32'h3f800000); else mul_a = add_a;
      mul_b   = sp::rnd((kb == 2) ? 0 : kb, mul_a);
      rot_d   = 4'($urandom);  rot_sel = 2'($urandom);  rot_en = 1'($urandom);
      dist_d  = 8'($urandom);  dist_sh = 3'($urandom);  dist_fill = 1'($urandom);
      ca_a    = 24'($urandom); ca_b = 24'($urandom);    ca_sub = 1'($urandom);
      ca_mode = round_mode_t'($urandom_range(0, 3));
      ca_sign = 1'($urandom);  ca_grs = 3'($urandom);
      #1;

      // adder
      sp::add(add_a, add_b, add_sub, ey, ef);
      checks++;
      if (add_y !== ey || add_flags !== fp_flags_t'(ef))
        fail($sformatf("add %h %0d %h: %h/%b vs %h/%b", add_a, add_sub, add_b, add_y, add_flags, ey, ef));
      if (add_y[30:23] != 8'hff && add_y[30:23] != 0) begin
        if (dut.u_add.aligned[0])                  seen[M_ADD_STICKY]++;
        if (dut.u_add.sum[27])                     seen[M_ADD_CARRY_NORM]++;
        if (!dut.u_add.sum[27] && dut.u_add.lzc > 0) seen[M_ADD_LZ_NORM]++;
        if (dut.u_add.u_round.round_up)            seen[M_ADD_ROUND_UP]++;
        if (dut.u_add.rcout)                       seen[M_ADD_ROUND_RENORM]++;
      end
      if (add_flags.overflow)  seen[M_ADD_OVERFLOW]++;
      if (add_flags.underflow) seen[M_ADD_UNDERFLOW]++;
      if (add_flags.invalid)   seen[M_ADD_INVALID]++;

      // multiplier
      sp::mul(mul_a, mul_b, ey, ef);
      checks++;
      if (mul_y !== ey || mul_flags !== fp_flags_t'(ef))
        fail($sformatf("mul %h %h: %h/%b vs %h/%b", mul_a, mul_b, mul_y, mul_flags, ey, ef));
      if (mul_y[30:23] != 8'hff && mul_y[30:23] != 0) begin
        if (dut.u_mul.prod[47])            seen[M_MUL_NORM]++;
        if (dut.u_mul.u_round.round_up)    seen[M_MUL_ROUND_UP]++;
        if (dut.u_mul.rcout)               seen[M_MUL_ROUND_RENORM]++;
      end
      if (mul_flags.overflow)  seen[M_MUL_OVERFLOW]++;
      if (mul_flags.underflow) seen[M_MUL_UNDERFLOW]++;
      if (mul_flags.invalid)   seen[M_MUL_INVALID]++;

      // shift and rotate barrel shifter
      checks++;
      w = 16'({rot_d, rot_d}) << rot_sel;
      if (rot_y !== (rot_en ? w[7:4] : 4'(rot_d << rot_sel)))
        fail($sformatf("rot %b sel %0d en %0d: %b", rot_d, rot_sel, rot_en, rot_y));
      if (rot_en) seen[M_ROT_0 + int'(rot_sel)]++;
      else        seen[M_SHIFT_MODE]++;

      // distributed barrel shifter
      checks++;
      w = {{8{dist_fill}}, dist_d} >> dist_sh;
      if (dist_y !== w[7:0]) fail($sformatf("dist %h >> %0d: %h", dist_d, dist_sh, dist_y));
      if (dist_fill && dist_sh != 0) seen[M_DIST_FILL]++;

      // compound adder and rounding selection
      bb = ca_sub ? ~ca_b : ca_b;
      e0 = {1'b0, ca_a} + {1'b0, bb};
      case (ca_mode)
        RND_NEAREST_EVEN: up = ca_grs[2] & (e0[0] | ca_grs[1] | ca_grs[0]);
        RND_TOWARD_ZERO:  up = 1'b0;
        RND_TOWARD_POS:   up = !ca_sign && ca_grs != 0;
        default:          up = ca_sign && ca_grs != 0;
      endcase
      e0 = e0 + 25'(up);
      checks++;
      if ({ca_cout, ca_y} !== e0 || ca_inc !== up)
        fail($sformatf("compound %h %h sub %0d mode %0d: %h", ca_a, ca_b, ca_sub, ca_mode, {ca_cout, ca_y}));
      if (up && ca_mode == RND_NEAREST_EVEN) seen[M_CA_RNE_UP]++;
      if (ca_mode == RND_TOWARD_ZERO && ca_grs != 0) seen[M_CA_RZ]++;
      if (up && ca_mode == RND_TOWARD_POS) seen[M_CA_RUP_UP]++;
      if (up && ca_mode == RND_TOWARD_NEG) seen[M_CA_RDN_UP]++;
      if (ca_sub) seen[M_CA_SUB]++;
    end

    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-32s seen %0d times", names[i], seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("MECHANISM NEVER EXERCISED: %s", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
