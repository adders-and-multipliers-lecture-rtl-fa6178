// fp_mul_tb: self-checking testbench for fp_mul.
//
// First the two worked single precision examples (Case-1 and Case-2, operand
// and result bit patterns given as sign, exponent, fraction), then directed
// corner cases and random operands for a single precision multiplier (the
// default) and a double precision one. Results and flags are compared with
// fp_ref, which multiplies the significands exactly and rounds the exact
// product to nearest even. The multiplier is combinational; each vector is
// held for 1 ns before it is checked.
module fp_mul_tb;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  typedef fp_ref#(8, 23)  sp;
  typedef fp_ref#(11, 52) dp;

  int checks = 0, failures = 0;

  logic [31:0] sa_i, sb_i, sy;
  fp_flags_t   sfl;
  logic [63:0] da_i, db_i, dy;
  fp_flags_t   dfl;

  fp_mul dut_sp (.a(sa_i), .b(sb_i), .y(sy), .flags(sfl));
  fp_mul #(.EXP_W(11), .FRAC_W(52)) dut_dp (.a(da_i), .b(db_i), .y(dy), .flags(dfl));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sp(logic [31:0] a, logic [31:0] b);
    logic [31:0] ey;
    ref_flags_t  ef;
    sa_i = a; sb_i = b;
    #1;
    sp::mul(a, b, ey, ef);
    checks++;
    if (sy !== ey || sfl !== fp_flags_t'(ef)) begin
      failures++;
      if (failures < 20)
        $display("SP MISMATCH %h * %h: got %h/%b expected %h/%b", a, b, sy, sfl, ey, ef);
    end
  endtask

  task automatic check_dp(logic [63:0] a, logic [63:0] b);
    logic [63:0] ey;
    ref_flags_t  ef;
    da_i = a; db_i = b;
    #1;
    dp::mul(a, b, ey, ef);
    checks++;
    if (dy !== ey || dfl !== fp_flags_t'(ef)) begin
      failures++;
      if (failures < 20)
        $display("DP MISMATCH %h * %h: got %h/%b expected %h/%b", a, b, dy, dfl, ey, ef);
    end
  endtask

  task automatic expect_sp(logic [31:0] a, logic [31:0] b, logic [31:0] ey);
    sa_i = a; sb_i = b;
    #1;
    checks++;
    if (sy !== ey) begin
      failures++;
      $display("SP DIRECTED %h * %h: got %h expected %h", a, b, sy, ey);
    end
  endtask

  initial begin
    logic [31:0] a32, b32;
    logic [63:0] a64, b64;
    // Case-1
    expect_sp({1'b0, 8'b10000001, 23'b00000000101000111101011},
              {1'b0, 8'b10000000, 23'b10101100110011001100110},
              {1'b0, 8'b10000010, 23'b10101101110111110011100});
    // Case-2
    expect_sp({1'b0, 8'b10000000, 23'b00001100110011001100110},
              {1'b0, 8'b10000000, 23'b00001100110011001100110},
              {1'b0, 8'b10000001, 23'b00011010001111010110111});
    // 1.5 * 1.5 = 2.25 (product >= 2, normalize right)
    expect_sp(32'h3fc00000, 32'h3fc00000, 32'h40100000);
    // -2 * 3 = -6
    expect_sp(32'hc0000000, 32'h40400000, 32'hc0c00000);
    // (1 + 2^-23) * (2 - 2^-22) = 2 - 2^-45 - 2^-46 and a similar pair: the 24
    // significand bits are all ones and R is set, so rounding carries out and
    // the result re-normalizes to 2.0
    expect_sp(32'h3f800001, 32'h3ffffffe, 32'h40000000);
    expect_sp(32'h3f800002, 32'h3ffffffc, 32'h40000000);
    // 2^100 * 2^100 overflows
    expect_sp(32'h71800000, 32'h71800000, 32'h7f800000);
    // 2^-100 * 2^-100 underflows to zero
    expect_sp(32'h0d800000, 32'h0d800000, 32'h00000000);
    // 0 * inf is NaN
    expect_sp(32'h00000000, 32'hff800000, 32'h7fc00000);
    // -0 * 5 = -0
    expect_sp(32'h80000000, 32'h40a00000, 32'h80000000);
    check_sp({1'b0, 8'b10000001, 23'b00000000101000111101011},
             {1'b0, 8'b10000000, 23'b10101100110011001100110});
    check_dp(64'h3ff8000000000000, 64'h3ff8000000000000);
    // products just below 2: b is chosen so that a * b lands within 2^-23 of
    // 2.0, where rounding often carries out of the significand
    for (int i = 0; i < 4000; i++) begin
      logic [23:0] ma;
      logic [48:0] mb;
      ma = {1'b1, 23'($urandom)};
      mb = ((49'(1) << 47) - 49'(1 << ($urandom_range(0, 23))) + 49'(ma) - 1) / 49'(ma);
      if (mb[23] && mb < (49'(1) << 24)) check_sp({1'($urandom), 8'($urandom_range(64, 190)), ma[22:0]},
                                                  {1'($urandom), 8'($urandom_range(64, 190)), mb[22:0]});
    end
    for (int i = 0; i < 60000; i++) begin
      int ka, kb;
      ka = int'($urandom_range(0, 9));
      kb = int'($urandom_range(0, 9));
      if (ka > 5 || ka == 2) ka = 0;
      if (kb > 5 || kb == 2) kb = 0;
      a32 = sp::rnd(ka, 32'h3f800000);
      b32 = sp::rnd(kb, a32);
      check_sp(a32, b32);
      a64 = dp::rnd(ka, 64'h3ff0000000000000);
      b64 = dp::rnd(kb, a64);
      check_dp(a64, b64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
