// fp_add_tb: self-checking testbench for fp_add.
//
// Drives a single precision adder (the default) and a double precision one
// with directed cases (exact sums, rounding ties, carry-out, cancellation,
// overflow, underflow, infinities, NaN) and with random operands drawn from
// several classes (random bits, nearby exponents, deep cancellation,
// specials, range extremes, rounding carry-out). Every result and flag set is
// compared with fp_ref, which works with exact integers. The adder is
// combinational; each vector is held for 1 ns before it is checked.
module fp_add_tb;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  typedef fp_ref#(8, 23)  sp;
  typedef fp_ref#(11, 52) dp;

  int checks = 0, failures = 0;

  logic [31:0] sa_i, sb_i, sy;
  logic        ssub;
  fp_flags_t   sfl;
  logic [63:0] da_i, db_i, dy;
  logic        dsub;
  fp_flags_t   dfl;

  fp_add dut_sp (.a(sa_i), .b(sb_i), .sub(ssub), .y(sy), .flags(sfl));
  fp_add #(.EXP_W(11), .FRAC_W(52)) dut_dp (.a(da_i), .b(db_i), .sub(dsub), .y(dy), .flags(dfl));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sp(logic [31:0] a, logic [31:0] b, logic sub);
    logic [31:0] ey;
    ref_flags_t  ef;
    sa_i = a; sb_i = b; ssub = sub;
    #1;
    sp::add(a, b, sub, ey, ef);
    checks++;
    if (sy !== ey || sfl !== fp_flags_t'(ef)) begin
      failures++;
      if (failures < 20)
        $display("SP MISMATCH %h %s %h: got %h/%b expected %h/%b", a, sub ? "-" : "+", b, sy, sfl, ey, ef);
    end
  endtask

  task automatic check_dp(logic [63:0] a, logic [63:0] b, logic sub);
    logic [63:0] ey;
    ref_flags_t  ef;
    da_i = a; db_i = b; dsub = sub;
    #1;
    dp::add(a, b, sub, ey, ef);
    checks++;
    if (dy !== ey || dfl !== fp_flags_t'(ef)) begin
      failures++;
      if (failures < 20)
        $display("DP MISMATCH %h %s %h: got %h/%b expected %h/%b", a, sub ? "-" : "+", b, dy, dfl, ey, ef);
    end
  endtask

  // fixed expectations, written out by hand
  task automatic expect_sp(logic [31:0] a, logic [31:0] b, logic sub, logic [31:0] ey);
    sa_i = a; sb_i = b; ssub = sub;
    #1;
    checks++;
    if (sy !== ey) begin
      failures++;
      $display("SP DIRECTED %h %s %h: got %h expected %h", a, sub ? "-" : "+", b, sy, ey);
    end
  endtask

  initial begin
    logic [31:0] a32, b32;
    logic [63:0] a64, b64;
    // 1.0 + 1.0 = 2.0 (carry out)
    expect_sp(32'h3f800000, 32'h3f800000, 1'b0, 32'h40000000);
    // 1.5 + 2.25 = 3.75
    expect_sp(32'h3fc00000, 32'h40100000, 1'b0, 32'h40700000);
    // 3.0 - 1.0 = 2.0
    expect_sp(32'h40400000, 32'h3f800000, 1'b1, 32'h40000000);
    // 1.0 - 1.0 = +0
    expect_sp(32'h3f800000, 32'h3f800000, 1'b1, 32'h00000000);
    // 1 + 2^-24 = tie, rounds to even 1.0
    expect_sp(32'h3f800000, 32'h33800000, 1'b0, 32'h3f800000);
    // (1 + 2^-23) + 2^-24 = tie, rounds up to even 1 + 2^-22
    expect_sp(32'h3f800001, 32'h33800000, 1'b0, 32'h3f800002);
    // 1.0 - (1 - 2^-24) = 2^-24 (deep cancellation)
    expect_sp(32'h3f800000, 32'h3f7fffff, 1'b1, 32'h33800000);
    // largest finite + largest finite overflows to +inf
    expect_sp(32'h7f7fffff, 32'h7f7fffff, 1'b0, 32'h7f800000);
    // inf - inf is NaN
    expect_sp(32'h7f800000, 32'h7f800000, 1'b1, 32'h7fc00000);
    // -2 + 1 = -1
    expect_sp(32'hc0000000, 32'h3f800000, 1'b0, 32'hbf800000);
    // double: 1.0 + 1.0 = 2.0
    check_dp(64'h3ff0000000000000, 64'h3ff0000000000000, 1'b0);
    for (int i = 0; i < 60000; i++) begin
      int ka, kb;
      ka = int'($urandom_range(0, 9));
      kb = int'($urandom_range(0, 9));
      if (ka > 5) ka = 0;
      if (kb > 5) kb = 1;
      a32 = sp::rnd(ka, 32'h3f800000);
      b32 = sp::rnd(kb, a32);
      check_sp(a32, b32, 1'($urandom));
      a64 = dp::rnd(ka, 64'h3ff0000000000000);
      b64 = dp::rnd(kb, a64);
      check_dp(a64, b64, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
