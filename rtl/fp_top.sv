// fp_top: floating point arithmetic building blocks side by side.
//
// Four independent units, each with its own ports:
//  * fp_add  - IEEE-754 adder/subtractor (align with G/R/S, p+3 bit add,
//              normalize, round to nearest even, exceptions);
//  * fp_mul  - IEEE-754 multiplier (exponent add minus bias, p x p product,
//              one-bit normalize, round to nearest even, exceptions);
//  * barrel_rotate and barrel_dist - the stand-alone barrel shifter
//              examples (4-bit shift/rotate, 8-bit distributed shifter);
//  * compound_adder + round_select - Sum and Sum+1 from one flagged prefix
//              adder, with the result chosen by the rounding mode.
// The adder's own alignment and normalization shifters are internal
// instances; the stand-alone shifters and the compound adder are not wired
// into it. Everything is combinational: results follow the inputs within
// the same cycle of whatever clock the surrounding system uses.
// Defaults are IEEE single precision; EXP_W = 11, FRAC_W = 52 gives double.
// The units are the lecture's; placing them side by side without a clock
// is this design's choice.
module fp_top
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = SP_EXP_W,
  parameter int unsigned FRAC_W = SP_FRAC_W,
  parameter int unsigned ROT_W  = 4,
  parameter int unsigned DIST_W = 8,
  parameter int unsigned CA_W   = FRAC_W + 1
) (
  // adder / subtractor
  input  logic [EXP_W+FRAC_W:0]   add_a,
  input  logic [EXP_W+FRAC_W:0]   add_b,
  input  logic                    add_sub,
  output logic [EXP_W+FRAC_W:0]   add_y,
  output fp_flags_t               add_flags,
  // multiplier
  input  logic [EXP_W+FRAC_W:0]   mul_a,
  input  logic [EXP_W+FRAC_W:0]   mul_b,
  output logic [EXP_W+FRAC_W:0]   mul_y,
  output fp_flags_t               mul_flags,
  // shift and rotate barrel shifter
  input  logic [ROT_W-1:0]         rot_d,
  input  logic [$clog2(ROT_W)-1:0] rot_sel,
  input  logic                     rot_en,
  output logic [ROT_W-1:0]         rot_y,
  // distributed barrel shifter
  input  logic [DIST_W-1:0]          dist_d,
  input  logic [$clog2(DIST_W)-1:0]  dist_sh,
  input  logic                       dist_fill,
  output logic [DIST_W-1:0]          dist_y,
  // compound adder with rounding selection
  input  logic [CA_W-1:0]          ca_a,
  input  logic [CA_W-1:0]          ca_b,
  input  logic                     ca_sub,
  input  round_mode_t              ca_mode,
  input  logic                     ca_sign,
  input  logic [2:0]               ca_grs,
  output logic [CA_W-1:0]          ca_y,
  output logic                     ca_cout,
  output logic                     ca_inc    // 1: Sum+1 was selected
);
  fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_add (
    .a (add_a), .b (add_b), .sub (add_sub), .y (add_y), .flags (add_flags)
  );

  fp_mul #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mul (
    .a (mul_a), .b (mul_b), .y (mul_y), .flags (mul_flags)
  );

  barrel_rotate #(.W(ROT_W)) u_rot (
    .d (rot_d), .sel (rot_sel), .rot (rot_en), .y (rot_y)
  );

  barrel_dist #(.W(DIST_W)) u_dist (
    .d (dist_d), .shamt (dist_sh), .fill (dist_fill), .y (dist_y)
  );

  logic [CA_W-1:0] ca_sum, ca_sum1;
  logic            ca_c0, ca_c1;

  compound_adder #(.W(CA_W)) u_cadd (
    .a (ca_a), .b (ca_b), .sub (ca_sub),
    .sum (ca_sum), .sum1 (ca_sum1), .cout (ca_c0), .cout1 (ca_c1)
  );

  round_select #(.W(CA_W)) u_rsel (
    .sum (ca_sum), .sum1 (ca_sum1), .c0 (ca_c0), .c1 (ca_c1),
    .mode (ca_mode), .sign (ca_sign),
    .g (ca_grs[2]), .r (ca_grs[1]), .s (ca_grs[0]),
    .y (ca_y), .cout (ca_cout), .inc (ca_inc)
  );
endmodule
