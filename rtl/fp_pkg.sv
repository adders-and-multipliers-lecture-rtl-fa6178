// fp_pkg: types and constants shared by the floating point blocks.
//
// The IEEE-754 binary formats are described by two widths, the exponent
// field EXP_W and the stored fraction FRAC_W; the significand precision is
// p = FRAC_W + 1 (the hidden leading one). Single precision (8, 23) is the
// default everywhere; double precision is (11, 52). The exception flags
// follow the IEEE-754 exception list (divide by zero cannot arise in an
// adder or multiplier and is left out). The rounding modes are the four
// IEEE modes used by the compound adder's rounding selection.
package fp_pkg;

  localparam int unsigned SP_EXP_W  = 8;
  localparam int unsigned SP_FRAC_W = 23;
  localparam int unsigned DP_EXP_W  = 11;
  localparam int unsigned DP_FRAC_W = 52;

  typedef enum logic [1:0] {
    RND_NEAREST_EVEN = 2'd0,
    RND_TOWARD_ZERO  = 2'd1,
    RND_TOWARD_POS   = 2'd2,
    RND_TOWARD_NEG   = 2'd3
  } round_mode_t;

  typedef struct packed {
    logic invalid;    // inf - inf or 0 x inf (NaN operands propagate quietly)
    logic overflow;   // result too large, returned as +/- infinity
    logic underflow;  // result too small, returned as a signed zero
    logic inexact;    // the rounded result differs from the exact one
  } fp_flags_t;

endpackage
