// rr_pkg: shared types and constants of the radix-4 reciprocal / square-root
// reciprocal unit.
//
// All datapath words (residual w, D, C and the approximation window H) use one
// two's-complement fixed-point format: INTB integer bits (sign included) and
// FRAC fraction bits. Keeping every word in the same format means carry-save
// pairs never need sign extension when they move between the two halves of
// the datapath. FRAC = 57 holds the operand d (54 fraction bits at most) and
// C[0] = d/8 exactly; INTB = 9 covers the approximation window, whose value
// stays inside (-256, 256).
//
// The digit-selection constants are those of the shared radix-4 selection
// function (constants scaled by 16, D estimate scaled by 32). One constant,
// m_-1 for D^ = 26/32, is -20 here: with -21 the first square-root-reciprocal
// step can leave the residual outside its bound. The reciprocal unit has its
// own, smaller table (R_*): the divisor is constant there, so three bits of it
// suffice, and the table tolerates the error of truncating each carry-save
// word separately.
//
// The word widths are this design's own; the published datapath uses 56- to
// 58-bit words with a different scaling.
package rr_pkg;

  localparam int unsigned FRAC_DEF = 57;
  localparam int unsigned INTB_DEF = 9;
  localparam int unsigned G_APPROX_DEF = 14;  // iterations, approximation path
  localparam int unsigned G_EXACT_DEF  = 28;  // iterations, digit-by-digit path

  // radix-4 digit in {-2,-1,0,1,2}
  typedef logic signed [2:0] digit_t;

  typedef enum logic {
    OP_RECIP = 1'b0,   // 1/d
    OP_RSQRT = 1'b1    // 1/sqrt(d)
  } op_e;

  // selection constants m_k(i), i = 32*D^ - 16, values scaled by 16
  typedef logic signed [6:0] mconst_t;
  localparam mconst_t M_M1 [16] = '{-13, -14, -14, -15, -16, -17, -17, -18,
                                    -18, -19, -20, -21, -21, -23, -24, -24};
  localparam mconst_t M_0  [16] = '{ -5,  -5,  -5,  -6,  -6,  -6,  -7,  -7,
                                     -7,  -8,  -8,  -8,  -9,  -9,  -9, -10};
  localparam mconst_t M_1  [16] = '{  3,   4,   4,   4,   4,   4,   4,   5,
                                      7,   7,   7,   7,   8,   8,   8,   8};
  localparam mconst_t M_2  [16] = '{ 12,  13,  14,  14,  15,  15,  16,  17,
                                     18,  18,  19,  19,  22,  22,  22,  22};

  // selection constants of the reciprocal unit, i = 16*d^ - 8 (d^ = d truncated
  // to four fraction bits), values scaled by 16; the estimate is 4w with both
  // carry-save words truncated to four fraction bits
  localparam mconst_t R_M1 [8] = '{-13, -15, -16, -18, -20, -20, -22, -24};
  localparam mconst_t R_0  [8] = '{ -4,  -6,  -6,  -6,  -8,  -8,  -8,  -8};
  localparam mconst_t R_1  [8] = '{  4,   4,   4,   4,   6,   6,   8,   8};
  localparam mconst_t R_2  [8] = '{ 12,  14,  15,  16,  18,  20,  20,  24};

endpackage
