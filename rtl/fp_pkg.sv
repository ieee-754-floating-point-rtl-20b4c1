// fp_pkg: shared types and constants of the single-precision multiplier.
//
// An IEEE-754 binary32 word is split into sign (bit 31), biased exponent
// (bits 30..23) and fraction (bits 22..0); the significand carries an implicit
// leading one, so it is 24 bits wide. The bias is 127. The exponent of a
// product is carried between pipeline stages as a 10-bit two's-complement
// number, wide enough for every sum E1 + E2 - 127 of two 8-bit exponents
// (-127 .. 383) plus the increment of normalisation and rounding.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;     // with the hidden one
  localparam int unsigned WORD_W = 1 + EXP_W + FRAC_W;
  localparam int unsigned BIAS   = 127;
  localparam int unsigned EXP_MAX = 255;           // all-ones exponent
  localparam int unsigned XEXP_W = 10;             // signed exponent between stages
  localparam int unsigned PROD_W = 2 * MANT_W;     // 48-bit significand product

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Stage-1 register contents: both operands and the zero flag.
  typedef struct packed {
    fp32_t a;
    fp32_t b;
    logic  zero;
  } stage1_t;

  // Stage-2 register contents besides the product (held in the multiplier).
  typedef struct packed {
    logic                     sign;
    logic signed [XEXP_W-1:0] exp;
    logic                     zero;
  } stage2_t;

endpackage
