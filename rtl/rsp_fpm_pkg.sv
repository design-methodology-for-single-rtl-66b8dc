// Shared types and constants of the reversible single precision floating
// point multiplier. fp32_t is the IEEE 754 binary32 layout (1 sign bit,
// 8 exponent bits, 23 fraction bits); the product word is this design's
// unrounded 64-bit result: sign, seven zero bits, the 8-bit exponent field
// and the full 48-bit significand product.
package rsp_fpm_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with hidden 1
  localparam int unsigned PROD_W = 2 * SIG_W;    // 48-bit significand product
  localparam int unsigned BIAS   = 127;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef struct packed {
    logic              sign;
    logic [6:0]        zero;
    logic [EXP_W-1:0]  exp;
    logic [PROD_W-1:0] mant;
  } product_t;

endpackage
