// Shared types and constants of the floating-point multiplier.
//
// Inputs are IEEE-754 single-precision words (1 sign, 8 exponent, 23
// mantissa bits). The significand datapath works on 24-bit values (hidden
// bit plus mantissa) and forms a 48-bit product; the modified Booth recoding
// of the 24-bit multiplier (extended by a zero sign bit to 25 bits) gives 13
// partial-product rows. The output mantissa width is a parameter of the
// modules that use it; 23 bits gives an IEEE single result, 31 bits the
// 40-bit extended format.
package fpm_pkg;

  localparam int unsigned EXP_W   = 8;
  localparam int unsigned MAN_W   = 23;
  localparam int unsigned SIG_W   = MAN_W + 1;          // 24: hidden bit + mantissa
  localparam int unsigned PROD_W  = 2 * SIG_W;          // 48
  localparam int unsigned PP_ROWS = (SIG_W + 2) / 2;    // 13 Booth rows for 25-bit signed multiplier
  localparam int unsigned BIAS    = 127;
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;   // 255, first overflowing biased exponent

  // Signed working width of exponents: holds 2*255 - 127 + 2 and -127.
  localparam int unsigned EXPW_W  = EXP_W + 2;

  typedef struct packed {
    logic               sign;
    logic [EXP_W-1:0]   exp;
    logic [MAN_W-1:0]   man;
  } fp32_t;

  // How the normalised product is cut to the output mantissa width.
  typedef enum logic [0:0] {
    ROUND_TRUNC        = 1'b0,  // discard the low bits (round toward zero)
    ROUND_NEAREST_EVEN = 1'b1   // IEEE round to nearest, ties to even
  } round_mode_e;

endpackage
