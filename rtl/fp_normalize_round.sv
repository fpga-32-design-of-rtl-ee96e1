// Normalisation and rounding of the significand product.
//
// prod is the 48-bit product of two significands in [1, 2), so it lies in
// [1, 4) with the binary point after bit 46. If bit 47 is set the product is
// shifted right one place and the exponent is increased by one (Normal = 1);
// otherwise it is already normalised (Normal = 0). The bits below the hidden
// bit are then cut to MAN_OUT_W bits: ROUND_TRUNC drops the rest,
// ROUND_NEAREST_EVEN rounds to nearest with ties to even, and if that carries
// out of the mantissa the value is 2.0, so the mantissa becomes 0 and the
// exponent is increased once more. A zero operand or a zero product gives
// zero = 1.
//
// Purely combinational. exp_n is the signed biased exponent for the
// exception step; shifted reports that the one-place shift was applied.
module fp_normalize_round
  import fpm_pkg::*;
#(
  parameter int unsigned MAN_OUT_W = 23,
  parameter round_mode_e ROUND     = ROUND_TRUNC
) (
  input  logic [PROD_W-1:0]        prod,
  input  logic signed [EXPW_W-1:0] e_sum,
  input  logic                     zero_in,
  output logic [MAN_OUT_W-1:0]     man,
  output logic signed [EXPW_W-1:0] exp_n,
  output logic                     zero,
  output logic                     shifted
);

  localparam int unsigned FRAC_W = PROD_W - 1;        // fraction bits after normalising: 47
  localparam int unsigned REST_W = FRAC_W - MAN_OUT_W; // bits cut off

  logic [PROD_W-1:0]    norm;
  logic [MAN_OUT_W-1:0] man_t;
  logic [REST_W-1:0]    rest;
  logic                 inc, carry;

  always_comb begin
    zero    = zero_in | (prod == '0);
    shifted = prod[PROD_W-1];
    // Align the hidden bit to bit 47; a right shift by one is the same as
    // leaving the product in place and reading one bit higher.
    norm    = shifted ? prod : {prod[PROD_W-2:0], 1'b0};
    {man_t, rest} = norm[FRAC_W-1:0];
    if (ROUND == ROUND_NEAREST_EVEN)
      inc = rest[REST_W-1] & ((|rest[REST_W-2:0]) | man_t[0]);
    else
      inc = 1'b0;
    {carry, man} = {1'b0, man_t} + (MAN_OUT_W+1)'(inc);
    exp_n = e_sum + EXPW_W'(shifted) + EXPW_W'(carry);
  end

  initial assert (MAN_OUT_W >= 1 && MAN_OUT_W <= FRAC_W - 2)
    else $error("fp_normalize_round: MAN_OUT_W=%0d out of range", MAN_OUT_W);

endmodule
