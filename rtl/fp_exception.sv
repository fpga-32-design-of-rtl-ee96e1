// Exponent range check and result packing.
//
// exp_n is the signed biased exponent of the normalised, rounded product.
// A zero product gives exponent field 0 and mantissa 0 (the reserved
// smallest exponent). An exponent of 2^8-1 or more is an overflow: the
// result saturates to the largest finite magnitude (exponent 254, mantissa
// all ones) with the product's sign, the largest positive or most negative
// value. An exponent of 0 or less is an underflow: the result is flushed to
// exponent 0, mantissa 0. Otherwise sign, exponent and mantissa are packed
// as they are. The sign is kept in every case.
//
// Purely combinational. ovf and unf report the two exception cases.
module fp_exception
  import fpm_pkg::*;
#(
  parameter int unsigned MAN_OUT_W = 23
) (
  input  logic                       sign,
  input  logic signed [EXPW_W-1:0]   exp_n,
  input  logic [MAN_OUT_W-1:0]       man,
  input  logic                       zero,
  output logic [EXP_W+MAN_OUT_W:0]   c,
  output logic                       ovf,
  output logic                       unf
);

  always_comb begin
    ovf = ~zero & (exp_n >= $signed(EXPW_W'(EXP_MAX)));
    unf = ~zero & (exp_n <= 0);
    if (zero || unf)
      c = {sign, {EXP_W{1'b0}}, {MAN_OUT_W{1'b0}}};
    else if (ovf)
      c = {sign, EXP_W'(EXP_MAX - 1), {MAN_OUT_W{1'b1}}};
    else
      c = {sign, exp_n[EXP_W-1:0], man};
  end

endmodule
