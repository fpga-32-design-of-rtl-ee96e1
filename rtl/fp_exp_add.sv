// Exponent adder.
//
// Adds the two biased exponents and removes one bias:
// e_sum = a_exp + b_exp - BIAS, as a signed value wide enough for every
// result (-BIAS .. 2*(2^E-1) - BIAS) and for the later +1 of normalisation.
// The normalisation step adds its correction to this value, and the
// exception step compares it with the valid range.
//
// Purely combinational.
module fp_exp_add #(
  parameter int unsigned E    = 8,
  parameter int unsigned BIAS = 127
) (
  input  logic [E-1:0]        a_exp,
  input  logic [E-1:0]        b_exp,
  output logic signed [E+1:0] e_sum
);

  always_comb
    e_sum = $signed({2'b00, a_exp}) + $signed({2'b00, b_exp}) - $signed((E+2)'(BIAS));

endmodule
