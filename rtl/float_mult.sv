// Pipelined 32-bit floating-point multiplier.
//
// Multiplies two IEEE-754 single-precision numbers a and b. The operands are
// captured into a_reg/b_reg at a clock edge where en is high (otherwise the
// registers hold). In the following cycle the datapath works on the
// registered operands:
//   - fp_exp_add adds the exponents and removes the bias,
//   - mant_mult multiplies the 24-bit significands (modified Booth
//     recoding into 13 rows, Wallace tree of 4:2/3:2 compressors, carry
//     look-ahead final adder),
//   - fp_normalize_round shifts the product right by one place when it is
//     2 or more, adds that to the exponent and cuts the mantissa to
//     MAN_OUT_W bits,
//   - fp_exception saturates on exponent overflow, flushes on underflow or a
//     zero operand, and packs the result,
// and the result is registered at the next edge, with valid.
//
// Timing: an operand pair presented with en at edge k appears on c with
// valid high after edge k+1; a new pair may be presented every cycle.
// Reset (rst_n low, asynchronous) clears all registers and valid.
//
// Number formats: an operand with exponent field 0 counts as zero;
// exponent field 255 is treated as an ordinary exponent. With the default
// MAN_OUT_W = 23 and ROUND_TRUNC, c is an IEEE single word whose mantissa is
// the product truncated toward zero; MAN_OUT_W = 31 gives a 40-bit extended
// result (1 sign, 8 exponent, 31 mantissa bits). The sign is registered
// together with exponent and mantissa.
module float_mult
  import fpm_pkg::*;
#(
  parameter int unsigned MAN_OUT_W = 23,
  parameter round_mode_e ROUND     = ROUND_TRUNC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [31:0]              a,
  input  logic [31:0]              b,
  output logic [EXP_W+MAN_OUT_W:0] c,
  output logic                     valid
);

  fp32_t a_reg, b_reg;
  logic  mult_en;

  logic                     a_zero, b_zero;
  logic signed [EXPW_W-1:0] e_sum, exp_n;
  logic [PROD_W-1:0]        prod;
  logic [MAN_OUT_W-1:0]     man;
  logic                     zero, shifted, ovf, unf, sign;
  logic [EXP_W+MAN_OUT_W:0] result;

  // Operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg   <= '0;
      b_reg   <= '0;
      mult_en <= 1'b0;
    end else begin
      mult_en <= en;
      if (en) begin
        a_reg <= a;
        b_reg <= b;
      end
    end
  end

  assign a_zero = (a_reg.exp == '0);
  assign b_zero = (b_reg.exp == '0);
  assign sign   = a_reg.sign ^ b_reg.sign;

  fp_exp_add #(.E(EXP_W), .BIAS(BIAS)) u_exp (
    .a_exp (a_reg.exp),
    .b_exp (b_reg.exp),
    .e_sum (e_sum)
  );

  mant_mult #(.N(SIG_W)) u_mant (
    .x ({~a_zero, a_reg.man}),
    .y ({~b_zero, b_reg.man}),
    .p (prod)
  );

  fp_normalize_round #(.MAN_OUT_W(MAN_OUT_W), .ROUND(ROUND)) u_norm (
    .prod    (prod),
    .e_sum   (e_sum),
    .zero_in (a_zero | b_zero),
    .man     (man),
    .exp_n   (exp_n),
    .zero    (zero),
    .shifted (shifted)
  );

  fp_exception #(.MAN_OUT_W(MAN_OUT_W)) u_exc (
    .sign  (sign),
    .exp_n (exp_n),
    .man   (man),
    .zero  (zero),
    .c     (result),
    .ovf   (ovf),
    .unf   (unf)
  );

  // Result registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= mult_en;
      if (mult_en) c <= result;
    end
  end

endmodule
