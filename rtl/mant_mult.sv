// Significand multiplier: modified Booth recoding, Wallace tree, CLA.
//
// p = x * y for two N-bit unsigned significands (hidden bit included).
// booth_pp_gen recodes y in radix 4 and forms (N+2)/2 partial-product rows
// (13 for N = 24); wallace_tree compresses them to a Sum row and a Carry
// row; cla_adder adds the two into the 2N-bit product. The rows are summed
// modulo 2^(2N), which is exact because the product of two N-bit values is
// below 2^(2N). The Wallace tree is wired for 13 rows, so N must be 23 or 24.
//
// Purely combinational.
module mant_mult #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = (N + 2) / 2;

  logic [W-1:0] pp [ROWS];
  logic [W-1:0] tree_sum, tree_carry;

  booth_pp_gen #(.N(N), .ROWS(ROWS), .W(W)) u_pp (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  wallace_tree #(.W(W)) u_tree (
    .pp    (pp),
    .sum   (tree_sum),
    .carry (tree_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .x (tree_sum),
    .y (tree_carry),
    .s (p)
  );

  initial assert (ROWS == 13) else $error("mant_mult: the Wallace tree needs 13 rows, N=%0d gives %0d", N, ROWS);

endmodule
