// Wallace tree for the 13 modified-Booth partial-product rows.
//
// Compresses the rows to one Sum and one Carry row whose total equals the
// total of the rows modulo 2^W. The tree is built mostly from rows of 4:2
// compressors, which keep the wiring regular, with one row of 3:2
// compressors where three operands are left:
//
//   level 1: rows 0-3, 4-7, 8-11 -> three 4:2 rows (12 -> 6), row 12 passes
//   level 2: four operands -> one 4:2 row, three operands -> one 3:2 row (7 -> 4)
//   level 3: one 4:2 row (4 -> 2)
//
// Three compressor levels for 13 rows. The grouping is this design's choice.
//
// Purely combinational.
module wallace_tree #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] pp [13],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] l1 [7];
  logic [W-1:0] l2 [4];

  // Level 1
  for (genvar g = 0; g < 3; g++) begin : g_l1
    compressor_4_2_row #(.W(W)) u_c42 (
      .a (pp[4*g]), .b (pp[4*g+1]), .c (pp[4*g+2]), .d (pp[4*g+3]),
      .sum (l1[2*g]), .carry (l1[2*g+1])
    );
  end
  assign l1[6] = pp[12];

  // Level 2
  compressor_4_2_row #(.W(W)) u_l2_c42 (
    .a (l1[0]), .b (l1[1]), .c (l1[2]), .d (l1[3]),
    .sum (l2[0]), .carry (l2[1])
  );
  csa_3_2_row #(.W(W)) u_l2_c32 (
    .a (l1[4]), .b (l1[5]), .c (l1[6]),
    .sum (l2[2]), .carry (l2[3])
  );

  // Level 3
  compressor_4_2_row #(.W(W)) u_l3_c42 (
    .a (l2[0]), .b (l2[1]), .c (l2[2]), .d (l2[3]),
    .sum (sum), .carry (carry)
  );

endmodule
