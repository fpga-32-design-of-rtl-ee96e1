// A W-bit carry-save adder row of 3:2 compressors.
//
// Reduces three W-bit operands to two: a + b + c = sum + carry (modulo
// 2^W). carry is returned already shifted to its weight; the carry out of
// bit W-1 is dropped.
//
// Purely combinational.
module csa_3_2_row #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_bit
    csa_3_2 u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (sum[i]),
      .co (co[i])
    );
  end

  assign carry = {co[W-2:0], 1'b0};

endmodule
