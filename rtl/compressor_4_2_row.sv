// A W-bit row of 4:2 compressors.
//
// Reduces four W-bit operands to two: a + b + c + d = sum + carry (modulo
// 2^W). COUT of bit i feeds CIN of bit i+1 and CIN of bit 0 is 0; since COUT
// does not depend on CIN this chain has no ripple. carry is returned already
// shifted to its weight (C of bit i lands at bit i+1); what leaves bit W-1
// is dropped.
//
// Purely combinational.
module compressor_4_2_row #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W:0]   chain;  // chain[i] is CIN of bit i
  logic [W-1:0] cbit;

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor_4_2 u_cmp (
      .p    ({d[i], c[i], b[i], a[i]}),
      .cin  (chain[i]),
      .s    (sum[i]),
      .c    (cbit[i]),
      .cout (chain[i+1])
    );
  end

  assign carry = {cbit[W-2:0], 1'b0};

endmodule
