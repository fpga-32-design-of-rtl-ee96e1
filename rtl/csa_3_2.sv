// 3:2 compressor (full adder): a + b + ci = s + 2*co.
//
// The cell of the carry-save rows in the partial-product tree.
// Purely combinational.
module csa_3_2 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
