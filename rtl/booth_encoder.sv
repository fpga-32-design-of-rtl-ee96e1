// Modified (radix-4) Booth encoder for one multiplier group.
//
// The group is three overlapping multiplier bits {y(2i+1), y(2i), y(2i-1)}.
// The two lower bits weigh +1 and the upper bit weighs -2, so the digit is
// y(2i-1) + y(2i) - 2*y(2i+1), one of {0, +X, -X, +2X, -2X}. The digit is
// returned as three selects: one (|digit| = 1), two (|digit| = 2) and neg
// (digit < 0). The codes 000 and 111 both give 0 with neg low, so a zero
// row never carries a +1 correction.
//
// Purely combinational.
module booth_encoder (
  input  logic [2:0] grp,   // {y(2i+1), y(2i), y(2i-1)}
  output logic       one,
  output logic       two,
  output logic       neg
);

  always_comb begin
    one = grp[1] ^ grp[0];
    two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
