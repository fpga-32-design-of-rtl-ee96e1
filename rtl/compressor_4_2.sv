// One-bit 4:2 compressor.
//
// Adds four bits of equal weight and a carry from the next lower bit
// position: P1 + P2 + P3 + P4 + CIN = S + 2*(C + COUT).
// S is the XOR of all five inputs and COUT = P1.P2 + P3.P4, so COUT does not
// depend on CIN and a row of these cells has no carry ripple. The carry C
// picks CIN when the four inputs hold an odd number of ones, and otherwise
// is high when the ones are split across the two input pairs
// ((P1+P2).(P3+P4)), which together with that COUT makes the cell exact.
//
// Purely combinational.
module compressor_4_2 (
  input  logic [3:0] p,     // P1 = p[0] .. P4 = p[3]
  input  logic       cin,
  output logic       s,
  output logic       c,
  output logic       cout
);

  logic x4;

  always_comb begin
    x4   = ^p;
    s    = x4 ^ cin;
    cout = (p[0] & p[1]) | (p[2] & p[3]);
    c    = x4 ? cin : ((p[0] | p[1]) & (p[2] | p[3]));
  end

endmodule
