// 4-bit carry look-ahead adder block.
//
// Bit generate g = x & y and propagate p = x ^ y. Every carry c1..c4 is
// formed directly from the g, p and c0 terms below it, so no carry waits for
// another; the sum bits are s = p ^ c. The block also returns its group
// generate G and group propagate P, which let a look-ahead carry unit form
// the carries between blocks in the same way.
//
// Purely combinational.
module cla4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       gg,   // group generate G
  output logic       gp    // group propagate P
);

  logic [3:0] g, p;
  logic [3:0] c;     // c[i] is the carry into bit i

  always_comb begin
    g = x & y;
    p = x ^ y;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
    c4   = gg | (gp & c0);
    s    = p ^ c;
  end

endmodule
