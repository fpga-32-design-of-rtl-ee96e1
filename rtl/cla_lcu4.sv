// Look-ahead carry unit for four groups.
//
// Given the generate/propagate pair of four adjacent groups and the carry
// into the lowest, it forms the carry into each group in parallel, with the
// same equations a 4-bit carry look-ahead block uses for its bits, and
// returns the generate/propagate pair of the four groups together.
//
// Purely combinational.
module cla_lcu4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       c0,
  output logic [3:0] c,    // c[i] is the carry into group i
  output logic       gg,
  output logic       gp
);

  always_comb begin
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
  end

endmodule
