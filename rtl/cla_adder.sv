// Carry look-ahead adder for the final Sum and Carry rows.
//
// s = x + y modulo 2^W. The operands are padded to 64 bits and cut into
// sixteen 4-bit carry look-ahead blocks (cla4). Four look-ahead carry units
// (cla_lcu4) form the carries into the blocks of each 16-bit group from the
// blocks' G/P, and a fifth unit forms the carries into the four 16-bit groups
// from the groups' G/P. Every carry thus comes from three look-ahead levels
// and no carry ripples from block to block. W may be at most 64.
//
// Purely combinational.
module cla_adder #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  localparam int unsigned PW = 64;

  logic [PW-1:0] xp, yp, sp;
  logic [15:0]   bg, bp, bc;    // per 4-bit block: G, P, carry in
  logic [3:0]    sg, sgp, sc;   // per 16-bit group: G, P, carry in
  logic [15:0]   bc4_unused;
  logic          top_g, top_p;

  assign xp = PW'(x);
  assign yp = PW'(y);

  for (genvar k = 0; k < 16; k++) begin : g_blk
    cla4 u_cla4 (
      .x  (xp[4*k +: 4]),
      .y  (yp[4*k +: 4]),
      .c0 (bc[k]),
      .s  (sp[4*k +: 4]),
      .c4 (bc4_unused[k]),
      .gg (bg[k]),
      .gp (bp[k])
    );
  end

  for (genvar j = 0; j < 4; j++) begin : g_grp
    cla_lcu4 u_lcu (
      .g  (bg[4*j +: 4]),
      .p  (bp[4*j +: 4]),
      .c0 (sc[j]),
      .c  (bc[4*j +: 4]),
      .gg (sg[j]),
      .gp (sgp[j])
    );
  end

  cla_lcu4 u_lcu_top (
    .g  (sg),
    .p  (sgp),
    .c0 (1'b0),
    .c  (sc),
    .gg (top_g),
    .gp (top_p)
  );

  assign s = sp[W-1:0];

  initial assert (W <= PW) else $error("cla_adder: W=%0d exceeds %0d", W, PW);

endmodule
