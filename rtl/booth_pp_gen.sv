// Modified Booth partial-product generator.
//
// The multiplicand X and the multiplier Y are N-bit unsigned significands.
// Each is read as an (N+1)-bit two's-complement number with a zero sign bit.
// The multiplier is cut into ROWS overlapping 3-bit groups (y(-1) = 0 and
// the bits above the sign bit are 0), and each group selects 0, X, 2X, -X or
// -2X through booth_encoder. A negative row is formed as the one's
// complement of the selected magnitude; the missing +1 is placed in the next
// row at the column of the row's own least significant bit, in a slot that
// row leaves empty. Every row is sign extended to the full W-bit product
// width, so the rows add to X*Y modulo 2^W. Because the multiplier's sign
// bit is 0, the top group can only select 0 or +X and needs no +1 of its
// own, which is why ROWS = (N+2)/2 rows suffice.
//
// Purely combinational. Output pp[r] is row r, already shifted by 2r.
module booth_pp_gen #(
  parameter int unsigned N    = 24,
  parameter int unsigned ROWS = (N + 2) / 2,
  parameter int unsigned W    = 2 * N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [W-1:0] pp [ROWS]
);

  localparam int unsigned YW = 2 * ROWS + 1;  // y(-1) .. y(2*ROWS-1)
  localparam int unsigned SW = N + 2;         // width of a selected multiple (2X needs N+1 bits plus sign)

  logic [YW-1:0] yext;        // yext[k] = y(k-1)
  logic [ROWS-1:0] one, two, neg;

  assign yext = {{(YW - N - 1){1'b0}}, y, 1'b0};

  for (genvar r = 0; r < ROWS; r++) begin : g_enc
    booth_encoder u_enc (
      .grp (yext[2*r +: 3]),
      .one (one[r]),
      .two (two[r]),
      .neg (neg[r])
    );
  end

  always_comb begin
    logic [SW-1:0] mag;
    logic [SW-1:0] sel;
    logic [W-1:0]  row;
    for (int r = 0; r < ROWS; r++) begin
      mag = '0;
      if (one[r]) mag = {2'b00, x};
      if (two[r]) mag = {1'b0, x, 1'b0};
      sel = mag ^ {SW{neg[r]}};
      row = W'({{(W - SW){sel[SW-1]}}, sel} << (2 * r));
      if (r > 0) row[2*(r-1)] = neg[r-1];
      pp[r] = row;
    end
  end

  // The top row is never negative: its +1 would have no row to go to.
  always_comb assert (neg[ROWS-1] == 1'b0);

endmodule
