// Self-checking testbench for booth_pp_gen: for corner and random 24-bit
// operands the 13 rows must add to x*y modulo 2^48, and each row with its
// negation bit moved back must equal the Booth digit of its group times x,
// shifted by twice the row index.
module tb_booth_pp_gen;
  localparam int N = 24, ROWS = 13, W = 48;
  logic [N-1:0] x, y;
  logic [W-1:0] pp [ROWS];
  int checks = 0, failures = 0;

  booth_pp_gen dut (.x(x), .y(y), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] total, expect_row, row;
    logic [2*ROWS+1:0] ye;
    longint digit;
    #1;
    total = '0;
    for (int r = 0; r < ROWS; r++) total += pp[r];
    checks++;
    if (total != W'(longint'(x) * longint'(y))) begin
      failures++;
      $display("FAIL sum x=%h y=%h rows=%h expected %h", x, y, total, W'(longint'(x) * longint'(y)));
    end
    ye = {{(2*ROWS+2-N-1){1'b0}}, y, 1'b0};
    for (int r = 0; r < ROWS; r++) begin
      digit = longint'(ye[2*r]) + longint'(ye[2*r+1]) - 2 * longint'(ye[2*r+2]);
      row = pp[r];
      if (r > 0) row[2*(r-1)] = 1'b0;
      // a negative row is the one's complement; its +1 sits in the next row
      expect_row = W'((digit * longint'(x)) << (2*r));
      if (digit < 0) expect_row = expect_row - (W'(1) << (2*r));
      checks++;
      if (row != expect_row) begin
        failures++;
        $display("FAIL row %0d x=%h y=%h got %h expected %h", r, x, y, row, expect_row);
      end
    end
  endtask

  initial begin
    static logic [N-1:0] corners [6] = '{24'h800000, 24'hffffff, 24'h000000, 24'haaaaaa, 24'h555555, 24'hc00001};
    foreach (corners[i]) foreach (corners[j]) begin
      x = corners[i]; y = corners[j]; check();
    end
    for (int k = 0; k < 2000; k++) begin
      x = N'($urandom); y = N'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
