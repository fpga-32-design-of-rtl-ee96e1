// Self-checking testbench for cla4: all 512 combinations of x, y, c0.
// Checks the sum and carry out against integer addition, and the group
// generate/propagate against their definitions (G: the block produces a
// carry by itself; P: x + y = 15, so a carry in passes through).
module tb_cla4;
  logic [3:0] x, y, s;
  logic c0, c4, gg, gp;
  int checks = 0, failures = 0;

  cla4 dut (.x(x), .y(y), .c0(c0), .s(s), .c4(c4), .gg(gg), .gp(gp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int k = 0; k < 512; k++) begin
      {c0, x, y} = 9'(k);
      #1;
      total = int'(x) + int'(y) + int'(c0);
      checks += 3;
      if ({c4, s} != 5'(total)) begin
        failures++;
        $display("FAIL %h+%h+%b = %h got %b%h", x, y, c0, total, c4, s);
      end
      if (gg != (int'(x) + int'(y) > 15)) begin
        failures++;
        $display("FAIL G x=%h y=%h", x, y);
      end
      if (gp != (int'(x) + int'(y) == 15 && (x & y) == 0)) begin
        failures++;
        $display("FAIL P x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
