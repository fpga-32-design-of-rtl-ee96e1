// Self-checking testbench for csa_3_2: all eight input combinations,
// a + b + ci = s + 2*co.
module tb_csa_3_2;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  csa_3_2 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, ci} = 3'(k);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(ci) != int'(s) + 2 * int'(co)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b s=%b co=%b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
