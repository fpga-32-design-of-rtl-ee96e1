// Self-checking testbench for booth_encoder: all eight group codes are
// applied and the selected digit (one/two/neg) is compared with the
// radix-4 Booth digit y(2i-1) + y(2i) - 2*y(2i+1).
module tb_booth_encoder;
  logic [2:0] grp;
  logic one, two, neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .one(one), .two(two), .neg(neg));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int digit, got;
    for (int k = 0; k < 8; k++) begin
      grp = 3'(k);
      #1;
      digit = int'(grp[0]) + int'(grp[1]) - 2 * int'(grp[2]);
      got = (one ? 1 : 0) + (two ? 2 : 0);
      if (neg) got = -got;
      checks++;
      if (got != digit || (one && two) || (digit == 0 && neg)) begin
        failures++;
        $display("FAIL grp=%b one=%b two=%b neg=%b expected digit %0d", grp, one, two, neg, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
