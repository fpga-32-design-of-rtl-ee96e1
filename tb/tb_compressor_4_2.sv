// Self-checking testbench for compressor_4_2: all 32 input combinations.
// Checks P1+P2+P3+P4+CIN = S + 2*(C+COUT), the sum equation
// S = P1^P2^P3^P4^CIN and the carry-out equation COUT = P1.P2 + P3.P4.
module tb_compressor_4_2;
  logic [3:0] p;
  logic cin, s, c, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.p(p), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int in_sum, out_sum;
    for (int k = 0; k < 32; k++) begin
      {cin, p} = 5'(k);
      #1;
      in_sum  = int'(p[0]) + int'(p[1]) + int'(p[2]) + int'(p[3]) + int'(cin);
      out_sum = int'(s) + 2 * (int'(c) + int'(cout));
      checks += 3;
      if (in_sum != out_sum) begin
        failures++;
        $display("FAIL p=%b cin=%b: %0d != s=%b c=%b cout=%b", p, cin, in_sum, s, c, cout);
      end
      if (s != (p[0] ^ p[1] ^ p[2] ^ p[3] ^ cin)) begin
        failures++;
        $display("FAIL sum equation p=%b cin=%b", p, cin);
      end
      if (cout != ((p[0] & p[1]) | (p[2] & p[3]))) begin
        failures++;
        $display("FAIL carry-out equation p=%b", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
