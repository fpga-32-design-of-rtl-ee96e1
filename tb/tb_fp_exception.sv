// Self-checking testbench for fp_exception: exponents from deep underflow
// to far overflow, including the edges 0, 1, 254 and 255, random mantissas
// and signs, and zero products. Overflow must give the largest finite
// magnitude with the sign kept, underflow and zero must give exponent 0 and
// mantissa 0.
module tb_fp_exception;
  logic sign, zero, ovf, unf;
  logic signed [9:0] exp_n;
  logic [22:0] man;
  logic [31:0] c;
  int checks = 0, failures = 0;

  fp_exception dut (.sign, .exp_n, .man, .zero, .c, .ovf, .unf);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [31:0] expected;
    bit eo, eu;
    #1;
    eo = !zero && int'(exp_n) > 254;
    eu = !zero && int'(exp_n) < 1;
    if (zero || eu)   expected = {sign, 31'h0};
    else if (eo)      expected = {sign, 8'hfe, 23'h7fffff};
    else              expected = {sign, 8'(exp_n), man};
    checks++;
    if (c !== expected || ovf != eo || unf != eu) begin
      failures++;
      $display("FAIL sign=%b exp=%0d man=%h zero=%b got %h ovf=%b unf=%b expected %h",
               sign, exp_n, man, zero, c, ovf, unf, expected);
    end
  endtask

  initial begin
    static int edges [8] = '{-200, -1, 0, 1, 254, 255, 256, 383};
    foreach (edges[i]) begin
      for (int z = 0; z < 2; z++) begin
        exp_n = 10'(edges[i]); man = 23'($urandom); sign = 1'($urandom); zero = z[0];
        check();
      end
    end
    for (int k = 0; k < 5000; k++) begin
      exp_n = 10'($urandom_range(0, 800)) - 10'sd250;
      man = 23'($urandom); sign = 1'($urandom); zero = ($urandom % 16) == 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
