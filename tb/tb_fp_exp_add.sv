// Self-checking testbench for fp_exp_add: all 65536 exponent pairs,
// compared with a_exp + b_exp - 127.
module tb_fp_exp_add;
  logic [7:0] a_exp, b_exp;
  logic signed [9:0] e_sum;
  int checks = 0, failures = 0;

  fp_exp_add dut (.a_exp(a_exp), .b_exp(b_exp), .e_sum(e_sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a_exp = 8'(i); b_exp = 8'(j);
        #1;
        checks++;
        if (int'(e_sum) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d got %0d", i, j, e_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
