// Self-checking testbench for wallace_tree: 13 random 48-bit rows (and
// all-ones / all-zero rows) must reduce to Sum + Carry equal to the sum of
// the rows modulo 2^48.
module tb_wallace_tree;
  localparam int W = 48;
  logic [W-1:0] pp [13];
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;

  wallace_tree dut (.pp(pp), .sum(sum), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] total;
    #1;
    total = '0;
    for (int r = 0; r < 13; r++) total += pp[r];
    checks++;
    if (W'(sum + carry) != total) begin
      failures++;
      $display("FAIL sum=%h carry=%h total=%h", sum, carry, total);
    end
  endtask

  initial begin
    for (int r = 0; r < 13; r++) pp[r] = '1;
    check();
    for (int r = 0; r < 13; r++) pp[r] = '0;
    check();
    for (int k = 0; k < 3000; k++) begin
      for (int r = 0; r < 13; r++) begin
        pp[r] = W'({$urandom, $urandom});
        // sparse rows now and then, so that few-ones columns are covered
        if (k % 3 == 1) pp[r] &= W'({$urandom, $urandom});
        if (k % 3 == 2) pp[r] |= W'({$urandom, $urandom});
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
