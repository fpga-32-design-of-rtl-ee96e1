// Self-checking testbench for mant_mult: corner and random 24-bit
// significands (hidden bit set, and some arbitrary values), compared with
// the integer product.
module tb_mant_mult;
  localparam int N = 24;
  logic [N-1:0] x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  mant_mult dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [2*N-1:0] expected;
    #1;
    expected = (2*N)'(longint'(x) * longint'(y));
    checks++;
    if (p != expected) begin
      failures++;
      $display("FAIL %h * %h got %h expected %h", x, y, p, expected);
    end
  endtask

  initial begin
    static logic [N-1:0] corners [7] = '{24'h800000, 24'hffffff, 24'h000000, 24'h000001, 24'haaaaaa, 24'h555555, 24'hc00001};
    foreach (corners[i]) foreach (corners[j]) begin
      x = corners[i]; y = corners[j]; check();
    end
    for (int k = 0; k < 5000; k++) begin
      x = N'($urandom); y = N'($urandom);
      if (k % 2 == 0) begin x[N-1] = 1'b1; y[N-1] = 1'b1; end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
