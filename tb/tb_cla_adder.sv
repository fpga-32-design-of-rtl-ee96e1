// Self-checking testbench for cla_adder at its 48-bit default: corner and
// random operands, compared with integer addition modulo 2^48. The corners
// make carries travel across every 4-bit block and 16-bit group.
module tb_cla_adder;
  localparam int W = 48;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  cla_adder dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (s != W'(x + y)) begin
      failures++;
      $display("FAIL %h + %h got %h", x, y, s);
    end
  endtask

  initial begin
    x = '1; y = 48'd1; check();
    x = '1; y = '1; check();
    x = 48'h0000_ffff_ffff; y = 48'h1; check();
    x = 48'h7fff_ffff_ffff; y = 48'h1; check();
    for (int k = 0; k < 48; k++) begin
      x = (W'(1) << k) - 1; y = W'(1); check();
    end
    for (int k = 0; k < 5000; k++) begin
      x = W'({$urandom, $urandom}); y = W'({$urandom, $urandom});
      if (k % 2 == 1) y = ~x ^ (W'(1) << ($urandom % W));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
