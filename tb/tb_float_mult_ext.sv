// Testbench for the other float_mult configurations: the 40-bit extended
// output (31-bit mantissa) with truncation, and the 32- and 40-bit outputs
// with round-to-nearest-even. All three instances get the same operand
// stream (random operands over the full exponent range, gaps with en low,
// plus values whose rounding carries into the exponent) and are compared
// with the double-precision reference model two rising edges after each
// operand pair is presented.
module tb_float_mult_ext;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [39:0] c_xt, c_xr;
  logic [31:0] c_r;
  logic        v_xt, v_xr, v_r;
  int checks = 0, failures = 0;
  int n_roundup = 0;

  float_mult #(.MAN_OUT_W(31), .ROUND(ROUND_TRUNC))        u_xt (.clk, .rst_n, .en, .a, .b, .c(c_xt), .valid(v_xt));
  float_mult #(.MAN_OUT_W(31), .ROUND(ROUND_NEAREST_EVEN)) u_xr (.clk, .rst_n, .en, .a, .b, .c(c_xr), .valid(v_xr));
  float_mult #(.MAN_OUT_W(23), .ROUND(ROUND_NEAREST_EVEN)) u_r  (.clk, .rst_n, .en, .a, .b, .c(c_r),  .valid(v_r));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] pa [2], pb [2];
  logic        pv [2];

  task automatic check_out();
    logic [39:0] e_xt, e_xr;
    logic [31:0] e_r;
    checks++;
    if (pv[1]) begin
      e_xt = 40'(ref_mult(pa[1], pb[1], 31, 0));
      e_xr = 40'(ref_mult(pa[1], pb[1], 31, 1));
      e_r  = 32'(ref_mult(pa[1], pb[1], 23, 1));
      if (e_r != 32'(ref_mult(pa[1], pb[1], 23, 0))) n_roundup++;
      if (!v_xt || !v_xr || !v_r || c_xt != e_xt || c_xr != e_xr || c_r != e_r) begin
        failures++;
        $display("FAIL a=%h b=%h got %h %h %h expected %h %h %h", pa[1], pb[1], c_xt, c_xr, c_r, e_xt, e_xr, e_r);
      end
    end else if (v_xt || v_xr || v_r) begin
      failures++;
      $display("FAIL valid without a pending result");
    end
  endtask

  task automatic step(input bit go, input logic [31:0] av, input logic [31:0] bv);
    @(negedge clk);
    check_out();
    pa[1] = pa[0]; pb[1] = pb[0]; pv[1] = pv[0];
    en = go; a = av; b = bv;
    pa[0] = av; pb[0] = bv; pv[0] = go;
  endtask

  initial begin
    pv[0] = 0; pv[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(1, 32'h3fffffff, 32'h3fffffff);   // rounds up across the mantissa
    step(1, 32'h3fb504f3, 32'h3fb504f3);
    step(1, 32'h7f7fffff, 32'h3f800001);   // rounding pushes into overflow
    for (int k = 0; k < 3000; k++) begin
      if ($urandom % 6 == 0) step(0, 32'($urandom), 32'($urandom));
      else step(1, {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)},
                   {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)});
    end
    repeat (3) step(0, 0, 0);
    checks++;
    if (n_roundup == 0) begin failures++; $display("FAIL no result was rounded up"); end
    $display("rounded up: %0d", n_roundup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
