// End-to-end testbench for float_mult at its default parameters (IEEE
// single output, truncation).
//
// Operands are driven on the falling clock edge; the multiplier captures
// them at the next rising edge and must show the product with valid high
// exactly one rising edge later. Every output is compared with the
// double-precision reference model of fpm_ref_pkg. The stimulus covers two
// published test pairs (checked against their published products), random
// operands over the full exponent range, back-to-back operands, gaps with
// en low, zero operands, exponent overflow and underflow, and a reset in
// the middle of a stream. Each of these mechanisms, and both outcomes of the
// normalising shift, is counted, and one that never happened is a failure.
module tb_float_mult;
  import fpm_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [31:0] c;
  logic        valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct { int due; logic [31:0] val; logic [31:0] a; logic [31:0] b; } exp_t;
  exp_t q [$];

  // Mechanism counters
  int n_shift = 0, n_noshift = 0, n_zero = 0, n_ovf = 0, n_unf = 0;
  int n_b2b = 0, n_gap = 0, n_reset = 0, n_results = 0;
  logic en_prev = 1'b0;

  float_mult dut (.clk, .rst_n, .en, .a, .b, .c, .valid);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.mult_en) begin
      if (dut.zero) n_zero++;
      else if (dut.ovf) n_ovf++;
      else if (dut.unf) n_unf++;
      if (!dut.zero) begin
        if (dut.shifted) n_shift++; else n_noshift++;
      end
    end
    if (rst_n) begin
      if (en && en_prev) n_b2b++;
      if (!en && en_prev) n_gap++;
      en_prev <= en;
    end
  end

  // Check the output at each falling edge, before new operands are driven.
  task automatic check_out();
    checks++;
    if (q.size() != 0 && q[0].due == cyc) begin
      exp_t e = q.pop_front();
      n_results++;
      if (!valid || c != e.val) begin
        failures++;
        $display("FAIL cycle %0d a=%h b=%h got valid=%b c=%h expected %h", cyc, e.a, e.b, valid, c, e.val);
      end
    end else if (valid) begin
      failures++;
      $display("FAIL cycle %0d valid without a pending result", cyc);
    end
  endtask

  // One falling edge: check, then drive the next operands (or none).
  task automatic step(input bit go, input logic [31:0] av, input logic [31:0] bv);
    @(negedge clk);
    check_out();
    en = go;
    a  = go ? av : 32'($urandom);   // operands are don't-care while en is low
    b  = go ? bv : 32'($urandom);
    if (go) q.push_back('{due: cyc + 2, val: 32'(ref_mult(av, bv, 23, 0)), a: av, b: bv});
  endtask

  function automatic logic [31:0] rand_fp(input int lo, input int hi);
    return {1'($urandom), 8'($urandom_range(lo, hi)), 23'($urandom)};
  endfunction

  initial begin
    logic [31:0] prev_c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // The two published pairs, back to back
    step(1, 32'h3f67e1fb, 32'h3e0208d5);
    step(1, 32'h3f78e1fb, 32'h3e0299d5);
    step(0, 0, 0);                      // pair 1 is on c from this falling edge
    checks++;
    if (c != 32'h3deb9182) begin failures++; $display("FAIL published pair 1 gave %h", c); end
    step(0, 0, 0);
    checks++;
    if (c != 32'h3dfdf09f) begin failures++; $display("FAIL published pair 2 gave %h", c); end

    // Output holds while no new result arrives
    prev_c = c;
    repeat (3) step(0, 0, 0);
    checks++;
    if (c != prev_c) begin failures++; $display("FAIL output not held"); end

    // Directed corner cases
    step(1, 32'h3f800000, 32'h3f800000);           // 1 * 1, no shift
    step(1, 32'h3fffffff, 32'h3fffffff);           // ~2 * ~2, shift
    step(1, 32'h00000000, 32'h40490fdb);           // zero operand
    step(1, 32'hc0490fdb, 32'h80123456);           // denormal counts as zero
    step(1, 32'h7f000000, 32'h7f000000);           // overflow, positive
    step(1, 32'hff000000, 32'h7f000000);           // overflow, negative
    step(1, 32'h00800000, 32'h00800000);           // underflow
    step(1, 32'h3f000000, 32'h00800000);           // underflow by one
    step(1, 32'h3f800000, 32'h00800000);           // smallest normal stays
    step(1, 32'h7f7fffff, 32'h3f800000);           // largest finite stays
    step(1, 32'h7f7fffff, 32'h3fffffff);           // overflow after the shift

    // Random stream: mostly back to back, with gaps
    for (int k = 0; k < 4000; k++) begin
      if ($urandom % 5 == 0) step(0, 0, 0);
      else if (k % 3 == 0) step(1, rand_fp(0, 255), rand_fp(0, 255));
      else step(1, rand_fp(64, 190), rand_fp(64, 190));
    end

    // Reset in the middle of a stream: pending results are dropped
    step(1, 32'h40400000, 32'h40400000);
    step(1, 32'h40a00000, 32'h40a00000);
    @(negedge clk);
    rst_n = 1'b0;
    en = 1'b0;
    #1;
    checks++;
    if (valid || c != 0) begin failures++; $display("FAIL reset did not clear the outputs"); end
    else n_reset++;
    q.delete();
    @(negedge clk);
    rst_n = 1'b1;
    step(1, 32'h40400000, 32'hc0400000);
    repeat (4) step(0, 0, 0);

    // Every mechanism must have occurred
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_zero == 0 || n_ovf == 0 || n_unf == 0 ||
        n_b2b == 0 || n_gap == 0 || n_reset == 0 || q.size() != 0) begin
      failures++;
      $display("FAIL coverage or pending results left (%0d)", q.size());
    end
    $display("mechanisms: shift=%0d no_shift=%0d zero=%0d overflow=%0d underflow=%0d back_to_back=%0d gap=%0d reset=%0d results=%0d",
             n_shift, n_noshift, n_zero, n_ovf, n_unf, n_b2b, n_gap, n_reset, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
