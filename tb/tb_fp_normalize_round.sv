// Self-checking testbench for fp_normalize_round, in four configurations:
// 23- and 31-bit output mantissa, each truncating and rounding to nearest
// even. Products are random products of significands, random values in
// [2^46, 2^48), all-ones (which rounds up to 2.0), exact ties and zero.
// The reference reads the normalising shift and the rounding off the
// double-precision encoding of the product.
module tb_fp_normalize_round;
  import fpm_pkg::*;
  logic [47:0] prod;
  logic signed [9:0] e_sum;
  logic zero_in;
  logic [22:0] man_t, man_r;
  logic [30:0] man_xt, man_xr;
  logic signed [9:0] exp_t, exp_r, exp_xt, exp_xr;
  logic zero_t, zero_r, zero_xt, zero_xr;
  logic sh_t, sh_r, sh_xt, sh_xr;
  int checks = 0, failures = 0;
  int n_shift = 0, n_roundup = 0, n_carry = 0;

  fp_normalize_round u_t (.prod, .e_sum, .zero_in, .man(man_t), .exp_n(exp_t), .zero(zero_t), .shifted(sh_t));
  fp_normalize_round #(.MAN_OUT_W(23), .ROUND(ROUND_NEAREST_EVEN)) u_r
    (.prod, .e_sum, .zero_in, .man(man_r), .exp_n(exp_r), .zero(zero_r), .shifted(sh_r));
  fp_normalize_round #(.MAN_OUT_W(31), .ROUND(ROUND_TRUNC)) u_xt
    (.prod, .e_sum, .zero_in, .man(man_xt), .exp_n(exp_xt), .zero(zero_xt), .shifted(sh_xt));
  fp_normalize_round #(.MAN_OUT_W(31), .ROUND(ROUND_NEAREST_EVEN)) u_xr
    (.prod, .e_sum, .zero_in, .man(man_xr), .exp_n(exp_xr), .zero(zero_xr), .shifted(sh_xr));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected {mantissa, exponent} of one configuration.
  function automatic void expect_nr(input int w, input bit nearest,
                                    output longint man, output int exp_n, output bit sh);
    logic [63:0] bits, keep, rem, half;
    int e;
    bits = $realtobits(real'(prod));
    e    = int'(bits[62:52]) - 1023;     // 46 or 47
    sh   = (e == 47);
    keep = {12'b0, bits[51:0]} >> (52 - w);
    rem  = {12'b0, bits[51:0]} & ((64'd1 << (52 - w)) - 1);
    half = 64'd1 << (51 - w);
    if (nearest && (rem > half || (rem == half && keep[0]))) keep++;
    if (keep == (64'd1 << w)) begin keep = 0; e++; end
    man   = longint'(keep);
    exp_n = int'(e_sum) + e - 46;
  endfunction

  task automatic cmp(input string tag, input int w, input bit nearest,
                     input longint man, input int exp_n, input bit zero, input bit sh);
    longint em; int ee; bit esh;
    checks++;
    if (zero_in || prod == 0) begin
      if (!zero) begin failures++; $display("FAIL %s zero not flagged prod=%h", tag, prod); end
      return;
    end
    expect_nr(w, nearest, em, ee, esh);
    if (zero || man != em || exp_n != ee || sh != esh) begin
      failures++;
      $display("FAIL %s prod=%h e_sum=%0d got man=%h exp=%0d sh=%b expected man=%h exp=%0d sh=%b",
               tag, prod, e_sum, man, exp_n, sh, em, ee, esh);
    end
  endtask

  task automatic check();
    #1;
    cmp("t23", 23, 0, longint'(man_t),  int'(exp_t),  zero_t,  sh_t);
    cmp("r23", 23, 1, longint'(man_r),  int'(exp_r),  zero_r,  sh_r);
    cmp("t31", 31, 0, longint'(man_xt), int'(exp_xt), zero_xt, sh_xt);
    cmp("r31", 31, 1, longint'(man_xr), int'(exp_xr), zero_xr, sh_xr);
    if (!zero_in && prod != 0) begin
      if (sh_t) n_shift++;
      if (man_r != man_t) n_roundup++;
      if (exp_r != exp_t) n_carry++;
    end
  endtask

  initial begin
    zero_in = 0;
    e_sum = 10'sd100;
    prod = '1; check();                                   // rounds up to 2.0
    prod = 48'h7fff_ffff_ffff; check();                   // rounds up to 2.0 without the shift
    prod = 48'h4000_0040_0000; check();                   // tie, even: stays
    prod = 48'h4000_00c0_0000; check();                   // tie, odd: rounds up
    prod = 48'h8000_0080_0000; check();                   // tie after the shift
    prod = 48'h4000_0000_0000; check();
    prod = 48'h0; check();
    zero_in = 1; prod = 48'h5555_5555_5555; check();
    zero_in = 0;
    for (int k = 0; k < 20000; k++) begin
      e_sum = 10'($urandom_range(0, 600)) - 10'sd200;
      if (k % 2 == 0)
        prod = 48'({1'b1, 23'($urandom)}) * 48'({1'b1, 23'($urandom)});
      else
        prod = {2'b01, 46'({$urandom, $urandom})} | (48'($urandom & 1) << 47);
      check();
    end
    checks++;
    if (n_shift == 0 || n_roundup == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL coverage shift=%0d roundup=%0d carry=%0d", n_shift, n_roundup, n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
