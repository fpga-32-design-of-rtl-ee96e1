// Reference model for the floating-point multiplier testbenches.
//
// Works through the simulator's double-precision arithmetic rather than
// through integer significand logic: each single-precision operand is
// widened exactly to a double, the two doubles are multiplied (the 48-bit
// significand product fits the 53-bit double significand, so the product is
// exact), and the double's bits are then cut to the output mantissa width,
// truncating or rounding to nearest-even, before the exponent range rules
// are applied: exponent field 0 on either operand gives zero, a biased
// exponent of 255 or more saturates to the largest finite magnitude, one of
// 0 or less flushes to zero.
package fpm_ref_pkg;

  // Operand widened to double; exponent field 255 is an ordinary exponent.
  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  // Result {sign, 8-bit exponent, man_w-bit mantissa} in the low bits.
  function automatic logic [63:0] ref_mult(input logic [31:0] a, input logic [31:0] b,
                                           input int man_w, input bit nearest);
    logic        s;
    logic [63:0] bits, keep, rem, half;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 0 || b[30:23] == 0) return 64'(s) << (8 + man_w);
    bits = $realtobits(to_real(a) * to_real(b));
    e    = int'(bits[62:52]) - 1023 + 127;
    keep = {12'b0, bits[51:0]} >> (52 - man_w);
    rem  = {12'b0, bits[51:0]} & ((64'd1 << (52 - man_w)) - 1);
    half = 64'd1 << (51 - man_w);
    if (nearest && (rem > half || (rem == half && keep[0]))) keep++;
    if (keep == (64'd1 << man_w)) begin
      keep = 0;
      e++;
    end
    if (e >= 255) return (64'(s) << (8 + man_w)) | (64'd254 << man_w) | ((64'd1 << man_w) - 1);
    if (e <= 0)   return 64'(s) << (8 + man_w);
    return (64'(s) << (8 + man_w)) | (64'(e) << man_w) | keep;
  endfunction

endpackage
