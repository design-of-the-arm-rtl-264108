// srt_ref_pkg: reference arithmetic for the SRT testbenches.
//
// Exact integer quotient and square root, wide enough for double-precision
// significands, worked out with plain long division and the bit-by-bit
// integer square root, independently of the SRT recurrence.
package srt_ref_pkg;

  // floor(sqrt(v)) for a 128-bit unsigned value.
  function automatic logic [127:0] isqrt(logic [127:0] v);
    logic [127:0] res, bitv, num;
    num  = v;
    res  = '0;
    bitv = 128'(1) << 126;
    while (bitv > num) bitv = bitv >> 2;
    while (bitv != 0) begin
      if (num >= res + bitv) begin
        num = num - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    return res;
  endfunction

  // Expected corrected Q (units 2^-56) and sticky bit for NDIG digits.
  // a, b: 53-bit 1.f significands; odd: square-root radicand is 2a.
  function automatic void expect_q(input bit is_sqrt, input int ndig,
                                   input logic [52:0] a, input bit odd,
                                   input logic [52:0] b,
                                   output logic [57:0] q, output bit sticky);
    logic [127:0] num, r;
    int           drop;
    drop = 56 - 2 * ndig;
    if (!is_sqrt) begin
      num    = 128'(a) << (54 - drop);
      r      = num / 128'(b);
      sticky = (num % 128'(b)) != 0;
    end else begin
      num    = (odd ? 128'(a) << 1 : 128'(a)) << (58 - 2 * drop);
      r      = isqrt(num);
      sticky = (r * r) != num;
    end
    q = 58'(r << drop);
  endfunction

endpackage
