// srt_rem_adder: one speculative remainder adder, R*_(i+1) = R_i - F_k.
//
// Five of these run in parallel, one per possible digit, so that the digit
// only has to drive a 5:1 multiplexer. The incoming remainder is shifted by
// two places (radix 4): its 8-bit head covers weights 2^3..2^-4 and its
// carry-save tail 2^-5..2^-54. Columns 2^1..2^-4 add head and addend in half
// adders; columns 2^-5..2^-56 add tail sum, tail carry and addend in full
// adders (3:2), the carry-in entering the empty carry slot of the lowest
// column. An 8-bit carry-propagate adder then assimilates columns 2^1..2^-6
// into the new head; the bits at 2^3 and 2^2 are dropped because the new
// remainder lies in [-2,2). Everything below 2^-6 stays carry-save.
// This column arrangement follows the design; the 58-bit width follows from
// this design's number format (srt_pkg). Combinational.
//
// Interface: rin is the remainder before the shift; add/cin come from srt_fgen;
// rout is the speculative next remainder.
module srt_rem_adder
  import srt_pkg::*;
(
  input  rem_t          rin,
  input  logic [RW-1:0] add,
  input  logic          cin,
  output rem_t          rout
);

  logic [RW-1:0] a, b, c, s, co;

  // Operands after the radix-4 shift, column b has weight 2^(b-56).
  assign a = {rin.head[5:0], rin.sum, 2'b00};
  assign b = {6'b0, rin.carry, 1'b0, cin};
  assign c = add;

  // Half adders where b is zero (the head), full adders below.
  always_comb begin
    for (int i = 0; i < RW; i++) begin
      s[i]  = a[i] ^ b[i] ^ c[i];
      co[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end

  // 8-bit carry-propagate adder over columns 2^1 .. 2^-6.
  assign rout.head  = s[RW-1 -: HEAD_W] + co[RW-2 -: HEAD_W];
  assign rout.sum   = s[TAIL_W-1:0];
  assign rout.carry = {co[TAIL_W-2:0], 1'b0};

endmodule
