// srt_fgen: F_k logic, the four non-zero remainder-update multiples.
//
// For every digit q the remainder update is R_(i+1) = 4w - F(q) and this block
// hands each R* adder the word to add, -F(q) mod 4, with its carry-in:
// for q > 0 the adder gets ~F and carry-in 1, for q < 0 it gets |F| and
// carry-in 0, for q = 0 it gets zero.
//   Division:    F(q) = q*D.
//   Square root: F(q) = 2Q*q + q^2*eps with eps = 4^-(j+1), formed without an
//   adder from the on-the-fly root estimates Q (Q+) and QM (Q-, Q minus one
//   unit of the last digit, 4*eps) by concatenating bits below the estimate:
//     q=+1: 2Q  | eps        q=+2: 4Q  | 4*eps
//     q=-1: 2QM | 7*eps      q=-2: 4QM | 12*eps
// The use of Q+/Q- and the OR-ed eps terms follow the design; expressing the
// negative cases through QM with 7*eps and 12*eps is the equivalent form used
// here. Combinational.
//
// Interface: d is the 1.f divisor significand; qp, qm and eps use the 58-bit
// remainder format (srt_pkg); add[k], cin[k] are indexed like the one-hot
// digit bits {+2,+1,0,-1,-2} = 4..0.
module srt_fgen
  import srt_pkg::*;
(
  input  op_e               op,
  input  logic [SIG_W-1:0]  d,
  input  logic [RW-1:0]     qp,
  input  logic [RW-1:0]     qm,
  input  logic [RW-1:0]     eps,
  output logic [RW-1:0]     add [5],
  output logic              cin [5]
);

  logic [RW-1:0] d1, d2, p1, p2, n1, n2;

  assign d1 = RW'(d) << (FB - (SIG_W - 1));
  assign d2 = d1 << 1;

  always_comb begin
    if (op == OP_DIV) begin
      p1 = d1;  p2 = d2;  n1 = d1;  n2 = d2;
    end else begin
      p1 = (qp << 1) | eps;
      p2 = (qp << 2) | (eps << 2);
      n1 = (qm << 1) | eps | (eps << 1) | (eps << 2);
      n2 = (qm << 2) | (eps << 2) | (eps << 3);
    end
  end

  assign add[4] = ~p2;  assign cin[4] = 1'b1;
  assign add[3] = ~p1;  assign cin[3] = 1'b1;
  assign add[2] = '0;   assign cin[2] = 1'b0;
  assign add[1] = n1;   assign cin[1] = 1'b0;
  assign add[0] = n2;   assign cin[0] = 1'b0;

endmodule
