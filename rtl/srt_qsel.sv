// srt_qsel: radix-4 SRT result-digit selection.
//
// Four comparators test the 8-bit non-redundant head of the shifted partial
// remainder 4w (weights 2^3 .. 2^-4, units of 1/16) against the constants
// M_2, M_1, M_0 and M_-1, giving c_k = (4w_head >= M_k); the one-hot digit
// logic then picks q = +2 if c_2, +1 if c_1 only, 0 if c_0 only, -1 if c_-1
// only and -2 otherwise. Purely combinational.
//
// The comparator / one-hot structure and the 8-bit head follow the design.
// The constants are this design's own: they come from the standard SRT
// containment conditions with redundancy factor rho = 2/3, taking the head's
// truncation error to lie in [0, 2/16) because the tail below it is carry-save:
//   (k - rho)*D_hi + (k - rho)^2*eps  <=  M_k  <=  (k - 1 + rho)*D_lo
//                                       + (k - 1 + rho)^2*eps - 1/16,
// with D the divisor (division) or 2Q (square root), each D row 1/16 wide
// from 14/16 to 2, and eps <= 1/64. The first two square-root iterations, where
// eps = 4^-(j+1) is large and Q takes only a few exact values, use rows of
// their own. M_k is the integer midpoint of the allowed range.
//
// Interface: head is the remainder head after the radix shift; d_msb are the
// divisor fraction bits 2^-1..2^-4; q_msb are root bits 2^0..2^-5 (= floor(32Q));
// iter0 / iter1 flag square-root iterations 0 and 1.
module srt_qsel
  import srt_pkg::*;
(
  input  logic signed [7:0] head,
  input  op_e               op,
  input  logic              iter0,
  input  logic              iter1,
  input  logic [3:0]        d_msb,
  input  logic [5:0]        q_msb,
  output mk_t               mk,
  output qdig_t             q
);

  logic [4:0] row;
  logic       c2, c1, c0, cm1;

  // Row of the constant table from divisor or 2Q, clamped to 0..17.
  always_comb begin
    if (op == OP_DIV) row = 5'(d_msb) + 5'd2;
    else if (q_msb < 6'd14) row = 5'd0;
    else if (q_msb > 6'd31) row = 5'd17;
    else row = 5'(q_msb - 6'd14);
  end

  always_comb begin
    if (op == OP_SQRT && iter0) begin
      mk = '{8'sd56, 8'sd17, -8'sd16, -8'sd40};
    end else if (op == OP_SQRT && iter1) begin
      // Q is exactly 1/2, 3/4 or 1 after the first digit.
      unique case (q_msb[5:3])
        3'b010:  mk = '{8'sd26, 8'sd8,  -8'sd9,  -8'sd22};
        3'b011:  mk = '{8'sd37, 8'sd12, -8'sd12, -8'sd35};
        default: mk = '{8'sd50, 8'sd15, -8'sd16, -8'sd46};
      endcase
    end else begin
      unique case (row)
        5'd0:    mk = '{8'sd21, 8'sd7,  -8'sd8,  -8'sd22};
        5'd1:    mk = '{8'sd22, 8'sd7,  -8'sd8,  -8'sd24};
        5'd2:    mk = '{8'sd24, 8'sd7,  -8'sd9,  -8'sd25};
        5'd3:    mk = '{8'sd26, 8'sd8,  -8'sd10, -8'sd27};
        5'd4:    mk = '{8'sd27, 8'sd8,  -8'sd10, -8'sd28};
        5'd5:    mk = '{8'sd29, 8'sd9,  -8'sd10, -8'sd29};
        5'd6:    mk = '{8'sd30, 8'sd10, -8'sd11, -8'sd31};
        5'd7:    mk = '{8'sd31, 8'sd10, -8'sd11, -8'sd33};
        5'd8:    mk = '{8'sd33, 8'sd10, -8'sd12, -8'sd34};
        5'd9:    mk = '{8'sd35, 8'sd11, -8'sd13, -8'sd36};
        5'd10:   mk = '{8'sd36, 8'sd11, -8'sd13, -8'sd37};
        5'd11:   mk = '{8'sd38, 8'sd12, -8'sd13, -8'sd38};
        5'd12:   mk = '{8'sd39, 8'sd13, -8'sd14, -8'sd40};
        5'd13:   mk = '{8'sd40, 8'sd13, -8'sd14, -8'sd42};
        5'd14:   mk = '{8'sd42, 8'sd13, -8'sd15, -8'sd43};
        5'd15:   mk = '{8'sd44, 8'sd14, -8'sd16, -8'sd45};
        5'd16:   mk = '{8'sd45, 8'sd14, -8'sd16, -8'sd46};
        default: mk = '{8'sd47, 8'sd15, -8'sd16, -8'sd47};
      endcase
    end
  end

  // c_k = sgn(trunc(R_i) - M_k), as "greater or equal".
  assign c2  = head >= mk.m2;
  assign c1  = head >= mk.m1;
  assign c0  = head >= mk.m0;
  assign cm1 = head >= mk.mm1;

  // One-hot digit: the constants are ordered, so c_k implies c_(k-1).
  assign q = {c2, c1 & ~c2, c0 & ~c1, cm1 & ~c0, ~cm1};

endmodule
