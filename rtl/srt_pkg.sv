// srt_pkg: widths, digit encoding and shared types of the radix-4 SRT
// divide / square-root unit.
//
// Number formats (all two's complement, fixed point):
//   * Partial remainder w and every addend: RW = 58 bits, bit b has weight
//     2^(b-56), i.e. 2 integer bits (sign and units, range [-2,2)) and 56
//     fraction bits. The remainder is held as an 8-bit non-redundant head
//     (weights 2^1 .. 2^-6) plus a 50-bit carry-save tail (2^-7 .. 2^-56).
//   * Root / quotient estimates Q (Q+) and QM (Q-, equal to Q minus one unit
//     in the last digit place) use the same 58-bit format.
//   * Operand significands are 53-bit 1.f values (bit 52 = integer 1);
//     single-precision significands are left-aligned in that field.
// The radix-4 digit q in {-2,-1,0,1,2} travels one-hot, 5 bits wide.
// The 8-bit non-redundant head and the 5-bit one-hot digit follow the original
// macrocell; the 58-bit width and the scaling of the remainder are this
// design's own (the original quotes 54-bit remainder adders).
package srt_pkg;

  localparam int RW      = 58;      // remainder / root register width
  localparam int FB      = 56;      // fraction bits of RW
  localparam int HEAD_W  = 8;       // non-redundant remainder msbs
  localparam int TAIL_W  = RW - HEAD_W;  // carry-save remainder lsbs
  localparam int SIG_W   = 53;      // significand width, 1.f
  localparam int NDIG_DP = 28;      // radix-4 digits for double precision
  localparam int NDIG_SP = 14;      // radix-4 digits for single precision

  // One-hot radix-4 digit, bit order {+2, +1, 0, -1, -2}.
  typedef logic [4:0] qdig_t;
  localparam qdig_t Q_P2 = 5'b10000;
  localparam qdig_t Q_P1 = 5'b01000;
  localparam qdig_t Q_Z  = 5'b00100;
  localparam qdig_t Q_M1 = 5'b00010;
  localparam qdig_t Q_M2 = 5'b00001;

  // Comparison constants M_2, M_1, M_0, M_-1 in units of 1/16 of 4w.
  typedef struct packed {
    logic signed [7:0] m2;
    logic signed [7:0] m1;
    logic signed [7:0] m0;
    logic signed [7:0] mm1;
  } mk_t;

  // Partial remainder: non-redundant head plus carry-save tail.
  typedef struct packed {
    logic [HEAD_W-1:0] head;
    logic [TAIL_W-1:0] sum;
    logic [TAIL_W-1:0] carry;
  } rem_t;

  typedef enum logic {OP_DIV = 1'b0, OP_SQRT = 1'b1} op_e;

endpackage
