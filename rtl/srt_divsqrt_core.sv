// srt_divsqrt_core: iterative radix-4 SRT divide / square-root engine.
//
// Holds the partial remainder (8-bit non-redundant head + carry-save tail),
// the on-the-fly result estimates Q+ / Q-, the digit weight eps = 4^-(j+1) and
// an iteration counter, and applies one srt_iter step per clock: two result
// bits per cycle. Division of a by b (significands in [1,2)) starts from
// w0 = a/4, Q = 0 and yields a/b = 4Q. Square root of a radicand X in [1,4)
// starts from w0 = X/4 - 1, Q = 1 and yields sqrt(X/4) = Q in [1/2,1).
// After the last digit the full remainder is assimilated once; its sign
// picks Q+ or Q- (a negative remainder means the result is one unit too high)
// and its non-zero test gives the sticky bit.
//
// Timing: start is sampled on a rising edge (the load), the next NDIG edges
// each retire one digit (NDIG_SP = 14 for single, NDIG_DP = 28 for double),
// and done is high for the one cycle that follows, with res/sticky valid.
// start is ignored while busy. The digit counts and the load/iterate/finish
// split are this design's choices, made so that a result register after done
// gives the 15 / 29 cycle latencies of the design.
module srt_divsqrt_core
  import srt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  op_e               op_in,
  input  logic              dp_in,     // 1: double (28 digits), 0: single (14)
  input  logic [SIG_W-1:0]  a_in,      // dividend / radicand significand 1.f
  input  logic              a_odd,     // square root: radicand is 2*a
  input  logic [SIG_W-1:0]  b_in,      // divisor significand 1.f
  output logic              busy,
  output logic              done,
  output qdig_t             q_dbg,     // digit chosen this cycle
  output logic [RW-1:0]     res,       // corrected Q (units 2^-56)
  output logic              sticky     // final remainder non-zero
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_e;

  state_e        state;
  op_e           op;
  logic          dp;
  logic [SIG_W-1:0] d;
  rem_t          rem, rem_nx;
  logic [RW-1:0] qp, qm, eps, qp_nx, qm_nx;
  logic [5:0]    cnt;
  logic [5:0]    last;
  logic [RW-1:0] w0, radicand, wfull;

  assign last = dp ? 6'(NDIG_DP - 1) : 6'(NDIG_SP - 1);

  // Initial remainder in the 58-bit format (weights 2^1 .. 2^-56).
  assign radicand = a_odd ? (RW'(a_in) << 5) : (RW'(a_in) << 4);
  assign w0 = (op_in == OP_DIV) ? (RW'(a_in) << 2)
                                : ((radicand >> 2) - (RW'(1) << FB));

  srt_iter u_iter (
    .op      (op),
    .iter0   (cnt == 6'd0),
    .iter1   (cnt == 6'd1),
    .d       (d),
    .rin     (rem),
    .qp      (qp),
    .qm      (qm),
    .eps     (eps),
    .q       (q_dbg),
    .rout    (rem_nx),
    .qp_next (qp_nx),
    .qm_next (qm_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op    <= OP_DIV;
      dp    <= 1'b0;
      d     <= '0;
      rem   <= '0;
      qp    <= '0;
      qm    <= '0;
      eps   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          state <= S_IDLE;
          if (start) begin
            state    <= S_ITER;
            op       <= op_in;
            dp       <= dp_in;
            d        <= (op_in == OP_DIV) ? b_in : SIG_W'(0);
            rem.head <= w0[RW-1 -: HEAD_W];
            rem.sum  <= w0[TAIL_W-1:0];
            rem.carry <= '0;
            qp       <= (op_in == OP_DIV) ? RW'(0) : (RW'(1) << FB);
            qm       <= (op_in == OP_DIV) ? -(RW'(1) << FB) : RW'(0);
            eps      <= RW'(1) << (FB - 2);
            cnt      <= '0;
          end
        end
        default: begin
          rem <= rem_nx;
          qp  <= qp_nx;
          qm  <= qm_nx;
          eps <= eps >> 2;
          cnt <= cnt + 6'd1;
          if (cnt == last) state <= S_DONE;
        end
      endcase
    end
  end

  assign busy = (state == S_ITER);
  assign done = (state == S_DONE);

  // Full remainder: sign selects Q+ or Q-, non-zero gives the sticky bit.
  assign wfull  = {rem.head, rem.sum} + {{HEAD_W{1'b0}}, rem.carry};
  assign res    = wfull[RW-1] ? qm : qp;
  assign sticky = |wfull;

  // The digit is always exactly one of the five values.
  a_q_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                               busy |-> $onehot(q_dbg));

endmodule
