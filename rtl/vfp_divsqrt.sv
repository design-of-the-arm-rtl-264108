// vfp_divsqrt: IEEE-754 single / double precision divide and square-root
// macrocell built around a radix-4 SRT engine (srt_divsqrt_core).
//
// The engine produces two result bits per cycle from a single-cycle radix-4
// iteration; this wrapper unpacks the operands, forms the result exponent,
// handles special operands, and after the last digit normalises, rounds and
// packs the result. Latency from the clock edge that samples start to the
// edge that registers the result is 15 cycles for single precision and 29
// for double precision, as in the design; a new operation may start in the
// cycle in which done is high.
//
// Operands: a is the dividend or radicand, b the divisor; single-precision
// operands and results use bits [31:0], the upper half of the result is zero.
// Choices of this design (the underlying description covers the iteration and
// the latency only): round to nearest even; subnormal inputs read as zero and
// tiny results are flushed to zero (flush-to-zero), raising UFC; any NaN
// result is the default quiet NaN; flags follow the IEEE exceptions
// (IOC invalid, DZC divide by zero, OFC overflow, UFC underflow, IXC inexact).
// Special-operand results still take the full latency.
module vfp_divsqrt
  import srt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  op_e         op,       // OP_DIV: a / b, OP_SQRT: sqrt(a)
  input  logic        dp,       // 1: double precision, 0: single
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,     // one-cycle pulse, result and flags valid
  output logic [63:0] result,
  output logic [4:0]  flags     // {IOC, DZC, OFC, UFC, IXC}
);

  typedef struct packed {
    logic             sign;
    logic signed [12:0] exp;    // unbiased
    logic [SIG_W-1:0] sig;      // 1.f, single left-aligned
    logic             zero;
    logic             inf;
    logic             nan;
    logic             snan;
  } fp_t;

  // ---------------------------------------------------------------- unpack
  function automatic fp_t unpack(input logic [63:0] v, input logic is_dp);
    fp_t f;
    logic [10:0] e;
    logic [51:0] m;
    if (is_dp) begin
      f.sign = v[63]; e = v[62:52]; m = v[51:0];
      f.exp  = 13'(signed'({2'b00, e})) - 13'sd1023;
      f.zero = (e == 11'd0);
      f.inf  = (e == 11'h7ff) && (m == '0);
      f.nan  = (e == 11'h7ff) && (m != '0);
      f.snan = f.nan && !m[51];
    end else begin
      f.sign = v[31]; e = {3'b000, v[30:23]}; m = {v[22:0], 29'b0};
      f.exp  = 13'(signed'({2'b00, e})) - 13'sd127;
      f.zero = (e == 11'd0);
      f.inf  = (e == 11'h0ff) && (m == '0);
      f.nan  = (e == 11'h0ff) && (m != '0);
      f.snan = f.nan && !m[51];
    end
    f.sig = {1'b1, m};
    return f;
  endfunction

  fp_t fa, fb;
  assign fa = unpack(a, dp);
  assign fb = unpack(b, dp);

  // --------------------------------------------------- special operands
  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF, SP_ZERO} special_e;
  special_e   sp_in;
  logic       sign_in;
  logic [4:0] sp_flags_in;

  always_comb begin
    sp_in       = SP_NONE;
    sp_flags_in = '0;
    if (op == OP_DIV) begin
      sign_in = fa.sign ^ fb.sign;
      if (fa.nan || fb.nan) begin
        sp_in = SP_NAN; sp_flags_in[4] = fa.snan || fb.snan;
      end else if ((fa.zero && fb.zero) || (fa.inf && fb.inf)) begin
        sp_in = SP_NAN; sp_flags_in[4] = 1'b1;
      end else if (fa.inf) begin
        sp_in = SP_INF;
      end else if (fb.zero) begin
        sp_in = SP_INF; sp_flags_in[3] = 1'b1;
      end else if (fa.zero || fb.inf) begin
        sp_in = SP_ZERO;
      end
    end else begin
      sign_in = fa.sign;
      if (fa.nan) begin
        sp_in = SP_NAN; sp_flags_in[4] = fa.snan;
      end else if (fa.zero) begin
        sp_in = SP_ZERO;
      end else if (fa.sign) begin
        sp_in = SP_NAN; sp_flags_in[4] = 1'b1;
      end else if (fa.inf) begin
        sp_in = SP_INF;
      end
    end
  end

  // -------------------------------------------------------- SRT engine
  logic          core_busy, core_done, sticky_rem;
  logic [RW-1:0] qres;
  qdig_t         q_unused;

  srt_divsqrt_core u_core (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start && !busy),
    .op_in  (op),
    .dp_in  (dp),
    .a_in   (fa.sig),
    .a_odd  (fa.exp[0]),
    .b_in   (fb.sig),
    .busy   (core_busy),
    .done   (core_done),
    .q_dbg  (q_unused),
    .res    (qres),
    .sticky (sticky_rem)
  );

  // Operation context held for the final cycle.
  op_e                op_r;
  logic               dp_r, sign_r;
  special_e           sp_r;
  logic [4:0]         sp_flags_r;
  logic signed [12:0] exp_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_r <= OP_DIV; dp_r <= 1'b0; sign_r <= 1'b0;
      sp_r <= SP_NONE; sp_flags_r <= '0; exp_r <= '0;
    end else if (start && !busy) begin
      op_r       <= op;
      dp_r       <= dp;
      sign_r     <= sign_in;
      sp_r       <= sp_in;
      sp_flags_r <= sp_flags_in;
      exp_r      <= (op == OP_DIV) ? (fa.exp - fb.exp) : (fa.exp >>> 1);
    end
  end

  // ------------------------------------------ normalise, round and pack
  logic [SIG_W-1:0]   mant;
  logic               rnd, stk, inc, lsb;
  logic [SIG_W:0]     mant_r;
  logic signed [12:0] e_unb, e_bias;
  logic [63:0]        res_nx;
  logic [4:0]         flg_nx;

  always_comb begin
    // Select significand, round and sticky bits from Q (units 2^-56).
    // Division: a/b = 4Q, integer bit at Q[54]. Square root: Q in [1/2,1).
    e_unb = exp_r;
    mant  = '0;
    if (op_r == OP_DIV) begin
      if (qres[54]) begin
        mant = dp_r ? qres[54:2] : {qres[54:31], 29'b0};
        rnd  = dp_r ? qres[1]    : qres[30];
        stk  = dp_r ? qres[0]    : |qres[29:28];
      end else begin
        e_unb = exp_r - 13'sd1;
        mant = dp_r ? qres[53:1] : {qres[53:30], 29'b0};
        rnd  = dp_r ? qres[0]    : qres[29];
        stk  = dp_r ? 1'b0       : qres[28];
      end
    end else begin
      mant = dp_r ? qres[55:3] : {qres[55:32], 29'b0};
      rnd  = dp_r ? qres[2]    : qres[31];
      stk  = dp_r ? |qres[1:0] : |qres[30:28];
    end
    stk = stk | sticky_rem;
    lsb = dp_r ? mant[0] : mant[29];
    inc = rnd & (stk | lsb);
    mant_r = {1'b0, mant} + (dp_r ? (SIG_W+1)'(1) : ((SIG_W+1)'(1) << 29)) * inc;
    if (mant_r[SIG_W]) begin
      mant_r = mant_r >> 1;
      e_unb  = e_unb + 13'sd1;
    end
    e_bias = e_unb + (dp_r ? 13'sd1023 : 13'sd127);

    flg_nx = sp_flags_r;
    res_nx = '0;
    unique case (sp_r)
      SP_NAN:  res_nx = dp_r ? 64'h7ff8_0000_0000_0000 : 64'h0000_0000_7fc0_0000;
      SP_INF:  res_nx = dp_r ? {sign_r, 11'h7ff, 52'b0} : {32'b0, sign_r, 8'hff, 23'b0};
      SP_ZERO: res_nx = dp_r ? {sign_r, 63'b0} : {32'b0, sign_r, 31'b0};
      default: begin
        if (e_bias >= (dp_r ? 13'sd2047 : 13'sd255)) begin
          res_nx    = dp_r ? {sign_r, 11'h7ff, 52'b0} : {32'b0, sign_r, 8'hff, 23'b0};
          flg_nx[2] = 1'b1;
          flg_nx[0] = 1'b1;
        end else if (e_bias <= 13'sd0) begin
          res_nx    = dp_r ? {sign_r, 63'b0} : {32'b0, sign_r, 31'b0};
          flg_nx[1] = 1'b1;
        end else begin
          res_nx = dp_r ? {sign_r, e_bias[10:0], mant_r[51:0]}
                        : {32'b0, sign_r, e_bias[7:0], mant_r[51:29]};
          flg_nx[0] = rnd | stk;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
      flags  <= '0;
    end else begin
      done <= core_done;
      if (core_done) begin
        result <= res_nx;
        flags  <= flg_nx;
      end
    end
  end

  assign busy = core_busy || core_done;

endmodule
