// tb_srt_iter: runs the single-cycle SRT iteration in a testbench loop.
//
// The testbench holds the state registers itself, applies the iteration 28
// times (double-precision digit count) from the documented start values and
// then checks the corrected result and sticky bit against exact integer
// division and square root (srt_ref_pkg). Counts how often each digit value
// and the final negative-remainder correction occur.
module tb_srt_iter;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  op_e              op;
  logic             iter0, iter1;
  logic [SIG_W-1:0] d;
  rem_t             rin, rout;
  logic [RW-1:0]    qp, qm, eps, qp_next, qm_next;
  qdig_t            q;
  int               checks = 0, failures = 0;
  int               seen [5];
  int               neg_fix = 0;

  srt_iter dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SIG_W-1:0] a;
    logic             odd;
    logic [RW-1:0]    w0, wf, res, e_q;
    bit               e_st;
    for (int n = 0; n < 3000; n++) begin
      op  = (n % 2) ? OP_SQRT : OP_DIV;
      a   = {1'b1, 20'($urandom), 32'($urandom)};
      d   = {1'b1, 20'($urandom), 32'($urandom)};
      odd = 1'($urandom);
      if (n % 10 == 2) a = {1'b1, 52'b0};
      if (n % 10 == 4) a = '1;
      if (n % 10 == 6) d = {1'b1, 52'b0};
      if (n % 10 == 8) a = d;
      if (op == OP_DIV) begin
        w0 = RW'(a) << 2;
        qp = '0;
        qm = -(RW'(1) << FB);
      end else begin
        w0 = ((odd ? RW'(a) << 5 : RW'(a) << 4) >> 2) - (RW'(1) << FB);
        qp = RW'(1) << FB;
        qm = '0;
      end
      rin = '{head: w0[RW-1 -: HEAD_W], sum: w0[TAIL_W-1:0], carry: '0};
      eps = RW'(1) << (FB - 2);
      for (int j = 0; j < NDIG_DP; j++) begin
        iter0 = (j == 0);
        iter1 = (j == 1);
        #1;
        for (int k = 0; k < 5; k++) if (q[k]) seen[k]++;
        rin = rout;
        qp  = qp_next;
        qm  = qm_next;
        eps = eps >> 2;
      end
      wf  = {rin.head, rin.sum} + {{HEAD_W{1'b0}}, rin.carry};
      res = wf[RW-1] ? qm : qp;
      if (wf[RW-1]) neg_fix++;
      expect_q(op == OP_SQRT, NDIG_DP, a, odd, d, e_q, e_st);
      checks++;
      if (res != e_q || (wf != 0) != e_st) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h d=%h got=%h exp=%h", op, a, d, res, e_q);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("digit %0d never used", k - 2); end
    end
    checks++;
    if (neg_fix == 0) begin failures++; $display("no negative-remainder correction"); end
    $display("digits -2..2: %0d %0d %0d %0d %0d, corrections %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], neg_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
