// tb_srt_divsqrt_core: checks the clocked SRT engine end to end.
//
// Random single and double precision divisions and square roots go through
// the start / done handshake; the corrected result and sticky bit are
// compared with exact integer arithmetic (srt_ref_pkg), and done must appear
// exactly NDIG cycles after the edge that sampled start (14 single, 28 double).
// A start while busy must be ignored.
module tb_srt_divsqrt_core;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  op_e              op_in;
  logic             dp_in, a_odd;
  logic [SIG_W-1:0] a_in, b_in;
  logic             busy, done, sticky;
  qdig_t            q_dbg;
  logic [RW-1:0]    res;
  int               checks = 0, failures = 0;

  srt_divsqrt_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW-1:0] e_q;
    bit            e_st;
    int            lat, ndig;
    logic [SIG_W-1:0] sa, sb;
    logic          sodd;
    bit            ssq;
    op_in = OP_DIV; dp_in = 0; a_odd = 0; a_in = '0; b_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      op_in = (n % 2) ? OP_SQRT : OP_DIV;
      dp_in = (n % 4) >= 2;
      ndig  = dp_in ? NDIG_DP : NDIG_SP;
      a_in  = {1'b1, 20'($urandom), 32'($urandom)};
      b_in  = {1'b1, 20'($urandom), 32'($urandom)};
      if (!dp_in) begin a_in[28:0] = '0; b_in[28:0] = '0; end
      if (n % 16 == 5) b_in = a_in;
      a_odd = 1'($urandom);
      sa = a_in; sb = b_in; sodd = a_odd; ssq = (op_in == OP_SQRT);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      // A second start while busy must not disturb the operation.
      op_in = OP_DIV; a_in = {1'b1, 52'b0}; b_in = '1; start = (n % 3 == 0);
      @(negedge clk);
      start = 0;
      lat++;
      while (!done && lat < 40) begin
        @(negedge clk);
        lat++;
      end
      expect_q(ssq, ndig, sa, sodd, sb, e_q, e_st);
      checks++;
      if (!done || res != e_q || sticky != e_st) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt=%0d a=%h b=%h got=%h exp=%h", ssq, sa, sb, res, e_q);
      end
      checks++;
      if (lat - 1 != ndig) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", lat - 1, ndig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
