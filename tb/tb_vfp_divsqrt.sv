// tb_vfp_divsqrt: end-to-end test of the divide / square-root macrocell.
//
// Drives the top level with single and double precision divisions and
// square roots: 12000 random normal operands (a quarter with corner fractions) (checked bit for bit against the
// simulator's IEEE double arithmetic, rounded once more to single precision
// for single operations, which is exact for division and square root),
// special operands (NaN, infinities, zeros, negative radicand, divide by
// zero) and results that overflow or underflow. Checks the flags and the
// latency (15 cycles single, 29 double, from the edge that samples start to
// the edge that registers the result), and counts how often each mechanism
// happened: every digit value, the negative-remainder correction, a rounding
// increment, each special case, overflow, flush to zero, a start while busy
// (ignored) and a start in the cycle of done (accepted). A mechanism that
// never happened counts as a failure.
module tb_vfp_divsqrt;
  import srt_pkg::*;
  import srt_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  op_e         op;
  logic        dp;
  logic [63:0] a, b, result;
  logic        busy, done;
  logic [4:0]  flags;
  int          checks = 0, failures = 0;

  vfp_divsqrt dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_dig [5];
  int n_negfix = 0, n_round_up = 0, n_nan = 0, n_inf = 0, n_zero = 0;
  int n_dz = 0, n_of = 0, n_uf = 0, n_sp = 0, n_dpop = 0, n_div = 0, n_sqrt = 0;
  int n_busy_start = 0, n_b2b = 0;

  always @(posedge clk) begin
    if (dut.u_core.busy)
      for (int k = 0; k < 5; k++) if (dut.u_core.q_dbg[k]) n_dig[k]++;
    if (dut.u_core.done && dut.sp_r == dut.SP_NONE) begin
      if (dut.u_core.wfull[RW-1]) n_negfix++;
      if (dut.inc) n_round_up++;
    end
  end

  // Round a double (normal single-precision range) to single precision, RNE.
  function automatic logic [31:0] to_single(logic [63:0] x);
    logic [23:0] m;
    logic [10:0] e;
    logic        r, s;
    int          eb;
    e  = x[62:52];
    m  = {1'b1, x[51:29]};
    r  = x[28];
    s  = |x[27:0];
    eb = int'(e) - 1023 + 127;
    if (r && (s || m[0])) begin
      m = m + 24'd1;
      if (m == 24'd0) begin m = 24'h800000; eb++; end
    end
    return {x[63], 8'(eb), m[22:0]};
  endfunction

  function automatic real s2r(logic [31:0] s);
    return $bitstoreal({s[31], 11'(int'(s[30:23]) - 127 + 1023), s[22:0], 29'b0});
  endfunction

  task automatic run(input op_e o, input logic p, input logic [63:0] x, input logic [63:0] y,
                     input logic [63:0] e_res, input logic [4:0] e_flags,
                     input logic chk_ixc);
    int lat;
    @(negedge clk);
    op = o; dp = p; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    // A start while busy is ignored.
    if ($urandom_range(0, 3) == 0) begin
      start = 1; a = 64'h3ff0_0000_0000_0000; n_busy_start++;
      @(negedge clk);
      start = 0; lat++;
    end
    while (!done && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat - 1 != (p ? 29 : 15)) begin
      failures++;
      $display("FAIL latency %0d dp=%0d", lat - 1, p);
    end
    checks++;
    if (result != e_res || flags[4:1] != e_flags[4:1] || (chk_ixc && flags[0] != e_flags[0])) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d dp=%0d a=%h b=%h got=%h/%b exp=%h/%b", o, p, x, y,
                 result, flags, e_res, e_flags);
    end
    if (p) n_dpop++; else n_sp++;
    if (o == OP_DIV) n_div++; else n_sqrt++;
    if (flags[3]) n_dz++;
    if (flags[2]) n_of++;
    if (flags[1]) n_uf++;
  endtask

  // Random fraction, one time in four a corner value: zero, all ones, or just
  // at / below a 1/16 boundary of the significand (a selection-table row edge).
  function automatic logic [51:0] rnd_frac();
    logic [51:0] f;
    int          sel;
    f   = {20'($urandom), 32'($urandom)};
    sel = $urandom_range(0, 11);
    case (sel)
      0: f = '0;
      1: f = '1;
      2: f = 52'($urandom_range(1, 15)) << 48;
      3: f = (52'($urandom_range(1, 15)) << 48) - 52'd1;
      default: ;
    endcase
    return f;
  endfunction

  function automatic logic [63:0] rnd_double(int emin, int emax);
    return {1'($urandom), 11'(1023 + $urandom_range(0, emax - emin) + emin), rnd_frac()};
  endfunction

  function automatic logic [31:0] rnd_single(int emin, int emax);
    logic [51:0] f;
    f = rnd_frac();
    return {1'($urandom), 8'(127 + $urandom_range(0, emax - emin) + emin), f[51:29]};
  endfunction

  // Exactness of a normal-range result, from the exact integer quotient or
  // root: no remainder and no quotient bits below the result's last place.
  function automatic logic exact(input op_e o, input logic p, input logic [63:0] x,
                                 input logic [63:0] y);
    logic [52:0] ma, mb;
    logic [57:0] q;
    bit          st;
    int          e;
    if (p) begin
      ma = {1'b1, x[51:0]}; mb = {1'b1, y[51:0]}; e = int'(x[62:52]) - 1023;
    end else begin
      ma = {1'b1, x[22:0], 29'b0}; mb = {1'b1, y[22:0], 29'b0}; e = int'(x[30:23]) - 127;
    end
    expect_q(o == OP_SQRT, 28, ma, e[0], mb, q, st);
    if (o == OP_SQRT) return !st && (p ? q[2:0] == 0 : q[31:0] == 0);
    if (q[54])        return !st && (p ? q[1:0] == 0 : q[30:0] == 0);
    return !st && (p ? q[0] == 0 : q[29:0] == 0);
  endfunction

  localparam logic [63:0] DNAN_DP = 64'h7ff8_0000_0000_0000;
  localparam logic [63:0] DNAN_SP = 64'h0000_0000_7fc0_0000;

  initial begin
    logic [63:0] x, y, r;
    logic [31:0] xs, ys;
    op = OP_DIV; dp = 0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Random normal operands.
    for (int n = 0; n < 3000; n++) begin
      x = rnd_double(-200, 200);
      y = rnd_double(-200, 200);
      run(OP_DIV, 1, x, y, $realtobits($bitstoreal(x) / $bitstoreal(y)),
          {4'b0, !exact(OP_DIV, 1, x, y)}, 1);
      x[63] = 1'b0;
      run(OP_SQRT, 1, x, 0, $realtobits($sqrt($bitstoreal(x))),
          {4'b0, !exact(OP_SQRT, 1, x, 0)}, 1);
      xs = rnd_single(-40, 40);
      ys = rnd_single(-40, 40);
      run(OP_DIV, 0, {32'b0, xs}, {32'b0, ys},
          {32'b0, to_single($realtobits(s2r(xs) / s2r(ys)))},
          {4'b0, !exact(OP_DIV, 0, {32'b0, xs}, {32'b0, ys})}, 1);
      xs[31] = 1'b0;
      run(OP_SQRT, 0, {32'b0, xs}, 0,
          {32'b0, to_single($realtobits($sqrt(s2r(xs))))},
          {4'b0, !exact(OP_SQRT, 0, {32'b0, xs}, 0)}, 1);
    end

    // Exact results: no inexact flag.
    run(OP_DIV, 1, 64'h4022_0000_0000_0000, 64'h4008_0000_0000_0000,
        64'h4008_0000_0000_0000, 5'b00000, 1);                      // 9 / 3
    run(OP_SQRT, 1, 64'h4002_0000_0000_0000, 0, 64'h3ff8_0000_0000_0000, 5'b00000, 1); // sqrt 2.25
    run(OP_SQRT, 0, 64'h4080_0000, 0, 64'h4000_0000, 5'b00000, 1);  // sqrt 4 (single)
    run(OP_DIV, 0, 64'hc0e0_0000, 64'h4000_0000, 64'hc060_0000, 5'b00000, 1); // -7/2

    // Special operands.
    run(OP_DIV, 1, 64'h7ff0_0000_0000_0001, 64'h3ff0_0000_0000_0000, DNAN_DP, 5'b10000, 1); n_nan++;
    run(OP_DIV, 1, 0, 0, DNAN_DP, 5'b10000, 1); n_nan++;
    run(OP_DIV, 1, 64'h7ff0_0000_0000_0000, 64'hfff0_0000_0000_0000, DNAN_DP, 5'b10000, 1); n_nan++;
    run(OP_SQRT, 1, 64'hbff0_0000_0000_0000, 0, DNAN_DP, 5'b10000, 1); n_nan++;
    run(OP_SQRT, 0, 64'h7fc0_0001, 0, DNAN_SP, 5'b00000, 1); n_nan++;
    run(OP_DIV, 1, 64'h4000_0000_0000_0000, 0, 64'h7ff0_0000_0000_0000, 5'b01000, 1); n_inf++;
    run(OP_DIV, 0, 64'hff80_0000, 64'h4000_0000, 64'hff80_0000, 5'b00000, 1); n_inf++;
    run(OP_SQRT, 1, 64'h7ff0_0000_0000_0000, 0, 64'h7ff0_0000_0000_0000, 5'b00000, 1); n_inf++;
    run(OP_DIV, 1, 64'h8000_0000_0000_0000, 64'h4000_0000_0000_0000, 64'h8000_0000_0000_0000, 5'b00000, 1); n_zero++;
    run(OP_DIV, 0, 64'h3f80_0000, 64'h7f80_0000, 64'h0000_0000, 5'b00000, 1); n_zero++;
    run(OP_SQRT, 1, 64'h8000_0000_0000_0000, 0, 64'h8000_0000_0000_0000, 5'b00000, 1); n_zero++;
    run(OP_SQRT, 1, 64'h0000_0000_0000_0001, 0, 64'h0000_0000_0000_0000, 5'b00000, 1); n_zero++; // subnormal in

    // Back-to-back: the next start is given in the cycle in which done is high.
    for (int n = 0; n < 20; n++) begin
      logic [63:0] x2, y2;
      int          lat;
      x  = rnd_double(-50, 50);  y  = rnd_double(-50, 50);
      x2 = rnd_double(-50, 50);  y2 = rnd_double(-50, 50);
      @(negedge clk);
      op = OP_DIV; dp = 1; a = x; b = y; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (result != $realtobits($bitstoreal(x) / $bitstoreal(y))) begin
        failures++; $display("FAIL back-to-back first result");
      end
      op = OP_DIV; dp = 1; a = x2; b = y2; start = 1;
      @(negedge clk);
      start = 0; lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat - 1 != 29 || result != $realtobits($bitstoreal(x2) / $bitstoreal(y2))) begin
        failures++; $display("FAIL back-to-back second result, latency %0d", lat - 1);
      end
      n_b2b++;
    end

    // Overflow and flush to zero.
    run(OP_DIV, 1, 64'h7fe0_0000_0000_0000, 64'h3fe0_0000_0000_0000, 64'h7ff0_0000_0000_0000, 5'b00101, 1);
    run(OP_DIV, 0, 64'h7f00_0000, 64'h3e00_0000, 64'h7f80_0000, 5'b00101, 1);
    run(OP_DIV, 1, 64'h0010_0000_0000_0000, 64'h4000_0000_0000_0000, 64'h0000_0000_0000_0000, 5'b00010, 1);
    run(OP_DIV, 0, 64'h8080_0000, 64'h4100_0000, 64'h8000_0000, 5'b00010, 1);

    begin
      string names [15] = '{"q=-2", "q=-1", "q=0", "q=+1", "q=+2", "neg-remainder fix",
                            "round up", "NaN", "infinity", "zero", "divide by zero",
                            "overflow", "flush to zero", "start while busy",
                            "back-to-back start"};
      int cnt [15];
      cnt = '{n_dig[0], n_dig[1], n_dig[2], n_dig[3], n_dig[4], n_negfix, n_round_up,
              n_nan, n_inf, n_zero, n_dz, n_of, n_uf, n_busy_start, n_b2b};
      for (int k = 0; k < 15; k++) begin
        $display("  %-18s %0d", names[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[k]); end
      end
      $display("  single %0d double %0d div %0d sqrt %0d", n_sp, n_dpop, n_div, n_sqrt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
