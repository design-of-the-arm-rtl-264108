// tb_srt_fgen: checks the F_k multiples by plain modular arithmetic.
//
// For random divisors, root estimates Q (a multiple of 4*eps), QM = Q - 4*eps
// and digit weights eps = 4^-(j+1), every digit's addend plus carry-in must
// equal -F(q) mod 2^58, with F(q) = q*D (division) or 2*Q*q + q*q*eps
// (square root), computed here with multiplications instead of bit patterns.
module tb_srt_fgen;
  import srt_pkg::*;

  op_e              op;
  logic [SIG_W-1:0] d;
  logic [RW-1:0]    qp, qm, eps;
  logic [RW-1:0]    add [5];
  logic             cin [5];
  int               checks = 0, failures = 0;

  srt_fgen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW-1:0] f, got, dal;
    int            k, j;
    for (int n = 0; n < 4000; n++) begin
      op  = (n % 2) ? OP_SQRT : OP_DIV;
      d   = {1'b1, 20'($urandom), 32'($urandom)};
      j   = $urandom_range(0, 27);
      eps = RW'(1) << (FB - 2 * (j + 1));
      // Q on the grid of the previous digit, in [1/2, 1].
      qp  = ({RW'($urandom), 32'($urandom)} & ((RW'(1) << (FB - 1)) - 1)) | (RW'(1) << (FB - 1));
      qp  = qp & ~((eps << 2) - RW'(1));
      if (qp == '0) qp = RW'(1) << FB;
      qm  = qp - (eps << 2);
      #1;
      dal = RW'(d) << 4;
      for (k = -2; k <= 2; k++) begin
        if (op == OP_DIV) f = RW'(signed'(k)) * dal;
        else              f = RW'(signed'(k)) * (qp << 1) + RW'(k * k) * eps;
        got = add[k + 2] + RW'(cin[k + 2]);
        checks++;
        if (got != -f) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d q=%0d got=%h exp=%h", op, k, got, -f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
