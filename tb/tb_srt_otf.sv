// tb_srt_otf: checks on-the-fly conversion against signed addition.
//
// For random Q on the 4*eps grid, QM = Q - 4*eps and every digit q, the new
// estimates must be Q' = Q + q*eps and QM' = Q' - eps (mod 2^58).
module tb_srt_otf;
  import srt_pkg::*;

  logic [RW-1:0] qp, qm, eps, qp_next, qm_next;
  qdig_t         q;
  int            checks = 0, failures = 0;

  srt_otf dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW-1:0] e_qp;
    int            j;
    for (int n = 0; n < 5000; n++) begin
      j   = $urandom_range(0, 27);
      eps = RW'(1) << (FB - 2 * (j + 1));
      qp  = {26'($urandom), 32'($urandom)} & ~((eps << 2) - RW'(1));
      qm  = qp - (eps << 2);
      for (int k = -2; k <= 2; k++) begin
        q = qdig_t'(5'b00001 << (k + 2));
        #1;
        e_qp = qp + RW'(signed'(k)) * eps;
        checks++;
        if (qp_next != e_qp || qm_next != e_qp - eps) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
