// tb_srt_qsel: checks the radix-4 digit selection against the SRT
// convergence bounds, worked out in real arithmetic.
//
// Division: for random divisors D in [1,2) and random shifted remainders 4w
// with |4w| <= (8/3)D, split into an 8-bit head and a carry-save tail worth
// [0, 2/16), the chosen digit must leave |4w - qD| <= (2/3)D.
// Square root: for random roots r in [1/2,1), iteration j and an estimate S
// within (2/3)4^-j of r on the 4^-j grid, 4w = 4*4^j*(r^2 - S^2); the next
// remainder 4w - (2Sq + q^2 eps), eps = 4^-(j+1), must lie in
// [-(4/3)S' + (4/9)eps, (4/3)S' + (4/9)eps] with S' = S + q*eps.
module tb_srt_qsel;
  import srt_pkg::*;

  logic signed [7:0] head;
  op_e               op;
  logic              iter0, iter1;
  logic [3:0]        d_msb;
  logic [5:0]        q_msb;
  mk_t               mk;
  qdig_t             q;
  int                checks = 0, failures = 0;
  int                seen [5];

  srt_qsel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(qdig_t v);
    unique case (v)
      Q_P2: return 2;  Q_P1: return 1;  Q_Z: return 0;  Q_M1: return -1;
      default: return -2;
    endcase
  endfunction

  // Splits a value into the 8-bit head and a tail in [0, 2/16); returns 0
  // when the head does not fit.
  function automatic bit split(real v, output logic signed [7:0] h);
    real t;
    int  hi;
    t  = ($urandom_range(0, 999) / 1000.0) * (2.0 / 16.0);
    hi = $rtoi($floor((v - t) * 16.0));
    if (hi < -128 || hi > 127) return 0;
    h = 8'(hi);
    return 1;
  endfunction

  initial begin
    real D, v, w, r, S, eps, Sn, lo, hi;
    int  qq, j, ulp;
    op = OP_DIV; iter0 = 0; iter1 = 0; q_msb = '0; head = '0; d_msb = '0;
    // Division.
    for (int n = 0; n < 20000; n++) begin
      d_msb = 4'($urandom_range(0, 15));
      D = 1.0 + d_msb / 16.0 + ($urandom_range(0, 9999) / 10000.0) / 16.0;
      v = (($urandom_range(0, 20000) / 10000.0) - 1.0) * (8.0 / 3.0) * D;
      if (split(v, head)) begin
        #1;
        qq = digit(q);
        seen[qq + 2]++;
        w = v - qq * D;
        checks++;
        if (!$onehot(q) || w > (2.0 / 3.0) * D || w < -(2.0 / 3.0) * D) begin
          failures++;
          if (failures < 10) $display("div FAIL D=%f 4w=%f q=%0d", D, v, qq);
        end
      end
    end
    // Square root.
    op = OP_SQRT;
    for (int n = 0; n < 20000; n++) begin
      j   = $urandom_range(0, 12);
      r   = 0.5 + ($urandom_range(0, 99999) / 100000.0) * 0.5;
      ulp = 1 << (2 * j);                     // S on the 4^-j grid
      S   = $floor(r * ulp + ($urandom_range(0, 1000) / 1000.0 - 0.5) * (4.0 / 3.0)) / ulp;
      if (j == 0) S = 1.0;
      if (S > 1.0) S = 1.0;
      if (r - S <= (2.0 / 3.0) / ulp && S - r <= (2.0 / 3.0) / ulp) begin
        eps   = 1.0 / (4.0 * ulp);
        v     = 4.0 * ulp * (r * r - S * S);
        iter0 = (j == 0);
        iter1 = (j == 1);
        q_msb = 6'($rtoi($floor(S * 32.0)));
        if (split(v, head)) begin
          #1;
          qq  = digit(q);
          seen[qq + 2]++;
          Sn  = S + qq * eps;
          w   = v - (2.0 * S * qq + qq * qq * eps);
          lo  = -(4.0 / 3.0) * Sn + (4.0 / 9.0) * eps;
          hi  =  (4.0 / 3.0) * Sn + (4.0 / 9.0) * eps;
          checks++;
          if (!$onehot(q) || w < lo - 1e-12 || w > hi + 1e-12) begin
            failures++;
            if (failures < 10) $display("sqrt FAIL j=%0d S=%f r=%f 4w=%f q=%0d", j, S, r, v, qq);
          end
        end
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("digit %0d never selected", k - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
