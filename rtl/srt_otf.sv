// srt_otf: on-the-fly conversion of the signed-digit result (Q*+/- logic and
// its 5:1 multiplexers).
//
// Keeps two conventional (non-redundant) forms of the result: Q (Q+) and
// QM = Q - 4*eps (Q-), where eps = 4^-(j+1) is the weight of the incoming digit.
// Because both are multiples of 4*eps, every candidate is a concatenation of
// a stored estimate with a 2-bit digit pattern, so no carries are needed:
//   q  = +2   +1   0        -1        -2
//   Q' = Q+2e Q+e  Q        QM+3e     QM+2e
//   QM'= Q+e  Q    QM+3e    QM+2e     QM+e
// All five candidates are formed in parallel and the one-hot digit selects.
// Combinational. The use of Q+ and Q- and of a 5:1 selection follows the
// design; the candidate table is the standard on-the-fly rule.
module srt_otf
  import srt_pkg::*;
(
  input  logic [RW-1:0] qp,
  input  logic [RW-1:0] qm,
  input  logic [RW-1:0] eps,
  input  qdig_t         q,
  output logic [RW-1:0] qp_next,
  output logic [RW-1:0] qm_next
);

  logic [RW-1:0] e1, e2, e3;

  assign e1 = eps;
  assign e2 = eps << 1;
  assign e3 = eps | (eps << 1);

  always_comb begin
    unique case (q)
      Q_P2:    begin qp_next = qp | e2; qm_next = qp | e1; end
      Q_P1:    begin qp_next = qp | e1; qm_next = qp;      end
      Q_Z:     begin qp_next = qp;      qm_next = qm | e3; end
      Q_M1:    begin qp_next = qm | e3; qm_next = qm | e2; end
      default: begin qp_next = qm | e2; qm_next = qm | e1; end  // Q_M2
    endcase
  end

endmodule
