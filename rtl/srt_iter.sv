// srt_iter: one complete radix-4 SRT divide / square-root iteration.
//
// This is the single-cycle recurrence of the unit: the remainder head goes
// to the comparators and one-hot digit logic (srt_qsel) while, in parallel,
// the F_k logic (srt_fgen) and five speculative remainder adders
// (srt_rem_adder) form R_i - F_k for every possible digit. The digit then only
// drives two banks of 5:1 multiplexers: one picks the next remainder, the
// other (inside srt_otf) the next root / quotient estimates Q+ and Q-.
// The speculate-then-select structure follows the design. Combinational;
// the registers live in srt_divsqrt_core.
//
// Interface: rin/qp/qm/eps are the current state, d the divisor significand;
// iter0/iter1 mark the first two iterations; q is the digit chosen.
module srt_iter
  import srt_pkg::*;
(
  input  op_e               op,
  input  logic              iter0,
  input  logic              iter1,
  input  logic [SIG_W-1:0]  d,
  input  rem_t              rin,
  input  logic [RW-1:0]     qp,
  input  logic [RW-1:0]     qm,
  input  logic [RW-1:0]     eps,
  output qdig_t             q,
  output rem_t              rout,
  output logic [RW-1:0]     qp_next,
  output logic [RW-1:0]     qm_next
);

  mk_t           mk;
  logic [RW-1:0] add [5];
  logic          cin [5];
  rem_t          rstar [5];

  srt_qsel u_qsel (
    .head  (rin.head),
    .op    (op),
    .iter0 (iter0),
    .iter1 (iter1),
    .d_msb (d[SIG_W-2 -: 4]),
    .q_msb (qp[FB -: 6]),
    .mk    (mk),
    .q     (q)
  );

  srt_fgen u_fgen (
    .op  (op),
    .d   (d),
    .qp  (qp),
    .qm  (qm),
    .eps (eps),
    .add (add),
    .cin (cin)
  );

  for (genvar k = 0; k < 5; k++) begin : g_add
    srt_rem_adder u_add (
      .rin  (rin),
      .add  (add[k]),
      .cin  (cin[k]),
      .rout (rstar[k])
    );
  end

  // 5:1 remainder multiplexer driven by the one-hot digit.
  always_comb begin
    rout = '0;
    for (int k = 0; k < 5; k++)
      if (q[k]) rout = rstar[k];
  end

  srt_otf u_otf (
    .qp      (qp),
    .qm      (qm),
    .eps     (eps),
    .q       (q),
    .qp_next (qp_next),
    .qm_next (qm_next)
  );

endmodule
