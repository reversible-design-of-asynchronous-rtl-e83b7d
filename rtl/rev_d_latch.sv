// rev_d_latch: a level-sensitive gated D latch made only of reversible gates.
//
// The stored bit lives on a feedback loop, as in any asynchronous circuit:
//
//   Q+ = E(D xor Q) xor Q          (= D while E = 1, = Q while E = 0)
//
// One Feynman gate forms D xor Q from the fed-back state, one Peres gate with
// A = E, B = D xor Q, C = Q produces Q+ on its R output, and a second Feynman
// gate with B = 0 copies Q+ into the feedback line and the latch output,
// because a reversible netlist may not fan a signal out directly.
//
//   e     enable; transparent while 1, holding while 0
//   d     data input
//   q     latch output (a copy of the state)
//   e_o   the enable passed through the Peres gate's P output, free for the
//         next stage so the enable need not be fanned out
//   g     garbage output (Peres Q = E xor D xor Q) that keeps the netlist
//         reversible
//
// Timing: q follows d while e is 1, after three gate delays, and holds the
// last value once e falls.  There is no reset: the state at power-up is
// whatever the loop settles to.
//
// The combinational loop through u_copy -> u_mix -> u_pg -> u_copy is the
// storage element of this latch and is intended; it is what a synthesis or
// lint tool will report as a logic loop.  The gate network is this design's
// own choice: 2 Feynman + 1 Peres, QC 6, 4 XOR + 1 AND, no NOT.
module rev_d_latch
  import rev_pkg::*;
(
  input  logic e,
  input  logic d,
  output logic q,
  output logic e_o,
  output logic g
);

  localparam rev_cost_t COST = cost_add(cost_scale(FG_COST, 2), PG_COST);

  logic fb;        // fed-back state
  logic fb_pass;   // state passed through the first Feynman gate
  logic d_x_fb;    // D xor Q
  logic q_next;    // Q+ from the Peres gate

  feynman_gate u_mix (
    .a (fb),
    .b (d),
    .p (fb_pass),
    .q (d_x_fb)
  );

  peres_gate u_pg (
    .a (e),
    .b (d_x_fb),
    .c (fb_pass),
    .p (e_o),
    .q (g),
    .r (q_next)
  );

  feynman_gate u_copy (
    .a (q_next),
    .b (1'b0),
    .p (fb),
    .q (q)
  );

endmodule
