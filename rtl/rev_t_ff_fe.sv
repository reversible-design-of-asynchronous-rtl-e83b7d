// rev_t_ff_fe: a T flip-flop that acts on the falling clock edge, built only
// from Peres and Feynman gates.
//
// On every falling edge of clk the output q toggles if t is 1 and holds if t
// is 0; between falling edges q does not change, whatever t does.
//
// Structure (master-slave, this design's own arrangement):
//   u_in    Feynman gate, A = q, B = t:  P = q (the output), Q = t xor q
//   u_mst   master rev_d_latch, enabled by clk, D = t xor q
//   u_inv   Feynman gate, A = clk, B = 1: Q = not clk (an XOR, no NOT gate)
//   u_slv   slave rev_d_latch, enabled by not clk, D = master output
// While clk is 1 the master takes the next state t xor q and the slave holds
// q.  When clk falls the master closes and the slave opens, so q takes the
// new value right after the falling edge.  The enable reaches the slave
// through the master's Peres P output and u_inv, so clk is never fanned out.
//
// Ports: clk and t in, q out.  garbage[3:0] brings out the lines a
// reversible netlist must keep but does not use: [0] master Peres Q,
// [1] inverter P (a copy of clk), [2] slave Peres Q, [3] slave enable
// pass-through.  The constant inputs are two 0s (the copy gates inside the
// latches) and one 1 (u_inv).
//
// Timing: q changes about five gate delays after the falling edge of clk.
// t must be stable for the master's settling time before clk falls.  At the
// rising edge the slave closes one gate delay (u_inv) after the master
// opens; the master-to-slave path is three gates long, which covers that
// skew.  There is no reset; the first value of q is whatever the loops hold
// at power-up, as the gate-level circuit has no clear input.
//
// Gate count: 6 Feynman + 2 Peres, QC 14, 10 XOR + 2 AND, no NOT gates.  The
// two stored bits are the feedback loops inside the latches; the loops that
// lint and synthesis report here are intended.
module rev_t_ff_fe
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       t,
  output logic       q,
  output logic [3:0] garbage
);

  localparam rev_cost_t COST =
    cost_add(cost_scale(FG_COST, 6), cost_scale(PG_COST, 2));

  logic s;          // slave state (copy from the slave latch)
  logic d_mst;      // t xor q
  logic m;          // master output
  logic clk_pass;   // clk after the master's Peres gate
  logic clk_n;      // inverted clock

  feynman_gate u_in (
    .a (s),
    .b (t),
    .p (q),
    .q (d_mst)
  );

  rev_d_latch u_mst (
    .e   (clk),
    .d   (d_mst),
    .q   (m),
    .e_o (clk_pass),
    .g   (garbage[0])
  );

  feynman_gate u_inv (
    .a (clk_pass),
    .b (1'b1),
    .p (garbage[1]),
    .q (clk_n)
  );

  rev_d_latch u_slv (
    .e   (clk_n),
    .d   (m),
    .q   (s),
    .e_o (garbage[3]),
    .g   (garbage[2])
  );

endmodule
