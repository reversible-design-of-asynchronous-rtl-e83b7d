// peres_gate: the 3x3 reversible Peres gate (also called the new Toffoli gate).
//
//   P = A
//   Q = A xor B
//   R = (A and B) xor C
//
// It is a Toffoli gate followed by a Feynman gate on the first two lines, and
// is the one gate in the gate set that carries an AND.  With C = 0 it gives
// AND, with C = 1 NAND, and with B fed as (D xor Q) and C as Q it gives the
// next-state function of a gated latch (see rev_d_latch).  Combinational, no
// internal state.  Cost: QC 4, two XOR and one AND (rev_pkg::PG_COST).
module peres_gate
  import rev_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  localparam rev_cost_t COST = PG_COST;

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;

endmodule
