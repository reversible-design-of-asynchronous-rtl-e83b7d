// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
//   P = A
//   Q = A xor B
//
// The mapping is a bijection on {A,B}, so no information is lost.  Besides
// XOR, the gate is the reversible way to copy a signal (B tied to 0 gives
// P = Q = A, since plain fan-out is not allowed in a reversible netlist) and
// to invert one (B tied to 1 gives Q = not A at the cost of one XOR rather
// than a NOT gate).  Purely combinational, no clock, zero internal state.
// Cost: QC 1, one XOR (rev_pkg::FG_COST).
module feynman_gate
  import rev_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  localparam rev_cost_t COST = FG_COST;

  assign p = a;
  assign q = a ^ b;

endmodule
