// rev_pkg: shared types and constants for the reversible-logic circuits.
//
// Reversible circuits are compared by their quantum cost (QC) and by their
// hardware complexity, written as a count of XOR (alpha), AND (beta) and NOT
// (delta) operations.  This package holds that cost as a packed struct, the
// cost of each gate the circuits use, and two helpers that add costs up, so
// that every module can state the cost of its own netlist as a localparam.
//
// The per-gate figures follow the gate descriptions this design is based on:
//   Feynman gate : QC 1, 1 alpha
//   Peres gate   : QC 4, 2 alpha + 1 beta
// Nothing in this package is hardware; it is elaborated away.
package rev_pkg;

  typedef struct packed {
    int unsigned qc;      // quantum cost
    int unsigned n_xor;   // alpha: XOR operations
    int unsigned n_and;   // beta : AND operations
    int unsigned n_not;   // delta: NOT operations
  } rev_cost_t;

  localparam rev_cost_t FG_COST = '{qc: 1, n_xor: 1, n_and: 0, n_not: 0};
  localparam rev_cost_t PG_COST = '{qc: 4, n_xor: 2, n_and: 1, n_not: 0};

  function automatic rev_cost_t cost_add(rev_cost_t x, rev_cost_t y);
    cost_add.qc    = x.qc + y.qc;
    cost_add.n_xor = x.n_xor + y.n_xor;
    cost_add.n_and = x.n_and + y.n_and;
    cost_add.n_not = x.n_not + y.n_not;
  endfunction

  function automatic rev_cost_t cost_scale(rev_cost_t x, int unsigned n);
    cost_scale.qc    = x.qc * n;
    cost_scale.n_xor = x.n_xor * n;
    cost_scale.n_and = x.n_and * n;
    cost_scale.n_not = x.n_not * n;
  endfunction

endpackage
