// rev_async_top: top level of the reversible asynchronous sequential design.
//
// It holds the falling-edge T flip-flop built from Peres and Feynman gates
// (rev_t_ff_fe), which in turn is made of two reversible gated latches
// (rev_d_latch).  The design has no global clock domain of its own: clk is
// simply the flip-flop's edge input, and all state sits on feedback loops
// inside the latches.
//
//   clk          flip-flop clock; q changes only after a falling edge
//   t            toggle enable, sampled at the falling edge of clk
//   q            flip-flop output
//   garbage[3:0] garbage outputs of the reversible netlist (see rev_t_ff_fe)
//
// COST gives the quantum cost and operation counts of the whole netlist:
// QC 14, 10 XOR + 2 AND, no NOT.
module rev_async_top
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       t,
  output logic       q,
  output logic [3:0] garbage
);

  localparam rev_cost_t COST =
    cost_add(cost_scale(FG_COST, 6), cost_scale(PG_COST, 2));

  rev_t_ff_fe u_tff (
    .clk     (clk),
    .t       (t),
    .q       (q),
    .garbage (garbage)
  );

endmodule
