# Reversible asynchronous sequential logic: a falling-edge T flip-flop from Peres and Feynman gates

A reversible gate maps its input vector to its output vector one-to-one, so no
information is erased and, in principle, none of the kT·ln2 heat per lost bit
is dissipated. A reversible circuit must therefore have as many outputs as
inputs, may not fan a signal out directly, and carries "garbage" outputs that
exist only to keep the mapping invertible. Such circuits are compared by their
**quantum cost** (QC) and their **hardware complexity**, counted as XOR (α),
AND (β) and NOT (δ) operations.

The idea this RTL follows is that sequential circuits, latches and
edge-triggered flip-flops, can be built from only two gates, the Peres gate and
the Feynman gate, with no NOT gates at all, which lowers both measures compared
with designs that use Fredkin gates and the "New Gate". Storage is not a
flip-flop primitive: as in any asynchronous sequential circuit, each stored bit
is a feedback loop through the gate network.

## The two gates

| gate | mapping | QC | complexity |
|---|---|---|---|
| Feynman (`feynman_gate`) | P = A, Q = A ⊕ B | 1 | α |
| Peres (`peres_gate`) | P = A, Q = A ⊕ B, R = AB ⊕ C | 4 | 2α + β |

The Feynman gate does three jobs here: XOR; copying a signal (B = 0 gives
P = Q = A), which replaces fan-out; and inversion (B = 1 gives Q = ¬A), which
replaces a NOT gate with an XOR. The Peres gate is the only source of AND.

`rev_pkg` holds a `rev_cost_t` struct (QC, α, β, δ), the cost of each gate and
helpers to add costs; every module declares a `COST` localparam for its own
netlist.

## The reversible gated latch (`rev_d_latch`)

The latch's next state is

    Q+ = E·(D ⊕ Q) ⊕ Q        = D while E = 1, Q while E = 0

which is exactly the R output of a Peres gate with A = E, B = D ⊕ Q, C = Q:

    fb ──► Feynman(A=fb, B=D) ──P=fb──────────► Peres C
                              └─Q=D⊕fb────────► Peres B
    E  ─────────────────────────────────────► Peres A ──P──► e_o (enable pass-through)
                                                Peres Q ──► g   (garbage)
                                                Peres R = Q+ ──► Feynman(A=Q+, B=0)
                                                                   ├─P──► fb (feedback)
                                                                   └─Q──► q  (output)

Cost: 2 Feynman + 1 Peres, QC 6, 4α + β, no NOT. The loop
fb → Feynman → Peres → Feynman → fb *is* the memory. Lint tools report it as
circular combinational logic and synthesis as a logic loop; that is intended.
While E = 0 the loop computes fb = fb and keeps whatever value it holds.

`e_o` hands the enable on to the next stage, so the clock is never fanned out.

## The falling-edge T flip-flop (`rev_t_ff_fe`)

Two latches in master-slave form:

| instance | gate / block | inputs | role |
|---|---|---|---|
| `u_in`  | Feynman | A = slave state, B = t | P is the output `q`; Q = t ⊕ q is the next state |
| `u_mst` | latch | E = clk, D = t ⊕ q | master, transparent while clk = 1 |
| `u_inv` | Feynman | A = clk (via master's `e_o`), B = 1 | Q = ¬clk |
| `u_slv` | latch | E = ¬clk, D = master | slave, transparent while clk = 0 |

While clk is high the master follows t ⊕ q and the slave holds q. When clk
falls the master closes and the slave opens, so q takes the new value just
after the falling edge: it toggles if t was 1 and holds if t was 0. Changes of
t while clk is low have no effect; while clk is high, the last value before
the fall counts.

Ports: `clk`, `t` in; `q` out; `garbage[3:0]` out:
`[0]` master Peres Q, `[1]` a copy of clk, `[2]` slave Peres Q, `[3]` ¬clk.
Constant inputs: 0 on the two copy gates, 1 on the inverter.

Cost: 6 Feynman + 2 Peres = QC 14, 10α + 2β, no NOT gates.

### Timing

- q settles about five gate delays after the falling edge (inverter, slave
  Peres, slave copy gate, `u_in`).
- t must be stable for the master's settling time (three gate delays) before
  clk falls.
- At the rising edge the slave closes one gate delay (`u_inv`) after the
  master opens. The master-to-slave path is three gates long, so the slave has
  closed before a new master value can reach it. This relies on the gates
  having comparable delays; in RTL simulation all delays are zero.
- There is no reset or clear input. q powers up at whatever the loops hold.

## Top level (`rev_async_top`)

The top holds the T flip-flop and brings out `clk`, `t`, `q` and
`garbage[3:0]`. It has no parameters. `COST` gives QC 14, 10α + 2β.

## How this RTL relates to the published design

- **Gates.** The Feynman and Peres gate functions are the standard ones. Their
  QC and α/β counts match the published figures (QC 1 and α; QC 4 and 2α + β).
- **T flip-flop.** The published flip-flop uses Peres and Feynman gates in
  place of the Fredkin and New gates of an earlier design. It reports QC 96 and
  60α + 18β, which matches 18 Peres + 24 Feynman gates. That gate-level netlist
  is not reproduced here. This RTL implements the same function, a T
  flip-flop on the falling clock edge built from Peres and Feynman gates only,
  with a compact master-slave arrangement: QC 14, 10α + 2β. The
  latch structure, the master-slave split, the garbage assignment and the
  absence of a reset are this design's own choices. No Q̄ output is provided.
- **Latch circuit.** The article also presents an asynchronous sequential
  circuit built from latches. It reports QC 27 and 15α + 6β, which matches
  6 Peres + 3 Feynman gates. Its state table and its inputs and outputs are not
  specified, so it is not implemented.
- The Fredkin gate and the New Gate appear only in the earlier designs used
  for comparison, so they are not implemented.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog:

- `feynman_gate_tb`, `peres_gate_tb`: every input vector against the truth
  table, plus a check that the mapping is a bijection.
- `rev_d_latch_tb`: 2000 random enable/data changes against a reference latch,
  also checking `e_o` and the garbage line. It requires both transparent
  updates and holds across a data change to occur.
- `rev_t_ff_fe_tb`, `rev_async_top_tb`: 4000 clock cycles (period 100 ns)
  with t changing at random in both clock phases. q is checked against a
  reference after every edge and every change of t, along with the clock
  copies on the garbage lines. The tests count toggles, holds, rising edges,
  t changes while clk is high and t changes while clk is low, and fail if any
  count is zero. The reference starts from q's power-up value because there
  is no reset.

For each module, a copy with a deliberate fault (a wrong gate function, an
inverted copy gate, a D-type master input or an inverted t) fails its
testbench.

## Simulating

With Verilator 5 (the loops need no special options; warnings about circular
logic are expected):

    verilator --binary --timing --assert -Wno-fatal --top-module rev_async_top_tb \
        -y rtl -y tb +libext+.sv rtl/rev_pkg.sv tb/rev_async_top_tb.sv
    ./obj_dir/Vrev_async_top_tb

Replace the top module name and testbench file to run another test. Verilator
settles the feedback loops by iterating the combinational logic. A netlist
change that lets a loop oscillate, for example a latch whose enable is 1 while
its output feeds its inverted input, stops the simulation with a
"did not converge" error.

## Files

- `rtl/rev_pkg.sv`: cost type and gate costs
- `rtl/feynman_gate.sv`, `rtl/peres_gate.sv`: the gates
- `rtl/rev_d_latch.sv`: reversible gated D latch
- `rtl/rev_t_ff_fe.sv`: falling-edge T flip-flop
- `rtl/rev_async_top.sv`: top level
- `tb/*_tb.sv`: one testbench per module
