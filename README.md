# Reversible sequential circuits: D latch, T flip-flop and 4-bit ripple up/down counter

A reversible gate has as many outputs as inputs and maps input vectors to
output vectors one to one, so no information is erased and, in principle,
no energy has to be dissipated for erasing it. Such gates have no memory of
their own. This library builds sequential circuits from them anyway: a
reversible multiplexer gate whose output is fed back to one of its own data
inputs holds a value, and two of them in series make a master-slave
flip-flop. On top of that sit a D latch, a T flip-flop and a 4-bit
asynchronous up/down counter, all written gate by gate in SystemVerilog.

The usual figures of merit for such circuits are the number of gates, the
number of constant inputs (inputs tied to 0 or 1), the number of garbage
outputs (outputs that are neither results nor fed back) and the quantum
cost (the sum of fixed per-gate costs). `rtl/rev_pkg.sv` records them for
each circuit.

## The gates

| module | ports | function | quantum cost |
|---|---|---|---|
| `feynman_gate` | A,B -> P,Q | P = A, Q = A xor B (controlled NOT) | 1 |
| `fredkin_gate` | A,B,C -> P,Q,R | P = A; B and C swapped when A = 1 | 5 |
| `sayem_gate` | A,B,C,D -> P,Q,R,S | P = A, Q = A'B xor AC, R = Q xor D, S = AB xor A'C xor D | 6 |

The Sayem gate carries the sequential circuits. With D tied to 0 it is a
2:1 multiplexer (A selects C over B) with two identical copies of its result,
on Q and R; S carries the input that was not selected, P is a copy of A. The
Feynman gate serves as a copy gate, as an inverter (B tied to 1, giving A
and not A) and as a controlled inverter. The Fredkin gate belongs to the same
basic set, but no circuit here uses it; it stands alone in the top.

## How a Sayem gate stores a bit

Feed the R output back into B, put the enable on A and the data on C:

    Q = A ? C : (previous Q)

While A is 1 the gate passes the data; when A goes to 0 the multiplexer
selects its own output and the loop keeps the value. Feeding R back into C
instead gives the opposite phase: the gate passes B while A is 0 and holds
while A is 1.

These loops are real combinational loops in the RTL. That is intended: the
gates have no state, so the loop is the storage. Verilator reports them as
`UNOPTFLAT` (it still simulates them correctly, settling each loop after
every input change), and synthesis reports logic loops. The zero-delay
simulation has no races; a physical implementation would need the timing
of these loops checked like that of any asynchronous latch.

## D latch (`rev_d_latch`)

One Sayem gate in the first form above (A = e, B = its own R, C = d, D = 0)
and a Feynman gate with B tied to 1 that gives q and q_n. q follows d while
e = 1 and holds while e = 0. Cost: 2 gates, 2 constants, 2 garbage outputs
(the Sayem P and S, on `garbage`), quantum cost 7.

## T flip-flop (`rev_t_ff`)

    clk ─► SG master (A=clk, B=own R, C=q^t, D=0) ─P,Q─► SG slave (A=clk, B=master Q, C=own R, D=0)
                                                                        │ Q
                       t ─► FG (A=slave Q, B=t) ─► P = q, Q = q^t ──► back to master C (and out as qp)

The master is transparent while clk is 1 and loads q xor t; the slave is
transparent while clk is 0. When clk falls the master closes and the slave
passes the new value on, so **q changes right after each falling edge of
clk**: it toggles when t = 1 and keeps its value when t = 0. t has to be
stable while clk is high. `qp` is the feedback line q xor t, not the
complement of q. The clock leaves the slave's P output unchanged
(`garbage[2]`). Cost: 3 gates, 2 constants, 3 garbage, quantum cost 13.

## 4-bit asynchronous up/down counter (`rev_updown_counter`)

Four T flip-flops with T on the count-enable line. The first one is clocked
by the count pulses. Between stage i and stage i+1 sits a Feynman gate:
A = q[i] and B = the direction line. Its P output is count bit i, and its Q
output, q[i] xor direction, clocks stage i+1. The count is `count[3:0]`,
with `count[0]` the first (fastest) stage.

Because each stage changes on a falling clock edge:

* direction line 0: stage i+1 toggles when q[i] falls from 1 to 0, so the
  counter counts **up**;
* direction line 1: stage i+1 toggles when q[i] rises, so it counts
  **down**.

The intended interface has `up_dn = 1` for counting up and a down count
with `up_dn = 0` (1111, 1110, 1101, ... on successive pulses). To give that
polarity, the default build (`UP_WHEN_HIGH = 1`) puts one more Feynman gate,
with B tied to 1, between `up_dn` and the direction line. With
`UP_WHEN_HIGH = 0` the circuit has exactly four flip-flops and three link
gates, and `up_dn = 1` counts down.

| build | gates | constants | garbage | quantum cost |
|---|---|---|---|---|
| `UP_WHEN_HIGH = 0` (minimal netlist) | 15 | 8 | 12 | 55 |
| `UP_WHEN_HIGH = 1` (default) | 16 | 9 | 13 | 56 |

Things to know when using it:

* It is a ripple counter: after a pulse's falling edge the change runs
  through up to four stages before the count is stable.
* Changing `up_dn` flips every link gate's output and can itself clock
  stages, so the count may jump. Change the direction only when the count
  does not matter, or reload the count afterwards.
* `count_en = 0` holds the count (every T input is 0).
* `garbage` holds three bits per stage (`[3i+2]` is the clock copy of
  stage i) plus, in the default build, a copy of `up_dn` on the top bit.

## Reset and initial state

None of the circuits has a reset. Adding one would take extra gates with
more constant inputs. The latch is defined once e has been 1; the
flip-flop and the counter start from an unknown value and count from
there. The testbenches take the first value they read as the starting
point. If a defined start matters, add a clear path in front of the
circuits.

## The top (`rev_seq_top`)

The three circuits and the Fredkin gate are independent, so `rev_seq_top`
only places them side by side, each with its own `latch_*`, `tff_*`,
`cnt_*` and `frg_*` ports. Parameters `CNT_WIDTH` (default 4) and
`CNT_UP_WHEN_HIGH` (default 1) pass through to the counter. After synthesis
the whole top is 79 two-input gates (AND, XOR, NOT) and no flip-flops: the
storage is in the loops.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`:

* the gate testbenches apply every input and also check that the mapping is
  one to one (the Fredkin test also checks that it is its own inverse and
  keeps the number of ones);
* `rev_d_latch_tb` replays the enable/data sequence en=1 d=0, en=1 d=1,
  en=0 d=0, en=0 d=1 (q = 0, 1, 1, 1) and 400 random steps;
* `rev_t_ff_tb` checks q before and after each edge for 300 random cycles,
  so a change on the rising edge would be caught, and checks qp = q xor t;
* `rev_updown_counter_tb` runs the default counter and the minimal
  `UP_WHEN_HIGH = 0` counter side by side through down, up, hold and random
  segments, and checks the down sequence 1111, 1110, ... 0110;
* `rev_seq_top_tb` runs the whole top at its default parameters for 600
  steps with random inputs and counts each mechanism (latch follow/hold,
  toggle/keep, count up/down/hold, Fredkin pass/swap).

The circuit testbenches also compare the cost records in `rev_pkg` with the
table above. To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -Wno-fatal \
        rtl/rev_pkg.sv tb/rev_seq_top_tb.sv --top-module rev_seq_top_tb
    ./obj_dir/Vrev_seq_top_tb

`-Irtl` lets Verilator find the modules by file name. `-Wno-fatal` is needed
because the storage loops raise `UNOPTFLAT` warnings.

## Where this RTL departs from the circuits it implements

* **Up/down polarity.** The minimal netlist counts up with its direction
  input at 0. The default build adds one Feynman gate so that 1 means up.
  This costs one gate, one constant, one garbage output and one unit of
  quantum cost. `UP_WHEN_HIGH = 0` restores the minimal netlist.
* **Edge.** The flip-flop's falling-edge behaviour follows from the gate
  equations and is not separately specified.
* **Fredkin gate.** It is part of the basic gate set, but no circuit uses
  it. It is provided standalone.
* **Garbage outputs as ports.** Every garbage output is a module port, so
  the gate outputs stay observable. This is a naming and interface choice.
