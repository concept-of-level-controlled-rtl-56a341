# A level-controlled fuzzy R-S / D memory element

A two-valued latch remembers 0 or 1. This design remembers a *many-valued*
(fuzzy) truth value anywhere in [0, 1], and it uses only one kind of gate in its
storage loop: the standard many-valued Sheffer operation ("fuzzy NAND")

    a NAND b = 1 - min(a, b)

Two such gates cross-coupled give a many-valued R-S circuit. Two more gates,
driven by a level-control input T, make it a level-controlled R-S latch, and
one negation in front of the R input turns that into a D latch. The circuit is
a direct generalisation of the classical NAND R-S flip-flop: with values
restricted to {0, 1} it is exactly the textbook gated D latch.

Feedback loops of many-valued gates have a weakness that binary ones do not: a
gate that is slightly off (gives 0.49 instead of 0.5) feeds its error back into
itself, and a stored value can slowly drift away. The cure used here is a
**level filter** at the output of each loop gate, which snaps the value onto
one of a finite set of evenly spaced levels. As long as the spacing of the
levels is at least twice the gate error, the error is removed every time round
the loop and the stored value stays put.

## How values are represented

| Quantity          | Representation                                              |
|-------------------|-------------------------------------------------------------|
| fuzzy value x     | unsigned W-bit code k, x = k / (2^W - 1)                    |
| 1 and 0           | all ones and all zeros                                      |
| negation 1 - x    | bitwise complement `~k`                                     |
| 1 - min(a, b)     | `~(a < b ? a : b)`                                          |
| levels of filter  | LEVELS codes j * STEP, STEP = (2^W - 1) / (LEVELS - 1)       |

Defaults are W = 8 and LEVELS = 16, so the levels are the codes 0, 17, 34, ...
255 (0, 1/15, 2/15, ..., 1). Both sizes are this design's choice: the memory
element works for any number of levels, and the right number depends on how
large the errors of real gates are. `2^W - 1` must be a multiple of
`LEVELS - 1` (checked at elaboration); this keeps every level a whole code and
makes the filter commute with negation, `filter(1 - x) = 1 - filter(x)`, which
the stored pair Q1 = 1 - Q2 relies on. Other valid pairs are for example
W = 8 with 4, 6, 18 or 52 levels, or W = 4 with 4, 6 or 16 levels.

## Time: one clock cycle is one gate delay

The memory element itself has no clock. Its input T is a many-valued *level*:
T = 1 opens the element, T = 0 closes it, and T may pass through every value in
between. What the RTL needs a clock for is the feedback loop. A
combinational loop of many-valued gates has no well-defined value in a digital
simulator, and under invalid inputs this loop genuinely oscillates. So each of
the two loop gates ends in a register that takes its new value on every rising
edge of `clk`: one cycle stands for one gate delay, and both gates step at the
same time from the previous Q1 and Q2. The input gates (U, V) and the negation
are combinational. Read `clk` as the time step of the circuit, not as a clock
of the memory element.

With this timing the outputs settle within **two cycles** of a change of D or
T, from any previous state (checked in the testbenches; it follows from the
equations below).

## The R-S circuit (`rs_circuit`)

    Q1' = F(1 - min(Q2, R))        Q2' = F(1 - min(Q1, S))

F is the level filter (`FILTERED = 1`, the default) or nothing
(`FILTERED = 0`, the bare two-gate circuit). Its behaviour, for ideal gates:

* **Store.** If R <= 1 - S, then Q1 becomes 1 - R and Q2 becomes 1 - S,
  whatever the state was. With R = 1 - S that means Q1 = S, Q2 = R: the value S
  is written.
* **Keep.** If Q1 = 1 - Q2 and S > Q1 and R > Q2 (in particular R = S = 1), the
  state does not change.
* **Invalid input.** If R > 1 - S (the many-valued version of "both set and
  reset active"), the outputs are no longer fixed. They stay inside
  1 - R <= Q1 <= S and 1 - S <= Q2 <= R, but may oscillate between those
  bounds; from Q1 = Q2 = 1 with R = S = 0.6, for example, both outputs swing
  between 0.4 and 0.6 every cycle. The closer R and S are to a valid pair, the
  narrower that band.

## The R-S latch (`rs_latch`)

Two unfiltered input gates combine R and S with the control level T:

    U = 1 - min(S, T)     V = 1 - min(R, T)

and U, V drive the filtered R-S circuit (U into the Q1 gate, V into the Q2
gate):

* **T = 1** (open): U = 1 - S, V = 1 - R. If R >= 1 - S, then Q1 = S and Q2 = R.
* **T = 0** (closed): U = V = 1, so the circuit keeps a stored Q1 = 1 - Q2
  whatever R and S do.
* **T falling** from 1 to 0 through intermediate levels, with R = 1 - S held:
  the stored value is kept at every step. This is the part that is not obvious.
  While T is above both S and R nothing changes; once T drops below the larger
  of them, U (or V) becomes 1 - T, which is still larger than the value fed
  back from the other gate, so min() keeps selecting the feedback and the loop
  keeps its value. The testbenches lower T in random steps, lingering one to
  three cycles on each level, and check the stored value in every cycle.

## The D latch (`fuzzy_d_latch`, the top)

S = D and R = 1 - D (through `fuzzy_not`), so R = 1 - S always holds and the
invalid region can never be reached from the inputs. T = 1 writes D
(Q1 = D, Q2 = 1 - D), T = 0 holds, and lowering T gradually does not disturb the
value. The whole element is four Sheffer gates, one negation and two filters.

A D that lies between two levels is stored as the nearest level: the filters
guarantee the stored pair is always on the grid (an immediate assertion in
`rs_circuit` checks this every cycle).

### Ports

| Port           | Dir | Width | Meaning                                          |
|----------------|-----|-------|--------------------------------------------------|
| `clk`          | in  | 1     | gate step (one cycle = one gate delay)           |
| `rst_n`        | in  | 1     | asynchronous reset, active low; stores 0         |
| `d`            | in  | W     | value to store                                   |
| `t`            | in  | W     | level control: 1 open, 0 closed, any value between |
| `err1`, `err2` | in  | W, signed | error added to the Q1 / Q2 loop gate, in codes; tie to 0 |
| `q1`           | out | W     | stored value                                     |
| `q2`           | out | W     | 1 - stored value                                 |

## Gate errors and the filter

Real many-valued gates deliver their result with some error. `sheffer_gate`
has a signed `err` input that is added to the ideal result (clamped to
[0, 1]); the latch brings out those of its two loop gates as `err1`/`err2`. They
are a modelling aid for studying defective gates, not part of the memory
element: in normal use tie them to zero.

With the default level step of 17 codes, any error of up to 8 codes in either
loop gate is removed completely, even if it changes every cycle. Without the
filter the picture is different: in the bare R-S circuit, a gate that is only
one code low makes the held value drop by one code every two cycles until it
reaches 0. `tb_rs_circuit` shows both side by side. The input gates U and V
carry no error port: they are outside the feedback loop, so an error there is
not accumulated.

## Files

| File                   | Contents                                             |
|------------------------|------------------------------------------------------|
| `rtl/fuzzy_pkg.sv`     | default W and LEVELS                                 |
| `rtl/sheffer_gate.sv`  | 1 - min(a, b) with optional gate error               |
| `rtl/level_filter.sv`  | round to the nearest of LEVELS evenly spaced values  |
| `rtl/filtered_sheffer.sv` | Sheffer gate followed by a level filter           |
| `rtl/fuzzy_not.sv`     | 1 - x, as an inverter or as a Sheffer gate with tied inputs |
| `rtl/rs_circuit.sv`    | cross-coupled pair with step registers               |
| `rtl/rs_latch.sv`      | R-S latch with level control T                       |
| `rtl/fuzzy_d_latch.sv` | D latch, the top                                     |
| `tb/tb_<module>.sv`    | one self-checking testbench per module               |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed number of cycles if something hangs. `tb_fuzzy_d_latch` runs the top at
its default sizes and counts each mechanism (reset, write, hold, falling T,
rounding of off-grid D, removal of gate errors); a mechanism that never
happened counts as a failure. The clocked testbenches also compare every cycle
with a step model of the circuit written independently in the testbench.

## Simulating

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fuzzy_pkg.sv tb/tb_fuzzy_d_latch.sv --top-module tb_fuzzy_d_latch
    ./obj_dir/Vtb_fuzzy_d_latch

Replace the testbench name to run another one. Each runs in well under a
second. To lint the RTL alone: `verilator --lint-only -Wall -Irtl
rtl/fuzzy_pkg.sv rtl/fuzzy_d_latch.sv`. Linting `sheffer_gate` or `fuzzy_not`
on its own reports that the package's LEVELS default is unused there, which is
expected.

## Where this RTL goes beyond, or stops short of, the circuit it implements

* The value code, W, LEVELS, the nearest-level rounding of the filter, the
  one-register-per-loop-gate timing, the reset value and the gate error ports
  are this design's own choices. The gate equations, the connections and the
  placement of the filters are those of the circuit.
* The step model updates both loop gates at once rather than one after the
  other. The store, keep and falling-T results hold for it as well; the
  testbenches check each of them.
* The two-cycle settling time is a property of this discrete-time model, not a
  timing figure for any physical gate.
* Not included: an edge-controlled element built from two of these latches,
  and the dual element built from "1 - max" gates; both are only mentioned as
  possibilities for the same idea.
* The level filter is a digital rounding unit. An analog implementation of
  these gates (currents or voltages as truth values) would need a physical
  quantiser instead; only its function is modelled here.
