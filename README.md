# Dynamic-logic adders: a latch-free three-phase pipeline and a double Manchester carry chain

This repository holds synthesizable SystemVerilog models of two adder designs.
Both come from work on speeding up arithmetic with dynamic (precharged) CMOS
logic. They share only a clock and a reset:

1. **A 16-bit Kogge-Stone adder whose carry look-ahead unit is a pipeline with
   no pipeline registers.** Every level of dynamic gates is its own pipeline
   stage. A three-phase clocking scheme makes each level hold its own result
   for one phase time. That held output stands in for the latch a
   conventional pipeline would need.
2. **An 8-bit Manchester carry chain adder module that computes its even and
   odd carries in two separate 4-long chains at once.** Eight carries thus
   take the time of a 4-bit chain. Modules are chained to form 16-, 32- and
   64-bit adders. The top level uses the 64-bit adder.

The models describe logic values phase time by phase time. They do not
describe transistors. The speed, energy and area advantages of these circuits
come from transistor-level effects: where the evaluation transistor sits,
keepers, node capacitance. RTL cannot show those effects. What the RTL does
capture exactly is the logic function, the clocking discipline of the
pipeline and the cycle timing, and the testbenches check all three.

---

## 1. The three-phase memory-less pipeline

### The gate

Each gate is an ordinary dynamic gate with one change. Its pMOS precharge
transistor and its nMOS evaluation transistor are driven by **two different
clocks**. Because of this, the gate has three operating phases rather than
two, and each phase lasts one *phase time*:

| phase     | precharge clock (active low) | evaluate clock (active high) | output node                                  |
|-----------|------------------------------|------------------------------|----------------------------------------------|
| precharge | low                          | low                          | charged high, inputs ignored                 |
| evaluate  | high                         | high                         | discharged if the nMOS network conducts      |
| memory    | high                         | low                          | floats and keeps its charge, inputs ignored  |

Every gate output is the complement of its nMOS network function. During
evaluate the output can only fall. Its inputs must therefore be stable for the
whole evaluate phase.

`mlp_dyn_node` models the output nodes of one gate level. A level module works
out where its nMOS network would conduct (`pd`), and the node does the rest:

    precharge: out <= '1
    evaluate:  out <= out & ~pd     (discharge only)
    memory:    out <= out

The model stores one bit per node and updates it once per phase time. In the
circuit no latch holds this bit; the node capacitance does.

### Clock groups and the pipeline rule

Gate levels are assigned to three clock groups by `L mod 3`. Each group has an
evaluate clock and a precharge clock:

| level L   | group | evaluate clock | precharge clock |
|-----------|-------|----------------|-----------------|
| L mod 3 = 1 | 0   | CLK1           | CLK2            |
| L mod 3 = 2 | 1   | CLK3           | CLK4            |
| L mod 3 = 0 | 2   | CLK5           | CLK6            |

The clocks of group k+1 are those of group k delayed by one phase time.
Counting phase times from reset (`clk` ticks once per phase time):

| phase time t | 0 | 1  | 2  | 3 | 4  | 5  | 6  | 7  |
|--------------|---|----|----|---|----|----|----|----|
| level 1      | p | e1 | m1 | p | e2 | m2 | p  | e3 |
| level 2      | m | p  | e1 | m1| p  | e2 | m2 | p  |
| level 3      | e | m  | p  | e1| m1 | p  | e2 | m2 |
| level 4      | p | e  | m  | p | e1 | m1 | p  | e2 |
| level 5      | m | p  | e  | m | p  | e1 | m1 | p  |

In the table, `eN` means the level evaluates operand set N and `mN` means it
holds that set's result. This arrangement enforces two properties:

* **A level evaluates only while the level before it is in memory.** Its
  inputs are therefore stable. An assertion in `ks_mlp_adder16` checks this
  rule for every level.
* **A level precharges while its predecessor evaluates.** The only constraint
  on a level's inputs is therefore during its own evaluate phase.

A new operand set can enter every three phase times. Several sets are in
flight at once, one "wave" per three levels.

`mlp_phase_gen` produces the six clocks from a modulo-3 phase counter. Each
clock is active for a whole phase time. A real generator would produce the
narrower pulses of the original waveforms, but at the granularity modelled
here the two behave the same.

### Skipping levels

A signal that has to jump from level i to level i+k must pass through k
inserted gates, because every level is a stage. An even number of inversions
keeps its polarity. The design inserts dynamic NOT gates for this. In the
adder this happens in two places:

* generates that are already complete pass through NOT gates at the lower bit
  positions;
* the half-sum bits `a ^ b`, computed at level 1, travel to the sum unit
  through one NOT gate per level.

---

## 2. The 16-bit Kogge-Stone adder on that pipeline (`ks_mlp_adder16`)

| level | module         | operation (position i)                                               | gates           | clocks    |
|-------|----------------|----------------------------------------------------------------------|-----------------|-----------|
| 1     | `ks_gp_level`  | ~G = ~(a b), ~P = ~(a + b), ~X = ~(a ^ b)                            | NAND, NOR, XOR  | CLK1/CLK2 |
| 2     | `ks_dot_level` D=1 | G = ~(~Gj (~Pj + ~Gs)), P = ~(~Pj + ~Ps)                         | OR-NAND, NOR    | CLK3/CLK4 |
| 3     | `ks_dot_level` D=2 | ~G = ~(Gj + Pj Gs), ~P = ~(Pj Ps)                                | AND-NOR, NAND   | CLK5/CLK6 |
| 4     | `ks_dot_level` D=4 | as level 2                                                       |                 | CLK1/CLK2 |
| 5     | `ks_dot_level` D=8 | as level 3, generate only                                        |                 | CLK3/CLK4 |
| –     | `ks_sum_xor`   | s_i = X_i xor G_{i-1:0}, cout = G_{15:0}, static logic               |                 | –         |

Here `j` is position i and `s` is position i − D. The propagate is inclusive
(`a + b`), which is valid for the carry tree. Every dynamic gate inverts, so
the signal polarity alternates from level to level. Level 5 delivers the
inverted prefix generates `~G_{i:0}`, which are exactly the inverted carries.
The sum unit reads them, together with the half-sum bits, while level 5 is in
its memory phase.

**Pass-through positions.** At a level with distance D, positions i < D
already hold their complete group `[i:0]`. Their generate passes through a
dynamic NOT gate. Their propagate is no longer needed, so no gate is built for
it and the node simply stays precharged. Level 5 builds no propagate gates at
all.

**Interface timing** (all in phase times of `clk`):

* `in_take` is high in the phase time in which level 1 evaluates. `a` and `b`
  must be stable for that whole phase time. At any other time they may change
  freely; the testbenches drive random values then.
* The sum of that pair appears **5 phase times later**. `sum_valid` is high
  for exactly that one phase time, which is level 5's memory phase.
* **Throughput:** one addition every 3 phase times, that is, one per period
  of the three-phase clock.
* `sum_valid` stays low for the first 6 phase times after reset. During that
  time level 5 still holds values left from before reset.

Carry in: the adder has none (bit 0 adds `a_0 + b_0` only).

---

## 3. The double carry chain Manchester adder

### The rewrite

A Manchester chain computes `c_i = g_i + z_i c_{i-1}` with one pass transistor
per bit. The chain is limited to about four bits because every added device
slows it. The design here rewrites the carries in terms of *new carries* h_i,
using

    g_i = a_i b_i,   p_i = a_i xor b_i,   t_i = a_i + b_i,   c_i = t_i · h_i

With

    G_i = g_i + g_{i-1}            (g_{-1} = c_{-1}, the carry in)
    P_i = p_i · p_{i-1} · t_{i-2}  (t_{-1} = 1)

the new carries obey a recursion that skips every second bit:

    even:  h_0 = G_0,            h_i = G_i + P_i h_{i-2}   (i = 2, 4, 6)
    odd:   h_1 = G_1 + P_1 c_{-1}, h_i = G_i + P_i h_{i-2} (i = 3, 5, 7)

So the even and the odd carries form **two independent chains of four
devices each**. They run in parallel, and eight carries take the time of a
4-bit chain. G_i and P_i are never both 1, which keeps the dynamic chain nodes
from discharging by mistake. The only extra cost is the gates that form G and
P.

### The sum

Since `c_{i-1} = t_{i-1} h_{i-1}`, the sum `s_i = p_i xor c_{i-1}` becomes a
2:1 multiplexer:

    s_i = h_{i-1} ? (p_i xor t_{i-1}) : p_i      (i > 0),   s_0 = p_0 xor c_{-1}

Both data inputs are ready before `h_{i-1}` arrives. The multiplexer therefore
costs no more delay than the usual XOR. The carry out of a module is
`c_7 = t_7 h_7`.

### Modules

| module           | contents                                              |
|------------------|-------------------------------------------------------|
| `mcc_pgt`        | g, p, t per bit                                       |
| `mcc_newgp`      | G_0..G_7, P_1..P_7                                    |
| `mcc_even_chain` | h_0, h_2, h_4, h_6                                    |
| `mcc_odd_chain`  | h_1, h_3, h_5, h_7 and c_7                            |
| `mcc_sum`        | multiplexer sum                                       |
| `mcc_dcc8`       | the 8-bit module: the five above                      |
| `mcc_adder`      | `WIDTH/8` modules in a carry ripple (default 64 bits) |

The circuit is domino logic with a precharge half and an evaluate half per
clock period. The RTL describes the evaluated values as combinational logic.
In `arith_top` the 64-bit result is registered at each rising clock edge,
which stands for the end of evaluation. This gives one addition per clock with
the result one clock later.

---

## 4. Top level (`arith_top`)

| port                         | dir | width | meaning                                                |
|------------------------------|-----|-------|--------------------------------------------------------|
| `clk`, `rst_n`               | in  | 1     | phase-time clock of the pipeline and addition clock of the Manchester adder; asynchronous active-low reset |
| `ks_a`, `ks_b`               | in  | 16    | Kogge-Stone operands, taken while `ks_in_take`         |
| `ks_in_take`                 | out | 1     | level 1 evaluates in this phase time                   |
| `ks_sum`, `ks_cout`          | out | 16, 1 | result, valid while `ks_sum_valid`                     |
| `ks_sum_valid`               | out | 1     | level 5 holds a result                                 |
| `ks_clk_n`, `ks_clk_p_n`     | out | 3, 3  | CLK1/3/5 and CLK2/4/6                                  |
| `mcc_a`, `mcc_b`, `mcc_cin`  | in  | 64, 64, 1 | Manchester operands                                |
| `mcc_sum`, `mcc_cout`        | out | 64, 1 | registered result, one clock after the operands        |

Parameter: `MCC_WIDTH` (default 64, a multiple of 8). The Kogge-Stone width
is fixed at 16 in the top. `ks_mlp_adder16` itself accepts any power of two
for `N`.

---

## 5. How far to trust it, and where it departs from the original

The following are taken from the source design:

* the three-phase gate behaviour;
* the clock groups and their one-phase-time shift;
* the five-level Kogge-Stone structure and its gate equations;
* the use of dynamic NOT gates to keep signals in step;
* the double-chain equations, the multiplexer sum and the chaining of 8-bit
  modules.

The following choices are this design's own:

* **The abstraction.** Each dynamic node is one bit updated once per phase
  time. Both gate variants (evaluation transistor at the foot or moved up
  next to the output for pre-evaluation) give identical values at this level,
  so one model serves both. Keepers and charge sharing are not modelled.
* **The clock generator.** It is a modulo-3 counter. Its clocks are a full
  phase time wide.
* **The half-sum gates.** These are placed at level 1 as dynamic XOR gates,
  which assumes both polarities of `a` and `b` are available. They travel
  through one NOT gate per level.
* **The sum XOR.** It is static logic reading level 5 during its memory phase.
* **The valid/take strobes and the warm-up after reset.** The original
  pipeline has no such control. These strobes only tell the user when to
  drive and sample.
* **No carry in on the Kogge-Stone adder.**
* **P_0 of the double chain is not produced.** It would need p_{-1}, which
  the equations leave undefined, and h_0 = G_0 does not use it.
* **The output register of the Manchester adder in `arith_top`.**

Not modelled: transistor sizing and placement, clock skew, and all delay,
energy and area behaviour. The baseline adders that the designs were compared
against are not included: standard Domino and Wave Domino Kogge-Stone, the
conventional 4-bit Manchester chain, and the carry-skip Manchester chain.

---

## 6. Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mlp_phase_gen` checks the six clocks phase time by phase time, the
  3-phase-time period and the reset state.
* `tb_mlp_dyn_node` checks precharge, discharge-only evaluation and hold in
  the memory phase while the inputs change.
* `tb_ks_gp_level` and `tb_ks_dot_level` check the gate equations of each
  level type, including pass-through positions.
* `tb_ks_sum_xor` checks the sum from prefix generates.
* `tb_ks_mlp_adder16` streams 400 operand pairs, with noise on the operands
  between takes. It checks every sum, the 5-phase-time latency and the
  3-phase-time interval.
* `tb_mcc_*` covers the Manchester blocks. The chains and the 8-bit module
  are tested exhaustively: `mcc_dcc8` over all 2^17 input combinations.
* `tb_mcc_widths` checks the 8-, 16-, 32- and 64-bit adders.
* `tb_arith_top` runs both designs end to end with default parameters. It
  counts each mechanism and fails if one never occurs:
  * operand pairs in flight together;
  * operand changes outside the take phase time;
  * carry out and full 16-bit carry propagation;
  * carries across module boundaries and a carry through all eight modules;
  * even and odd chain carries.
* `tb_mlp_pkg` checks the phase/group functions of the package.

Running a testbench with Verilator (the package must come first):

    verilator --binary --timing --assert -Irtl rtl/mlp_pkg.sv tb/tb_arith_top.sv \
              --top-module tb_arith_top
    ./obj_dir/Vtb_arith_top

Replace `tb_arith_top` with any other testbench name. Each of them runs in a
few seconds. Lint a module with

    verilator --lint-only -Wall -Irtl rtl/mlp_pkg.sv rtl/arith_top.sv

The only remaining lint warning is `SYNCASYNCNET`. It appears because the
asynchronous reset also disables the concurrent assertions.

---

## 7. Files

    rtl/mlp_pkg.sv          phase enum, clock-group functions
    rtl/mlp_phase_gen.sv    CLK1..CLK6 generator
    rtl/mlp_dyn_node.sv     dynamic output nodes of one level
    rtl/ks_gp_level.sv      Kogge-Stone level 1
    rtl/ks_dot_level.sv     Kogge-Stone levels 2..5
    rtl/ks_sum_xor.sv       sum unit
    rtl/ks_mlp_adder16.sv   the pipelined Kogge-Stone adder
    rtl/mcc_pgt.sv, mcc_newgp.sv, mcc_even_chain.sv, mcc_odd_chain.sv,
    rtl/mcc_sum.sv, mcc_dcc8.sv, mcc_adder.sv   the double-chain adder
    rtl/arith_top.sv        both designs side by side
    tb/tb_<module>.sv       one testbench per module, plus tb_mcc_widths
