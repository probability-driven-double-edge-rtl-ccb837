# Double-edge-triggered multi-bit flip-flop with data-driven clock gating

A large share of a register's dynamic power goes on toggling its clock pin, and
most flip-flops change state on only a few percent of their clock edges. This
design combines three ways to save that clock power:

* **Double-edge triggering (DET).** The register takes data on both the rising
  and the falling edge, so it moves two words per clock period. The clock can
  run at half the frequency for the same data rate.
* **Multi-bit grouping (MBFF).** All bits of a register share one clock input,
  and so one clock driver, instead of each flip-flop buffering the clock for
  itself.
* **Data-driven clock gating (DDCG).** Each group compares its next state with
  its current state. If no bit would change, its clock is stopped for that
  period.

The RTL is a two-stage, 32-bit pipeline. The first stage is a free-running
DET-MBFF. The second stage is a DET-MBFF whose clock is gated by the data.

```
  D1 --> [m1 DET_mbff] --q1--+------------------> [m2 DET_mbff] --+--> Q2
              ^ clk          |                         ^ clk_g    |
              |              +--> [g3 xor_g] <---------|----------+
              |                       | diff (WIDTH)   |
              |                   [OR reduce] en       |
              |                       v                |
  clk --------+---- ~clk --> en [m4 Dlatch] en_l --> [AND] --+--> clk_g
              |                                        ^
              +----------------------------------------+
```

## Files

| file | contents |
|---|---|
| `rtl/det_pkg.sv` | default group width (32) and the `det_style_e` enum |
| `rtl/dff_p.sv`, `rtl/dff_n.sv` | rising- and falling-edge registers, asynchronous active-high reset |
| `rtl/mux21.sv` | 2:1 mux, `y = s ? a : b` |
| `rtl/Dlatch.sv` | level-sensitive latch, transparent while `en = 1` |
| `rtl/xor_g.sv` | bitwise XOR, the state-change detector |
| `rtl/DET_mbff.sv` | the DET multi-bit flip-flop, with two forms (see below) |
| `rtl/det_mbff_ddcg.sv` | the top: two DET-MBFFs and the clock gater |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ddcg_multiplicity` |
| `tb/ddcg_lane.sv` | one stimulus, DUT and reference lane used by `tb_ddcg_multiplicity` |

## The DET multi-bit flip-flop (`DET_mbff`)

A DET register needs two storage halves: one loads on each clock level or
edge, and an output mux always shows the half that holds the newest word. The
module has two forms, chosen with the `STYLE` parameter.

**`DET_FLOP_MUX` (default).** A rising-edge register `dff_p` and a
falling-edge register `dff_n` both sample `d`. `mux21` shows `dff_p` from a
rising edge until the next falling edge, and `dff_n` for the rest of the
period.

The obvious select for that mux is `clk` itself, but that has a flaw. At each
edge the select switches at once, while the half it switches to loads its new
word only a clock-to-Q delay later. For that moment `q` shows a stale word,
one captured a half period earlier. The second stage of this pipeline is
clocked by the same edge, so it can capture that stale word. In zero-delay
simulation it reliably does, and in silicon it is a hold-time hazard.

So the select is generated by a one-bit copy of the same DET structure:

* `t_p` loads `~t_n` on each rising edge.
* `t_n` loads `t_p` on each falling edge.
* `sel = t_p ^ t_n` is 1 from a rising edge to the next falling edge.

`sel` therefore has the same value as `clk`, but it comes out of registers on
the same edge as the data. `q` then goes straight from the old word to the new
one. The cost is two flip-flops and an XOR per group, shared by all `WIDTH`
bits. An assertion (`a_sel_in_step`) checks that `sel` is low just
before every rising edge. The tracker is reset with the data. Without a
reset, it falls into step by itself at the first falling edge.

**`DET_LATCH_MUX`.** This is the "side-by-side" form. A latch transparent
while `clk = 1` and a latch transparent while `clk = 0` sit in parallel on
`d`, and the mux, driven by `clk`, always connects `q` to the latch that is
holding. The output is never transparent to `d`, and it changes only at clock
edges.

The latches have no reset pin, so in this form `rst` forces zeros into their
`D` inputs, and `q` reads zero from the first edge after `rst` rises. This
form is correct as a stand-alone register. Its select is the clock, so feeding
a same-edge register from it has the hazard described above. The top
therefore uses the flop form.

Both forms load `d` at every edge, which gives two words per clock period. The
testbench checks this rate.

## The data-driven clock gater (top: `det_mbff_ddcg`)

* `g3` XORs the second stage's next state `q1` with its state `Q2`.
* The OR of the result, `en`, says whether any bit of the group would change.
* `m4` is transparent while `clk` is low and holds `en` while `clk` is high.
  The enable can only change while the AND gate's other input is 0, so
  `clk_g = clk & en_l` cannot glitch.
* When the gate is open, `clk_g` repeats the clock's high pulse. `m2` then
  loads at both edges of that pulse: the rising edge and the falling edge.

What this means for data:

* **Decision point.** Whether the clock runs is decided by comparing `q1`
  with `Q2` at the end of each low phase.
* **Latency.** A word that `q1` takes at a falling edge reaches `Q2` at the
  next rising edge. A word taken at a rising edge reaches `Q2` at the falling
  edge if the gate is open. Otherwise it reaches `Q2` at the following rising
  edge. `Q2` lags `q1` by one or two edges.
* **Words that can be dropped.** A word that `q1` holds only for a high phase
  during which the gate was shut is replaced at the falling edge, before it
  is ever compared, so it never reaches `Q2`. Every word that `q1` holds
  across a low phase does reach `Q2`. The second stage is therefore a
  "latest value" register, not a lossless delay line. This is a property of
  gating a double-edge register with a latch evaluated once per period.
  Downstream logic that needs every half-period word must not rely on `Q2`.
* **Hold timing.** `m2`'s clock goes through one AND gate more than `m1`'s
  clock, and `q1` feeds `m2` directly. The path `m1 -> m2` must meet hold
  against that skew in any physical implementation.

## Choosing the group size

Gating pays off only when the whole group is idle. One gater (latch, XOR tree,
OR) serves `K` flip-flops, and the clock is stopped only when none of the `K`
flip-flops changes. So larger groups spread the gater's cost over more bits,
but they are idle less often.

Under a first-order model, the best `K` follows from the toggle probability
`p` of the flip-flops:

| toggle probability `p` | 0.01 | 0.02 | 0.05 | 0.1 |
|---|---|---|---|---|
| best group size `K` | 8 | 6 | 4 | 3 |

Curves of the per-bit power of gated 2-, 4- and 8-bit groups against an
ungated flip-flop give these ranges:

| activity `p` | best choice |
|---|---|
| below about 0.04 | 8-bit groups |
| about 0.04 to 0.08 | 4-bit groups |
| about 0.08 to 0.155 | 2-bit groups |
| above that | leave the flip-flops ungated, but still grouped to share clock drivers |

The grouping procedure sorts the flip-flops by activity. It fills groups from
the least active flip-flops upward, using the size that suits each one's
activity. It never groups across clock domains.

That procedure is a netlist-level step and is not part of this RTL. In the
RTL, the group size is the `WIDTH` parameter of `det_mbff_ddcg`. The default
is a single 32-bit group.

`tb_ddcg_multiplicity` measures the fraction of clock pulses the gater
suppresses, with independent random bits toggling at a given probability per
edge:

| group | p = 0.01 | p = 0.02 | p = 0.05 | p = 0.1 |
|---|---|---|---|---|
| 2 bits | 96 % | 93 % | 83 % | 71 % |
| 4 bits | 93 % | 86 % | 71 % | 54 % |
| 8 bits | 86 % | 77 % | 54 % | 36 % |
| 32 bits | 62 % | 42 % | 17 % | 3 % |

The default 32-bit group is well above the best `K` for every activity in the
first table. At `p = 0.1`, it gates off almost nothing. For real use, set
`WIDTH` to the group size that suits the data's activity, and use several
instances.

## Interface of `det_mbff_ddcg`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; both edges are active |
| `rst` | in | 1 | active-high asynchronous reset; clears both stages |
| `D1` | in | `WIDTH` (32) | data into the first stage |
| `Q2` | out | `WIDTH` | output of the gated second stage |
| `clk_g` | out | 1 | the gated clock, brought out for observation |

## Departures from the reference structure, and choices made here

* **Mux select.** In the flop form, the select comes from the edge tracker
  instead of the clock (see above). Which mux input `s = 1` selects was also
  chosen here.
* **Reset.** Active high and asynchronous, with value zero. Only the `rst`
  pins and an active-high reset pulse were given.
* **Gating latch.** The latch is transparent while the clock is low. This
  follows the standard integrated clock gater drawing.
* **No logic between stages.** The gated stage loads the free-running
  stage's output directly.
* **Reported numbers not reproduced.** Power results (about 0.014 W for the
  implementation) and transistor-level details are not reproduced: the shared
  clock inverters of an MBFF cell and the SPICE energy curves.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/det_pkg.sv tb/tb_det_mbff_ddcg.sv --top-module tb_det_mbff_ddcg -o sim
./obj_dir/sim
```

The testbenches:

* **`tb_det_mbff_ddcg`** runs the top at its default size. It uses a
  behavioural reference of the pipeline and compares `Q2`, the internal
  `q1` and `clk_g` after every edge and in every phase. The stimulus is:
  * a reset;
  * a held constant word;
  * activity sweeps at 0.01, 0.02, 0.05 and 0.1;
  * random words;
  * a second reset.

  The run must produce at least one of each: a gated pulse, an open pulse,
  a two-edge update of `Q2`, a late pick-up, a double-edge update of `q1`,
  a dropped high-phase word, and a reset.
* **`tb_DET_mbff`** checks both forms side by side. It checks loading on
  both edges, that the output is never transparent, the rate of two words
  per period, and reset.
* **`tb_ddcg_multiplicity`** is the group-size sweep above.
* The leaf testbenches check their module against values computed from its
  definition.

All of them use two-state simulation and no constraint solver. They reset or
initialise everything they read.
