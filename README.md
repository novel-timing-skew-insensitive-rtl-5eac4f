# Multi-phase non-overlapping clock generator with skew-free sampling edges

Time-interleaved sampled-data circuits split one fast signal over N slower
paths. Examples are an N-way switched-capacitor DAC output multiplexer, an
interpolation filter or an N-path filter. Each path's switches are driven by
its own clock phase, and path k acts one master-clock period after path k-1.
If the instants at which the paths sample or release charge are not spaced
exactly one period apart, the error repeats every N samples. That puts image
tones at multiples of f_s/N. In a conventional generator each phase comes
out of its own chain of logic, so any mismatch between the chains shows up
directly as timing skew.

This generator avoids that with **clock edge reassignment**. Every edge that
sets a sampling instant is re-timed by one of two delayed copies of the
master clock, and those copies are shared by all paths. The per-path logic
(a ring counter) only opens a window one period wide. Inside that window, a
small gate per phase passes the shared clock edges through. Mismatch in the
per-path logic moves only the edges that do not matter.

## The phases it makes

For every path k = 1..N there are two phases. `phi[k]` is the post-phase.
`phi_p[k]` is the pre-phase, a slightly advanced copy used for the
bottom-plate switches of the capacitors. The pre-phase must open (fall) a
little before the post-phase, to reduce signal-dependent charge injection.
Two kinds of edge are critical:

| edge | why it matters |
|---|---|
| rising edge of `phi` (and of `phi_p`) | starts the charge transfer in a DAC output multiplexer |
| falling edge of `phi_p` | the sampling instant of an input sample-and-hold |

A DAC needs only the first kind. An N-path filter, which samples at the
input and plays out at the output, needs both. The generator makes both
kinds skew-free at once.

## Structure

```
 clk ──┬── d0 ───────────── pre_clk ──────────────┐ A (pre-phase EDB, all paths)
       ├── d2 (inverting) ─ post_dff_clk ─┬───────┼── B (pre-phase EDBs)
       │                                  └─ d3 ──┼── B (post-phase EDBs)
       └── d1 ── mod-N ring counter               │
                   slave[k]  ── dS ───────────────┴── C (both EDBs of path k)
                   master[k] ── dS, inverted ──────── A (post-phase EDB of path k)
```

* **`ms_dff_m`** is a master-slave flip-flop built from two latches. The
  master latch is open while the clock is low and the slave latch while it
  is high. The master latch node is brought out as `m`. In a shift chain,
  `m` changes on the falling clock edge, half a period before `q` does.
  It has active-low asynchronous set and clear.
* **`ring_counter`** is N of these flip-flops in a ring in which one low
  circulates. `slave[k]` is low for exactly one period: this is the
  *envelope* of path k. The ring starts by itself: stage 1 takes a low only
  when stages 1..N-1 are all high. From any state it reaches the one-low
  pattern within N-1 clocks, with no reset.
* **`edb`** is the Edge Decision Block, `out = !C & !(A & B)`. With C low
  (envelope open) it is a NAND of A and B. With C high it holds the phase
  low.
* **`delay_cell`** is a behavioural fixed delay, optionally inverting. It
  stands for the analog delay chains d0..d3. It also stands for the
  per-path counter delay dS, and for the inverter on each master output.
* **`clkgen_top`** wires N paths of two EDBs each around one counter and
  four shared delays.

## How the edges are assigned

Let the master clock rise at t0, so that the envelope of path k opens at
t0 + d1 + dS and closes one period later.

| event | time | set by |
|---|---|---|
| `phi_p[k]` rises | t0 + d2 | falling edge of `post_dff_clk` (shared) |
| `phi[k]` rises | t0 + d2 + d3 | falling edge of `post_dff_clk` delayed by d3 (shared) |
| `phi_p[k]` falls | t0 + T + d0 | rising edge of `pre_clk` (shared) |
| `phi[k]` falls | t0 + T + d1 + dS | envelope closes (per path, not critical) |

Only the last row depends on the path's own delay dS.

**Why the post-phase needs the master output.** A pre-phase EDB sees
A = `pre_clk` and falls as soon as `pre_clk` rises again near the end of the
envelope. The post-phase must stay high there. But at that moment the
slave output, `pre_clk` and `post_dff_clk` look the same as in the first
half of the envelope, where the phase must be high for another reason. The
three signals alone cannot tell the two intervals apart. The flip-flop's
master output can. It falls at the clock's falling edge in the middle of
the envelope. So the post-phase EDB takes A = inverted `master[k]`. A is
high in the first half of the envelope, where the phase rises with
`post_dff_clk`. A is low in the second half, which keeps the phase high
until the envelope closes. The phase therefore falls on the
(non-critical) envelope edge, after the pre-phase.

**Delay ordering.** Edge assignment works only if the envelope is already
open when the shared edges arrive, and still open when `pre_clk` rises
again:

```
d0 < d1 + dS < d2,      d2 < d0 + T/2,      d2 + d3 < T/2 + d1 + dS
```

These must hold for every path. `clkgen_top` checks them with assertions at
start-up.

**Defaults.** N = 4 and T = 6250 ps, a 160 MHz master clock, the four-phase
configuration this scheme was evaluated in. The delays are d0 = 150,
d1 = 200, d2 = 450, d3 = 50 and dS = 100 ps. With these values each phase
runs at 40 MHz:

* pre-phase high for 5950 ps, gap of 300 ps to the next pre-phase
* post-phase high for 6050 ps, gap of 200 ps to the next post-phase
* pre-phase rises 50 ps before its post-phase and falls 150 ps before it

The non-overlap gap between post-phases is d2 + d3 − d1 − dS.

## Parameters of `clkgen_top`

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | number of paths (at least 2) |
| `T_CLK_PS` | 6250 | master clock period; used only by the start-up assertions |
| `D0_PS`, `D1_PS`, `D2_PS`, `D3_PS` | 150, 200, 450, 50 | shared delays |
| `DS_PS` | 100 | per-path counter-to-EDB delay |
| `DS_STEP_PS` | 0 | extra delay per path index, to model mismatch between paths |

Ports: `clk` (master clock), `init_n` (optional, active low, sets all
counter stages high; tie high to rely on self-start), `phi[N-1:0]` and
`phi_p[N-1:0]`. Index 0 is phase 1.

## How far to trust it

* The logic of the EDB, the flip-flop with master output and the overall
  wiring follow the published description and its block and timing
  diagrams. The generator's timing behaviour (the table above) is checked to
  the picosecond in simulation.
* The delay values are this design's own. Only their ordering is
  constrained. In silicon they are analog inverter chains. Here they are
  ideal `#` delays, so the top and `delay_cell` are timing models, not
  synthesizable logic. `edb`, `ms_dff_m` and `ring_counter` are
  synthesizable.
* The self-start gating of the counter, the `load_n`/`init_n` inputs and
  the priority of clear over set are this design's own choices.
* The d3 delay on the post-phase EDBs appears in the published block
  diagram without explanation. Here it is read as a way to place the
  pre-phase rising edge slightly ahead of the post-phase one. Setting
  `D3_PS = 0` makes both rise together.
* Not modelled:
  * the dummy gates that balance the loading of the counter outputs
    (electrical only)
  * transistor-level mismatch of the shared delays, the only remaining
    source of skew in the real circuit
  * the switched-capacitor circuits that use the phases
* Lint reports a combinational loop through the counter. It is a ring of
  latches in which a master latch and a slave latch are never open
  together, and it is intended.

## Testbenches

Each testbench prints `TB_RESULT checks=<n> failures=<m>`:

| testbench | what it checks |
|---|---|
| `tb_edb` | all 8 input combinations against a hand-written truth table |
| `tb_ms_dff_m` | master transparency while the clock is low, the edge behaviour of Q, async set/clear |
| `tb_ring_counter` | self-start from all 16 states within N clocks, rotation, master leading slave |
| `tb_delay_cell` | delay and inversion to the picosecond |
| `tb_clkgen_top` | default configuration, 64 master periods: every phase edge against the master clock, phase order, non-overlap, the interval where only the master output keeps the post-phase high, start-up |
| `tb_clkgen_skew` | N = 6 with path delays differing by up to 125 ps: critical edges unchanged |
| `tb_clkgen_sampling` | N = 4 at 160 MHz with mismatched paths, sampling a 75 MHz sine with a behavioural sample-and-hold |

The last one prints the rms skew of paths 2..4 against path 1. The result
is 0 ps on the sampling and play-out edges, and about 86 ps on the
non-critical edge that follows the mismatch.

`tb_clkgen_top` and `tb_clkgen_skew` share the checker in
`tb/clkgen_checker.sv`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_clkgen_top tb/tb_clkgen_top.sv
./obj_dir/Vtb_clkgen_top +verilator+rand+reset+2
```

The simulator is two-state. `init_n` must see a real falling edge (the
testbenches raise it first) for the asynchronous set to act at time zero.

## Changing it

* More paths: set `N`. The counter, the EDB array and the port widths
  follow.
* Another clock rate: set `T_CLK_PS` and choose delays that meet the
  ordering above. The assertions report a violation at start-up.
* Delays in a real implementation come from the cell library. The same
  ordering constraints apply, with dS meaning the counter's
  clock-to-output delay plus wiring.
