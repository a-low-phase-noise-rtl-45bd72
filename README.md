# Programmable DLL-based clock generator (x1 to x8)

This clock generator multiplies a reference clock by any whole factor M from 1 to 8. It is built around a
delay-locked loop (DLL) rather than a PLL. A chain of 16 identical delay cells is driven by the reference.
The loop adjusts the cell delay until tap P(2M) is exactly one reference period behind the reference.
Taps P1..P(2M) then split every reference period into 2M equal steps. A small gate network turns each
pair of neighbouring taps into a pulse. A latch merges the pulses into an output clock with M cycles per
reference cycle.

There is no oscillator. Every output edge comes from a reference edge through a fixed number of cells, so
jitter does not build up from cycle to cycle. The loop is all-digital: the delay is set by codes held in
registers, and there is no charge pump or loop-filter capacitor.

The control logic and the frequency multiplier are synthesizable SystemVerilog. The delay line is analog
in silicon, and so is the small delay that sets the phase detector's dead zone. Both are written here as
behavioural timing models, so the whole generator can be simulated with Verilator.

## Structure

```
                       +------------------------- DLL core (dll_core) ---------------------------+
 reset --> initial_circuit --start--> sar (coarse, C[2:0]) ---------+                             |
 ref_clk -+-> phase_comparator --comp--^    |ld                     v                             |
          +-> dz_delay --ref_clk_late--> phase_detector --up/dn--> updn_counter (fine, F[4:0])    |
          +-----------------------------------------------------> dcdl (16 cells) --P/Pb[16:1]--+--+
          |                                                                                      |
          |       int_clk = P(2M) <---------------------------------------------------------+    |
          +------------------------------------------------------------------------------------+-+
                       +----------------- frequency multiplier (freq_multiplier) -----------------+
 b[2:0] -------------> multiplier_selector --D[8:1]--> pulse_generator --B,Bb--> edge_combiner --> clkout, clkoutb
                       (also picks int_clk = P(2M))
```

| Module | Role | Kind |
|---|---|---|
| `clock_generator` | top: DLL core plus frequency multiplier | RTL with models inside |
| `dll_core` | initial circuit, coarse loop, fine loop, delay line | RTL with models inside |
| `initial_circuit` | turns Reset into Start, synchronised to Ref_clk | RTL |
| `phase_comparator` | coarse lead/lag decision (Comp) | RTL |
| `sar` | 3-bit successive-approximation search for C, raises LD | RTL |
| `phase_detector` | fine lead/lag decision with a dead zone (Up_F, Dn_F) | RTL |
| `updn_counter` | saturating counter, 5-bit thermometer output F | RTL |
| `dcdl` | 16-cell delay line, delay set by C, F and S | behavioural model |
| `dz_delay` | fixed delay that sets the dead-zone width | behavioural model |
| `multiplier_selector` | B[2:0] to the feedback tap and the pulse enables D[8:1] | RTL |
| `pulse_generator` | AND gates that make pulses B_x, B_xb | RTL |
| `edge_combiner` | latch that merges the pulses into Clkout/Clkoutb | RTL (intended latch) |
| `freq_multiplier` | selector, pulse generator and edge combiner together | RTL |
| `clkgen_pkg` | shared sizes, mid codes, thermometer helpers | package |

## Locking: coarse search, then a fine walk

All loop control runs on rising edges of `ref_clk`. The loop locks in three phases.

1. **Start.** `reset` (active high, asynchronous) sets a two-stage shift register in `initial_circuit`.
   `start` is high during reset and for two `ref_clk` edges after it. While `start` is high, the SAR
   loads C = `100` and the counter loads F = `00011`, so both codes begin in the middle of their range.
   Starting in the middle keeps the first comparisons close to the right answer. The phase decision is
   only valid near lock (see below), so a start at an extreme code could lock onto the wrong edge.
2. **Coarse tune.** `phase_comparator` samples `int_clk` on each `ref_clk` edge. If `int_clk` is still
   low, its edge has not arrived yet: the reference leads and the line is too long, so `comp` = 1. The
   SAR decides one bit of C every `SETTLE_CYCLES` (4) cycles, most significant bit first. It clears the
   trial bit when `comp` = 1 and keeps it otherwise. The wait between decisions lets the line show the
   new code at `int_clk` and lets the comparator register it. After the third bit, `ld` goes high and C
   is frozen. This happens exactly 14 reference edges after `reset` falls: 2 Start cycles plus 3 x 4.
3. **Fine tune.** While `ld` is high, `phase_detector` samples `int_clk` twice per period. The first
   sample is on the `ref_clk` edge. The second is on a copy of `ref_clk` delayed by the dead zone
   `DZ_PS` (450 ps). The decision is then:
   - high at both samples: `int_clk` is early, so Up_F (more delay);
   - low at both samples: `int_clk` is late, so Dn_F (less delay);
   - low then high: the `int_clk` edge lies inside the window, and the counter stops.

   The counter takes at most one step every 4 cycles. It saturates at 0 and 5 ones.

At lock, the P(2M) rising edge lies between 0 and `DZ_PS` after the reference edge. The window is
one-sided, so the loop delay settles slightly longer than one period, never shorter. The fine loop keeps
running after lock, so it follows slow drift in the reference frequency or in the cell delay. The
testbench steps the reference period from 2.4 ns to 1.95 ns after lock, and the fine code steps down to
follow it.

**Constraints that make this work.** These hold for the default delay model. Check them again if you
change its numbers.

- **Comparator range.** Both detectors judge the phase modulo one period. The coarse comparator is right
  only while the loop delay is between 0.5 T and 1.5 T. Keep the delay range reachable during the search
  inside that band. With the defaults, every code spans about 2.3:1, which fits.
- **Fine range.** The fine range above the mid level must cover one coarse step. This needs
  3 x `TF_PS` >= `TC_PS` (75 ps >= 60 ps). The search leaves the loop up to one coarse step short, and
  the fine loop starts at level 2 of 5.
- **Dead-zone width.** The dead zone must be wider than one fine step of the whole loop, 2M x `TF_PS`.
  At M = 8 that is 400 ps, below the 450 ps default. If the dead zone is narrower, the fine loop toggles
  between two codes instead of stopping. The dead zone must also stay below half a reference period.

**Changing the factor.** After changing `b`, pulse `reset`. The loop then locks again from the mid codes
for the new feedback tap. Without a reset, the old codes give the wrong delay for the new tap.

## Frequency multiplication: from phases to pulses to edges

With M = B + 1, the `multiplier_selector` feeds P(2M) back as `int_clk`. The choices are B = `000` ->
P2 (x1), `001` -> P4 (x2), and so on up to `111` -> P16 (x8). Once the loop is locked, tap P(k) is the
reference delayed by k*T/(2M). The selector also enables pulse pairs 1..M through `D[8:1]`, which is a
thermometer code. For each enabled pair x, `pulse_generator` forms:

```
B_x  = P(2x-1) & ~P(2x)      high from edge 2x-1 to edge 2x
B_xb = P(2x)   & ~P(2x+1)    high from edge 2x   to edge 2x+1
```

The pulses are each T/(2M) wide and tile the reference period. The last pair needs P(2M+1), which is the
same waveform as P1 one period later. The last enabled pair therefore uses P1 in its place. This is
required for M = 8, where no P17 exists.

`edge_combiner` is a set/reset latch:

- any B_x pulls `clkout` low;
- any B_xb pulls it high;
- with no pulse present, the latch holds its state.

`clkout` therefore rises at the P(2x) edges and falls at the P(2x+1) edges: M cycles per reference cycle
at 50 % duty. `clkoutb` is its complement. If both kinds of pulse are present at once, the low side wins.
This can only happen briefly, when the loop is far from lock.

Example, M = 2 (B = `001`): the line locks 4 cells to one period, so P1..P4 are a quarter-period apart,
and P3 = not P1, P4 = not P2. The pulse order around the period is B2b, B1, B1b, B2. `clkout` is high
during B2b and B1b, which gives two output cycles per reference cycle.

The output frequency is M x the reference whenever the line runs, locked or not. The edge spacing and
the duty cycle are even only after lock. After lock, an edge spacing differs from T/M by at most the
dead zone.

## Delay-line model (`dcdl`)

Each of the 16 differential cells carries switchable load transistors on both outputs. They are gated by
the coarse bits C2..C0 (binary weighted), the fine bits F4..F0 (thermometer) and S. All cells share one
delay:

```
cell delay = T0_PS + TC_PS*C + TF_PS*ones(F) + TS_PS*S      defaults 300, 60, 25, 600 ps
```

Every input edge leaves the cell after the delay in force when the edge arrived. It is a transport delay,
quantised to `STEP_PS` = 5 ps. A code change therefore affects only edges launched after it. `pb` is the
exact complement of `p`.

The picosecond values are this model's own. They should be replaced by characterised numbers for a real
cell. With the defaults:

- with S = 0, the loop locks for cell delays of about 300 to 845 ps;
- with S = 1, it locks for about 900 to 1445 ps.

Measured operating points that the end-to-end test runs:

| factor | reference | cell delay needed | locked codes (C, fine level) | output |
|---|---|---|---|---|
| x2 | 400 MHz | 625 ps | 4, 4 | 800 MHz |
| x3 | 400 MHz | 417 ps | 1, 3 | 1.2 GHz |
| x5 | 200 MHz | 500 ps | 2, 4 | 1 GHz |
| x8 | 150 MHz | 417 ps | 1, 3 | 1.2 GHz |

A x1 clock at 100 MHz would need 5 ns per cell. That is outside this model's range at either S setting.
The full range of the fabricated circuit (100 to 600 MHz in, 100 MHz to 1.2 GHz out) depends on cell
delays that are not known here.

## Interface of `clock_generator`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | reference clock |
| `reset` | in | 1 | active high, asynchronous; restarts locking |
| `s` | in | 1 | delay-line range select (extra load per cell) |
| `b` | in | 3 | multiplication factor minus one |
| `clkout`, `clkoutb` | out | 1 | multiplied clock and its complement |
| `ld` | out | 1 | coarse lock; fine tuning runs while high |
| `c` | out | 3 | coarse code, for observation |
| `f` | out | 5 | fine thermometer code, for observation |

| Parameter | Default | Meaning |
|---|---|---|
| `SETTLE_CYCLES` | 4 | reference cycles between SAR decisions and between fine steps |
| `DZ_PS` | 450 | phase-detector dead zone |
| `T0_PS`, `TC_PS`, `TF_PS`, `TS_PS` | 300, 60, 25, 600 | delay-line model |

The fixed sizes are in `clkgen_pkg`: 16 phases, C 3 bits, F 5 bits, M up to 8, mid codes `100` and
level 2.

## What is taken from the architecture and what is this implementation's choice

These parts follow the architecture as published:

- the block partition and the signal names (Start, Comp, LD, Up_F/Dn_F, C[2:0], F[4:0], P/Pb, D[8:1],
  B_x/B_xb, Int_clk);
- 16 phases, 3 binary-weighted coarse bits and 5 thermometer fine bits;
- the start at mid codes;
- coarse-then-fine sequencing;
- the B-to-feedback-tap table;
- the pulse equations;
- the edge combiner's truth table and its transistor structure.

The edge combiner is built as its circuit behaves: Out = NOT(B_1 + ... + B_x), with a hold state
between pulses.

These are this implementation's own choices:

- **Phase comparator.** It is a single sampling flip-flop.
- **Phase detector.** It uses two samples with a one-sided window, `DZ_PS` wide.
- **Step rate.** Both loops move at most once every 4 cycles.
- **Fine mid level.** Level 2 is the mid fine level.
- **Start timing.** Start lasts two cycles.
- **Pulse enables.** D[8:1] is a thermometer code that gates the pulse pairs.
- **Last pulse pair.** The last pair wraps to P1.
- **Latch priority.** The B_x side of the latch wins if both sides are driven.
- **The S input.** It is modelled only as an extra load per cell. The line drawing also shows a switch
  labelled S inside the chain, but its role is not described.
- **Factor changes.** A change of factor requires a reset.
- **Delay values.** All picosecond values are this implementation's own.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each one has a watchdog. Example
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/clkgen_pkg.sv tb/tb_clock_generator.sv --top-module tb_clock_generator -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_clock_generator` | Whole generator at default parameters. It checks all eight factors at a 1.2 ns x M reference, then the four operating points above, S = 1, and a reference-frequency step after lock. For each run it checks: LD after 14 edges; C and F against an independent model of the search; 16 M output rises in 16 periods; period and high time within the dead zone of T/M and T/2M; complementary outputs. It also counts each mechanism (SAR clear, fine up, fine down, dead-zone hold, S range, factor switch, tracking). |
| `tb_dll_core` | Lock of the core with the feedback tap supplied by the testbench, and the final Int_clk edge position. |
| `tb_freq_multiplier` | Ideal phases for M = 1..8: exact output period, high time and edge positions, and Int_clk tap. |
| `tb_dcdl` | Edge time of every tap for random codes, against the delay equation. |
| `tb_sar`, `tb_updn_counter` | Search result for every threshold, LD latency, freeze after lock; counter stepping, saturation, hold. |
| `tb_phase_comparator`, `tb_phase_detector` | Lead/lag/dead-zone decisions for a set of offsets. |
| `tb_multiplier_selector`, `tb_pulse_generator`, `tb_edge_combiner` | Truth tables with random inputs. |

`tb/tb_delay.sv` is a testbench-only transport-delay helper.

`sar`, `updn_counter` and `phase_detector` carry concurrent assertions: C frozen after LD, F always a
thermometer code, Up_F and Dn_F never together. Build with `--assert` to check them.

The whole-generator test runs in well under a second. All files carry `` `timescale 1ps/1ps ``.

## Synthesis notes

- `dcdl` and `dz_delay` contain delays and are not synthesizable. Replace them with the real delay cells
  and a dead-zone delay element. Everything they connect to is ordinary logic on `ref_clk`. The one
  exception is the sampling flop of the phase detector, which is clocked by the delayed reference.
- `edge_combiner` infers a latch on purpose: the latch is the circuit. `multiplier_selector`,
  `pulse_generator` and `edge_combiner` sit in the clock path. In a real implementation they would be
  custom or hand-placed cells, not logic left to the synthesis tool.
- `int_clk` passes through the selector multiplexer before it reaches the detectors. In silicon, the
  loop locks P(2M) plus that multiplexer delay to the reference. The taps used by the pulse generator
  are then early by the multiplexer delay, which is a systematic phase error. In the RTL simulation, the
  multiplexer has no delay.
