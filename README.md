# Nutt time-to-digital converter with a three-clock coarse-count synchronizer

This RTL measures how long an input signal, `hit`, stays high, with a
resolution of one FPGA carry-cell delay (about 17.9 ps) and a range of
thousands of clock periods. It follows the Nutt method. A counter on the
200 MHz system clock gives the whole clock periods. A tapped delay line gives
the two fractions: from the rising edge of `hit` to the next clock edge, and
from the falling edge to the next clock edge. One delay line serves both
edges.

The hard part is making the counter and the delay line agree. When an edge of
`hit` lands almost on a clock edge, the counter may or may not count that
clock edge, while the delay line reads almost zero. The result is then off by
one full period (5 ns). Two extra counters run on phase-shifted copies of the
clock. A small decider uses them, together with the fine values, to rebuild
the count that matches the delay line. Most of this document explains that
mechanism.

The design targets a Xilinx Zynq-7000 (the delay line is built from CARRY4
carry blocks). Everything except the delay line is plain synthesizable
SystemVerilog. The delay line is a behavioural model.

## The measurement

For a pulse of `hit`:

```
width = coarse * T + (fine_start - fine_stop) * tau
        T   = 5000 ps  (Clk0 period)
        tau = 17.9 ps  (one carry cell)
```

- `coarse` is the number of Clk0 rising edges at which `hit` was high. It is
  counted from the first edge that sees the pulse to the first edge that sees
  it low.
- `fine_start` is the number of cells the rising edge has travelled into the
  delay line when the first of those clock edges samples it.
- `fine_stop` is the same count for the falling edge, at the first clock edge
  after it.

The result is one 32-bit word, `tdc_measure`:

| bits   | field        | meaning                              |
|--------|--------------|--------------------------------------|
| 31..18 | `coarse`     | corrected Clk0 count (14 bits)       |
| 17..9  | `fine_start` | fine value of the rising edge, 0..280  |
| 8..0   | `fine_stop`  | fine value of the falling edge, 0..280 |

`new_measure` pulses for one Clk0 cycle when the word is valid. The word is
also pushed into a dual-clock FIFO, which is read on the processor bus clock.

## Data path and timing (`nutt_tdc`)

```
 hit ──┬─────────────► carry_chain_delay_line ─ taps[279:0] ─► dual_sample_thermometer
       │                                                        │ first stage (every cycle)
       ├─► edge_detector (Clk0) ── rise ──────────────────────► │ start regs (CE = rise)
       │                        └─ fall ──────────────┬───────► │ stop regs  (CE = fall)
       │                                              │          ▼            ▼
       ├─► coarse_counter (Clk0, CE = hit, store = fall)   decoder(start) decoder(stop, inverted)
       │          │ c0                                 │          │ fine_start   │ fine_stop
       └─► synchronizer (Clk1, Clk2) ◄────────────────┼──────────┴──────────────┤
                  │ coarse, src                        ▼                         │
                  └──────────────────────────────► merge ◄──────────────────────┘
                                                     │ tdc_measure, new_measure
                                                     ▼
                                                 async_fifo ──► rd_clk domain
```

Cycle by cycle, with E(k) the k-th rising edge of Clk0:

1. `hit` rises between E(k-1) and E(k). E(k) captures the taps in the first
   sample stage and sees `hit` high in the edge detector. The coarse counter
   counts E(k).
2. `rise` is high during the cycle after E(k). E(k+1) copies the first stage
   into the start register, which then holds the start code until the next
   pulse.
3. `hit` falls between E(m-1) and E(m). E(m) captures the stop code in the
   first stage and sees `hit` low. The counter stops at m - k.
4. `fall` is high after E(m). E(m+1) loads the stop register and stores the
   counter value. The arbiters on Clk1 and Clk2 have stored their counts by
   then, or will have before E(m+2).
5. E(m+2) registers the merged word, so `new_measure` is high after E(m+2).

Two rules follow from this. `hit` must stay high, and then low, for at least
the length of the delay line (280 cells, just over one period). Otherwise one
level is not seen by any clock edge, or a code holds two transitions. After
a pulse, the next one can start in the cycle after `fall`: the dead time is
one clock cycle.

## Delay line and thermometer codes

`carry_chain_delay_line` has 280 cells of 17.9 ps, slightly more than one 5 ns
period (5000 / 17.9 = 279.3). On the device this is 70 CARRY4 blocks stacked
in one column, each giving four taps. The synthesis tool must not remove or
merge them (a dont-touch attribute). The sampling flip-flop of each tap must
sit in the same slice as its carry cell, and the column should be close to
the clock buffer. With that placement, skew only reorders bits inside a
slice. The model in `rtl/` gives every cell the same delay. The real line is
not uniform: in a code-density measurement its worst cells were several LSB
wide.

A sample taken after a rising edge looks like `0…0 1…1` (ones from tap 0
upwards). After a falling edge it looks like `1…1 0…0`. The length of the run
that starts at tap 0 is the fine value. `thermometer_decoder` first fills any
gap of one or two zeros inside the run: a bit counts as one if it, or either
of the next two bits, is one. It then reports the index of the first zero. The
stop decoder inverts its code first. Because the decoder reads only the run
that starts at tap 0, leftovers of an earlier pulse further up the line do no
harm. This is why one-period gaps between pulses still decode correctly.

`dual_sample_thermometer` samples the line twice. The first stage captures
every cycle. The start and stop registers copy the first stage only in the
one cycle flagged by `rise` or `fall`. So the code stays still while it is
decoded, and a metastable first-stage bit gets one more cycle to settle.

## The coarse-count synchronizer

### Why the count can be wrong

The coarse counter samples `hit` directly as its count enable. If `hit`
changes within a few tens of picoseconds of a Clk0 edge, that flip-flop and
the tap flip-flops can resolve differently:

- The delay line says the rising edge arrived at the clock edge (fine ≈ 0),
  but the counter did not count that edge. Or the reverse happens for a
  falling edge.
- Or the edge detector takes the edge one cycle later (fine ≈ 279), while
  the counter counted the earlier clock edge.

Either way the word is off by ±5 ns. The fine values themselves are still
correct, and they show when this can have happened: a fine value within
`GUARD` cells of 0, or of a full period, marks an edge near a Clk0 edge.

### Counting on other clocks

`synchronizer` runs two more coarse counters ("arbiters"). Each has its own
fall-edge detector and stored-value register. They are clocked by Clk1 and
Clk2, which are Clk0 delayed by φ1 = 1.25 ns and φ2 = 2.5 ns. An edge that is
close to a Clk0 edge is far from the Clk1 and Clk2 edges, so the arbiters
count it cleanly.

The Clk1 count still differs from the Clk0 count whenever an edge of `hit`
falls between a Clk0 edge and the Clk1 edge after it. The fine value shows
this. An edge that arrives exactly on a Clk1 edge has

```
fine = (T - φ1) / tau = 3750 / 17.9 = 209   (CLK1_FINE)
```

Edges with fine ≥ 209 arrived after the previous Clk0 edge and before that
Clk0 period's Clk1 edge. So:

```
Clk0 count = c1 + [fine_stop >= CLK1_FINE] - [fine_start >= CLK1_FINE]
Clk0 count = c2 + [fine_stop >= CLK2_FINE] - [fine_start >= CLK2_FINE]   (CLK2_FINE = 140)
```

For example, take `hit` rising 0.1 ns after a Clk0 edge and falling 10 ps
before the Clk0 edge nine periods later. Then fine_start = 273, fine_stop = 0,
and the true Clk0 count is 9. Clk1 sees the rise in the same period (its edge
comes 1.25 ns after the Clk0 edge) and the fall one period later, so c1 = 10.
The correction gives 10 + 0 - 1 = 9.

### Which counter the decider trusts

`decider` is combinational:

| condition                                                     | result          | `src` |
|---------------------------------------------------------------|-----------------|-------|
| neither fine value within GUARD of 0 or of PERIOD_TAPS        | c0              | 0     |
| otherwise, neither fine value within GUARD of CLK1_FINE       | corrected c1    | 1     |
| otherwise (one edge near Clk0, the other near Clk1)           | corrected c2    | 2     |

A counter can only be wrong if an edge of `hit` is near its own clock's edge.
Each edge of the pulse can be near at most one of the three clocks, so with
two edges at most two counters are in doubt. The table always picks one that
is not. Counting a third clock is what covers the case where the rising edge
is near Clk0 and the falling edge is near Clk1. Apart from that case, one
extra counter would be enough.

The printed scenarios of the original description (a second counter that
must sometimes be incremented by one, depending on how the fine value
compares with the phase difference, and a third counter consulted when the
other edge falls between the phased clocks) are special cases of the
correction formula. This RTL uses the formula because it treats both edges
the same way.

### Timing of the clock crossing

The arbiters store their counts on their own clocks. At the latest, this is
at E(m+1) + φ. The decider's result is registered at E(m+2). So paths from
the Clk2 registers have T - φ2 = 2.5 ns, and paths from Clk1 have 3.75 ns,
including the decoder and decider logic. All three clocks must come from one
PLL. Give the tool those multicycle/phase relationships instead of treating
the domains as asynchronous.

## Output FIFO

`async_fifo` is a Gray-pointer dual-clock FIFO: 16 words of 32 bits by
default, with two-flop pointer synchronizers. `rd_data` is valid the cycle
after `rd_en` is accepted. A result that arrives while the FIFO is full is
dropped, and the sticky `fifo_overflow` flag is set. Only `rst_n` clears it.

## Interface of `nutt_tdc`

| port | dir | width | description |
|------|-----|-------|-------------|
| `clk0` | in | 1 | 200 MHz system clock: delay-line sampling, primary counter |
| `clk1`, `clk2` | in | 1 | Clk0 delayed by 1.25 ns and 2.5 ns (from the PLL) |
| `rst_n` | in | 1 | asynchronous active-low reset, Clk0/1/2 logic and FIFO write side |
| `hit` | in | 1 | signal to measure |
| `tdc_measure` | out | 32 | `{coarse, fine_start, fine_stop}` |
| `new_measure` | out | 1 | one-cycle end of conversion |
| `sync_src` | out | 2 | counter used for `tdc_measure` (0 Clk0, 1 Clk1, 2 Clk2) |
| `fifo_overflow` | out | 1 | sticky, a result was dropped |
| `rd_clk`, `rd_rst_n` | in | 1 | FIFO read clock and its reset |
| `rd_en` | in | 1 | read request |
| `rd_data` | out | 32 | word read |
| `rd_empty` | out | 1 | FIFO empty |

The PLL and the processor-side bus are not part of this RTL. Drive the three
clocks from a PLL or MMCM with the phase shifts above. Connect the FIFO read
port to whatever bus slave the system uses.

## Parameters

Shared constants are in `rtl/tdc_pkg.sv`:

| name | value | meaning |
|------|-------|---------|
| `TAPS` | 280 | delay-line cells (must cover one period plus margin) |
| `FINE_W` | 9 | fine field width |
| `COARSE_W` | 14 | coarse field width (16383 periods = 81.9 µs range) |
| `MEAS_W` | 32 | result word |
| `PERIOD_TAPS` | 279 | cells per Clk0 period |

Decider and synchronizer: `CLK1_FINE` = 209 and `CLK2_FINE` = 140 follow from
the clock phases. `GUARD` = 8 cells (±143 ps) is the window treated as "near
an edge". If you change the clock period, the cell delay or the phases,
recompute `PERIOD_TAPS`, `CLK1_FINE` and `CLK2_FINE`. The three clock edges
must stay more than 2·GUARD cells apart. The carry-chain model takes
`TAP_DELAY_PS`. `nutt_tdc` takes `FIFO_DEPTH` (a power of two).

On hardware the real cell delay has to be measured. The design tools'
worst-case estimate for these cells was 28.5 ps, but 17.9 ps was measured.
`PERIOD_TAPS` and the two `CLKn_FINE` values must use the measured number.

## What comes from the original design and what was chosen here

These parts follow the published converter:

- one delay line for both edges;
- the start and stop registers loaded by one-cycle rise and fall flags after
  a first sampling stage;
- the coarse counter enabled by `hit` and stored on the fall flag;
- two arbiter counters on phase-shifted clocks, with fall-edge detectors,
  stored values and a decider;
- a 32-bit merged result with an end-of-conversion flag, and an asynchronous
  FIFO to the processor;
- 200 MHz and 17.9 ps per cell.

These were chosen here:

- the number of cells (280);
- the split of the 32 bits;
- the phase values of Clk1 and Clk2;
- the guard band;
- the exact decider rule (the closed-form correction above);
- the bubble-correction rule;
- counter restart on store;
- reset style, FIFO depth and overflow handling;
- the extra `sync_src` and `fifo_overflow` outputs.

The design does not include calibration of the delay line: no per-cell width
table and no correction of the fine values for non-linearity. Fine values are
raw cell counts.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_carry_chain_delay_line` | tap pattern at chosen times after each edge |
| `tb_edge_detector` | rise/fall against a reference, 100 random pulses |
| `tb_dual_sample_thermometer` | start/stop registers hold the code of the flagged cycle |
| `tb_thermometer_decoder` | every run length 0..280, with 1- and 2-bit bubbles, both polarities |
| `tb_coarse_counter` | stored count for 300 random pulses, including one-cycle gaps |
| `tb_decider` | 20000 random pulses, wrong counts injected on any counter whose clock edge is within 100 ps of a `hit` edge |
| `tb_synchronizer` | real phase-shifted clocks, wrong primary counts injected, result read at the merge cycle |
| `tb_merge` | field packing and two-cycle latency |
| `tb_async_fifo` | random traffic across 200/100 MHz, overflow, drain |
| `tb_nutt_tdc` | full design at default size: about 480 pulses with edges placed uniformly and near each clock's edges, with one-period gaps, forced wrong primary counts and a reader pause that overflows the FIFO. Checks every field, the latency, the rebuilt width and every FIFO word |
| `tb_carry_delay_estimate` | cell-delay measurement: square wave into the line, sampled by an unrelated slower clock, half period shrunk until a whole high phase fits in the line. Half period divided by the run length must give 17.9 ps |
| `tb_code_density` | code-density run: 10000 pulses of a 700 kHz square wave, plus 1500 each at 800 and 900 kHz. Every width must be correct to two cells. The histogram must fill 279 to 280 bins, giving a 17.9 ps cell estimate |

A two-state simulator has no metastability, so no counter ever errs by
itself. The testbenches therefore inject the errors a metastable flip-flop
could cause:

- `tb_decider` and `tb_synchronizer` feed wrong counts on their inputs.
- `tb_nutt_tdc` forces the primary stored count one off, for the merge
  cycle, whenever an edge of the pulse lies within 100 ps of a Clk0 edge.
  This happens about 120 times per run, and every word must still be right.
  With the decider reduced to "always trust the primary count", about 120
  checks fail.

`tb_code_density` injects nothing. There, the synchronizer only has to
choose correctly and do no harm.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_nutt_tdc rtl/tdc_pkg.sv tb/tb_nutt_tdc.sv
./obj_dir/Vtb_nutt_tdc
```

All files use a `1ps/100fs` timescale, so the 17.9 ps cell delay is exact. To
lint the synthesizable part, use `verilator --lint-only -Wall --timing -Irtl
-y rtl rtl/tdc_pkg.sv rtl/<module>.sv`. When synthesizing `nutt_tdc`, replace
`carry_chain_delay_line` with the placed carry-primitive chain for the target
device.
