# Dual delay-line time-to-digital converter for particle time of flight

This design measures the time between two asynchronous pulses to a few
picoseconds on an FPGA. S1 comes from a primary-particle detector. S2 comes
from a secondary-particle detector. The interval is the particle's time of
flight. In charged-particle therapy it tells how much energy the beam has and
how far it reaches into the patient.

A 400 MHz clock has a 2500 ps period. That alone resolves nothing finer than
2.5 ns. So the design splits the interval into three parts:

```
          |<-T1->|<------------ N * Tclk ------------>|
clk   _|‾‾|__|‾‾|__|‾‾|__|‾‾|__ ... __|‾‾|__|‾‾|__|‾‾|__
S1    ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
S2    ________________________________________/‾‾‾‾‾‾‾‾
                                              |<T3>|
      T = T1 + N*Tclk - T3
```

- **T1** is the time from S1 to the next rising clock edge. Delay line DL1 measures it.
- **T3** is the time from S2 to the next rising clock edge. Delay line DL2 measures it.
- **N** is the number of whole clock periods between those two edges. A synchronous counter measures it.

The two delay lines are identical. Each one is a tapped delay line: a chain of
carry cells, about 6 ps per tap, read by a flip-flop at every tap on each
clock edge. The word those flip-flops capture shows how far the hit travelled
before the edge. That distance is the fine time.

## Files

| file | what it is |
|---|---|
| `rtl/tdc_pkg.sv` | constants (clock period, taps, widths) and the result struct `tof_result_t` |
| `rtl/tdl_delay_line.sv` | **behavioural model** of one carry-chain delay line and its first sampling flip-flops |
| `rtl/tdl_sampler.sv` | second sampling stage, hit detection, bubble flag |
| `rtl/therm_encoder.sv` | bubble-tolerant encoder (counts the ones), 2-stage pipeline |
| `rtl/cal_lut.sv` | calibration table, 512 x 16, one block RAM per line |
| `rtl/fine_channel.sv` | sampler + encoder + table for one line |
| `rtl/coarse_counter.sv` | counts clock periods from the S1 hit to the S2 hit |
| `rtl/tof_processor.sv` | computes T1 + N*2500 - T3 |
| `rtl/tdc_core.sv` | everything synthesizable: two fine channels, counter, processor |
| `rtl/tdc_top.sv` | two delay-line models plus `tdc_core`: the whole converter |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The delay line and what is modelled

A carry-chain delay line cannot be written in RTL. Its behaviour comes from the
silicon and from where the tools place and route it. On the device, each line
is 60 CARRY8 cells (480 taps) in one clock region. That is all the carry logic
one clock region offers on this device family. 480 taps of about 6 ps span
about 2880 ps, which is more than one clock period.

`tdl_delay_line` stands in for that hardware in simulation. The model has
these features:

- **Non-uniform taps.** Each tap delay is `TAP_PS` (6 ps) plus a fixed random
  deviation of up to ±`TAP_SPREAD_PS` (3 ps). The deviations come from a
  seeded generator, so a given seed always gives the same line.
- **Sampling skew.** Each flip-flop has a fixed clock skew of up to
  ±`SKEW_PS` (3 ps).
- **Bubbles.** Where the skew is larger than the local tap delay, the captured
  word is not a clean `1…10…0` code. It has "bubbles": zeros among the ones.
- **Metastability.** A tap whose transition lands within `META_PS` of the clock
  edge is captured as a random value.
- **Input routing.** `ROUTE_PS` adds a fixed delay from the pin to the line.

On each rising clock edge, `taps_q[i]` is set to the level that `hit` had one
tap-delay earlier, where the tap delay includes the skew. The model uses real
arithmetic and `$realtime`, so it is simulation only.

On the device, the layout is what keeps the two lines alike:

- The two lines sit in neighbouring clock regions, as mirror images.
- Their routes from the S1 and S2 pins are matched, to the line entries and to
  the counter.

Without these constraints, the published measurements show large offsets and
gaps between the lines. These constraints belong in the implementation flow,
not in this RTL. The model can show their effect: give the two lines
different `ROUTE_PS` values or seeds.

## From taps to picoseconds

Each line's word passes through `fine_channel`:

1. **Second sampling** (`tdl_sampler`). The first-stage word may be
   metastable, so it is registered once more. A hit is seen when the OR of
   the first four taps goes from 0 to 1 between two samples. Using four taps
   instead of tap 0 alone means one bubbled or metastable early tap neither
   hides a hit nor doubles it. The hit input must stay high until the next
   clock edge has sampled it. It must go low again before the next hit.
2. **Encoding** (`therm_encoder`). The bin code is the number of ones in the
   word. For a clean code this equals the position of the edge. With bubbles,
   the count still grows with the time the hit spent in the line: tap *i* is
   1 exactly when the elapsed time exceeds that tap's effective delay. A
   priority encoder would jump by several bins at a bubble; a ones count does
   not. The count is taken per 8-tap group (one CARRY8 cell), then summed, one
   pipeline stage each.
3. **Calibration** (`cal_lut`). The code addresses a 512-entry table. Each
   entry holds the mean hit-to-edge time, in ps, for that code. Until loaded,
   entry *c* holds `6c - 3`: the middle of bin *c* of an ideal 6 ps line.

The channel keeps its last result on its outputs until the next hit.
`sat_o` is set when a hit filled the whole line, which makes its code useless.
It cannot happen while the line is longer than the clock period. `bubble_o`
reports a word with bubbles.

## Calibration

Process variation makes the bins unequal, and layout cannot remove that. So
each line needs its own table. This is how to build one:

1. Send hits into the line at precisely controlled offsets before a clock
   edge, stepped finely across a whole period. Hold the other line's hit
   mid-period.
2. Read the raw codes (`code1` and `code2` in every result) and the coarse
   count `N`. `N` tells which edge caught the swept hit, so the true
   hit-to-edge time of each sample is known.
3. For each code, store the mean of those times in the table through the
   `cal_we`/`cal_line`/`cal_addr`/`cal_data` port.

The published procedure steps the offset by 10 ps. The testbench steps by
1 ps, because a 10 ps step is wider than a 6 ps bin and would leave bins
without samples. Codes that never occur are filled in at the nominal 6 ps per
bin.

In simulation, with the default line model, the RMS error of the measured
interval is 27.6 ps with the initial linear tables and 3.3 ps after
calibration. These figures show how well the calibration fits the model. They
do not predict how a real device will perform.

## Coarse count and result

`coarse_counter` is started and stopped by the hit strobes of the two fine
channels. Both channels have the same latency. So the number of cycles between
the strobes equals the number of clock edges between the edge that caught S1
and the edge that caught S2. That is N.

| case | what happens |
|---|---|
| S1 and S2 caught by the same edge | N = 0; T = T1 - T3 |
| S2 with no measurement running | ignored |
| a second S1 during a measurement | ignored; the first start counts |
| no S2 within 2^16 - 1 periods (163.8 µs) | the measurement is dropped and `overflow_o` pulses |

`tof_processor` captures T1 when the counter accepts a start. It captures T3
and N when the counter sees the stop. It then computes `N*2500` with one
multiplier and `T1 - T3` in one cycle, and adds the two in the next.

A result appears on `result_o` with a one-cycle `result_valid_o`, 9 clock
edges after the edge that caught S2:

- 6 edges in the fine channel: 2 sampling, 2 encoding, 1 table read, 1 hold;
- 1 edge in the counter;
- 2 edges in the processor.

The counter accepts a new start one cycle after it reports a stop. A line
sees a new hit only after it has sampled its input low at least once.

`tof_result_t` (from `tdc_pkg`):

| field | bits | meaning |
|---|---|---|
| `tof_ps` | 32, signed | T = T1 + N*2500 - T3, in ps |
| `coarse` | 16 | N |
| `t1_ps`, `t3_ps` | 16 each | calibrated fine times |
| `code1`, `code2` | 9 each | raw bin codes, for calibration |

## Interface of `tdc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 400 MHz system clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `s1`, `s2` | in | 1 | hits, single-ended, after the LVDS input buffers |
| `cal_we`, `cal_line`, `cal_addr`, `cal_data` | in | 1, 1, 9, 16 | write a table entry (line 0 = DL1, 1 = DL2) |
| `result_valid_o`, `result_o` | out | 1, 98 | a finished measurement |
| `overflow_o` | out | 1 | measurement dropped, no stop |
| `busy_o` | out | 1 | a measurement is running |
| `sat_o`, `bubble_o` | out | 2 each | per-line diagnostics of the last hit |

`tdc_core` has the same ports, except that `taps1` and `taps2` (480 bits each)
replace `s1` and `s2`. It is the part to synthesize. Each `taps` input must
come from a carry chain whose per-tap flip-flops are in the same slices, with
placement and routing constrained as described above.

Parameters: `TAPS_P` (taps per line, 480) and `CLK_PS` (clock period in ps,
2500) on `tdc_top` and `tdc_core`, and `SEED_DL1`/`SEED_DL2` for the models.
The widths are set in `tdc_pkg`: code 9 bits, fine time 16 bits, counter 16
bits, result 32 bits. `CODE_W` follows from the tap count. If you change
`TAPS_P`, keep it a multiple of 8 and larger than the clock period divided by
the tap delay.

## Simulating

All files use a 1 ps time unit. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/tdc_pkg.sv tb/tb_tdc_top.sv --top-module tb_tdc_top
./obj_dir/Vtb_tdc_top
```

Replace `tb_tdc_top` with any other testbench name to run that one. Each
testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends a run that
hangs.

`tb_tdc_top` runs the whole converter at its default size. That means two
480-tap lines, the 400 MHz clock and the 16-bit counter. It runs in about a
second and goes through these steps:

1. random intervals with the uncalibrated tables;
2. the calibration sweep of both lines, then loading both tables;
3. 600 random intervals from 0 to 1 µs, each checked to within 25 ps, with an
   RMS error required below 6 ps and below the uncalibrated RMS;
4. the special cases from the coarse-count table above.

It counts how often each mechanism occurred and fails if any never did. The
mechanisms are: N = 0, long intervals, bubbled words, table writes, overflow,
ignored stray stop, ignored extra start.

`tb_delay_sweep` measures the converter's input/output characteristic. It
applies fixed delays from 300 to 2900 ps in 100 ps steps, 40 times each at
random clock phases, and prints the mean and standard deviation per delay,
first with the initial tables and then after calibration. With the default
line model, the mean spread falls from 22.6 ps to 3.2 ps. Every calibrated
mean lies within 1 ps of the applied delay.

The module testbenches check the following:

- `tb_tdl_delay_line`: an ideal line must give exact thermometer codes; the
  default line must give monotonic codes with bubbles.
- `tb_tdl_sampler`: hit strobes, captured words and bubble flags, two edges
  after each word.
- `tb_therm_encoder`: every code length, with and without bubbles, plus
  random words.
- `tb_cal_lut`: the initial contents, the read latency and writes.
- `tb_fine_channel`: latency, code, table lookup and hold.
- `tb_coarse_counter`: exact counts, N = 0, ignored strobes and overflow
  (with a 6-bit counter).
- `tb_tof_processor`: the equation and the carried fields.
- `tb_tdc_core`: end-to-end arithmetic and the 9-edge latency.

## Where this departs from the published design, and what is not here

- **Delay lines.** They are behavioural models; see above. The tap count of
  480 is derived from the carry cells in one clock region, and the tap delays
  and their spread are assumed. The published resource table (285 CARRY8 in
  total) does not give the length of each line.
- **Encoder, detection rule, pipeline depths and widths.** The source names
  an encoder and a table but not how they work. The ones count, the four-tap
  hit detection, the 16-bit counter and all latencies are this design's
  choices.
- **Where the counter's start and stop come from.** In the published design,
  S1 and S2 reach the counter by their own routes. There, a mismatch between
  a hit's route to its line and its route to the counter can make the count
  wrong by a cycle. Here the counter starts and stops on the hit strobes that
  the two lines' own samples produce. So the count always refers to the same
  clock edges as the fine times.
- **Calibration table storage.** The published design uses one block RAM.
  Here there are two 512 x 16 tables, which fit together in one 36 Kb block
  RAM.
- **Calibration itself** runs off-chip, with an external stepped source and a
  host. Only the table and its write port are in the RTL.
- **One stop per start.** In the published beam test, a trigger is followed
  by particles arriving in bursts. This design measures only the first stop
  after each start; later S2 hits are ignored until S1 starts a new
  measurement.
- **Not included:**
  - the LVDS18 input buffers;
  - the LVDS25-to-LVDS18 converter board;
  - the detector;
  - clock generation;
  - the placement and routing constraints;
  - any readout of results to a host.
- **Precision.** The published precision, 6.2 ps standard deviation and
  9.7 ps RMS after calibration, belongs to the silicon and its layout. This
  RTL does not reproduce it, and the simulated figures above do not stand in
  for it.
