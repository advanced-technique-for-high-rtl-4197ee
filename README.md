# Tunable ring-oscillator vernier TDC

A time-to-digital converter (TDC) measures the interval between two edges,
`start` and `stop`, with a resolution much finer than any clock period in the
chip. This design does it with two ring oscillators whose periods differ by a
small amount `dt`. `start` launches the slow ring (period `T0`) and `stop`
launches the fast ring (period `T1 = T0 - dt`). Each fast period gains `dt` on
the slow ring. A phase detector notices when the fast ring has caught up, and at
that moment the two period counts `N0` and `N1` are latched:

    T = N0*T0 - N1*T1 = (N0 - N1)*T0 + N1*dt

The resolution is `dt`, not a gate delay. The difficulty in an FPGA or in a
standard-cell ASIC is getting two rings whose periods differ by a few tens of
picoseconds. The key idea here is to make each ring tunable by "moving
inverters" along a chain of XOR cells. A calibration sweep then picks the pair of
settings with the wanted `dt`.

Everything is written in SystemVerilog (IEEE 1800-2017). The oscillator cells
and the delay chain are behavioural models with `#` delays. Everything else is
synthesizable logic.

## The tunable ring (moving inverters)

    fbin ──┐
           AND ── cell A ── cell B ── ... ── cell H ──> outClock
    clockEnb┘     sel[7]     sel[6]          sel[0]

Each cell is an XOR of the signal with one select bit:

- A cell with its select bit at 0 passes the signal with delay `Tpass`.
- A cell with its select bit at 1 inverts it with delay `Tinv`.

The loop is closed outside the ring module (`fbin = outClock`). That keeps the
ring an open path for static timing analysis. The AND gate is the start/stop
gate.

The ring oscillates only when an odd number of cells invert. The ring then has
two transitions per period:

    T = 2 * (Tand + sum over cells of (sel ? Tinv : Tpass))

With 8 cells, 128 select words have an odd number of ones. Each word gives a
slightly different period, because `Tinv` and `Tpass` differ cell by cell.
"Moving" one inverter from cell `a` to cell `b` changes the period by
`2*((Tinv_b - Tpass_b) - (Tinv_a - Tpass_a))`. With cells from different logic
families these differences span a few ps up to about 150 ps, and picking two
words gives `dt` almost anywhere in that range.

This design, like the calibration results it is modelled on, uses words with
exactly three inverters. There are C(8,3) = 56 such words per ring, so
56 × 56 = 3136 slow/fast pairs.

While the ring is disabled, the AND output is 0. After an odd number of
inversions, `outClock` rests at 1. Enabling the ring therefore produces the first
rising edge one full period after the enable, and the k-th rising edge at
`t_enable + k*T`.

**Delay model.** `tdc_pkg` holds the delays used by default. The values are
modelled on FPGA logic-cell timing:

| cell          | A   | B   | C   | D   | E   | F   | G   | H   |
|---------------|-----|-----|-----|-----|-----|-----|-----|-----|
| Tpass (ps)    | 417 | 417 | 417 | 564 | 564 | 564 | 734 | 734 |
| Tinv (ps)     | 402 | 401 | 379 | 482 | 477 | 474 | 576 | 576 |

The AND gate is 417 ps. Pass delays are LUT-input delays plus one routing hop.
The invert-minus-pass spreads (15 to 158 ps) follow measurements on an FPGA
chain. Both rings use the same table unless the parameters are overridden.

On silicon the slow and fast rings are placed apart, so their delays differ, and
the chosen pair is found by calibration. In this model the same word in both
rings gives the same period. For the reference pair slow = 148
(`8'b1001_0100`), fast = 22 (`8'b0001_0110`), the model gives T0 = 9282 ps,
T1 = 8996 ps and dt = 286 ps. The FPGA implementation measured 50 ps for the
same pair. Treat the model's numbers as a functional stand-in, not a prediction
of resolution. To model a real device, override the
`SLOW_TPASS_PS`/`SLOW_TINV_PS`/`FAST_*` tables.

## Measurement (vernier_tdc)

1. The rising edge of `start` sets a flop that enables the slow ring.
2. The rising edge of `stop` sets the flop for the fast ring.
3. Two counters (`osc_counter`) count the rising edges of each ring.
4. The phase detector samples the slow clock on every fast rising edge, twice in
   a row (`q1`, then `q2`). Its output is `phase = q2 & ~q1`: at the previous
   fast edge the slow clock was high, and now it is low. The fast ring has just
   overtaken the slow one.
5. At the next fast rising edge the counts are latched into `result.n0` and
   `result.n1`, `valid` rises, and both rings are disabled.

In this design's timing, the latched values satisfy

    n0*T0 - n1*T1  ≈  t_stop - t_start,   error within one dt

This holds for `0 <= t_stop - t_start < T0`. Longer intervals also work, since
N0 simply grows, and the counters are 16 bits wide.

Near zero the code is not uniform. The detector needs two fast edges before it
can report anything, so intervals shorter than about two steps land on codes off
the regular `dt` grid. They are still within one step of the true value.
Intervals that are an exact multiple of `dt` put a fast edge exactly on a slow
edge. In simulation that tie may resolve either way.

`clear` is asynchronous. It resets the counters, the phase detector and the
result, and it also forces both rings off. Without that, a measurement with no
coincidence (for example equal periods) would leave the rings running, and a new
select word applied to a running ring could leave it oscillating with several
edges in flight.

Pulse `clear` high before every measurement. `start` and `stop` must be low when
`clear` falls.

`free_run` enables both rings without `start`/`stop` and without latching. It
is used for calibration. Immediate assertions check that both select words have
an odd number of ones whenever a ring is started.

## Coarse counter and full-range measurement

`coarse_counter` counts periods of the reference clock (40 MHz, 25 ns by
default in the test benches). On a rising `start` it holds the current count in
`coarse`. At the next reference edge it raises `ref_stop`.

In the top, `stop_src = 1` routes `ref_stop` to the TDC's stop. The fine
converter then measures from the trigger to the next reference edge (0–25 ns),
and the coarse count gives the number of whole reference periods. This is how a
trigger is placed on an absolute time scale against a 40 MHz clock.

## Calibration

The converter's raw counts become time only through `T0` and `dt`, so both are
measured in place.

**Period calibration (period_calib).** During `n_ref` reference periods the
module counts the rising edges of a free-running ring:

    n_calib * T_osc + E = n_ref * T_ref,   |E| < T_osc

The ring's period is therefore `T_ref * n_ref / n_calib`, with a relative error
below `1/n_calib`. The window is opened and closed on the reference clock and
carried into the oscillator domain through a two-flop synchronizer. The
oscillator counter starts at the first synchronized edge and stops at the last.
Any synchronizer error appears as at most one count. `done` rises `n_ref + SETTLE`
reference cycles after `go`.

The top has one instance for each ring, so both periods are measured together.
The division is left to software.

**Beat calibration (beat_calib).** With both rings free running, the phase
detector fires once every beat period, `T0*T1/dt`. `beat_calib` counts fast
periods between two successive detector pulses, which gives
`beat ≈ T0/dt`, so `dt ≈ T0/beat`. It measures one beat after each `clear` and
holds the result.

**Sweep (calib_sweep).** This finite-state machine, clocked by the reference
clock, runs through all 56 × 56 pairs of 3-inverter words. For each pair it:

1. applies the two words;
2. clears the TDC;
3. starts free running and both period calibrations;
4. waits for the calibrations and for a beat, or for `beat_timeout` reference
   cycles if the two periods are too close for a beat to come;
5. emits one record `{sel_slow, sel_fast, n_calib_slow, n_calib_fast, beat,
   beat_ok}` with a `rec_valid` strobe.

Software builds the table of `dt` per pair from the records and picks the pair
with the wanted resolution. While the sweep runs, it owns the select words and
the TDC control in the top. Pairs where the slow word is actually faster give a
beat too. The sign has to come from the two period counts.

## Hybrid converter (hybrid_tdc)

A pure vernier needs up to `T0/dt` fast periods to reach coincidence, and the
rings' jitter accumulates over all of them. The hybrid splits the slow period
into parts. The slow clock goes through a tapped buffer chain (`delay_chain`,
4 taps, `TBUF_PS` apart by default). Each tap feeds its own phase detector
against the fast clock, and the OR of the detectors stops the counters and rings.

The latched detector outputs `taps` tell which delayed copy caught the fast
clock first. If it is tap `k` (delay `k*Td`):

    T ≈ (N0 - [k > 0])*T0 + k*Td - N1*T1

The fast ring now only has to overtake a fraction `Td` of the slow period
instead of all of it. This cuts the number of periods to about `Td/dt`. The tap
delays need their own calibration, which is not part of this design. The hybrid
stands beside the main converter in the top, with its own start/stop/result
ports and the same select words.

## Top level (tdc_top)

`tdc_top` connects:

- the main vernier converter;
- the coarse counter and its stop source multiplexer;
- two period calibrators;
- the beat calibrator;
- the calibration sweep;
- the hybrid converter.

| group     | ports |
|-----------|-------|
| clocks    | `clk_ref` (reference), `rst_n` (active-low asynchronous) |
| measure   | `tdc_clear`, `start`, `stop`, `stop_src`, `result`, `valid`, `coarse`, `ref_count` |
| tuning    | `sel_slow`, `sel_fast`, `free_run` |
| calibrate | `cal_go`, `cal_n_ref`, `cal_busy`, `cal_done`, `n_calib_slow`, `n_calib_fast`, `beat`, `beat_valid` |
| sweep     | `sweep_go`, `beat_timeout`, `sweep_busy`, `sweep_done`, `rec_valid`, `rec` |
| hybrid    | `h_start`, `h_stop`, `h_result`, `h_taps`, `h_valid` |

Types and constants come from `tdc_pkg`: `tdc_result_t {n0, n1}` and
`sweep_rec_t`.

## Files

| file | contents |
|------|----------|
| `rtl/tdc_pkg.sv` | constants, default delay tables, result and record structs |
| `rtl/tunable_cell.sv` | one XOR cell, pass/invert delays (behavioural) |
| `rtl/tunable_ring_osc.sv` | AND gate + 8 cells, open loop (behavioural) |
| `rtl/phase_detector.sv` | two-flop slow-clock sampler |
| `rtl/osc_counter.sv` | ring period counter |
| `rtl/vernier_tdc.sv` | start/stop rings, detector, counters, result latch |
| `rtl/coarse_counter.sv` | reference-period counter and reference stop |
| `rtl/period_calib.sv` | oscillator period against the reference |
| `rtl/beat_calib.sv` | fast periods between coincidences |
| `rtl/calib_sweep.sv` | sweep of all 3-inverter pairs |
| `rtl/delay_chain.sv` | tapped buffer chain (behavioural) |
| `rtl/hybrid_tdc.sv` | vernier with delay-chain phase detectors |
| `rtl/tdc_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking test bench for each module |
| `tb/tb_tdc_workloads.sv` | full-range and DNL characterisation runs on the top |

## Simulating

Every test bench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl rtl/tdc_pkg.sv -y rtl \
        tb/tb_tdc_top.sv --top-module tb_tdc_top -o sim
    ./obj_dir/sim

Replace `tb_tdc_top` with any other test bench. Put the package first on the
command line. All files use `timeunit 1ps`.

Expected results are computed independently of the RTL in each test bench, from
the delay tables and the edge arithmetic above:

- `tb_tunable_ring_osc` checks the period of all 128 odd words.
- `tb_vernier_tdc` and `tb_hybrid_tdc` check `n0`/`n1` against a predicted
  coincidence for random intervals and select words.
- `tb_calib_sweep` drives the sweep against a model of the calibration results.
- `tb_tdc_top` runs the top at its default parameters. It counts each mechanism
  it exercises and fails if any never happened:
  - stop from the pin;
  - stop from the reference clock with the coarse count;
  - period calibration;
  - beat calibration;
  - re-tuning between measurements;
  - hybrid measurement;
  - a complete 3136-pair sweep.

  It takes about a minute.
- `tb_tdc_workloads` runs two characterisation workloads on the top at its
  defaults, in about half a minute:
  - a trigger stepped by 100 ps over 26 ns against the 40 MHz reference, checking
    the rebuilt time and that it never decreases;
  - a DNL histogram over 1 ns in 10 ps steps with 100 measurements per step,
    using pair 73/37 (50 ps in this delay model). All inner bins come out
    exactly 50 ps wide.

Verilator reports `ZERODLY`-type warnings on the delay models and unused
package constants. These are expected.

## How far to trust it, and where it departs

- **Resolution is a property of silicon.** The logic (start/stop gating, phase
  detection, latching, calibration, the sweep) is exact. The oscillator periods
  come from a delay table, so the resolution of 50 ps or better reported for the
  FPGA version cannot be reproduced by simulation. Jitter, temperature and
  voltage drift, and the difference between rising and falling delays are not
  modelled.
- **Rise and fall delays.** The ring's frequency really depends on the sum of
  high-to-low and low-to-high delays of each stage. The model uses one delay per
  stage and mode.
- **Pair count.** The sweep covers all 3136 pairs of 3-inverter words, equal
  words included (those end by timeout).
- **Own choices** (not given by the source design):
  - counter widths (16-bit counts, 24-bit calibration counts);
  - the arming flops on `start`/`stop`;
  - latching on the fast edge after the detector fires;
  - forcing the rings off on `clear`;
  - the calibration window, synchronizer and `SETTLE` delay;
  - the one-shot beat measurement;
  - the sweep order, timeout and record format;
  - the top-level stop-source multiplexer;
  - the delay-chain buffer delay (2320 ps, a quarter of the default slow
    period);
  - the hybrid's result formula and the choice to stop its rings on detection.
- **Not built.**
  - The FPGA placement and routing work that sets the cell delays (choice of
    LUT input, manual routing, locked regions) is a tool flow, not logic. In
    this design the delay tables stand in for it.
  - The reference PLL is external: its clock enters as `clk_ref`.
  - The ASIC version is only a layout of the same logic.
