# Ring-accelerator beam signal simulator

Beam position monitors (BPMs), fast orbit feedback and bunch-by-bunch feedback electronics are
normally only fully testable with a stored beam. This design stands in for the beam on the
bench. It produces the four signals that the four button electrodes (A, B, C, D) of a BPM would
deliver. Each bunch appears as one short bipolar pulse per channel. The bunches move the way a
real beam moves:

- **Transverse motion** (the bunch is off-centre in x and y) changes the pulse *amplitude* on each
  button differently. Each channel's pulse is scaled by its own factor.
- **Longitudinal motion** (the bunch arrives early or late) shifts the pulse *in time*. The stored
  pulse is read starting at a different address. Each channel has its own start address.

Both effects are table-driven, one entry per bunch per turn. A turn-by-turn oscillation
recorded on a real machine, or computed from a model, is loaded once. After that, each trigger
plays the next turn.

A second, independent unit (`bunch_calc`) evaluates the pickup formula directly from bunch
parameters, one sample per clock. This is the alternative to table playback.

## Signal model

A button of radius *a* in a round pipe of radius *b* sees a Gaussian bunch of charge *Q* and rms
length σ that passes at distance δ from the axis, at an angle θ from the button. It sees the
voltage

    V(t) ∝ (t − t0)/σ³ · exp(−(t − t0)² / 2σ²) · (a² − δ²) / (a² + δ² − 2aδ·cos θ)

This is the derivative of a Gaussian. It is bipolar, with a zero crossing at the bunch centre t0 and
extremes at t0 ± σ. The zero crossing is what BPM electronics use as the bunch's arrival time.

The playback path uses only the *shape* of this pulse. That shape is stored once, and the
position-dependent factor is supplied per channel through the factor table. `bunch_calc` evaluates
the whole expression.

## The playback path

```
            trig_in ─┐
                     v
  phase_rom ──> burst_ctrl ──start/offset[c]──> read_addr_gen ──addr──> wave_rom
  amp_rom   ──>     │                                                      │ sample
                    └──────── factor[c] ──(aligned)──────> amp_mult <──────┘
                                                              │
                                                    dac_data[c], trig_out
```

The chain from `read_addr_gen` to `amp_mult` exists once per channel c = A..D. All four
chains start together, so they stay in step.

### Stored pulse: `wave_rom`

This memory holds one bunch period: 2000 signed 16-bit samples. With a 2 ns period (a 499.8 MHz
RF bucket), one address step is 1 ps of arrival time, so bunch arrival can be set to the
picosecond. At elaboration the memory is filled with the model pulse above, centred at sample
1000 with σ = 50 samples and a peak of ±30000 codes. A measured pulse can replace it through
the write port (`wave_wr_*`).

### Time shift by read offset: `read_addr_gen`

This is the part that needs the closest reading. A bunch slot reads `WIN_LEN` = 1900
consecutive samples from the 2000-sample period, wrapping from 1999 to 0:

| offset | start address | end address (first not read) | effect |
|-------:|--------------:|-----------------------------:|--------|
| 0      | 0             | 1900                         | nominal |
| +50    | 50            | 1950                         | pulse 50 ps early |
| +100   | 100           | 0 (wrapped)                  | pulse 100 ps early |
| −30    | 1970          | 1870                         | pulse 30 ps late |

Starting the read *later* in the stored data makes the pulse appear *earlier* at the output. A
negative offset starts the read near the end of the period, so the first 30 output samples come
from the quiet tail and the pulse comes 30 ps late. The stored pulse never has to be
recomputed: only the start address changes from bunch to bunch. The 100 samples left out of
each slot are the margin for offsets up to ±100 samples. Larger offsets work too, but then the
wrap point moves into the part of the period that is read. That is harmless only while the pulse
itself stays clear of the wrap.

The generator accepts a new `start` in the last cycle of a slot, so consecutive bunches follow
each other without a gap.

### Tables: `phase_rom`, `amp_rom`

Entry `turn × 16 + bunch` holds:

- `phase_rom`: four 12-bit two's-complement offsets in samples (ps), one per channel, channel A
  in the low 12 bits. Load the same value into all four for a pure arrival-time shift. Initial
  value 0.
- `amp_rom`: four unsigned Q2.14 factors, channel A in the low 16 bits. Initial value 1.0
  (16384).

The tables hold 8192 turns of 16 bunches (131072 entries; 6.3 Mbit and 8.4 Mbit). Both are
written through `tbl_wr_addr` with `phase_wr_*` and `amp_wr_*`. Write them while no turn is
playing.

The factors come from inverting the difference-over-sum position formula. For a small
displacement (x, y) in normalised units, around 1.0:

    A = 1 + k(x + y),  B = 1 + k(x − y),  C = 1 − k(x + y),  D = 1 − k(x − y)

That computation is done by whatever loads the tables. The testbenches do it this way.

### Sequencing: `burst_ctrl`

- A rising edge on `trig_in` (synchronous to `clk`) starts a turn: 16 bunch slots back to back.
- A trigger that arrives while a turn is playing is ignored.
- After the last slot, the turn index advances and wraps after 8192 turns. Successive triggers
  therefore play successive turns of the stored oscillation.
- With `continuous = 1`, a new turn starts right after the previous one, with no trigger needed.
  The result is an endless bunch train. The first turn still waits for a trigger. Clearing
  `continuous` stops the train at the end of the current turn.

The controller always presents the table address of the *next* slot. The one-clock table read
is therefore complete long before that slot starts.

### Scaling: `amp_mult`

Each channel multiplies the sample by its factor and rounds to the nearest code (halves round
up). The product is kept at 18 bits: a full-scale sample times a factor below 4.0 cannot
overflow. Cutting the result down to the width of a particular DAC is left to the integration.

### Timing of the whole path

| cycle | event |
|------:|-------|
| n     | trigger edge seen; slot 0 starts |
| n+1   | first read address, slot factors latched |
| n+2   | waveform sample |
| n+3   | `dac_data` valid, `trig_out` and `bunch_first` high |

After that, one sample per clock per channel: 16 × 1900 = 30400 samples per turn.
`turn_idx`, `bunch_idx`, `start_addr` and `end_addr` (one address pair per channel) are aligned
with `dac_data` for observation.

## Direct computation: `bunch_calc`

This unit implements the formula above in a fixed-point pipeline. The three branches work in
parallel and meet at a final multiplier:

| branch | what it forms | built from |
|--------|---------------|-----------|
| exponential | e^(−dt²/2σ²) | dt², a 21-stage divider (`udiv_pipe`) giving w = dt²/2σ² in Q5.16, then `exp_neg` |
| multiplier  | amp · dt | one multiplier |
| divider     | G/σ³ · 2⁴⁰ | a², δ², aδ·cos θ, σ³, then a 32-stage divider |

- **Alignment.** `align_delay` registers hold the faster branches back until all three results
  belong to the same input. The final multiplier forms amp·dt·G·e^(−w)/σ³ · 2^OSH
  (OSH = 12), rounds it and saturates it to 16 bits.
- **Throughput and latency.** One sample per clock, latency 38 clocks.
- **Inputs.**
  - t, t0: 16-bit ps.
  - σ: 10-bit ps, nonzero.
  - amp: 16-bit. It collects charge, transfer impedance, beam velocity and geometry constants.
  - a, δ: 12-bit, same unit.
  - cos θ: signed Q2.14.
  - A bunch at or beyond the button radius (δ ≥ a) gives 0.
- **Exponential.** `exp_neg` splits w into an integer part and two fraction parts. It multiplies
  two tabulated exponentials (built at elaboration) by the first-order term 1 − f. The error is
  within one output step. Inputs of 16 or more give 0.
- **Accuracy.** The result is good to a few codes, plus the 1/65536 resolution of the
  exponential. The resolution limit matters only far out in the tails.

`bunch_calc` sits in the top next to the playback path with its own `bc_*` ports. It shares only
the clock and reset.

## What is outside the design

- **Converters.** The DAC, and whatever resampling is needed to drive a real converter, are not
  part of the design. The original bench setup used a 1 Gsps DAC to play a 204.03 MHz bunch train. The
  design delivers one sample per clock at the stored 1 ps resolution.
- **Feedback inputs.** The simulator is meant to grow two feedback inputs to close the loop with
  a feedback processor. Their behaviour is not defined, so they are not present.

## Departures and own choices

These follow the original design:

- table playback with a per-channel address offset and amplitude factor for each bunch;
- 16-bit pulse samples, 2000 per period;
- 16 bunches per trigger;
- the 0/1900, 50/1950, 100/0 read windows;
- four channels with a synchronous trigger;
- a continuous mode;
- the three-branch structure of the direct computation.

These are this design's own choices:

- **Pulse memory contents.** The original stores a pulse recorded with an oscilloscope. Here the
  memory starts with the analytic pulse and can be overwritten. Its polarity follows the formula
  (negative lobe first). A recorded pickup pulse may come the other way round. Load it, or set a
  negative `PULSE_PEAK`.
- **Formats.** Q2.14 factors, 12-bit offsets, 18-bit outputs, and the rounding.
- **Time step.** One sample is 1 ps, so offsets are set to the picosecond. The shifts that were
  tried out in the original work were multiples of 50 ps.
- **Table depth.** 8192 turns, chosen to hold a turn-by-turn record of about eight thousand
  turns.
- **Interfaces.** Load ports, synchronous active-low reset, the trigger rules (edge-triggered,
  ignored while busy) and the pipeline depth.
- **Fixed point in `bunch_calc`.** It uses fixed-point arithmetic throughout instead of
  floating-point and vendor divider cores. All its widths and its output scale are chosen here.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `sim_pkg.sv` | shared sizes, types, pulse model function |
| `beam_sim_top.sv` | top level |
| `burst_ctrl.sv`, `read_addr_gen.sv`, `wave_rom.sv`, `phase_rom.sv`, `amp_rom.sv`, `amp_mult.sv` | playback path |
| `bunch_calc.sv`, `udiv_pipe.sv`, `exp_neg.sv`, `align_delay.sv` | direct computation |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. In addition:

- `tb_beam_sim_top.sv` runs the whole design with 4 turns in the tables, so the turn index
  wraps. It checks every output sample of every channel against a model written in the
  testbench. It also counts that each mechanism happened: trigger ignored while busy, early and
  late bunches, channels with different offsets, wrapped reads, turn wrap, continuous turns, pulse reload, direct computation.
- `tb_beam_sim_full.sv` does the same with every parameter at its default (8192 turns).
- `tb_four_channel_run.sv` plays 21 triggered turns at default size. Each bunch gets amplitude
  factors up to 1.9, so the outputs go beyond 16 bits. It also gets an offset of up to ±90
  samples. The test checks where each channel's pulse peak lands in the slot. From the four
  channel amplitudes of each bunch it recovers x and y by difference over sum, and compares them
  with the values that were loaded.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/sim_pkg.sv \
          tb/tb_beam_sim_top.sv --top-module tb_beam_sim_top
./obj_dir/Vtb_beam_sim_top
```

Replace the testbench name for any other test. The testbenches reset or initialise everything
they read, so they also pass with random initial values (`+verilator+rand+reset+2`). The
end-to-end tests run in a few seconds.

To change sizes, override the parameters of `beam_sim_top`:

- `NB`: bunches per turn.
- `NT`: turns in the tables.
- `WDEPTH`, `LEN`: samples per period and per slot. Keep LEN ≤ WDEPTH and LEN ≥ 2.

The fixed-point formats are in `sim_pkg`.
