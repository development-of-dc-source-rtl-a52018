# Table-driven SPWM generator for single-phase full-bridge inverters

This design is a sinusoidal pulse-width modulator (SPWM) for a single-phase
full-bridge dc/ac inverter. It produces the four gate signals Ta+, Ta-, Tb+ and
Tb- at switching frequencies up to 1 MHz. Most digital SPWM generators compute
each pulse width, and that computation limits how fast they can switch. This
design computes nothing per pulse. A 50 Hz reference sine and a triangular
carrier are both stored in on-chip block RAM. Both are read one sample per
clock, and a comparator decides the gate state in every clock cycle. So the
switching frequency is limited only by the memory access and an 8-bit compare,
not by arithmetic. The only multiplication scales the sine by the modulation
index M, and it runs in parallel with the table reads.

Modulation is **unipolar**. Leg a compares the sine with the carrier. Leg b
compares the *negated* sine with the same carrier. The bridge voltage
(Ta+ − Tb+) therefore switches between 0 and +Vdc in the positive half-cycle
and between 0 and −Vdc in the negative one. Its first band of switching
harmonics lies around *twice* the carrier frequency.

The default configuration is a 1 MHz carrier sampled at f_s = 32 MHz, with a
50 Hz output and a 100 MHz board clock.

## Data path

```
 clk_in ─► clock_generator (÷2 FSM ─► DCM ×16/25) ─► clk_s = f_s
 m_float ─► modulation_index ─► index (0..255)
                                      │
 ┌──────────── sine_carrier ─────────┐│
 │ control_unit ─ sine addr ─► sine_memory ─ sineData ─┬─────► MUX1 ─ sine1 ─►┐
 │      │                     (¼ wave)                 └► processing_unit     │ adjustable_amplitude
 │      │                                                 (256 − x) ─ ys ──►  │  sineRef1, sineRef2
 │      ├─ flag (negative half) ─ reg ─► MUX select        MUX2 ─ sine2 ─────►┘        │
 │      └─ carrier addr ─► carrier_memory ─ carrier ───────────► carrier_delay ──► comparison ─► Ta+ Ta- Tb+ Tb-
 └────────────────────────────────────┘
```

| Stage | Module | What happens | Register |
|---|---|---|---|
| phase | `control_unit` | quadrant and index counters, carrier counter | counters |
| read | `sine_memory`, `carrier_memory` | one sample of each table | BRAM output |
| select | `processing_unit`, MUX1/MUX2 in `sine_carrier` | sine and its negative | none |
| scale | `adjustable_amplitude` | multiply by Index | sineRef1/2 |
| align | `carrier_delay` | carrier waits one cycle for the scaling stage | 1 stage |
| compare | `comparison` | `ref > carrier` → upper switch on | gate outputs |

The gate outputs describe the phase the counters held **3 clk_s cycles**
earlier (`spwm_pkg::PIPE_LATENCY`). The modulation index is registered once
before it reaches the multipliers.

## Number format

Every waveform is an unsigned 8-bit sample. A sine value in [−1, 1] maps to
[0, 255], and **128 means zero**. The carrier uses the same 0..255 scale, so a
reference and the carrier are compared as plain unsigned numbers.

- Sine: `128 + 127·sin θ`, rounded, so values run from 1 to 255.
- Negation (the processing unit): `256 − x`, a reflection about 128.
- Amplitude scaling: `sineRef = 128 + floor((s − 128) · Index / 256)`. This is
  one 18-bit signed multiply per leg, a DSP slice on an FPGA.
- Modulation index: the input is an IEEE-754 single-precision float, M ∈ [0, 1].
  It is aligned to a fixed-point fraction with `N_FRAC` (16) fractional bits,
  `Mq = floor(M·2^N_FRAC)`. It is then scaled with round-half-up to
  `Index = floor((Mq·255 + 2^(N_FRAC−1)) / 2^N_FRAC)`. Negative numbers, zero
  and subnormals give 0. M ≥ 1, infinity and NaN give 255.

With this scaling, the 50 Hz component of the bridge voltage (in units of
Vdc) is close to `2·127·Index/(256·255)`, that is 0.992·M. It is linear in M up
to M = 1. The carrier never reaches 255 at the scaled peak, so there is no
over-modulation.

## The two tables

The sizes follow from the frequencies. Every table entry lasts one sampling
clock:

```
QUARTER     = f_s / (4 · f_out)   sine entries      (160 000 at 32 MHz, 50 Hz)
CARRIER_LEN = f_s / f_c           carrier entries   (32 at 32 MHz, 1 MHz)
```

**Quarter-wave sine.** Only 0 … π/2 is stored, as
`rom[i] = round(128 + 127·sin(π/2 · (i + ½) / QUARTER))`. The half-sample
offset makes the table symmetric, so reading it backwards gives exactly the
second quarter. The control unit walks a phase p = 0 … 4·QUARTER−1:

| quadrant | sine address | flag | sine1 (MUX1) | sine2 (MUX2) |
|---|---|---|---|---|
| 0 | i (forward) | 0 | table | 256 − table |
| 1 | QUARTER−1−i (backward) | 0 | table | 256 − table |
| 2 | i (forward) | 1 | 256 − table | table |
| 3 | QUARTER−1−i (backward) | 1 | 256 − table | table |

The flag is delayed one register, so it lines up with the memory output. The
result is that `sine1` is a full-period sine sampled at the midpoints
θ = 2π(p + ½)/(4·QUARTER), and `sine2` is its exact negative.

**Carrier.** The carrier table holds one whole triangle period: 0 at entry 0,
255 at entry L/2 (L = CARRIER_LEN), rounded as `(510·j + L/2)/L` on the way up
and mirrored on the way down. The carrier counter is independent of the sine
counter. When f_s/f_c does not divide the sine period evenly, the carrier
simply runs on.

Both tables are filled at elaboration from these formulas, not from data
files. The default sine table is 160 000 × 8 bit = 1.28 Mbit, which is what
the target FPGA's block RAM has to hold.

### Resolution at high switching frequency

A carrier of L samples can place a switching edge only on one of L clock
positions per period. At 1 MHz with f_s = 32 MHz, L = 32, so pulse widths are
quantised to about 1/32 of the switching period. The simulated 50 Hz amplitude
still follows M, but with up to about 0.02 of error and a small 3rd harmonic
(about 0.026 at M = 0.1). At 10 kHz and 100 kHz (L = 3200 and 320) the error
is below 0.002. Raising f_s improves this, at the price of a proportionally
larger sine table.

## Clocking and reset

`clock_generator` is the clock generator subsystem. A two-state FSM toggles on
every board-clock edge, which gives f_clk/2. That clock feeds a digital clock
manager (DCM) whose frequency-synthesis output gives

```
f_s = f_clk / 2 · CLKFX_MULTIPLY / CLKFX_DIVIDE      (100/2 · 16/25 = 32 MHz)
```

The FSM is the same for every switching frequency. Only the two DCM ratio
parameters, and the table sizes derived from them, change. On an FPGA the DCM
is the vendor's clock primitive. `dcm_clkfx.sv` is a **behavioural model**
with delays, for simulation only:

- It measures the input period.
- It locks after 4 equal periods.
- It then produces the scaled clock.
- It holds its output low while unlocked.

When you synthesize for a device, replace it with the device's clock
primitive.

Reset (`reset`, active high) is handled in three parts:

- **Reset synchroniser.** The datapath is reset by `reset` or by loss of DCM
  lock. Either one asserts the datapath reset at once. Release comes two clk_s
  edges after both are gone.
- **Power-up value.** The synchroniser powers up "in reset", like an FPGA
  register loaded at configuration. This matters because clk_s does not run
  until the DCM locks, so the datapath could not otherwise be reset by a
  clock edge.
- **Asynchronous-assert reset in the datapath.** All datapath registers reset
  asynchronously. Any reset therefore turns all four gate signals off
  immediately, even with the clock stopped. The waveform restarts at phase 0.

`m_float` is not synchronised. Hold it steady, or change it slowly, relative to
clk_s. The index takes effect on the gate outputs 2 cycles after it is
registered.

## Parameters of `spwm_generator`

| Parameter | Default | Meaning |
|---|---|---|
| `F_CLKIN_HZ` | 100 000 000 | board clock, used only to size the tables |
| `CLKFX_MULTIPLY` / `CLKFX_DIVIDE` | 16 / 25 | DCM ratio; f_s = F_CLKIN_HZ/2 · M/D |
| `FC_HZ` | 1 000 000 | carrier (switching) frequency |
| `FOUT_HZ` | 50 | output frequency |
| `N_FRAC` | 16 | fraction bits of the float-to-fixed conversion |

f_s must be an integer multiple of both 4·FOUT_HZ and FC_HZ. Some examples:

- f_c = 1 kHz at f_s = 4 MHz: `FC_HZ=1000`, `CLKFX_MULTIPLY=2`.
- 1 MHz at 64 MHz: `CLKFX_MULTIPLY=32`. This gives a 320 000-entry sine
  table, 2.56 Mbit.

Besides the gate signals, the top level brings out:

- `clk_s` and `locked`;
- the `index` in use;
- `quadrant`, `half_flag` and `period_end`, a one-cycle pulse at the end of
  each output period, taken from the phase counter before the 3-cycle delay.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values come
from `tb/spwm_ref_pkg.sv`, which evaluates the sine over the *whole* period
with real arithmetic. Unlike the RTL, it does not mirror a quarter table.

- `tb_spwm_generator` runs the default configuration end to end. It covers the
  DCM lock, two full 640 000-cycle output periods (M = 0.9, then M = 0.5), a
  reset in mid-run and the restart. It compares all four gate signals with the
  model in every cycle, about 2.6 million checks. It checks clk_s = 31.25 ns
  and the 20 ms output period. It also counts each mechanism: lock, mirrored
  reads, half-period inversion, carrier wrap, index change and restart. It
  runs in about 8 s.
- `tb_workload_spectrum` runs four generators: f_c = 10 kHz, 100 kHz and
  1 MHz at 32 MHz, and 1 kHz at 4 MHz. Each steps M through 0.1, 0.5, 0.9 and
  1.0. It takes a DFT of Ta+ − Tb+ over whole periods and checks:
  - the fundamental against the expected depth;
  - that the 3rd harmonic is small;
  - that the component at f_c is absent, while the sidebands at 2f_c ± 50 Hz
    carry the switching energy.

  Measured fundamentals:

| M | 10 kHz | 100 kHz | 1 MHz | 1 kHz @ 4 MHz | expected |
|---|---|---|---|---|---|
| 0.1 | 0.098 | 0.098 | 0.079 | 0.098 | 0.097 |
| 0.5 | 0.499 | 0.498 | 0.485 | 0.499 | 0.498 |
| 0.9 | 0.891 | 0.891 | 0.894 | 0.891 | 0.891 |
| 1.0 | 0.991 | 0.992 | 0.979 | 0.992 | 0.992 |

To run one testbench with plain Verilator (timescale 1 ns/1 ps):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/spwm_pkg.sv tb/spwm_ref_pkg.sv \
  tb/tb_spwm_generator.sv --top-module tb_spwm_generator -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## What follows the published design and what is this design's choice

These points follow the published design:

- the five subsystems: clock generator, modulation index, sine-carrier,
  adjustable-amplitude sine and comparison;
- their internal parts and signal names;
- 8-bit samples with 128 as zero;
- a float modulation index converted to 0..255;
- a quarter-wave sine table mirrored and inverted, and a full-period carrier
  table, both in block RAM and read once per sample;
- a divide-by-two FSM followed by a DCM whose ratio sets the frequency;
- unipolar modulation;
- f_c = 1 MHz with f_s = 32 MHz.

These are this design's own choices:

- the table formulas (half-sample offset, rounding, triangle phase);
- the scaling formula and its floor rounding;
- the float-to-fixed rounding and `N_FRAC = 16`;
- the 100 MHz board clock and 16/25 DCM ratio;
- the register placement and the 3-cycle latency;
- the one-stage carrier delay;
- the strict `>` comparison;
- the reset scheme and the behavioural DCM model;
- the observation outputs.

There is **no dead time** between the two switches of a leg. The two signals
of a leg are exact complements, so a real bridge needs dead-time insertion
downstream. The published characterisation also left dead time out, and
evaluated the generator without a power stage by subtracting Ta+ and Tb+; the
spectrum testbench here measures the same difference. An assertion in
`comparison` checks that a leg's two switches are never on together.

Synthesis note: the sine table is initialised with `$sin` in an `initial`
loop. Simulators and FPGA flows that evaluate real-valued initialisers accept
this. A flow that does not will need the same formula evaluated into a memory
initialisation file.
