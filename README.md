# DPWM-POL: a look-up-table digital PWM controller for a point-of-load buck converter

A point-of-load (POL) converter has to answer load steps within microseconds.
A conventional digital controller cannot do that well. Its A/D converter
(with its sample-and-hold) adds a conversion delay, and its arithmetic adds a
computation delay, so the duty cycle reacts a switching period or more after
the voltage moved. This controller removes both delays:

* **No A/D converter.** An external DAC plays a step-down sawtooth, and a fast
  analog comparator compares the output voltage `Eo` with it. The count of
  the switching-period counter at which the comparator trips *is* the
  digitised voltage `y1(k)`. A higher `Eo` trips earlier.
* **No arithmetic in the loop.** The whole PID law is pre-computed into a
  table (memory 2). The table is indexed by a programmable counter that runs
  in step with the period counter. So at every clock, memory 2 is already
  reading the duty value for "the comparator trips now". When the trip comes,
  that value is loaded into the duty register one clock later.
* **Same-period correction.** The duty register is preset to its maximum at
  the start of every period. The PWM output is therefore on from the start of
  the period, and the sensed voltage cuts the on-time short in the same
  period in which it was measured.

The architecture, the rewritten PID law and the signal flow follow
Y. Ishizuka, K. Mii, D. Kanemoto and T. Ninomiya, *Frequency Response
Analysis of Proposed Digital Control System for DPWM-POL* (Nagasaki
University). That work gives a 500 MHz system clock, 1 MHz switching, a 9-bit
duty value, Vref+ = 1.7 V, Vref = 1.5 V, Ei = 6 V, KP = 5, KI = 0.08 and
KD = 0. Widths, table offsets, per-period sequencing and reset behaviour are
this implementation's own choices; they are listed below.

## The control law as a table look-up

The PID law per switching period `k` is

    e(k)  = y1(k) - r                       (r: reference, in counts)
    nI(k) = nI(k-1) + e(k)
    u(k)  = uref + KP e(k) + KI nI(k) + KD (e(k) - e(k-1))

Substituting `e` and `nI` and collecting terms in `y1(k)` gives

    u(k)     = uref - (KP+KI) r + A * address'      A = KP + KI + KD
    address' = y1(k) + a - b
    a        = (KI/A) nI(k-1)       -> memory 3, indexed by nI
    b        = (KD/A) y2(k-1)       -> memory 4, indexed by y2 = y1(k-1)

`a - b` depends only on the previous period, so it is ready before period
`k` starts. It becomes the start value of the **programmable counter**. That
counter increments with every clock, exactly like the period counter, so its
value is always `cnt + a - b`: the `address'` that applies if the comparator
trips at the current count. Memory 2 holds `u` for every `address'`. The
only computation left between the trip and the duty register is one memory
read.

The tables are filled at elaboration from integer parameters. The gains are
Q10 fixed point: `KP_Q = 5120` is 5.0 and `KI_Q = 82` is 0.0801. Entries are
rounded to nearest and clamped:

| table    | module         | index                                  | entry                                                   | default size    |
|----------|----------------|----------------------------------------|---------------------------------------------------------|-----------------|
| memory 1 | `sawtooth_lut` | period count `i`                       | `1023 - DAC_STEP*i`, floored at 0                       | 512 x 10 bit    |
| memory 2 | `duty_lut`     | `address' + 512`                       | `uref - (KP+KI) r + A address'`, clamped to 0..511      | 1024 x 9 bit    |
| memory 3 | `integral_lut` | `nI` (two's complement, 12 bit)        | `KI nI / A`, clamped to signed 10 bit                   | 4096 x 10 bit   |
| memory 4 | `deriv_lut`    | `y2`                                   | `KD y2 / A` (all zero for KD = 0)                       | 512 x 10 bit    |

Every table also has a write port. The top level exposes it as `tbl_we`,
`tbl_sel` (memory 1..4, `dpwm_pkg::tbl_sel_e`), `tbl_addr` and `tbl_data`.
Through it you can load other gains or another sensing waveform at run time,
one entry per clock. A reload done while the loop runs mixes old and new
entries for the period in progress.

Because `a` is rounded to an integer table offset, the integral acts in steps
of `A/KI` accumulated counts: 64 counts with the default gains. This
quantisation is inherent to folding the integral into the table address.

## One switching period, clock by clock

The defaults are `PERIOD = 500` clocks, a synchroniser depth of 2 and an
external DAC/comparator latency `EXT_LAT = 0`. Sensing latency is
`SENSE_LAT = 1 + SYNC_STAGES + EXT_LAT = 3`.

| count        | what happens |
|--------------|--------------|
| 499 (PR)     | The PR strobe presets `u(k)` to 511. The programmable counter is loaded with `a - b + 512` for the next period. |
| 0            | Memory 1 is addressed with 0. The sawtooth restarts at full scale (Vref+). The PWM output turns on. |
| c            | The DAC shows code `1023 - 2(c-1)`. The comparator output is resynchronised by two flip-flops. |
| 3            | First sample of the sensing window. It compares `Eo` with the top of the sweep, Vref+. A trip here means over-voltage. |
| c (trip)     | First window sample with the comparator high: `y1 = c`. Memory 2 is reading `address' = c + a - b` in this cycle. |
| c+1          | `sense_evt` pulse. D-FF4 loads `u(k)` from memory 2. On over-voltage it loads 0, which forces the PWM off. |
| c+2          | The comparison `cnt < u(k)` now uses the new `u(k)`. The registered PWM output follows one clock later. `nI` and `y2` have been updated. |
| c+3, c+4     | Memories 3 and 4 are read, so `a` and `b` are ready for the PR load. |
| 496          | Last window sample. With no trip by now, `Eo` is below the bottom of the sweep. The period is recorded with `y1 = 496` and `u(k)` stays at maximum (fully on). |

The window ends at `PERIOD-4` so that even a decision at the window end
leaves time for the `nI` → memory 3 → programmable-counter path before PR.
The PWM output is `cnt < u(k)`, registered, so it lags the count by one clock.

Two consequences matter when you pick parameters:

* **The trip must come before the nominal on-time ends.** The on-time can
  never be shorter than `y1 + 2` counts, because the duty register is still
  at its preset maximum until then. At 6 V in and 1.5 V out the on-time is
  about 125 counts. The default slope of 2 DAC codes per clock (3.3 mV per
  count) crosses 1.5 V about 60 counts into the period. A 1-code slope would
  cross at about 120 counts, right at the end of the on-time, and the
  correction would mostly act on the next period.
* **The reference `r` is in latched counts.** It includes the sensing latency:
  `r = (1.7 - 1.5) / 1.7 * 1023 / DAC_STEP + SENSE_LAT = 60 + 3 = 63`. If you
  change the DAC slope, the synchroniser depth or `EXT_LAT`, change `R_REF`
  with it.

Over-voltage follows the reference design: if `Eo` is above Vref+, the PWM
is forced off for the rest of the period. The minimum on-time is still
`SENSE_LAT + 2` clocks (5 clocks, 1 % at 1 MHz), because the over-voltage
decision is made at the first window sample.

## Modules

All files are in `rtl/`, one module per file. Shared constants and the table
selector enum are in `dpwm_pkg.sv`.

| module            | role (reference design's name) |
|-------------------|--------------------------------|
| `dpwm_pol_top`    | the digital controller; wires everything below |
| `up_counter`      | up-counter, 0..PERIOD-1; the time base and `y1` |
| `pr_generator`    | PR signal generator, plus the sensing-window decodes |
| `sawtooth_lut`    | memory 1, DAC waveform |
| `latch_gen`       | comparator synchroniser and latch-signal D-FFs: trip detection, `y1`, over-voltage flag |
| `pid_state`       | `e(k)`, integral `nI(k)` (saturating), `y2` register |
| `integral_lut`    | memory 3, `a` |
| `deriv_lut`       | memory 4, `b` |
| `prog_counter`    | programmable counter, `address'` |
| `duty_lut`        | memory 2, `u(address')` |
| `duty_register`   | D-FF4, `u(k)` with preset and forced off |
| `dpwm_comparator` | digital comparator, PWM output |

The DAC, the analog comparator, the gate driver and the power stage are not
logic and have no RTL. For simulation, `tb/atc_model.sv` models the DAC and
comparator, and `tb/buck_model.sv` models the buck stage.

Top-level ports: `clk`, `rst_n` (synchronous, active low), `comp_in`
(asynchronous comparator output, 1 when `Eo` is above the DAC voltage),
`dac_code[9:0]` to the DAC, `pwm` to the gate driver, and the table-write
port. Observation outputs: `u_k`, `y1_k`, `sense_evt`, `crossed`, `ovp` and
`n_i`.

## Parameters

| parameter     | default | from |
|---------------|---------|------|
| `PERIOD`      | 500     | 500 MHz clock / 1 MHz switching (reference design) |
| `CNT_W`, `U_W`| 9, 9    | 9-bit DPWM resolution (reference design) |
| `KP_Q`, `KI_Q`, `KD_Q` | 5120, 82, 0 | KP = 5, KI = 0.08, KD = 0 (reference design), Q10 |
| `DAC_W`       | 10      | a 10-bit DAC; own choice |
| `DAC_STEP`    | 2       | sawtooth slope, codes per clock; own choice (see above) |
| `UREF`        | 125     | 1.5 V / 6 V x 500; own derivation |
| `R_REF`       | 63      | see above; own derivation |
| `A2_W`        | 10      | memory-2 address, `address'` in -512..511; own choice |
| `NI_W`, `AB_W`| 12, 10  | widths of `nI` and of `a`, `b`; own choice |
| `SYNC_STAGES`, `EXT_LAT` | 2, 0 | comparator synchroniser, external latency; own choice |

## Where this implementation departs from or goes beyond the reference design

* **Table sizes.** The reference prototype fits the whole controller,
  memories included, into 163 logic elements, so its tables must be far
  smaller than those here. This design uses full-range tables (60,416 bits in
  total, most of it memory 3). How the original tables were reduced is not
  known.
* **Gain range.** The reference experiments use KP from 0.01 to 5. With
  `A2_W = 10`, memory 2 spans the full duty range only for KP+KI ≥ 0.5. With
  `AB_W = 10`, `a` is clamped when KI/A > 0.25. Very small gains need wider
  `A2_W`/`AB_W`.
* **DAC rate.** The DAC is fed one code per system clock (500 MHz by
  default). A real DAC may need a slower sweep. In that case, hold each code
  for several clocks (a different memory-1 content or addressing), and adjust
  `EXT_LAT` and `R_REF`.
* **Own additions:** the sensing window and its no-trip rule, the saturating
  `nI`, the saturating programmable counter, the registered PWM output, the
  run-time table-write port, and reset values (`u` = max, `nI` = 0).
* **No soft start.** From 0 V the first periods have no trip (fully on). The
  output overshoots past Vref+, over-voltage forces the PWM off, and the loop
  then settles. A soft start is not part of this design.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
compares outputs against values computed independently in the testbench,
and it ends with a line `TB_RESULT checks=N failures=M`. Two system-level
testbenches use the full default configuration:

* `tb_dpwm_pol_top`: closed loop with the DAC/comparator and buck models
  (6 V, 10 µH, 105 µF; 20 mΩ inductor resistance and 100 mΩ capacitor ESR,
  both assumed). The sequence is soft start, a 0.01 A → 2.3 A → 0.01 A load
  step at 50 A/µs, a run-time reload of memories 2 and 3 for KP = 5 and
  KI = 0, and the same load steps again. In every switching period, a
  reference model in the testbench predicts the exact on-time from the
  recorded comparator input and checks it. The model also checks `y1`, the
  trip/over-voltage flags and `nI`. The output settles to 1.50 V ± 5 mV and
  stays within 1.27 to 1.74 V during the steps. The testbench also checks that
  each of these happened at least once: a trip, a period with no trip,
  over-voltage, an on-time cut in the sensing period, and a table reload.
* `tb_freq_response`: loop gain by sine injection at the sense point,
  1 kHz to 250 kHz, at KP = 5, KI = 0 with 0.01, 0.5 and 1 A, and at KP = 5,
  KI = 0.08 with 0.5 A. With this plant model, the crossover is about 35 kHz,
  with a phase margin of 60 to 68° and a gain margin above 16.5 dB. The
  integral term raises the 1 kHz loop gain by about 5 dB. The margins
  describe the model plant; they do not predict a particular board.

* `tb_io_characteristic`: the static characteristic with the loop open. The
  output voltage is swept from 0 to 1.8 V, with a linear KP = 5 table and
  then a nonlinear table (gain 5 near the reference, 15 further out), both
  loaded through the table port. Every on-time is checked against the curve
  computed from the sweep. The sweep shows the three regions: fully on below
  the bottom of the sweep, the table's curve, and the `y1 + 2` floor up to
  the 5-clock over-voltage minimum above Vref+.

To run a testbench with Verilator (5.x), from the directory above `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dpwm_pol_top \
        -Irtl -Itb -y rtl -y tb rtl/dpwm_pkg.sv tb/tb_dpwm_pol_top.sv -o sim
    ./obj_dir/sim

Replace `tb_dpwm_pol_top` with any other testbench name. The closed-loop
test simulates about 1.1 ms in under a second, and the frequency-response
test simulates about 64 ms in about 20 s. Lint the RTL with
`verilator --lint-only -Wall rtl/dpwm_pkg.sv rtl/dpwm_pol_top.sv -y rtl`.
