# Sine-triangle PWM gate controller for a single-phase H-bridge inverter

A single-phase full-bridge inverter makes an AC voltage from a fixed DC supply
by switching its two legs. Leg a has an upper switch S11 and a lower switch
S12. Leg b has S21 and S22. The load sits between the two leg midpoints:

| switches on | load voltage v_o |
|-------------|------------------|
| S11 + S22   | +V_in            |
| S12 + S21   | -V_in            |
| S11 + S21, or S12 + S22 | 0 (freewheeling) |
| S11 + S12, or S21 + S22 | short circuit of the supply: must never happen |

This RTL generates the four gate signals in an FPGA clocked at 100 MHz. It
holds three control techniques side by side:

* **Symmetrical (180°) control.** A plain 50 Hz square wave. The load sees
  +V_in for half a period and -V_in for the other half.
* **Bipolar SPWM.** A 50 Hz sinusoidal reference v* is compared with a 5 kHz
  (or 10 kHz) triangular carrier v_p. While v* > v_p the diagonal pair
  S11/S22 conducts, otherwise S12/S21. The load voltage takes only two
  values, +V_in and -V_in. Its average over a carrier period follows the sine.
* **Unipolar SPWM.** Each leg has its own comparison. Leg a compares v* with
  the carrier and leg b compares -v* with the same carrier. The legs switch
  independently, so the load sees three levels: +V_in, 0 and -V_in. The
  output ripple is at twice the carrier frequency. For the same carrier
  frequency this gives a much smoother load current than bipolar switching.

Each leg of every technique passes through a dead-time stage. That stage keeps
both switches of the leg off for 4 µs whenever the leg changes state.

## Block structure

```
spwm_inverter_top
├── square_wave_gen          symmetrical control
│   └── dead_time ×2         one per leg
├── bipolar_spwm
│   ├── triangle_carrier
│   ├── sine_reference
│   └── dead_time ×2
└── unipolar_spwm
    ├── triangle_carrier
    ├── sine_reference ×2    v* (index 0) and -v* (index 299)
    └── dead_time ×2
spwm_pkg                     shared types (hbridge_gates_t, level_t) and the sine-table formula
```

The gate outputs are `hbridge_gates_t` structs, packed as `{s11, s12, s21, s22}`.
A 1 means "switch on". In hardware these outputs go through isolating
optocouplers to the gate-drive inputs of the IGBT power modules. The
optocouplers, the IGBT modules and the bridge itself are outside this RTL.

## Numbers: everything counts 100 MHz clock cycles

All carrier and reference values are unsigned integers on a 0..20000 scale.

| quantity | cycles | at 100 MHz |
|----------|--------|-----------|
| square-wave half period | 1,000,000 | 10 ms, i.e. 50 Hz |
| carrier period, `switch_fast`=0 | 2 × 10000, step 2 | 5 kHz |
| carrier period, `switch_fast`=1 | 2 × 5000, step 4 | 10 kHz |
| sine sample step | 3334 | 33.34 µs |
| sine period | 600 × 3334 = 2,000,400 | 20.004 ms, 49.99 Hz |
| dead time | 400 | 4 µs |

The carrier peaks at 20000 in both carrier settings. So changing the carrier
frequency does not change the modulation depth. The reference is
`2000 + table[k]`, where `table[k]` runs from 0 to 16000. The reference
therefore spans 2000..18000 around the middle of the carrier. That is an
amplitude modulation index m_a = 8000 / 10000 = 0.8. The frequency
modulation index is m_f = 2,000,400 / 20000 ≈ 100 at 5 kHz and ≈ 200 at
10 kHz.

## The carrier (`triangle_carrier`)

In cycle n of a period, the carrier value is `STEP * min(n, 2*HALF - n)`.
It is built incrementally: the value rises by STEP for HALF cycles, then
falls by STEP for HALF cycles. `period_start` is high in the cycle where the
value is 0.

`switch_fast` is sampled only in the last cycle of a period, and during
reset. A change therefore takes effect at the next period boundary, and the
triangle is never broken in the middle. `fast_active` shows which setting is
in use.

## The sinusoidal reference (`sine_reference`)

The reference comes from a 600-entry table, stepped once every 3334 cycles.
The table is not stored as constants. A constant function in `spwm_pkg`
computes it at elaboration:

    table[k] = 100 * round(80 * (1 + sin(2*pi*k/600)))        k = 0..599

That gives values from 0 to 16000 in steps of 100. Synthesis turns the table
into a ROM. The output register holds `BIAS + table[index]`. It changes one
clock after the sample timer expires. `wrap` marks the last cycle of
index 599.

The unipolar modulator needs the inverted reference -v*. It gets it from a
second `sine_reference` whose index starts at `START_B` = 299 instead of 0.
An exact half-period shift would be 300 samples. The value 299 is kept from
the original controller. It leaves leg b 1/600 of a period (0.6°) early. To
get an exact inversion, set `START_B` to 300.

## Modulators

The comparison is `carrier < reference`: while it holds, the leg's upper
switch should be on. The result is registered, one clock after the carrier
and reference registers.

* `bipolar_spwm` takes the leg-a command from its one comparison. The leg-b
  command is the inverse. Both legs switch together, diagonally.
* `unipolar_spwm` has two comparisons, one per leg, with the two references.
  It sets S11 = (carrier < v*) and S21 = (carrier < -v*). Each lower switch
  is the complement of its upper switch.
* `square_wave_gen` needs no carrier. A counter over 2,000,000 cycles gives
  the command "leg a up, leg b down" for the first half and the reverse for
  the second half.

## Dead time (`dead_time`)

This is the part whose timing needs the most care. One `dead_time` block
serves each leg. Its input `cmd` says which switch of the leg should conduct:
1 for the upper switch, 0 for the lower one. The block keeps a saturating
count of how many clock edges `cmd` has been unchanged.

* On the first edge that sees a new `cmd` value, both outputs go low. This
  turns the conducting switch off at once.
* The newly selected switch turns on DEAD_CYCLES edges later, and only if
  `cmd` has not changed again in the meantime.
* A command pulse shorter than DEAD_CYCLES therefore never reaches the gates,
  and the leg stays blanked for its whole length. Near the zero crossings of
  the unipolar modulator this removes the narrowest pulses. That is the usual
  dead-time distortion of the output voltage.
* Reset drives both outputs low and acts like a change to the lower switch.
  After reset a leg commanded "down" turns its lower switch on after
  DEAD_CYCLES edges. A leg commanded "up" turns its upper switch on one edge
  later, because that first edge counts as a change.

An assertion in `dead_time` checks that `upper` and `lower` are never high
together.

Dead time moves the output: during a blanking interval the leg voltage
depends on the direction of the load current through the freewheeling
diodes. The time-averaged output is therefore a little smaller than the
ideal value. The tests measure about 0.81–0.82 V_in near the reference peak
against the ideal 0.8. (In the test the model counts only the cycles where
both legs are driven.)

## Interface of the top level

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 100 MHz clock |
| `rst` | in | 1 | synchronous, active high; all gates off while asserted |
| `switch_fast` | in | 1 | carrier 5 kHz (0) or 10 kHz (1), for both SPWM modulators |
| `sq_gates` | out | 4 | symmetrical control gates `{s11,s12,s21,s22}` |
| `bip_gates` | out | 4 | bipolar SPWM gates |
| `uni_gates` | out | 4 | unipolar SPWM gates |

The submodules also bring out their carrier and reference values
(`carrier`, `ref_a`, `ref_b`) for observation. The top leaves them
unconnected.

## Where this design departs from the original controller

The original controller existed as three separate FPGA programs, one per
technique. This RTL follows its numbers: 600 samples, the 3334-cycle sample
step, the +2000 bias, MH = 10000/5000 with steps 2/4, the 2,000,000-cycle
square wave and the 299-sample offset. It makes these choices of its own:

* The three techniques sit side by side in one top level, each with its own
  outputs. They are not separate builds.
* The outputs are named after the switches (S11, S12, S21, S22). The original
  used PWM_1..PWM_4, and the mapping differed between its programs.
* Every leg gets a real 4 µs dead time. The original blanked in different ways
  in each program: a fixed offset of 700 carrier units in the unipolar one,
  shifted counter thresholds in the square-wave one, and none in the bipolar
  one.
* The carrier period is exactly 2×HALF cycles. The original held the bottom
  value for one extra cycle. The carrier setting changes only at a period
  boundary.
* The sine table is computed from its formula, so it has no hand-typed
  entries.
* The reference register holds the table value from reset onwards. The
  original held 0 until the first sample step.
* Square-wave control puts the positive half-wave first.
* Reset is synchronous.

The fault output of the IGBT modules is not used.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference models in the testbenches use
closed-form expressions: the carrier as `STEP*min(n, 2*HALF-n)`, the
reference from `$sin` of the cycle count, and the square wave from the cycle
count. They do not copy the design's registers. `tb/dead_time_ref.sv` predicts
a leg's gates from the command history. `tb/hbridge_model.sv` is a behavioural
model of the bridge. It turns gates into output levels and flags shorted legs.

| testbench | what it shows |
|-----------|---------------|
| `tb_dead_time` | exact blanking on random command runs, longer and shorter than the dead time; reset mid-run |
| `tb_triangle_carrier` | carrier value every cycle; periods of 20000/10000 cycles; switch only at boundaries |
| `tb_sine_reference` | every table value against the formula and the first printed entries; the 3334-cycle step; wrap |
| `tb_square_wave_gen` | gates every cycle; half-waves of HALF−DT cycles; 2×HALF period; no zero state |
| `tb_bipolar_spwm` | full-size run over one fundamental at 5 kHz and half a fundamental at 10 kHz; ≈100 pulses per fundamental; two-level output; average ±0.8·V_in at the peaks |
| `tb_unipolar_spwm` | full-size run; three-level output with pulses at twice the carrier rate; no wrong-sign pulses away from zero crossings; average ±0.8·V_in |
| `tb_spwm_inverter_top` | all three techniques at default sizes: 3.3 M cycles across the carrier switch and a reset; each mechanism counted |
| `tb_output_thd` | output-voltage distortion of bipolar and unipolar switching over one full period (see below) |

The top-level test runs at the default parameters. It takes about two
seconds of simulation. To run one testbench with Verilator 5 from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl rtl/spwm_pkg.sv tb/tb_spwm_inverter_top.sv \
  --top-module tb_spwm_inverter_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every module in `rtl/` also
passes `verilator --lint-only -Wall`. The only warnings are about outputs
deliberately left unconnected.

## Output quality

`tb_output_thd` runs the design at its default sizes for one 20 ms period
with the 5 kHz carrier. It passes the gates through an ideal bridge model,
with a blanked leg counted as 0 V. It then computes the distortion of the
load voltage, THD = sqrt(Vrms² − V1²) / V1.

| switching | fundamental | voltage THD | ideal sine-triangle PWM, m_a = 0.8, m_f = 100 |
|-----------|-------------|-------------|-----------------------------------|
| bipolar   | 0.80 V_in   | 141 %       | ≈ 146 % |
| unipolar  | 0.75 V_in   | 82 %        | ≈ 77 % |

The differences from the ideal come from the 4 µs dead time. For unipolar
switching the 299-sample reference offset also contributes. Near the zero
crossings the unipolar pulses are narrower than the dead time and are lost.
The real load voltage during blanking depends on the load current, which is
not modelled here.

## Changing it

* **Clock frequency.** Scale `HALF_*` of `triangle_carrier`,
  `SAMPLE_CYCLES`, `HALF_CYCLES` and `DEAD_CYCLES` together. Keep
  `HALF * STEP` at 20000, or change `BIAS` and `MID` to match.
* **Modulation index.** `MID` sets the sine amplitude. `BIAS` centres it on
  the carrier: for a 0..20000 carrier, `BIAS = 10000 - MID`.
* **Output frequency.** `SAMPLE_CYCLES` sets the output frequency, which is
  f = 100 MHz / (600 × SAMPLE_CYCLES).
* **Exact -v* for unipolar switching.** Set `START_B` to 300.
