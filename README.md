# Three-phase SPWM controller for a variable-voltage, variable-frequency drive

An induction motor runs at a speed roughly proportional to its supply
frequency. To keep the flux, and so the available torque, constant, the
voltage has to follow the frequency (constant volts per hertz). This
controller produces the six gate pulses for a three-phase inverter bridge
using sinusoidal pulse-width modulation (SPWM). Both the fundamental
frequency and the amplitude of the output can be set. The design is small
enough for a low-cost FPGA:

* A **phase accumulator** produces the electrical angle.
* The **amplitude is stored as an angle** φ with modulation index m = cos φ.
  The product m·cos θ then comes from two cosine-table reads and an
  addition, with no multiplier.
* **One cosine table** serves all three phases through a 12-step schedule.
* A **counter and window comparator** per phase makes a centred,
  symmetric PWM pulse. The counter's wrap is also the sample clock of the
  phase accumulator.

Everything is synchronous to one clock. All slower rates are clock enables.

## Data flow

```
 data_in[7:0] ─┐                 ┌──────────── osc_tick (phase-1 counter wrap)
 sel[1:0] ─────┤ vvvf_interface  │
 en ───────────┤  freq, amp,     ▼
               │  phase source ─► phase_oscillator ── θ1 ─┬──────────────────┐
               └──────▲──────────────────────────────────│                  │
                      └── θ1 fed back (phasein)  phase_add120 ─ θ2 ─┐       │
                                                 phase_add120 ─ θ3 ─┤       │
 freq ─► vf_amplitude_lut ─┐ (USE_VF_LUT=1)                          ▼       ▼
 amp (bus) ────────────────┴──► φ ───────────────────────► amplitude_module (one cos_lut)
                                                             │ v1, v2, v3 (8 bit)
 clock_divider ── tick ──► counter_comparator ×3 ◄───────────┘
                              │
                              ├─ pulse[2:0]  SPWM of phases 1..3
                              └─ gate[5:0]   two switches per inverter leg
```

## Number formats

Every block depends on these conventions.

| Quantity | Width | Meaning |
|---|---|---|
| phase θ | 10 bit | code k = k·360/1023 degrees; all ones is 360°. It wraps modulo 1024. |
| 120° step | 10 bit | 0101010101b = 341 = 1023/3 |
| amplitude angle φ | 8 bit | Same units as the phase, so it can be added to θ directly. Code 255 ≈ 89.7°. The modulation index is m = cos φ: φ = 0 gives full amplitude and φ = 255 gives almost none. |
| cosine table address | 8 bit | θ[9:2]; code i = i·360/255 degrees |
| cosine table entry | 8 bit | ⌊127 + 127·cos⌋: 254 = +1, 127 = 0, 0 = −1 (address 85, 120°, reads 63) |
| modulator output v | 8 bit | 127 + 127·cos φ·cos θ, range 0..254 |
| frequency word | 8 bit | phase increment per carrier period |

The scale i·360/255 for the table address is what makes the table
symmetric: cos(i) = cos(255 − i). Only addresses 0..127 are stored. An
address in the upper half is folded by inverting its bits.

## Amplitude without a multiplier (`amplitude_module`)

The modulator needs v = m·cos θ for each phase. With m = cos φ,

    cos φ · cos θ = [cos(θ + φ) + cos(θ − φ)] / 2

In offset form the two table values are 127 + 127·cos(θ±φ). Their sum
shifted right by one is therefore 127 + 127·cos φ·cos θ, which is already
in the offset form the comparator expects. The datapath is one 10-bit
add/subtract, one table read, a 9-bit adder and a shift.

The module computes the two reads of each of the three phases with a
single synchronous table. A step counter runs 0..11 on every clock:

| step | action |
|---|---|
| 0 | snapshot φ and θ1..θ3; table address = (θ1 + φ)[9:2] |
| 1 | capture table output as cos(θ1 + φ) |
| 2 | table address = (θ1 − φ)[9:2] |
| 3 | v1 ← (cos(θ1 + φ) + table output) >> 1 |
| 4..7, 8..11 | the same for θ2 and θ3 |

All three outputs are refreshed every 12 clocks. A change at the inputs
reaches all outputs within 23 clocks. The table's truncation to 8 bits and
its 256-step angle resolution keep the result within about ±2.5 codes of the
exact 127 + 127·cos φ·cos θ.

## Phase oscillator and configuration bus

`vvvf_interface` holds three registers written from `data_in` on a rising
clock edge while `en` is high:

| `sel` | register |
|---|---|
| 00 | amplitude angle φ |
| 01 | frequency word |
| 10 | initial phase bits [7:0] |
| 11 | initial phase bits [9:8], from `data_in[1:0]` |

While `en` is low the registers hold their values. The phase accumulator
loads `source + freq` on every oscillator strobe, and the source comes from
the interface:

* **`en` low:** the source is the accumulator's own value (`phasein`), so the phase is
  a sawtooth that advances by `freq` per carrier period.
* **`en` high:** the source is the stored initial phase, so the accumulator
  sits at *initial phase + freq* until `en` falls. It then continues from there.

Reset clears all registers, so the phase starts at zero.

## Counter-comparator and gate pulses (`counter_comparator`)

A 9-bit counter steps 0..511 on each divider tick. At the wrap it does two
things:

* It latches the modulator output v for the next carrier period.
* It emits the oscillator strobe `osc_tick`, at 1/512 of the counter rate.

During the period the output `out` is low while 256 − v ≤ count < 256 + v
and high otherwise. The low pulse is therefore 2v counts wide and centred
in the period, which gives quarter-wave and half-wave symmetry. Note the
sense: the high time is 1 − v/256 of the period. It is shortest at the
positive peak of the sine and about 50 % at its zero crossings.

The two switches of a leg are split at the zero crossing of the sinusoid.
The positive half is v > 127.

* **Positive half:** `gate_p` carries `out` and `gate_n` is off.
* **Negative half:** `gate_n` carries the inverted `out` and `gate_p` is off.

The two are never on together, and an assertion checks this. No dead time
is inserted.

Only the phase-1 counter's strobe drives the oscillator. The three counters
share the divider tick and reset, so they stay in step.

## Timing and frequencies

With a clock of f_clk and the divider ratio DIV:

* counter rate f_clk / DIV
* carrier (PWM) frequency f_c = f_clk / (512 · DIV)
* fundamental f_out = f_c · freq / 1024 = f_clk · freq / (DIV · 524288)

The default DIV = 100 assumes a 50 MHz clock. That gives a 976.6 Hz carrier
and 0.954 Hz per frequency step, so 50 Hz is word 52 and the 8-bit word
reaches 243 Hz. There are 1024/freq carrier periods per output cycle, about
20 at 50 Hz.

Latency from a bus write to the pulses:

* one clock into the register
* up to one carrier period until the next oscillator strobe
* up to 23 clocks through the modulator
* the rest of that carrier period before the comparator latches the new value

The outputs are registered, one clock behind the counter.

## Volts-per-hertz profile (`vf_amplitude_lut`)

With `USE_VF_LUT = 1`, the amplitude angle comes from a 256-entry table
indexed by the frequency word instead of from the bus. The table holds
φ = acos(min(f / F_BASE, 1)) in phase units. The modulation index is
therefore 1 at and above the base frequency (F_BASE = 52, i.e. 50 Hz at the
default clock) and falls linearly with frequency below it. The table is
computed at elaboration time from that formula. With `USE_VF_LUT = 0` (the
default) this table is not used and the bus amplitude applies.

## Parameters of the top (`vvvf`)

| Parameter | Default | Meaning |
|---|---|---|
| `DIV` | 100 | board clock to counter clock ratio |
| `F_BASE` | 52 | frequency word of the base (50 Hz) point of the V/f table |
| `USE_VF_LUT` | 0 | 1: amplitude from the V/f table, 0: from the bus |

Ports: `clock`, `reset` (synchronous, active high), `data_in[7:0]`,
`sel[1:0]`, `en`, `pulse[2:0]` (SPWM of phases 1..3) and `gate[5:0]`.
The gate outputs pair up per leg:

* `gate[0]`, `gate[1]`: phase 3
* `gate[2]`, `gate[3]`: phase 2
* `gate[4]`, `gate[5]`: phase 1

In each pair the first is the positive-half switch and the second the
negative-half switch.

## Design decisions and how far to trust them

Where the design follows the source:

* the block partition and the bus encoding
* the 10-bit phase and the 120° constant
* the cosine-identity amplitude scheme with one shared table and a 0..11
  schedule
* the offset cosine table with its half-table symmetry
* the 0..511 counter with a window comparator
* the oscillator clocked at 1/512 of the counter
* the zero-crossing split into two gate pulses
* the V/f profile (index 1 at 50 Hz and above, linear below)

Where this design chose for itself:

* **One clock.** The divided clocks became clock enables.
* **Phase wrap.** The phase wraps modulo 1024 and keeps the remainder,
  instead of being forced to zero.
* **Phase source while `en` is high.** It is the initial-phase register.
* **High phase bits.** They come from `data_in[1:0]`.
* **Schedule for phases 2 and 3.** Steps 4..11 and the input snapshot at
  step 0 were added.
* **Half-open window** in the comparator, so the low time is exactly 2v.
* **Comparator input latch.** The input is latched once per carrier period.
  Without it, a sign change of the sinusoid left a gate sliver of a few
  clocks at the start of the period while the modulator was still
  updating.
* **Registered outputs.**
* **Reset.** Synchronous, active high.
* **Clock and ratios.** The 50 MHz clock, DIV = 100 and F_BASE = 52 are
  assumptions.
* **One shared modulator.** A single `amplitude_module` serves all three
  phases, rather than one modulator per phase.

Not covered: dead time between the two switches of a leg, closed-loop
speed control, and everything after the gate pulses. That includes the
3.3 V to 12 V level shifter, the IGBT inverter and the motor.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
a model computed independently, with real-number trigonometry in the
testbench, and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_phase_add120` | all 1024 inputs |
| `tb_cos_lut` | all 256 addresses against the formula without folding, plus the read latency |
| `tb_vf_amplitude_lut` | every frequency word, with the modulation index within one angle step of f/F_BASE |
| `tb_phase_oscillator` | random increments and strobes; the sawtooth period ⌈1024/freq⌉ |
| `tb_vvvf_interface` | random bus traffic against a register model |
| `tb_amplitude_module` | 400 random operating points: exact value, accuracy against the ideal product, latency ≤ 23 clocks |
| `tb_counter_comparator` | every clock against a counter/window model; per period the high time 512 − 2v, symmetry, one strobe, and the gate split on both half cycles |
| `tb_clock_divider` | the tick period for DIV = 1, 7 and 100 |
| `tb_vvvf` | End to end at DIV = 16, with the two amplitude sources side by side (see below). |
| `tb_vvvf_full` | All defaults (DIV = 100). It programs 50 Hz and runs more than one full output cycle. |
| `tb_vvvf_bus_hold` | Enable held high while the select cycles every clock. The phase must stay frozen and every period must carry the same pulses. |

`tb_vvvf` runs two controllers side by side, one with the bus amplitude
and one with the V/f table. The scoreboard `vvvf_monitor` models the
registers, the phase accumulator and the modulator. In every carrier
period with no recent bus activity it checks the high time of all three
SPWM outputs and all six gate outputs to the clock. The testbench fails if
any of these mechanisms never occurs:

* bus writes of all four kinds
* enable held across a strobe
* phase wrap-around
* both half cycles
* V/f operation below and above base

To simulate with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vvvf_pkg.sv tb/tb_vvvf.sv --top-module tb_vvvf
./obj_dir/Vtb_vvvf
```

Substitute any other testbench name. `tb_vvvf_full` simulates about
1.3 million clocks in under a second.

## Files

* `rtl/vvvf_pkg.sv`: widths, constants, the select enum and the
  table-generating functions
* `rtl/vvvf.sv`: the top level
* `rtl/vvvf_interface.sv`, `rtl/phase_oscillator.sv`, `rtl/phase_add120.sv`,
  `rtl/cos_lut.sv`, `rtl/amplitude_module.sv`, `rtl/vf_amplitude_lut.sv`,
  `rtl/counter_comparator.sv`, `rtl/clock_divider.sv`: the blocks
* `tb/tb_*.sv`: the testbenches
* `tb/vvvf_monitor.sv`: the end-to-end scoreboard
