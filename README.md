# PID-like fuzzy logic controller

A small digital controller that takes the set point `yd` and the measured plant
output `yp` as 8-bit samples and returns an 8-bit control action `u`. Instead of
a linear PID law it uses a two-input fuzzy inference system (eight fuzzy sets
per input, 64 rules, singleton outputs, centroid defuzzification) and builds the
three PID behaviours out of it:

* a **PD fuzzy controller** works on the error `e(n)` and its rate of change
  `r(n) = e(n) - e(n-1)`;
* a second, identical PD fuzzy controller becomes a **PI controller in
  incremental form** when its two inputs are exchanged, the derivative gain is
  replaced by the integral gain and its output is treated as an increment and
  accumulated: `u_PI(n) = u_PI(n-1) + du_PI(n)`;
* the **PID** action is the sum of the two.

Two selection lines pick which of the three the chip outputs. Four 8-bit gains
(`Kp`, `Kd`, `Ki`, `Ko`) scale the fuzzy universes at run time. One control
action takes 17 clock cycles; the published implementation of this
architecture (on a 150k-gate Xilinx Virtex device, 1394 slices) reached
40.295 MHz, i.e. about 0.42 us per action, far below the millisecond-to-second sampling periods of the industrial loops it
is meant for.

The RTL is synthesizable SystemVerilog-2017. The input fuzzy set memories (two
per PD fuzzy controller) and the rule memories are written as arrays whose
contents are computed at elaboration time, so they map onto block RAM/ROM.

## Block structure

```
pidflc_top
 |- error / rate registers, PI accumulator, output selection
 |- pdflc u_pd_flc            inputs (e, r), gains (Kp, Kd, Ko)
 |- pdflc u_pi_flc            inputs (r, e), gains (Kp, Ki, Ko), output = du_PI
      |- gain_in  x2          4.4 gain latch, multiply, shift to 0..255
      |- fuzzifier x2         input_set_memory + incrementer + inverter
      |- inference_engine     active_rule_selector + rule_memory + minimum
      |- defuzzifier          multiplier, two accumulators, seq_divider
      |- gain_out             shift back to signed, 4.4 output gain
```

| file | role |
|---|---|
| `rtl/pidflc_pkg.sv` | widths, number formats, rule table, output singletons, membership function, helpers |
| `rtl/pidflc_top.sv` | the controller chip |
| `rtl/pdflc.sv` | one PD fuzzy controller |
| `rtl/gain_in.sv`, `rtl/gain_out.sv` | input and output gain blocks |
| `rtl/input_set_memory.sv`, `rtl/fuzzifier.sv` | fuzzification |
| `rtl/active_rule_selector.sv`, `rtl/rule_memory.sv`, `rtl/inference_engine.sv` | inference |
| `rtl/defuzzifier.sv`, `rtl/seq_divider.sv` | centroid defuzzification |

## Controller type selection

| `mi` | `mo` | output `u` |
|---|---|---|
| 0 | 0 | PD: `u_PD(n)` |
| 0 | 1 | PI: `u_PI(n)` |
| 1 | x | PID: `u_PD(n) + u_PI(n)` (saturated) |

Both PD fuzzy controllers compute every action. The PI accumulator is updated
only in PI and PID modes and holds its value in PD mode. Each PD fuzzy
controller has its own three gain latches; at `start` the latches of a
controller are loaded from the gain ports only if the selection lines enable
it, so the PI gains survive while the chip runs as a pure PD controller and
vice versa. Each PD fuzzy controller also has its own rule table
(`pidflc_top` parameters `PD_RULES`, `PI_RULES`), both defaulting to the table
below.

## Number formats

| quantity | format |
|---|---|
| `yd`, `yp`, `e`, `r`, `u` | 8-bit two's complement; 1.0 is 128, so the universe is [-1, 1) |
| gains `kp`, `kd`, `ki`, `ko` | 8-bit unsigned, 4 integer + 4 fraction bits: `8'h10` = 1.0, range 1/16 .. 15.94 |
| inputs of the fuzzy inference system | 8-bit unsigned 0..255, code 128 = zero |
| membership / applicability degree | 6 bits, 63 = full membership |
| fuzzy set number | 3 bits (8 sets per variable) |
| rule consequent | 8-bit singleton position, 0..255 |

`e`, `r`, every gain product, the PI accumulator and the PID sum saturate at
the 8-bit limits. Gain products are rounded to nearest with halves away from
zero, and the centroid is rounded to nearest. Unbiased rounding matters: the PI
part integrates the output of its gain block, and a truncating design drifts
measurably away from an ideal (floating-point) fuzzy PI controller.

## How one PD fuzzy controller works

**Gain and shift.** The input gain block multiplies the signed input by its
4.4 gain and then adds 2^7, which for an 8-bit value is just an inversion of
the MSB; the fuzzy inference system therefore only ever sees unsigned codes.
The output gain block does the reverse in the reverse order: invert the MSB
(subtract 2^7), then multiply by `Ko`.

**Fuzzification by table lookup.** Each input addresses a 256 x 9-bit memory.
A word holds the number `i` of the first active fuzzy set and the membership
`mu_i` in it. Neighbouring sets are required to overlap so that memberships add
up to one, hence the second active set is `i+1` (an incrementer) with
membership `1 - mu_i`. With 6-bit memberships and "one" represented as 63,
`1 - mu_i` is exactly `~mu_i` (an inverter). Any membership shape that obeys
this rule can be stored.

The default content: eight symmetric triangles (NB, NM, NS, NZ, PZ, PS, PM, PB)
whose peaks lie 32 codes apart at shifted codes 16 + 32k (value -0.875 + 0.25k),
NZ and PZ crossing at zero, and NB/PB held at full membership beyond their
peaks. Inside a triangle the membership is
`mu_i = 63 - round(63 * f / 32)`, with `f = (x - 16) mod 32`. Above the
last peak the memory stores set 6 with membership 0, so that the incremented
set 7 gets full membership and the set number never wraps.

**Active rule selection.** With two inputs and two active sets per input only
2^2 = 4 of the 64 rules can fire. A 2-bit counter walks them in four
consecutive clocks; counter bit 0 chooses between the two active sets of input 1
(error axis), bit 1 between those of input 2 (rate axis). The two selected set
numbers form the 6-bit rule memory address `{set1, set2}`; the minimum circuit
forms the rule's applicability degree `min(mu_set1, mu_set2)`.

**Rule memory.** 64 words of 8 bits: each rule stores the position of its
output singleton. Output singletons NB..PB sit evenly between -1 and 1, at
shifted codes `round(256k/7)` clipped to 255, i.e. 0, 37, 73, 110, 146, 183,
219, 255. The default rule table (consequent per rate row and error column):

| r \ e | NB | NM | NS | NZ | PZ | PS | PM | PB |
|---|---|---|---|---|---|---|---|---|
| NB | NB | NB | NB | NM | NM | NS | NZ | PZ |
| NM | NB | NB | NM | NM | NS | NZ | PZ | PZ |
| NS | NB | NM | NM | NS | NZ | PZ | PZ | PS |
| NZ | NM | NM | NS | NZ | PZ | PZ | PS | PM |
| PZ | NM | NS | NZ | NZ | PZ | PS | PM | PM |
| PS | NS | NZ | NZ | PZ | PS | PM | PM | PB |
| PM | NZ | NZ | PZ | PS | PM | PM | PB | PB |
| PB | NZ | PZ | PS | PM | PM | PB | PB | PB |

**Centroid defuzzification.** The four (beta_k, mu_k) pairs arrive one per
clock. A multiplier forms mu_k x beta_k (14 bits), Accumulator_1 sums those
(16 bits), Accumulator_2 sums mu_k (8 bits), and a sequential restoring
divider produces the 8-bit crisp output `z = sum(mu*beta) / sum(mu)`, one
quotient bit per clock. The quotient always fits 8 bits because it is a
weighted mean of 8-bit values. A zero weight sum cannot occur with
complementary memberships; if custom memories produce one, the divider returns
the zero code 128.

Serialising the four rules through one multiplier and one divider trades
latency for area, which is the point of the architecture.

## Timing

`start` is sampled at a rising edge (call it edge 0) if the controller is not
`busy`; `yd`, `yp`, the selection lines and the enabled gain latches are
captured there. The result appears with `done` after edge 17:

| edge | what happens |
|---|---|
| 0 | `e`, `r` registered; gain latches loaded; `e(n-1)` updated |
| 1 | input gain and shift registered |
| 2 | input set memories read |
| 3 .. 6 | rules 0..3 read from the rule memory, minimum registered |
| 4 .. 7 | accumulators update |
| 8 | divider loads the sums |
| 9 .. 16 | eight divider steps |
| 17 | output gain, PI accumulation, selection; `u` and `done` registered |

`done` is a one-cycle pulse; `u` holds until the next `done`. `busy` falls in
the same edge that raises `done`, so the next `start` can be given while `done`
is high. A `start` while `busy` is ignored. The 17-cycle action time is the
published figure; how the cycles are split between stages is this
implementation's choice.

Reset (`rst_n`, synchronous, active low) clears `e(n-1)`, the PI accumulator,
the output and all gain latches. The memories have no reset.

## Where this RTL fills gaps

The architecture, block structure, bit widths (8-bit gain latches in 4.4
format, 3-bit set numbers, 6-bit memberships, 8-bit consequents, the 14/16/8-bit
defuzzifier datapath), the selection table, the 64-rule table and the 17-cycle
action time follow the published design. These points were not specified and
are choices made here:

* the 8-bit two's complement format of `yd`, `yp` and `u`, with 1.0 = 128;
* the `start` / `done` / `busy` handshake and the split of the 17 cycles;
* rounding (to nearest, halves away from zero) and saturation everywhere;
* exact positions of the input triangles and output singletons (only -1, 0 and
  1 are given; the sets are drawn evenly spaced and symmetric);
* which counter bit drives which multiplexer, and the rule memory address order;
* the sequential restoring divider;
* gain latches loading only for the enabled PD fuzzy controller, and the PI
  accumulator holding in PD mode;
* synchronous-read memories (block RAM behaviour).

The published chip has 61 I/O pins; this top has 63 port bits (the control
pins `start`, `done`, `busy`, `rst_n` are this implementation's). The A/D and
D/A converters and the plant of the surrounding loop are not part of the RTL.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values come
from `tb/tb_ref_pkg.sv`, a separately written integer model of the controller
(membership formula, the rule table typed in again from set names, singleton
formula, rounding). Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gain_in`, `tb_gain_out` | rounding, saturation, shift, latch holding while not loaded |
| `tb_input_set_memory`, `tb_fuzzifier` | all 256 input codes, `mu_i + mu_(i+1) = 63`, latency |
| `tb_active_rule_selector`, `tb_rule_memory`, `tb_inference_engine` | rule order, all 64 consequents, minimum, four-cycle sequence |
| `tb_defuzzifier` | rounded centroid of random rule sets, zero-weight case, latency |
| `tb_pdflc` | 1500 random actions against the model, 15-cycle latency, a second instance with a different rule table |
| `tb_pidflc_top` | 3000 random actions in all modes at default parameters, 17-cycle latency; counts and requires each mechanism: PD, PI and PID modes, saturation of error, rate, input gain, output gain, PI accumulator and PID sum, both shoulder regions of the input sets, gain latches held for a disabled controller, `start` ignored while busy |
| `tb_closed_loop` | the controller in a unity-feedback loop with the plant models below, 0.5 step, 100 samples per case, compared with a floating-point fuzzy controller |

The closed-loop test uses the two discrete plants

```
G1(z) = 0.1903 z^-1 / (1 - 0.9048 z^-1)                                  T = 0.1 s
G2(z) = z^-2 (0.02511 z^-1 + 0.01997 z^-2) / (1 - 1.48 z^-1 + 0.5028 z^-2)   T = 0.25 s
```

in PD, PI and PID mode (gains chosen by trial, as no values are given). The
mean difference between the hardware and the floating-point step responses is
required to stay below 0.01 and that of the control actions below 0.02. Measured:

| mode | plant | mean diff, step response | mean diff, control action |
|---|---|---|---|
| PD | G1 | 0.0006 | 0.0003 |
| PD | G2 | 0.0018 | 0.0012 |
| PI | G1 | 0.0082 | 0.0046 |
| PI | G2 | 0.0019 | 0.0027 |
| PID | G1 | 0.0045 | 0.0026 |
| PID | G2 | -0.0004 | -0.0015 |

The fuzzy PI loops with these gains are oscillatory, so their differences are
the most sensitive to quantisation; with other gains the PI differences can
exceed 0.01 (a sweep is built in: run `tb_closed_loop` with `+sweep`).

What has not been checked: timing closure on any FPGA, and behaviour with
membership memories whose neighbouring sets do not sum to one.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pidflc_pkg.sv tb/tb_ref_pkg.sv tb/tb_pidflc_top.sv \
    --top-module tb_pidflc_top -o sim
./obj_dir/sim
```

Replace `tb_pidflc_top` with any other testbench name. Every run takes
seconds.

## Changing it

* **Rule tables**: override `PD_RULES` / `PI_RULES` on `pidflc_top` with a
  `pidflc_pkg::rule_table_t` (consequent set numbers, indexed `[rate][error]`).
* **Membership functions**: edit `default_mf_word` in `pidflc_pkg`; keep the
  first-set / complementary-membership encoding.
* **Output singletons**: edit `SINGLETON` in `pidflc_pkg`.
* The widths are package constants; the rule memory address, the selector and
  the defuzzifier widths follow the 3-bit set number and 6-bit membership and
  would need review if those change.
