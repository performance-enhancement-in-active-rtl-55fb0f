# FPGA controller for a three-phase shunt active power filter

A shunt active power filter (APF) sits in parallel with a non-linear load.
It measures the load current, works out the part of it that is harmonic or
reactive, and makes a voltage-source inverter inject exactly that part, so
the grid only has to supply a sinusoidal current in phase with its voltage.
This RTL is the digital half of such a filter: everything between the ADC
samples and the six gate signals of the inverter, in one clock domain, with
no processor. Its two central pieces are

* a **compact three-phase PLL** that finds the grid phase with a single
  quarter-wave sine table, shift-only loop gains and an FSM that reuses the
  table six times per step, and
* a **space-vector hysteresis ("directed") current controller** that picks
  the inverter switching state directly from the sector and size of the
  current-error vector and the previous switching state, using a small table
  instead of modulators or multipliers.

Around them sit a synchronous-reference-frame (SRF) current-reference
generator and a DC-link voltage regulator.

## Signal flow

```
 va,vb,vc ──► pll3ph ──► sin/cos of the 3 phases, step strobe
                              │
 ila,ilb,ilc ────────────► current_ref_gen ◄── idc ◄── dc_voltage_regulator ◄── vdc, vdc_ref
                              │ ira,irb,irc (inverter reference)
 ica,icb,icc ──────────────► (−) current error, saturated to 16 bits
                              │
                  direct_current_controller ──► pwma, pwmb, pwmc (upper switches)
```

`apf_controller` is the top. The ADCs, gate drivers, protection and the
inverter itself (switches, dc capacitor, ac inductors) are outside: the
top's ports are their signals.

### Number formats

All formats are choices of this implementation.

| quantity | format |
|---|---|
| voltages, currents (ADC samples, references, tolerances) | 16-bit signed, 1 p.u. = 2^14 (range ±2 p.u.) |
| sine / cosine | 16-bit signed, amplitude 32767 (Q15) |
| phase | 32-bit unsigned, 2^32 = one electrical turn |
| switching state | 3 bits `{Sa,Sb,Sc}`, 1 = upper switch of that leg on |

## The three-phase PLL (`pll3ph`)

### Loop

With the grid voltages `va = sin(θin)`, `vb = sin(θin − 2π/3)`,
`vc = sin(θin + 2π/3)` and the PLL's own angle θ, the d-axis component of the
Park transform is

```
delta = va·cos θ + vb·cos(θ − 2π/3) + vc·cos(θ + 2π/3) = 1.5·sin(θin − θ)
```

so it is a phase detector that is zero at lock and, for small errors, linear
in the error. Only this one component is computed (three multipliers and an
adder, `pll_phase_detector`); q and zero-sequence terms are never formed.
Park's 2/3 factor is left out and absorbed into the gains.

The loop filter (`pll_pi`) has power-of-two gains, so it has no multiplier:

```
acc   <= acc + delta
omega <= OMEGA0 + (delta >>> NP) + ((acc + delta) >>> NI)
theta <= theta + omega              (phase_accumulator)
```

`OMEGA0` is the nominal phase step of a 50 Hz grid, computed at elaboration
from `CLK_HZ`, `GRID_HZ` and `PERIOD`; the PI only has to supply the
deviation. With the defaults (50 MHz clock, one PLL step every 12 clocks =
4.17 MHz, `NP = 7`, `NI = 23`) the loop has a natural frequency of about
15 Hz and a damping of about 0.77 for a 1 p.u. input. It locks within about
100 ms from any starting phase and follows a frequency step with no
steady-state phase error (type-2 loop). A smaller `NP`/`NI` makes it faster
and noisier; each step of one bit changes the gain by a factor of two.

At lock `sina` is in phase with `va`; `cosa` leads it by 90°.

### One table, six look-ups

The sine table `sine_rom` holds only the first quadrant: 1024 unsigned
15-bit entries, entry k = round(32767·sin((k + ½)·π/2048)), computed at
elaboration by a constant function (no data file). Because of the half-step offset the table is exactly
mirror-symmetric, so the second-quadrant index is simply the bitwise inverse
of the first-quadrant one. The read is synchronous (one block RAM).

For each of the six outputs the address generator (`pll_addr_gen`) adds a
fixed offset to θ (0, −2π/3, +2π/3 for the sines; π/2 more for the
cosines), takes the top two bits as the quadrant, the next ten as the table
index (inverted in quadrants 2 and 4), and raises a negate flag in quadrants
3 and 4. The postprocessor (`pll_postproc`) delays that flag by the table
latency, negates where needed and collects the six values in staging
registers; a publish pulse copies all six to the outputs at once, so the
outputs always belong to the same θ.

### Step schedule (`pll_fsm`)

| clock in step | action |
|---|---|
| 0 | detector registers `delta` from the inputs and the current cosines |
| 1 | PI registers `omega` |
| 2 | `theta += omega` |
| 3–8 | six table addresses (sina, sinb, sinc, cosa, cosb, cosc) |
| 4–9 | six table values stored |
| 10 | publish to the outputs |
| 11 | idle (more idle clocks if `PERIOD` > 12) |

`valid` pulses one clock after the outputs change. `PERIOD` must be at
least 11.

## Current reference (`current_ref_gen`)

The load currents are projected on the axis of the grid voltage:

```
ip = 2/3 · (ila·sina + ilb·sinb + ilc·sinc)
```

(the PLL's sines play the role of the cosines of the textbook transform,
because the PLL aligns `sina` with `va`). The active fundamental becomes a
dc value; harmonics and unbalance become ripple. A first-order filter,
`ipd += (ip − ipd) / 2^LPF_SHIFT`, keeps the dc value (`LPF_SHIFT = 16`,
about 10 Hz at the default step rate). The reactive dc term is deliberately
set to zero, so reactive power is compensated, and the zero-sequence term is
zero for a three-wire system; neither is computed. The inverse transform of
what is left, plus the regulator's demand `idc`, is the current the grid
should carry, and the inverter is asked for the rest:

```
ir_x = il_x − (ipd + idc) · sin_x
```

It runs once per PLL step: three clocks from the step strobe to new
references.

## DC-link regulation (`dc_voltage_regulator`)

A PI on `vdc_ref − vdc`, again with shift gains (`×4` proportional,
`÷4096` integral per step), an integrator clamp and an output limit of
±0.5 p.u. Its output `idc` raises the active current drawn from the grid
when the capacitor is low, and lowers it when the capacitor is high.

## The directed current controller (`direct_current_controller`)

This is the part that needs the most explanation. Its input is the current
error `ΔI = i_ref − i_inverter` of the three phases, sampled every clock
(`sample_en`). Its output is one of the inverter's eight switching states.

### Space vectors

The eight states `{Sa,Sb,Sc}` give six active voltage vectors 60° apart and
two zero vectors:

| state | 4 (100) | 6 (110) | 2 (010) | 3 (011) | 1 (001) | 5 (101) | 0, 7 |
|---|---|---|---|---|---|---|---|
| direction | 0° | 60° | 120° | 180° | 240° | 300° | zero |

Applying a vector pushes the inverter current in roughly that vector's
direction (relative to the grid voltage), and so pushes the error
`i_ref − i_inverter` the opposite way. An error in sector I is therefore
removed fastest by the vector at 0°.

### From three phases to a vector, without multipliers (`clarke_shift_add`)

```
alpha = a − (b + c)/2          (= 1.5 × amplitude-invariant α)
dbc   = b − c                  (= √3 × β)
beta  = dbc·(1 − 1/8 − 1/128)  (≈ dbc·√3/2 = 1.5 × β, 0.13 % low)
```

Both axes carry the same factor 1.5; the tolerances are scaled by 1.5 (a
shift and an add) before they are compared, so `mi` and `mo` are given in
ordinary phase-current units. A common-mode (zero-sequence) part of the
error drops out.

### Magnitude (`magnitude_est`)

`|ΔI| ≈ max(M, M − M/8 + m/2)`, with M and m the larger and smaller of
`|alpha|`, `|beta|`. The estimate lies within −3 % … +1 % of the true length.

### Sector (`sector_id`)

The error plane is cut into six 60° sectors centred on the active vectors:
sector I = −30°…30°, II = 30°…90°, and so on to VI = 270°…330°. Three bits
decide it:

* `xa` = alpha ≥ 0,
* `xb` = beta ≥ 0,
* `xc` = the vector lies within 30° of the alpha axis, `|alpha| > √3·|beta|`,
  which in the scaled quantities is the exact integer test `3|dbc| < 2|alpha|`.

| xa xb xc | 1 x 1 | 1 1 0 | 0 1 0 | 0 x 1 | 0 0 0 | 1 0 0 |
|---|---|---|---|---|---|---|
| sector (code) | I (1) | II (2) | III (3) | IV (4) | V (5) | VI (6) |

A zero error vector gives code 0, which leaves the switching state alone.

### Three loops (`switching_generator`, `switching_table`)

| error size | loop | next state |
|---|---|---|
| `|ΔI| ≥ mo` | outer | the active vector at the centre of the sector (I→4, II→6, III→2, IV→3, V→1, VI→5): the fastest way back |
| `mi ≤ |ΔI| < mo` | inner | from the table below, chosen from the sector and the previous state |
| `|ΔI| < mi` | hold | previous state kept |

Inner-loop table (next state), by previous state:

| sector | prev 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| I   | 4 | 5 | 6 | 7 | 4 | 4 | 4 | 4 |
| II  | 6 | 0 | 6 | 2 | 6 | 4 | 6 | 6 |
| III | 2 | 3 | 2 | 2 | 6 | 7 | 2 | 2 |
| IV  | 3 | 3 | 3 | 3 | 0 | 1 | 2 | 3 |
| V   | 1 | 1 | 3 | 1 | 5 | 1 | 7 | 1 |
| VI  | 5 | 5 | 0 | 1 | 5 | 5 | 4 | 5 |

The inner loop is there to switch less. In the band between the two
tolerances the error is not urgent, so the controller picks, among the
vectors that still push the error back, the one that puts the smallest
voltage across the ac inductor given where the inverter output is now
(the previous state tells that). A small voltage means a slow drift of the
error through the band and so a low switching frequency; it often means
changing only one leg, or going to the zero vector that needs the fewest
leg changes. Each row is the row above rotated by 60°: rotating a state by
60° is `{Sa,Sb,Sc} → ~{Sb,Sc,Sa}` (both zero vectors swap), and the
testbenches use this rule as an independent check of every entry.

The state is registered: a new error reaches `pwma/pwmb/pwmc` one clock
later. Reset gives state 000 (all lower switches on).

## Timing summary

| block | rate | latency |
|---|---|---|
| `pll3ph` | one step per `PERIOD` (12) clocks | outputs 11 clocks after inputs are sampled |
| `current_ref_gen`, `dc_voltage_regulator` | once per PLL step | 3 clocks / 1 clock |
| `direct_current_controller` | every clock with `sample_en` | 1 clock |

Within one step the PLL uses the cosines of the previous step, so the
detector sees the phase one step (12 clocks, 2.9 milli-degrees at 50 Hz)
late; this is part of the loop dynamics and has no visible effect.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock, used only to compute the nominal phase step |
| `GRID_HZ` | 50 | nominal grid frequency |
| `PLL_PERIOD` | 12 | clocks per PLL step (≥ 11) |
| `PLL_NP`, `PLL_NI` | 7, 23 | PLL proportional / integral shifts |
| `LPF_SHIFT` | 16 | reference-generator low-pass shift |
| `DC_KP_SHL`, `DC_KI_SHR` | 2, 12 | DC-link regulator shifts |

If `CLK_HZ` or `PLL_PERIOD` change, retune `PLL_NP`/`PLL_NI`: the loop gain
per second scales with the step rate (proportional) and its square
(integral). The table size follows `LUT_AW`/`LUT_DW` in `apf_pkg`; entry k of 2^AW is
round((2^DW − 1)·sin((k + ½)·π/2^(AW+1))).

## Size

Generic synthesis of the top gives about 344 flip-flop bits, one
1024 × 15-bit table, nine 16 × 16 multipliers (three in the PLL's phase
detector, six in the reference generator, which also has one constant multiplier by 2/3) and a few hundred adders,
comparators and multiplexers. The current controller itself has no
multiplier and only five flip-flops.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/apf_pkg.sv \
          tb/tb_apf_controller.sv --top-module tb_apf_controller
./obj_dir/Vtb_apf_controller
```

| testbench | what it shows |
|---|---|
| `tb_apf_controller` | whole controller at its default parameters, closed around a model of the inverter, inductors, dc capacitor, grid and a load with 0.3 p.u. reactive, 0.15 p.u. 5th and 0.08 p.u. 7th harmonic current; after 150 ms the grid current's 5th and 7th harmonics are about 0.004 and 0.002 p.u., its reactive part below 0.001 p.u.; all three loops, all six sectors and both signs of `idc` occur (about 10 s of simulation) |
| `tb_pll3ph` | lock from an arbitrary phase at 50 Hz (output error < 0.001 p.u.), re-lock after a step to 51 Hz with 5 % fifth-harmonic distortion (< 0.005 p.u.), tracking with phase a at 0.8 p.u. plus noise (< 0.02 p.u.), step spacing of 12 clocks |
| `tb_direct_current_controller` | random error vectors against a model built from geometry and the rotated table |
| others | each unit against an independent model: table contents against `sin`, addresses against the intended angles, PI and regulator against 64-bit models, sector against `atan2`-style angles, magnitude against `sqrt`, FSM schedule cycle by cycle |

The plant model in `tb_apf_controller` is deliberately simple: ideal
switches, one inductor per phase with no resistance, a leaky capacitor.
The grid current's active part comes out about 7 % below the load's active
current plus the regulator's demand: the hysteresis band leaves a small
in-phase tracking error of the inverter current.

## What follows the original design and what is this implementation's own

Taken from the original design: the split into PLL, SRF current
reference, DC-link regulator and directed current controller; the PLL's
d-axis-only phase detector, shift-only PI, output integrator, quarter-wave
table with address generator, postprocessor and controlling FSM; the
controller's shift-and-add 3-to-2-phase conversion, magnitude module,
three-bit sector decoder, outer/inner hysteresis loops and the switching
table contents.

Choices of this implementation, where the original gives no detail:
all word widths and number formats; clock and step rates; the gain values;
the nominal-frequency feed-forward of the PLL; the table size and its
half-step offset; the FSM's exact schedule and the simultaneous publish of
the six outputs; the magnitude estimator; holding the state below the inner
tolerance; the `sample_en` input of the current controller; the low-pass
filter of the reference generator; the PI form, limits and the point where
`idc` enters; saturation of the current error to 16 bits.

Not part of the RTL: the inverter and its gate drivers, the ADC interfaces
and a protection unit; their signals are the
top's ports.
