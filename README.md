# FPGA controller for a four-level active-clamped inverter driving a PMSM

This is the digital half of a motor drive. The power stage is a three-phase,
four-level active-clamped (MAC) inverter: three series capacitors split the
dc link into four terminals, and each leg has 12 MOSFETs arranged in three
columns. The load is an 8-pole (4 pole pair) permanent-magnet synchronous
motor with a 1024-line incremental encoder. Once every 200 µs switching
period, the controller does the following:

- samples the three capacitor voltages and two phase currents with a
  six-channel simultaneous-sampling ADC (AD7656);
- runs field-oriented control, with two PI current loops plus decoupling
  and an optional outer PI speed loop;
- keeps the three capacitor voltages equal with two proportional balance
  compensators;
- turns the resulting duty vector into polar form (modulation index m*,
  angle θ*) for the modulator;
- drives the 36 gate signals, with a blanking time at every change and an
  ordered power-up and power-down of the device columns.

A small front panel lets an operator choose the operating mode, edit gains
and set-points, and read internal values. It has 10 switches, 3 buttons,
10 LEDs and four 7-segment digits.

Everything runs from one 50 MHz clock. One clock cycle (20 ns) is the time
unit of every parameter below.

## What is and is not in the RTL

The control chain is complete from the ADC and encoder pins to the gate pins,
with one exception: the **modulator** is not included. This is the block that
turns (m*, θ*, k2, k3, power sign) into the duty ratios of the three legs, using
nearest-three virtual-space-vector PWM for four levels. Its equations are not
given here, so the top level brings its interface out as ports:

| port | dir | meaning |
|---|---|---|
| `mod_tick` | out | one-cycle pulse at the start of each switching period |
| `mod_m` | out | modulation index m*, 10 bits unsigned |
| `mod_theta` | out | reference angle θ*, 1024 steps per electrical turn |
| `mod_k2`, `mod_k3` | out | dc-link balance terms, 12-bit signed |
| `mod_pow` | out | power-flow sign (1 = motoring, dd·id + dq·iq ≥ 0) |
| `mod_thr[leg][0..2]` | in | three level thresholds per leg, in carrier units (0..TS/2) |

A modulator that fills `mod_thr` completes the drive. The thresholds are
sampled at `mod_tick`, and the leg follows them during the next period (see
*Gate generation*).

## Timing of one switching period

At default parameters a period is 10 000 cycles. `switching_period` pulses
`tick` when it wraps, and everything else is chained from that pulse:

| cycles after `tick` | event |
|---|---|
| 0 | CONVST to the ADC (all six channels sampled together) |
| ~155 | BUSY falls (3 µs conversion); the five results are read |
| ~175 | `adc_valid`: new v21, v32, v43, ia, ib. Error limits checked; k2, k3 updated one cycle later |
| +2 | id, iq from the Clarke/Park transform |
| +47 | dd*, dq* from the current loops (two 44-bit serial divisions by Vdc) |
| +12 | m*, θ* from the polar converter |
| next `tick` | the phase generators latch the modulator's thresholds |

The whole computation takes about 240 cycles, 2.4 % of the period. The
serial ADC link adds about 130 cycles for its 32 ADC clocks at 12.5 MHz.
Variables sampled at the start of a period therefore reach the gates one
period later.

The speed is not part of this chain. It is measured over fixed 2.5 ms
windows, and the speed loop runs once per window.

## Number formats

| quantity | format | note |
|---|---|---|
| ADC samples | 12-bit two's complement | all scaling starts from the ADC |
| electrical angle φ, θ* | 10 bits, 1024 per turn | one encoder edge = one step |
| sin, cos tables | 13-bit signed, 4095 = 1.0 | |
| id, iq | 14-bit signed, same LSB as ia, ib | |
| dd*, dq* | 10-bit signed, 512 = 1 | |
| m* | 10-bit unsigned | |
| speed | 16-bit signed, 1.465 rpm/LSB | sum of four 2.5 ms edge counts |
| user parameters | 16-bit | see *Front panel* |

The decoupling constant and the error limits assume the sensor scales of
the reference hardware: ±12.5 A and ±222 V at the ±5 V ADC range, i.e.
6.1 mA and 0.108 V per LSB. Change `KDEC`, `I_LIM` and `V_LIM` if your
sensor boards differ.

## Gate generation: control variables, device map and blanking

Each leg selects one of four dc-link terminals k = 1..4. Three control
variables describe the choice: c_j = 0 for j < k and c_j = 1 for j ≥ k.

Every device of the leg is driven by one c_j or by its complement, which
also keeps every off-state device clamped to one capacitor voltage. The gate
word of a leg is 12 bits, in this order:

| bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| device | Sn11 | Sp13 | Sn22 | Sp22 | Sn33 | Sp31 | Sn21 | Sp12 | Sn32 | Sp21 | Sn31 | Sp11 |
| driven by | c1 | ¬c1 | c2 | ¬c2 | c3 | ¬c3 | c2 | ¬c1 | c3 | ¬c2 | c3 | ¬c1 |
| column | 1 | 1 | 1 | 1 | 1 | 1 | 2 | 2 | 2 | 2 | 3 | 3 |

Column 1 sits next to the dc link and has six devices per leg. Column 3 sits
next to the output and has two. The map is in `mac_pkg::gates_from_c`.

`phase_generator` produces the 12 gates of one leg:

1. **Level.** The level is the number of thresholds the period's triangular
   carrier (0 → 5000 → 0) has reached. Over one period a leg climbs the
   terminals and comes back down.
2. **Safe transition.** When the required gate word changes:
   - TD = 2 cycles later, every device that must turn off is turned off;
   - TB = 40 cycles (800 ns) after that, the devices that must turn on are
     turned on.

   Gates therefore start to change TD+1 cycles after the carrier crosses a
   threshold. Between turn-off and turn-on, both devices of a complementary
   pair are off for exactly 40 cycles.
3. **Column enable.** Each gate is ANDed with the enable of its column.

An assertion checks that the complementary pairs of column 1 are never on at
the same time.

The triangular carrier and the threshold form of the level command are this
design's own interface to the missing modulator.

### Column sequencing and errors (`system_fsm`)

The inverter must not be switched on or off all at once. A four-bit state
`estat` enables the columns one at a time, one switching period per step:

```
off 0000 → 1000 → 1100 → 1110 → on 1111        (switching off: the reverse)
```

- bit 3 enables column 1 (next to the dc link);
- bit 2 enables column 2;
- bit 1 enables column 3;
- bit 0 means fully on.

Switching on the dc-link column first is this design's choice of order.

Three errors are sticky:

- **over-current:** |ia|, |ib| or |ia+ib| above 1638 LSB (about 10 A);
- **over-voltage:** a capacitor above 833 LSB (about 90 V);
- **encoder error:** A and B change in the same cycle.

Any error starts the switch-off sequence and blocks switching on. Pressing
the on/off button while an error is shown restarts:

- a **soft restart** (only current or voltage errors) clears the flags and
  keeps all parameters and the rotor alignment;
- a **full restart** (encoder error) resets the whole design except the
  button sampler, so the parameters return to their presets and the
  encoder has to find the index again.

## Polar conversion by successive approximation

`polar_converter` computes

```
m*  = sqrt(dd² + dq²)
θ*  = atan2(dd, dq) + φ
```

A lookup table over two 10-bit inputs would need 2²⁰ entries, so both
results are built one bit per cycle, MSB first, and the two searches run
side by side.

- **Square root.** A trial bit is kept when r·(r−1) ≤ dd² + dq². Comparing
  against r·(r−1) instead of r² gives the root rounded to nearest rather
  than truncated. The result is within one LSB of the real value.
- **Arctangent.** With x = max(|dd|,|dq|) and y = min(|dd|,|dq|), the angle
  lies in the first octant (y/x ≤ 1). A 7-bit octant angle `a` keeps a trial
  bit when x·tan(a) ≤ y. tan(a) comes from a 129-entry table with 12
  fractional bits, computed when the design elaborates. The swap flag and
  the signs of dd and dq then place the angle in the right octant, and φ is
  added modulo one turn. The angle is within one step of the exact value.

The latency is 12 cycles.

## Current loops and decoupling

`clarke_park` converts the two measured currents to the rotating frame
using the electrical angle:

```
id = √2 · ( sin(φ+60°)·ia + sin φ·ib )
iq = √2 · ( cos(φ+60°)·ia + cos φ·ib )
```

Two 1024 × 26 tables supply the coefficients. One holds φ and the other
φ+60°, each with sine in bits 25:13 and cosine in bits 12:0, and both are
computed at elaboration. √2 is 181/128.

`current_controller` holds two identical PI compensators with id* = 0, and
iq* taken from the user or from the speed loop. The cross-coupling of the
motor's d and q voltage equations is cancelled with

```
dd* = PI_d − K·ω·iq / Vdc        dq* = PI_q + K·ω·id / Vdc
```

- Vdc = v21 + v32 + v43.
- ω is the measured speed.
- K = 12337/2¹⁶ folds together √2, the winding inductance (7.5 mH), the
  pole pairs and the number scales.
- The two divisions by Vdc use bit-serial restoring dividers (`seq_divider`),
  which is ample for one division per period.
- Below Vdc = 16 LSB the decoupling is switched off.

The PI blocks (`pi_compensator`) use 8-bit run-time gains with fixed
shifts, and clamp the integrator to the output range (anti-windup).

## DC-link balance

Only a proportional term is used:

```
k2 = −kp3 · ( v21 − (v32+v43)/2 ) / 16
k3 = −kp3 · ( (v21+v32)/2 − v43 ) / 16
```

v21 is the lowest capacitor and v43 the highest. kp3 is a panel parameter
from 0 to 255. The loop is known to stay stable up to kp3 ≈ 64 and to
become unstable around 80. Because there is no integral term, a small
steady imbalance remains. k2 and k3 go to the modulator, which shifts the
inner-level duty ratios with them.

## Encoder and speed

- **Filtering.** `encoder_filter` samples A, B and INDEX0 at 6.25 MHz and
  accepts a new level only after 8 equal samples. A clean edge appears
  57–67 cycles after it reaches the pin.
- **Position and angle.** `quadrature_counter` counts all 4096 edges per
  turn, with A leading B meaning forward. On the INDEX0 rising edge the
  position is loaded with −385 (the offset between the index and the
  winding axes). With 4 pole pairs the low 10 bits of the 12-bit position
  are the electrical angle φ.
- **Speed.** `speed_meter` counts edges in 2.5 ms windows and outputs the
  sum of the last four windows, which is the 10 ms average ×4. That is
  1.465 rpm per LSB, and rated speed (1500 rpm) reads 1024.

## ADC link

Both interfaces sample all five inputs together at the start of the period.
Both discard the first conversion after reset, because the AD7656 ignores
its RANGE pin on that conversion. Both pulse the ADC RESET pin after the
FPGA reset.

- **`adc_parallel_if`** is the default (`ADC_PARALLEL = 1`). It works in
  hardware parallel mode: CONVST, wait for BUSY, then five CS/RD reads of
  DB[11:0] in channel order, with RD low for 2 cycles and high for 2. The
  frame is registered and changes only when it is complete.
- **`adc_serial_if`** uses serial mode with three data lines at 12.5 MHz.
  DOUT A, B and C are on DB8..DB10. There are 32 clocks per frame, and
  each line carries two 16-bit words (4 zeros + 12 data bits). The three
  shift registers are themselves the sample variables, with no copy, so a
  reader not synchronised to `valid` (such as the display) may briefly
  catch a value in transit. The channel map is A: v21, v32; B: v43, ia;
  C: ib.

## Operating modes

| mode | loops | m*, θ* |
|---|---|---|
| 0, open loop | none (dc-link balance only) | m* from the panel; θ* from a 12-bit accumulator advanced by `delta_fit_0` each period: f = 5 kHz · delta_fit_0 / 4096, so 41 gives 50.05 Hz and 2 gives 2.44 Hz |
| 1, current loop | current loops | iq* from the panel; m*, θ* from the polar converter |
| 2, speed loop | speed + current loops | iq* from the speed PI, which updates every 2.5 ms against ω* from the panel |

The current integrators are held clear in mode 0. The speed integrator is
held clear outside mode 2.

## Front panel

| control | function |
|---|---|
| `sw[3:0]` | index of the parameter to edit (0–9) or value to show (0–15) |
| `sw[4]` | buttons step by 16 instead of 1 |
| button 0 / 1 | increment / decrement the selected parameter |
| button 2 | converter on/off; with an error shown: restart |

The buttons are sampled at 25 Hz, which removes contact bounce, and each
press gives one pulse. The digits show the selected value in hexadecimal
and refresh 3 times a second.

| index | value | preset |
|---|---|---|
| 0 | mode (0–2) | 0 |
| 1 | open-loop m* | 0 |
| 2 | delta_fit_0 | 41 |
| 3 | iq* (mode 1) | 0 |
| 4 | ω* (mode 2), 1.465 rpm/LSB | 0 |
| 5, 6 | current kp, ki | 16, 4 |
| 7, 8 | speed kp, ki | 8, 2 |
| 9 | kp3 | 16 |
| 10–15 (read only) | speed, v21, v32, v43, ia, ib | |

LEDs, bit by bit:

| LED | meaning |
|---|---|
| 2:0 | errors {encoder, over-voltage, over-current} |
| 3 | fully on |
| 6:4 | column enables |
| 8:7 | mode |
| 9 | encoder index seen |

## Where this design departs from, or adds to, the reference design

The following points follow the reference design closely:

- the time constants: period, blanking, delay, sampling rates;
- the encoder counting, offset and filter;
- the speed averaging;
- the table layout;
- the successive-approximation rules;
- the modes and the open-loop frequency law;
- the balance error expressions for k2 and k3, which compare each outer
  capacitor with the mean of the other two;
- the first-conversion discard;
- the ordered column switching;
- the soft/full restart split.

The following are this design's own decisions, because the reference design
does not fix them:

- all internal word widths and number scales, the decoupling constant and
  the signs of the decoupling terms;
- the sequencing order and the one-period step time;
- the error thresholds;
- the panel mapping and parameter presets;
- the ADC channel map and read timing;
- using the 2-cycle delay time before turn-off;
- the carrier-and-thresholds interface to the modulator;
- computing every table at elaboration rather than loading it from a file;
- the power-flow sign, formed as the sign of dd·id + dq·iq.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for
example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/mac_pkg.sv tb/tb_polar_converter.sv \
    --top-module tb_polar_converter
./obj_dir/Vtb_polar_converter
```

What the testbenches cover:

- **Block testbenches** compare each block with values computed
  independently in the testbench: real-valued trigonometry, exact integer
  division, reference PI arithmetic and so on. Where a rate or latency is
  defined, they also check the cycle counts.
- **`tb_mac_fpga_top`** runs the whole design at shortened time constants
  (1000-cycle period, fast buttons and display). It uses an encoder model and
  a behavioural AD7656 model (`tb/ad7656_model.sv`). Through the buttons it
  goes through parameter editing, the display, power-up, open loop, current
  loop, speed loop, an over-current with soft restart, an encoder error
  with full restart, and the power-down. It counts each of these events
  and fails if any did not happen. It also checks on every cycle that no
  complementary pair overlaps.
- **`tb_mac_fpga_top_full`** runs the top with every parameter at its
  default, simulating about 45 million cycles (under a minute). It checks:
  - the 10 000-cycle period and the 40-cycle blanking gap on the gates;
  - the open-loop angle, 41 steps per 4 periods;
  - switch-on through a 25 Hz button press and the column order;
  - the displayed v21 after a 3 Hz refresh;
  - the displayed speed with the encoder model at the motor's rated
    1500 rpm (1024 expected).

- **`tb_mac_fpga_top_serial`** runs the top with the serial ADC link
  against the serial model. It checks:
  - SCLK at clk/4, with 32 clocks per CS-low frame;
  - the first-conversion discard;
  - that each of the five samples lands in its variable;
  - k2 and k3;
  - an over-current trip from serial data, followed by a soft restart.

In every end-to-end run, fixed thresholds stand in for the modulator.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | constants, types, gate map, integer sine for tables |
| `rtl/mac_fpga_top.sv` | top level |
| `rtl/switching_period.sv` | period timer, tick, triangular carrier |
| `rtl/adc_parallel_if.sv`, `rtl/adc_serial_if.sv` | AD7656 interfaces |
| `rtl/encoder_filter.sv`, `rtl/quadrature_counter.sv`, `rtl/speed_meter.sv` | encoder chain |
| `rtl/sincos_rom.sv`, `rtl/clarke_park.sv` | ab → dq |
| `rtl/pi_compensator.sv`, `rtl/current_controller.sv`, `rtl/seq_divider.sv` | current loops |
| `rtl/dclink_balance.sv` | k2, k3 |
| `rtl/polar_converter.sv` | m*, θ* |
| `rtl/setpoint_manager.sv` | modes, open-loop angle, speed PI, power sign |
| `rtl/system_fsm.sv` | column sequencing, errors, restarts |
| `rtl/phase_generator.sv` | gates of one leg with blanking |
| `rtl/button_sampler.sv`, `rtl/param_regs.sv`, `rtl/display_ctrl.sv`, `rtl/hexa_nss.sv` | front panel |
| `tb/ad7656_model.sv` | behavioural ADC model (simulation only) |
| `tb/tb_*.sv` | testbenches |
