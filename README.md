# Event-driven BLAC motor controller with a traffic-light supervisor

This is synthesizable SystemVerilog for an FPGA controller of a three-phase
brushless AC (BLAC, permanent-magnet synchronous) motor. The design treats the
inverter as a discrete-event system. The current controller has no PWM and no
modulator. Three hysteresis comparators report which way each phase current has
to move. A small table then picks one of the eight inverter switch patterns.
Which patterns the table may use depends on the 60-degree sector in which the
stator voltage currently lies. A second-order phase-locked loop tracks that
sector from the vectors the controller itself asks for. The table keeps most
switchings to a single inverter leg, which lowers the switching count.

A PI speed loop sits around the current loop. Around both sits a supervisor
state machine. Its states are grouped into green (normal), yellow (a value is
close to its limit) and red (a limit was crossed), so the condition of the
drive can be read at a glance. A PC sets parameters and reads the state over
RS232.

The structure, the vector-selection rule, the filter structure and the
supervisor's states and transitions follow a published design. Everything
numeric is this design's own choice: widths, gains, limits, clock, baud rate,
encoder resolution, the register map and the ADC and D/A timing. The section
"Departures and open points" lists where the RTL goes beyond or against the
published design.

## Block diagram

```
 encoder A,B,Ri --> inc_decoder --theta--> sin3_ref --iref[3]--> hyst_comparator x3 --Sd[2:0]--+
                      |  step/dir            ^ Amp                  ^ i_meas[3]                  |
                      v                      |                      |                            v
                 velocity_calc --speed--> pi_controller <-- ramp_gen <-- w_ref     adc_if <-- 3 serial ADCs
                      |                                                                          |
                      v                                    pll_sector_filter <--Sd------------+  |
                 supervisor_fsm <-- i_meas, udc, limit/home switches   | secU                   v
                      | gates refs, integrator, inverter              +-----> vector_table --> S1 S2 S3
                      v                                                            |
                 lamps, state        uart_rx -> param_regs -> uart_tx      switch_counter (per 10 ms)
                                                 |
                                          signal_select --> dac_if --> serial D/A (oscilloscope)
```

`mcs_top` wires these blocks together. Each block has a module of its own in
`rtl/`, and `mcs_pkg` holds the shared types.

## Vector selection: how the current loop works

The three inverter legs give eight switch patterns, written `S1 S2 S3`, where
1 means the upper transistor is on:

| vector | V0  | V1  | V2  | V3  | V4  | V5  | V6  | V7  |
|--------|-----|-----|-----|-----|-----|-----|-----|-----|
| S1S2S3 | 000 | 100 | 110 | 010 | 011 | 001 | 101 | 111 |
| angle  |  -  | 0°  | 60° | 120°| 180°| 240°| 300°|  -  |

V0 and V7 are the zero vectors.

Each hysteresis comparator outputs `Sd = 1` once its phase current is more than
`hist` below its reference. It outputs `Sd = 0` once the current is more than
`hist` above the reference, and otherwise keeps its last value. The three bits
`Sd1 Sd2 Sd3` therefore read as a switch pattern: they name the vector that
pushes the currents the right way.

The voltage sector `secU` is the sign pattern of the three phase voltages.
Sector k is centred on Vk, spans ±30°, and its sign pattern equals the code of
Vk (sector 1 = `100`, sector 2 = `110`, and so on). In sector k the table lets
through only:

* the requested vector, if it is V(k-1), Vk or V(k+1);
* V0 for the request `000` and V7 for the request `111`;
* for any other request, the sector's own zero vector Vz. That is V7 in the
  odd sectors and V0 in the even ones.

The zero vector is chosen so that going between Vz and each of the two
neighbouring vectors V(k-1) and V(k+1) flips only one leg. In sector 2, for
example, the neighbours V1 = 100 and V3 = 010 each have one upper switch on,
so V0 = 000 is one flip away from both. In sector 1 the neighbours V6 = 101 and
V2 = 110 have two upper switches on, so V7 is used. The full table, with
columns as sectors and rows as requests:

| request Sd | Su1 (100) | Su2 (110) | Su3 (010) | Su4 (011) | Su5 (001) | Su6 (101) |
|-----------|----|----|----|----|----|----|
| 000 | V0 | V0 | V0 | V0 | V0 | V0 |
| 100 | V1 | V1 | V7 | V0 | V7 | V1 |
| 110 | V2 | V2 | V2 | V0 | V7 | V0 |
| 010 | V7 | V3 | V3 | V3 | V7 | V0 |
| 011 | V7 | V0 | V4 | V4 | V4 | V0 |
| 001 | V7 | V0 | V7 | V5 | V5 | V5 |
| 101 | V6 | V0 | V7 | V0 | V6 | V6 |
| 111 | V7 | V7 | V7 | V7 | V7 | V7 |

`vector_table` computes this from the rule; no table is stored. Its timing is
as follows:

* `secU` is first registered, and the chosen vector is registered again.
* A change of `Sd` reaches the inverter after 1 clock.
* A change of sector reaches it after 2 clocks.
* `enable = 0` forces V0.

In simulation at 100 encoder counts/ms, about 320 switchings per 10 ms change
one leg and about 30 change two or three legs.

## Recovering the voltage sector

The controller has no voltage sensor. `pll_sector_filter` estimates the
voltage angle from the active vectors, V1 to V6, as a sequence of angles
(k-1)·60°. It runs a type-2 PLL on that sequence:

```
eps   = angle(Vk) - phase             (16-bit, wraps at 360°)
integ = integ + A * eps * 2^-SHIFT_I  (frequency)
phase = phase + integ + B * eps * 2^-SHIFT_P
```

The phase carries 16 fraction bits. The loop only updates on `ce`, which the
top pulses once every `per` clocks (register 2, default 50, which gives 1 MHz).
While a zero vector is requested, `eps` is 0 and the phase keeps turning at the
learned frequency. A comparator then maps the phase to six 60° windows, shifted
by 30°. Sector k covers (k-1)·60° ± 30°. The outputs are the sector number and
its sign pattern `secU`.

**This design's choice:** the filter is fed with the vector the comparators
*request* (`Sd1 Sd2 Sd3`), not with the pattern actually applied. The published
block diagram draws the filter on the applied switch lines. Fed that way, the
loop locks up at start-up: if the request lies two sectors away from the
current estimate, the table answers with a zero vector. The filter then never
sees a vector that would move it, so sector and request stay apart. With the
request as input, the estimate follows the direction the current loop wants.
The module itself takes any 3-bit pattern, so the other wiring is one line in
`mcs_top`.

With A = B = 255 and the default shifts, the loop's natural frequency is about
490 rad/s at a 1 MHz update rate, with damping of about 4. The unit test locks
to within 5° of a dithered rotating vector.

## Speed loop

* `inc_decoder` decodes A/B in quadrature, 4 counts per line, into a position
  modulo 2^12. The electrical angle is pos · POLE_PAIRS · 2^(16-12).
* `velocity_calc` counts steps over a 1 ms window, so speed is in counts per
  ms: 1 count/ms ≈ 1.53 rad/s mechanical with 4096 counts per turn.
* `ramp_gen` limits the slope of the speed reference to `step` per ms. This is
  the trapezoidal profile.
* `pi_controller` runs once per speed sample:
  Amp = sat((Kp·e + I)·2^-8, ±1000), and I accumulates Ki·e, clamped to the
  same limit.
* `sin3_ref` turns Amp into the three references
  Amp·sin(θ − (k−1)·120°), k = 1, 2, 3. The sine comes from a 1024-entry table
  of round(32767·sin(2πn/1024)), built at elaboration.

## Supervisor

`supervisor_fsm` has nine states:

| colour | states | inverter | speed reference |
|--------|--------|----------|-----------------|
| none   | BEGIN | off | 0 |
| none   | HOMING | on | HOME_SPEED |
| green  | READY, OPERATE, STOPPING | on | w_ref in OPERATE, 0 otherwise |
| yellow | WARNING | on | unchanged: the drive keeps running |
| red    | RESET, STOP_ERR, ERROR | on, on, off | 0 |

Transitions:

* BEGIN goes to HOMING on main switch ON.
* HOMING goes to READY at the home switch, which also zeroes the position.
* READY goes to OPERATE on START.
* OPERATE goes to STOPPING on STOP.
* STOPPING goes to READY once |speed| ≤ STOP_SPEED.
* READY, OPERATE and STOPPING go to WARNING when any monitored value passes its
  warning level.
* WARNING goes back to the state it came from when all values are back below
  their warning levels.
* WARNING goes to RESET when a value passes its critical level.
* RESET lasts one clock. It clears the references, the PI integrator and the
  parameters, then moves to STOP_ERR.
* STOP_ERR brakes to zero speed. It goes to READY once the rotor stops, or to
  ERROR if it is still turning after STOP_TIMEOUT clocks (0.5 s).
* ERROR switches the main switch off. It goes back to BEGIN only on a manual
  reset command.

The supervisor watches:

* the largest phase-current magnitude (1200 warning / 1600 critical, ADC
  counts);
* |speed| (300 / 400 counts/ms);
* the DC-link voltage (3400 / 3800);
* the two limit switches. A limit switch counts as critical, so the path is
  WARNING followed by RESET on the next clock.

Values are monitored only in READY, OPERATE and STOPPING.

## Host interface (RS232, 115200 baud 8N1 at 50 MHz)

A write is three bytes: `addr` (below 16), then `data[15:8]`, then `data[7:0]`.
A read is one byte, `0x80 | addr`. The reply is two bytes, high byte first.
Addresses 0–15 hold the parameters and 16–31 hold status words.

| reg | meaning | reset |
|-----|---------|-------|
| 0 | speed reference w_ref (counts/ms, signed) | 0 |
| 1 | bit0 main switch ON, bit1 START, bit2 STOP, bit3 manual reset (bits 1–3 are one-clock pulses), bit4 profile on | 0x0010 |
| 2 | `per`: sector filter update period in clocks | 50 |
| 3 | `hist`: hysteresis half-band (ADC counts) | 20 |
| 4, 5 | Kp, Ki (scaled by 2^-8) | 4000, 200 |
| 6, 7 | filter gains A, B | 255, 255 |
| 8 | eight logical outputs `sw_out` | 0 |
| 9 | oscilloscope signal select | 0 |
| 10 | profile slope (counts/ms per ms) | 2 |

Status words:

| addr | content |
|------|---------|
| 16 | state |
| 17 | lamps |
| 18 | speed |
| 19–21 | one-, two- and three-leg switchings in the last 10 ms |
| 22–24 | phase currents |
| 25 | `sw_in` |
| 26 | position |
| 27 | electrical angle |
| 28 | Amp |
| 29 | sector |
| 30 | ramped reference |
| 31 | flags and current vector |

## Converters

`adc_if` reads three serial ADCs that share a clock and a conversion line. Each
cycle:

* `conv` goes high for one serial period.
* 14 serial clocks follow. The first 2 bits are dropped, and 12
  two's-complement bits come MSB first, with a new bit after each falling edge.
* The driver samples on the rising edge.

A full cycle takes 128 clocks, about 390 kS/s. This is a generic serial-ADC
timing. Check it against the data sheet of the converter actually used.

`signal_select` picks one of eight internal words (register 9), and `dac_if`
sends it to a serial D/A converter so that it can be watched on an
oscilloscope. Each frame works as follows:

* `cs_n` goes low for 16 serial clocks.
* The frame carries four zero bits and then a 12-bit code, MSB first.
* The code is offset binary, with 0 at mid-scale.
* Data is stable at each rising `sclk` edge.

Frames repeat every 132 clocks. As with the ADC, this is a generic format.
Adapt it to the converter actually fitted.

## Files and simulation

| module | role |
|--------|------|
| `mcs_pkg` | widths, `vec_t`, supervisor state enum, vector code helpers |
| `mcs_top` | top level |
| `vector_table`, `hyst_comparator`, `pll_sector_filter` | current loop |
| `inc_decoder`, `velocity_calc`, `ramp_gen`, `pi_controller`, `sin3_ref` | speed loop |
| `supervisor_fsm`, `switch_counter` | supervision and statistics |
| `adc_if`, `uart_rx`, `uart_tx`, `param_regs`, `signal_select`, `dac_if` | interfaces |

Every module `X` has a self-checking testbench `tb/tb_X.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`. The test models in `tb/` are:

* `blac_plant`: inverter, motor from the winding equation di/dt = (u − R·i − e)/L,
  encoder and home switch, integrated in real arithmetic each clock;
* `adc_model`: one serial ADC.

To run one testbench (here the full-system one, at the default parameters):

```
verilator --binary --timing --assert -Wno-fatal rtl/mcs_pkg.sv -y rtl -y tb \
    tb/tb_mcs_top.sv --top tb_mcs_top -Mdir obj -o sim && obj/sim
```

* `tb_mcs_top` (about 1 s of drive time, under a minute of simulation) covers
  the whole sequence:
  * power-up, homing, START and steady speed;
  * a DC-link warning and its return;
  * STOP;
  * a limit switch leading to RESET, braking and READY;
  * an overhauling load leading to a stop time-out, ERROR and the manual reset.

  It checks that sector changes, both zero vectors, one- and two-leg
  switchings, PI saturation, the ramp, RS232 traffic and D/A frames all occur.
* `tb_step_response` repeats a speed-step experiment: 60, 30, 60 and 30 rad/s,
  with a load step at 0.4 s. It checks tracking, recovery under load, and that
  one-leg switchings dominate every 10 ms window.

Both use every parameter at its default value.

## Resource estimate

After generic synthesis the design has about 710 word-level cells and 930
flip-flops. It uses seven multipliers:

* three in `sin3_ref`, 12×16;
* two in `pi_controller`;
* two in `pll_sector_filter`, 16×8.

It also has three 1024×16 sine ROMs. `sin3_ref` is written with three parallel
table reads. A single time-shared read would save two ROMs at the cost of two
clocks of latency.

## Departures and open points

* **Sector filter input**: the filter takes the requested vector instead of the
  applied one. The reason is given above.
* **Zero vectors**: the table uses V7 in odd sectors. A more compact
  formulation seen for this controller uses only 000 for both zero entries;
  the two-zero-vector rule is kept because it is what gives one-leg
  transitions in every sector.
* **Warning return**: which green state WARNING returns to is not specified.
  This design returns to the state it came from.
* **Parameter changes**: changing parameters and reference values belongs to
  the operating state. Here the speed reference takes effect only in OPERATE,
  while register writes are accepted in every state. This lets parameters be
  set before START.
* **Supervisor numbers**: the limits and the stop time-out are placeholders,
  to be set for a real drive.
* **Ignored inputs**: temperature is not monitored. The separate "reference"
  position switch of the mechanism is not used, and homing relies on the home
  switch alone.
* **Motor assumptions**: the encoder resolution (4096 counts per turn), the
  pole pairs (4), the 50 MHz clock and all fixed-point scalings are
  assumptions.
* **Error sign**: the current-error sign follows the block diagram
  (reference − measurement). The opposite convention would need the table's
  rows complemented.
