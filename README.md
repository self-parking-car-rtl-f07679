# Self-parking model car: FPGA controller

A four-wheel-drive model car parallel parks itself. It is driven up beside a
row of parked cars. From there one FPGA does everything: it reads four
infrared distance sensors, finds a gap long enough for the car, reverses
into the gap, straightens up and stops close to the car in front. The
controller is a single state machine with ten steps. Each step copies one
move of a human driver and sets a duty cycle for each wheel motor.

This repository holds synthesizable SystemVerilog for the FPGA side of that
system, plus self-checking testbenches. The sensors, A/D converters, motor
driver and motors are off-the-shelf parts. They appear only as ports, and
the converters also appear as a behavioural model in the testbenches.

```
 IR sensors (4) -> ADC0804 x4 -> read_sensor ----------> park_fsm --duty x4--> pwm_gen x4 --> L293 --> motors
   analog           shared      (sequence, average,  clean   (10 steps)                      motor_pwm[3:0]
                    8-bit bus    settle)              readings  |
                                   |                            +--> led[3:0] (step number)
                                   +--> seg7_display --> seg[6:0], digit[3:0]
```

## How the car sees

There are four Sharp IR sensors: one at the **front**, two on the **right
side** (`side1` toward the front of the car, `side2` toward the back), and
one at the **back**. A sensor's output voltage *falls* as the distance
*grows* (useful range about 3–30 cm). So throughout the design **a large
8-bit reading means a near obstacle**. No conversion to distance is done:
the control logic works on the raw converter codes, which keeps the most
resolution at short range.

Readings fall into three zones (`sp_pkg::classify`):

| reading      | zone   |
|--------------|--------|
| `>= 0xA0`    | close  |
| `0x54..0x9F` | medium |
| `< 0x54`     | far    |

### Sharing one bus among four converters

Each sensor feeds its own ADC0804. Four 8-bit outputs would need 32 FPGA
pins, so the converters share a single 8-bit bus instead:

* Each converter is wired in **read-only mode**. CS is tied low and RD is
  tied to WR. So one low pulse on a converter's RD does two things. While RD
  is low, the converter drives its last result onto the bus. When RD rises,
  the next conversion starts. A converter whose RD is high keeps its
  outputs tri-stated.
* An external multiplexer routes one FPGA RD line (`adc_rd_n`) to the
  converter picked by `adc_sel[1:0]`. The other three RD inputs stay high.
  This uses 3 pins instead of 4 RD lines.

`adc_sequencer` steps a counter through 0..99 at 300 kHz. At counts 0, 1, 2
and 3 it drives RD low and selects converters 0 to 3, one per step (3.3 µs
each). The bus is sampled at the end of each of these steps. The other 96
steps (about 320 µs) give the converters time to convert, against the
ADC0804's 114 µs conversion time at its 600 kHz RC clock. After the fourth
result is stored, `dirty_rr` pulses. A full round of four readings takes
333 µs. Each round returns the conversion started by the round before, so
readings lag the sensors by one round.

### Cleaning the readings

The sensors are noisy: readings spike and jump. Each channel goes through
two filters, one after the other:

1. **`rolling_average`** is the mean of the last 8 readings. It is
   truncated and updated every round. A running sum is kept, adding the new
   sample and subtracting the one that leaves the window. The window starts
   at zero, so the first 7 averages after reset ramp up.
2. **`stability_filter`** accepts a value only once its **high nibble** has
   stayed the same for **0.04 s** (2,000,000 cycles). Any change of the high
   nibble restarts the wait. Once a value is accepted, low-nibble changes
   pass straight through.

A one-round spike moves the average for only 8 rounds (2.7 ms), far less
than 0.04 s, so it never reaches the controller. A real change reaches it
about 43 ms after it happens: the window must fill, then the value must
settle. The car is slow, so this delay does not matter. `reading_ready`
pulses once per round, when new averages come out.

## The parking procedure (`park_fsm`)

This is the heart of the design. The table lists the steps in the order a
run goes through them. The "LED" column is the state number shown on
`led[3:0]`. The duty cycles are in tenths, 0–10.

| LED | step      | wheels (BL, BR, FL, FR)          | leaves when |
|-----|-----------|----------------------------------|-------------|
| 15  | WAIT      | 0,0,0,0                          | 1 s after reset, once at least one sensor round has arrived |
| 9   | PRESTART1 | 7,7,0,0 forward                  | `side1 >= 0x50`: the car angled toward the row is now close to it |
| 10  | PRESTART2 | 1,10,0,0 turn left               | `side1 == side2`: parallel to the row |
| 0   | START     | 7,7,0,0 forward                  | **both** side sensors far: a gap as long as the car. One side far alone is a gap that is too short, and the car drives on |
| 1   | MIDDLE    | 7,7,0,0 forward                  | both sides no longer far: the car is beside the car in front of the gap |
| 2   | BACKUP    | 0,0,10,10 reverse                | back sensor far for 0.1 s without a break. On leaving, the turn-in target `side1 - 28` is stored (saturating at 0) |
| 3   | TURNIN    | 0,1,10,2 reverse, left faster    | `side1 <= target`: the tail has swung into the gap |
| 4   | BACKIN    | 0,0,2,10 reverse, right faster   | `back >= 0x60`: close to the car behind |
| 6   | STRAIGHT  | 1,10,1,0 if `side1 > side2`, else 10,1,0,1 | the sides agree within 4 |
| 8   | END       | 7,7,0,0 forward, then 0,0,0,0    | stays here. It stops once the front zone is close |

How the wheels are driven is what makes these numbers make sense. The
chassis has four separate DC motors and no steering rack. To save pins, each
L293 channel drives its motor in one direction only. The **back wheels (BL,
BR) push the car forward** and the **front wheels (FL, FR) pull it in
reverse**. The car turns by running the left and right sides at different
speeds, as a tank does. For example, PRESTART2's 1 vs 10 on the back wheels
turns it left. The small nonzero values on the opposite axle in TURNIN and
STRAIGHT add drag on one side, which the real chassis relied on to turn.

Some points need care:

* **WAIT** counts from reset. Reset comes from the power-on reset *or* from
  the start/reset button while it is held. So releasing the button starts a
  new run one second later, which gives the filters time to fill.
* **BACKUP** keeps a timer that restarts every cycle the back reading is not
  far. The 0.1 s therefore counts from the *last* time something was behind
  the car.
* **TURNIN** uses the front side reading as its measure of angle. As the
  tail swings into the gap, the front side sensor turns away from the parked
  car in front and its reading falls. The target is set relative to where
  the reading was when reversing ended. So the amount of turn does not
  depend on how far from the row the car was driving.
* **PRESTART2** asks for exactly equal side readings (`PRESTART_TOL = 0`).
  **STRAIGHT** allows a difference of up to 4 (`STRAIGHT_TOL`).
* `duty` and `state` are registered. They change on the clock edge after
  the readings that cause them.

All thresholds are parameters of `park_fsm` (`PRESTART_NEAR`,
`PRESTART_TOL`, `TURNIN_OFFSET`, `BACK_CLOSE`, `STRAIGHT_TOL`, and the two
timer lengths). The zone limits are in `sp_pkg`.

## Driving the motors (`pwm_gen`)

Each wheel has its own PWM channel, stepped at 5 kHz. A PWM period is ten
steps (2 ms, 500 Hz). The output is high for `duty` steps and low for
`10 - duty`. `duty` is latched at the start of each period, so a change
never cuts a period short. Values above 10 act as 10. The four outputs
`motor_pwm[3:0]` = {BL, BR, FL, FR} go to the L293's inputs. The other input
of each motor is grounded.

## Display

`seg7_display` scans the four digits of the board's multiplexed display at
5 kHz. Digit *i* shows the high nibble of clean reading *i* as a hex digit,
0–F. Segments `seg[6:0]` = {g,f,e,d,c,b,a} and anodes `digit[3:0]` are
active low. `led[3:0]` shows the current step number.

## Clocking, reset and parameters

Everything runs on the 50 MHz board clock. The slower rates are one-cycle
clock enables from `tick_gen`, not derived clocks. All `always_ff` blocks
use a synchronous, active-high reset. The start button is synchronized and
debounced (stable for 10 ms) before use.

Top-level parameters of `self_parking_car`, all with the original
values as defaults:

| parameter     | default    | meaning |
|---------------|------------|---------|
| `CLK_HZ`      | 50,000,000 | system clock |
| `ADC_TICK_HZ` | 300,000    | ADC sequencer step rate (divider = 167) |
| `ADC_PERIOD`  | 100        | steps per round of four conversions |
| `AVG_WINDOW`  | 8          | moving-average length (power of two) |
| `PWM_TICK_HZ` | 5,000      | PWM step rate, 10 steps per period |
| `SCAN_HZ`     | 5,000      | display digit rate |
| `DEBOUNCE_US` | 10,000     | button debounce time |
| `STABLE_US`   | 40,000     | reading settle time |
| `STARTUP_US`  | 1,000,000  | wait after reset |
| `BACKUP_US`   | 100,000    | back sensor must read far this long |

All times are in microseconds and converted with `CLK_HZ`. Lowering
`CLK_HZ` therefore shrinks every counter together while the car time stays
the same. The fast end-to-end test uses this.

## Files

| file | contents |
|------|----------|
| `rtl/sp_pkg.sv` | sensor numbering, reading and duty types, zone thresholds, state encoding |
| `rtl/self_parking_car.sv` | top level |
| `rtl/read_sensor.sv` | sensing chain: divider, sequencer, 4 × (average, settle) |
| `rtl/adc_sequencer.sv` | RD / select sequence for the four converters |
| `rtl/rolling_average.sv` | window-8 moving average |
| `rtl/stability_filter.sv` | 0.04 s settle filter |
| `rtl/park_fsm.sv` | the ten-step parking controller |
| `rtl/pwm_gen.sv` | 0–10 duty-cycle PWM |
| `rtl/seg7_display.sv` | 4-digit multiplexed hex display |
| `rtl/debouncer.sv` | button synchronizer and debouncer |
| `rtl/tick_gen.sv` | clock-enable divider |
| `tb/adc0804_bank.sv` | behavioural model: four ADC0804s, shared bus (pull-ups read 0xFF), RD multiplexer |
| `tb/car_env.sv` | scripted surroundings for a whole parking run |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two whole-run tests |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. From the
repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sp_pkg.sv tb/tb_park_fsm.sv --top-module tb_park_fsm
./obj_dir/Vtb_park_fsm
```

Replace `tb_park_fsm` with any other testbench. What they check:

* **Unit tests** (`tb_tick_gen`, `tb_debouncer`, `tb_rolling_average`,
  `tb_stability_filter`, `tb_pwm_gen`, `tb_seg7_display`,
  `tb_adc_sequencer`, `tb_read_sensor`, `tb_park_fsm`) compare each module
  with values worked out in the testbench. Where a latency or a rate is
  defined they check exact cycle counts: the divider period, the settle
  time, PWM high time per period, one round per `reading_ready`, the
  one-second wait and the 0.1 s back-up hold. `tb_park_fsm` also walks
  every step with the cases that must *not* advance.
* **`tb_self_parking_car`** runs a whole parking run with `CLK_HZ` = 1 MHz,
  about 2 million cycles and a second of CPU time. `car_env` plays the
  sensors through the converter model and reacts to the step shown on the
  LEDs. It checks the order of the steps and the measured PWM duty cycles
  of every wheel in each step. It checks the start-up wait and back-up hold
  times and the display contents. It also checks that button bounce, a
  sensor spike and a too-short gap are all ignored, and that the car wiggles
  both ways and comes to a stop.
* **`tb_self_parking_car_full`** is the same run with every parameter at
  its default (50 MHz). It takes about 100 million cycles and about a minute.

## Where this implementation departs from the original

The original design left some things unstated or inconsistent. These are
the choices made here:

* **Rates.** The ADC sequencer steps at 300 kHz and the PWM at 5 kHz, the
  rates the original design names. Its board code divided the clock to
  about 278 kHz and 500 Hz instead.
* **Sequencer counts.** RD is driven at counts 0–3 of a 100-count round.
  The board code used counts 100–103 of 104.
* **Where the settle filter sits.** It is part of the sensing chain, as the
  original design describes it. Its board code placed the filter inside
  the state machine's threshold logic. The display therefore shows settled
  readings.
* **The tenth state.** The original design names ten states but describes
  nine. The tenth is taken to be the one-second start-up wait.
* **Step conditions.** START needs both sides far. BACKUP watches the
  *back* sensor for 0.1 s. Both follow the description of each step. The
  board code used different sensors and a 0.02 s count at those points.
  "Close" in MIDDLE is read as "not far", as in the board code.
* **BACKIN.** It was described as steering "in proportion" to the back
  reading, but no law is given. The fixed duty cycles 2 / 10 are used.
* **END.** It drives straight forward at 7 / 7 before stopping, not at the
  unequal 10 / 2 of the board code.
* **Additions.** Clock enables instead of derived clocks. A power-on reset
  port. A button synchronizer. Saturation of the turn-in target and of
  duty values above 10. Standard hex glyphs on the display.
* **Not built.** A module that would turn readings into distances (never
  used in the final car). A wireless (XBee) duty-cycle input and a
  "behaviour select" input to the PWM, which appear in the block diagram
  only.
* **Limits of the tests.** They exercise the logic against a scripted
  environment, not a physical model of the car. The thresholds and duty
  cycles were tuned on one chassis on one floor. Expect to retune them for
  other hardware.
