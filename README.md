# Hall-sensored BLDC motor speed controller

A brushless DC motor has no commutator, so something else must decide which
of its three windings carry current at each moment. This controller does it
in logic. Three Hall sensors report which 60-degree sector the rotor is in,
and a six-switch inverter bridge applies the supply to the two windings that
give torque in that sector. The controller turns the sensor code into six
gate signals. It keeps every switch off for a short dead time after each
sector change, and it chops the active switches with a PWM signal whose duty
a PI regulator adjusts so that the measured speed follows a set point.

The structure, the commutation table, the 8-bit widths, the 10 MHz clock, the
8-bit counters and the PI equations follow the FPGA controller described in
*Implementation Of Brushless DC Motor Using FPGA Interface*. That description
names some blocks without saying how they work, and it gives no gain values.
Those parts are this design's own. Each one is listed under "Choices and
departures" below.

## Structure

```
 hall[2:0] ─► change_detect ──hall_state──► commutation_logic ──comm[5:0]──┐
                 │  change                                                  ▼
                 ├──────────► dead_band ─────────────── db_en ───────► and_logic ─► gates[5:0]
                 │                                                          ▲        (to inverter)
                 └──────────► speed_estimator ──speed──┐                     │ pwm
 user_speed ─► speed_reference ──ref_speed──► pi_controller ──duty──► pwm_generator
                                                    ▲ update (once per PWM period)
```

| Module | Job |
|---|---|
| `bldc_pkg` | shared types (`hall_t`, `gates_t`, `speed_t`, `duty_t`), transistor bit positions `Q1`..`Q6`, phase-drive enum |
| `change_detect` | two ranks of Hall flip-flops; one-clock `change` pulse on any sensor edge |
| `commutation_logic` | Hall code and direction to the six switch enables; flags the invalid codes 000 and 111 |
| `dead_band` | 8-bit counter, comparator and flip-flop; `db_en` is low for `dead_time` clocks after a change |
| `pwm_generator` | 8-bit down-counter PWM with a 256-clock period; marks the end of each period |
| `and_logic` | `gates = comm & db_en & pwm`, registered, with a shoot-through assertion |
| `speed_estimator` | counts Hall edges in a fixed gate time and gives an 8-bit speed |
| `speed_reference` | set-point register loaded from the user input |
| `pi_controller` | discrete PI with output and integrator limits, updated once per PWM period |
| `bldc_controller` | top level: the blocks above wired as in the diagram |

The inverter bridge and the motor are not logic. The top level ends at
`gates[5:0]` and `hall[2:0]`.

## Commutation

Gate bit i-1 drives transistor Qi. Q1 and Q2 are the upper and lower switches
of the leg wired to phase A, Q3 and Q4 of phase B, and Q5 and Q6 of phase C.
The Hall code is written {A,B,C}. For clockwise rotation (`dir` = 1):

| Hall A B C | Phase A | Phase B | Phase C | `gates` Q6..Q1 | value |
|---|---|---|---|---|---|
| 1 0 0 | −Vdc | +Vdc | open | 000110 | 6 |
| 1 0 1 | open | +Vdc | −Vdc | 100100 | 36 |
| 0 0 1 | +Vdc | open | −Vdc | 100001 | 33 |
| 0 1 1 | +Vdc | −Vdc | open | 001001 | 9 |
| 0 1 0 | open | −Vdc | +Vdc | 011000 | 24 |
| 1 1 0 | −Vdc | open | +Vdc | 010010 | 18 |
| 0 0 0, 1 1 1 | open | open | open | 000000 | 0, `hall_fault` = 1 |

A clockwise rotor passes through the rows in this order. Each sector
energises exactly two legs, one high and one low. A leg never goes straight
from high to low: it always spends a sector open in between.

With `dir` = 0 the controller swaps + and − on the two energised phases. This
applies the opposite voltage vector in every sector. A motor turning
clockwise is first braked, and it then runs up counter-clockwise through the
same codes in reverse order.

## What happens at a sector change

This is the most timing-sensitive part of the design. Here is what happens
cycle by cycle when a Hall edge is sampled at clock edge *n*:

| edge | `change_detect` | `dead_band` | `and_logic` output |
|---|---|---|---|
| n | first rank takes the new code; `change` goes high | — | old pattern |
| n+1 | second rank (`hall_state`) takes the new code; `change` falls | counter cleared, `db_en` ← 0 | old pattern (registered from before n+1) |
| n+2 … n+1+D | — | counting | all off |
| n+1+D | — | comparator sets `db_en` ← 1 | all off |
| n+2+D | — | — | new pattern (if PWM is on) |

Here D = max(`dead_time`, 1). The commutation logic is combinational from the
second rank, so the new pattern and the start of the dead time appear on the
same edge. Because the gates are registered, all six switches are off for
exactly D clocks between the old pattern and the new one. Hall bounce is also
covered: a second change during the dead time restarts it. `dead_time` = 5 at
10 MHz gives 0.5 µs.

The Hall inputs go into the first rank with no extra synchroniser. If the
sensors are noisy or slow, add a synchroniser or a debounce stage in front
of `hall`.

## PWM

One 8-bit down-counter times both phases of each period:

* **Period start.** The duty is captured into a holding register. If it is
  non-zero, the output flip-flop is set and the counter is loaded with
  duty−1. If it is zero, the counter is loaded with 255 and the output stays
  low.
* **End of the on phase.** When the counter reaches zero, the output is
  cleared and the counter is loaded with 255−duty.
* **End of the off phase.** When the counter reaches zero again, the next
  period starts.

The period is therefore always 256 clocks: 25.6 µs, or 39 kHz, at 10 MHz. The
output is high for exactly `duty` clocks, so duty 255 gives 255/256. A duty
change never cuts a period short. `period_start` is high in the last clock of
each period, and the PI regulator uses it as its update strobe.

The PWM gates all six switches, the upper and the lower one of each active
pair.

## Speed loop

**Measurement.** `speed_estimator` counts `change` pulses during a gate time
of `WINDOW` clocks (default 1,000,000 = 0.1 s) and publishes the count,
saturated at 255, with a one-clock `speed_valid`. One unit is 10 Hall edges
per second, which is 100/(6·p) rpm for a motor with p pole pairs. The count
does not depend on the direction of rotation.

**Regulation.** At every PWM period end, `pi_controller` evaluates:

```
e      = ref_speed − speed                 saturated to −128..127
yn    += KI · e                            integrator, held in [YMIN, YMAX]
Yn     = yn + KP · e
duty   = Yn limited to [YMIN, YMAX]        (0..255)
```

The gains are fixed point with `FRAC` = 20 fraction bits, so 1.0 is 2^20. The
defaults are KP = 1.0 and KI = 121/2^20 per PWM period. The regulator runs
3906 times per speed window, so KI amounts to about 0.45 duty units per unit
of error per window. The loop is slow by construction: the speed value
changes only once per window. **If you change `WINDOW`, scale `KI` inversely,
so that KI times the number of PWM periods per window stays the same.** The
reduced testbench, for example, uses `WINDOW` = 16384 and KI = 7373. Holding the integrator inside the output range stops it from
winding up while the duty is saturated, for example when the set point is
above the motor's top speed.

## Top-level interface (`bldc_controller`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 10 MHz clock; synchronous active-low reset (all gates off, reference 0) |
| `hall` | in | 3 | Hall sensors {A,B,C} |
| `dir` | in | 1 | 1 = clockwise sequence, 0 = reversed |
| `user_speed`, `speed_load` | in | 8, 1 | set point, taken when `speed_load` = 1 |
| `dead_time` | in | 8 | dead time in clocks (5 = 0.5 µs) |
| `gates` | out | 6 | Q1..Q6 gate drive, active high |
| `speed`, `speed_valid` | out | 8, 1 | measured speed and its update strobe |
| `ref_speed`, `duty`, `speed_error` | out | 8 each | active reference, PI output, signed PI error |
| `hall_fault` | out | 1 | sensor code 000 or 111 (gates are then off) |

| Parameter | Default | |
|---|---|---|
| `WINDOW` | 1_000_000 | speed gate time in clocks |
| `FRAC` | 20 | PI gain fraction bits |
| `KP` | 1048576 | proportional gain (1.0) |
| `KI` | 121 | integral gain per PWM period |

Latency: the gates go off on the second clock edge after the one that samples
a Hall edge, and the new pattern appears D clocks later. That is two capture
ranks and the output register, plus the dead time.

## Choices and departures

These points follow the source design: the block structure, the commutation
table, the invalid-code rule, the two flip-flop ranks of the change detector,
the make-up of the dead-band logic (8-bit counter, comparator, flip-flop with
synchronous reset, cleared by a change), the 8-bit down-counter PWM at
10 MHz, the AND of commutation, dead band and PWM, the PI equations with
output limits, and the 8-bit widths.

These points are this design's own:

* **Clock.** The source gives both 50 MHz and 10 MHz. This design uses
  10 MHz, the clock of its PWM counter and test board.
* **Speed estimation.** Only the name and the 8-bit width are given. The
  gate-time edge counter and the 0.1 s window are new.
* **Speed reference.** Built as a load-enabled register with an upper limit.
* **PI details.** The gains, the fixed-point format, the saturation of the
  error to 8 bits and the integrator clamp are all new.
* **PWM wiring.** The parts are given but not their wiring. The two-phase use
  of the single counter is new.
* **Dead time.** It is a run-time input. The counter stops once the time is
  up.
* **Direction.** Reversal is done by polarity swap. The source says only that
  running the sequence in reverse reverses the motor.
* **Added signals.** The registered gate output, the shoot-through assertion,
  `hall_fault` and the status outputs are additions.
* **Change detection.** One change detector and one dead-band timer serve
  all three sensors. The source's simulation traces show per-sensor change
  and dead-band signals, but its block diagram and text have one of each,
  and that is what is built.

The inverter bridge and the motor are outside the logic. For simulation they
exist only as a behavioural model.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `change_detect_tb` | random Hall sequences against a two-deep reference history |
| `commutation_logic_tb` | all 8 codes × 2 directions against a phase-voltage table |
| `dead_band_tb` | low time for dead times 0, 1, 5, 17, 200; restart during a dead time |
| `pwm_generator_tb` | period 256 and high time = duty for edge and random duties; mid-period duty change |
| `pi_controller_tb` | 4000 random steps against an integer model of the equations; both limits reached |
| `speed_estimator_tb` | known pulse counts per window, saturation at 255, `valid` spacing |
| `speed_reference_tb` | load, hold and limit |
| `and_logic_tb` | gating by dead band and PWM, one-clock latency |
| `bldc_commutation_seq_tb` | open loop at default parameters: Hall codes stepped by hand through both directions; exact gate values (6, 36, 33, 9, 24, 18 clockwise) and exact dead-time placement for dead times 5 and 12 |
| `bldc_controller_tb` | closed loop, reduced window (16384 clocks), about 2.1 M clocks, under 1 s |
| `bldc_controller_full_tb` | the same closed-loop scenario with every parameter at its default; about 130 M clocks, about 1 minute |

The two closed-loop testbenches connect the controller to
`tb/bldc_plant_model.sv`, a behavioural model of the bridge, the motor and
the sensors:

* The rotor position is kept as a sector number plus a position inside the
  sector.
* The motor has first-order mechanics.
* A sector gets forward torque only from its correct pattern and braking
  torque from the reversed one.
* The model counts shoot-through and any wrong pattern.

The scenario runs the following steps:

1. Start with a set point above the reachable speed. The duty must saturate
   at 255.
2. Regulate to 150, then to 80, each within ±6 counts.
3. Inject the invalid codes 000 and 111. The gates must be off and
   `hall_fault` set.
4. Reverse at 80. The rotor must turn backwards at the regulated speed.
5. Stop at set point 0.

Throughout the run, the testbench checks the following:

* The model sees no shoot-through and no wrong pattern.
* There are at least `dead_time` off clocks between any two different active
  patterns.
* Commutation, dead gaps, PWM chopping, PI updates, both duty limits, speed
  measurements, invalid codes and reversal each happen at least once.

The motor model's numbers (top speed about 244 counts per window, time
constant about two windows) are chosen to exercise the loop. They do not
describe a particular motor.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb --top-module bldc_controller_tb \
  rtl/bldc_pkg.sv rtl/*.sv tb/bldc_plant_model.sv tb/bldc_controller_tb.sv -o sim
./obj_dir/sim
```

For a unit testbench, compile `rtl/bldc_pkg.sv`, the module and its
testbench, for example:

```
verilator --binary --timing --assert --top-module dead_band_tb \
  rtl/bldc_pkg.sv rtl/dead_band.sv tb/dead_band_tb.sv -o sim
```

Lint: `verilator --lint-only -Wall -Irtl rtl/bldc_pkg.sv rtl/bldc_controller.sv`.

## Limits of trust

* The commutation table, dead-time mechanism and PWM are checked exactly,
  cycle by cycle.
* The closed-loop behaviour is shown only against an idealised motor model.
  Real gains must be tuned to the motor and to `WINDOW`.
* Nothing here models inverter switching times, current limits or sensor
  noise.
* With a 0.1 s gate time the regulator reacts slowly. It suits a
  constant-speed drive, not fast speed changes.
