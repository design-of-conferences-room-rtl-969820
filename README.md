# Conference-room controller for a small CPLD

A conference-room model is run by one small programmable logic device. The
user works the room with on/off switches: two switches for the door, two for
the curtain, a mode switch and two switches for the lights. Sensors act on the
room too:

- A smoke detector opens the door and the curtain and sounds an alarm.
- An LM35 temperature sensor switches the heater on below 20 °C and the air
  conditioner on above 25 °C.
- A photo sensor at the door stops a closing door when someone stands in the
  doorway.
- A second photo sensor adds a second group of lights when the room gets dark.

The controller is seventeen flip-flops and some next-state logic, clocked by
the board's 25.175 MHz oscillator. Every output is registered, so each output
reacts one clock after its cause. The motors are DC motors behind H-bridges.
No limit switches or timers are used: a motor runs for as long as its switch
stays on.

The RTL has two layers:

- `room_controller` is the synthesizable logic that goes into the CPLD.
- `conference_room` wraps the controller in behavioural models of the
  circuits wired to it on the model board. These are the temperature
  comparators, two LDR photo sensors and two H-bridges. With them, a
  testbench can drive the whole room from a temperature and from LDR
  resistances, and can watch which way each motor turns.

## Signals

| signal | dir | meaning |
|---|---|---|
| `sw[0]`, `sw[1]` | in | door: open, close |
| `sw[2]`, `sw[3]` | in | curtain: open, close |
| `sw[4]` | in | 0 = lights automatic, 1 = lights manual |
| `sww[1:0]` | in | manual light switches (`sww[1]` → `l1`, `sww[0]` → `l2`) |
| `phd` | in | doorway photo sensor, 1 = something in the doorway |
| `phd1` | in | room photo sensor, 1 = dark |
| `fs` | in | smoke detector, 1 = smoke |
| `ts[1:0]` | in | temperature code: `ts[0]` above 25 °C, `ts[1]` below 20 °C |
| `p[3:0]`, `n[3:0]` | out | door / curtain H-bridge drive: `3` hex open, `C` hex close, `0` stop |
| `l1`, `l2` | out | low and high light groups |
| `alarm`, `cool`, `heat` | out | alarm, air conditioner, heater |

At the `conference_room` level, `phd`, `phd1` and `ts` are produced by the
models. The top instead takes `temp_dc` (tenths of a degree, signed),
`door_ldr_ohms` and `room_ldr_ohms`. It also gives `door_left/right` and
`curtain_left/right` from the H-bridge models. `rst` is synchronous and
active high. Reset leaves both motors stopped, all lights off, and alarm,
heater and air conditioner off.

## Door and curtain: command registers

This is the part that needs the most care. Each motor channel has a 4-bit
drive register (`p` for the door, `n` for the curtain). It also has two
command registers: `r1`/`r2` for the door and `r3`/`r4` for the curtain.
The open register records that an open command has been acted on. The close
register does the same for close. The registers do not tell where the door
or curtain actually is, because the model has no limit switch. Each clock,
the switch pair `{close, open}` selects one rule:

| switches | rule |
|---|---|
| `00` | stop; clear both registers |
| `01` open | if the open register is clear: drive open, set open, clear close. Otherwise, if the close register is also set: stop, clear close. Otherwise keep everything |
| `10` close | if the close register is clear: drive close, set close, clear open. Otherwise, if the open register is also set: stop, clear open. Otherwise keep everything |
| `11` both | if only open is set: drive close, set close. If only close is set: drive open, set open. Otherwise keep everything |

The consequences are not obvious from the table:

- **A motor runs while its switch is held.** The first clock of a command
  starts the motor. Later clocks keep the drive word unchanged. Releasing
  both switches is what stops it.
- **Both switches on reverses the motor once.** After the reversal both
  registers are set, so holding `11` does not make the motor swing back and
  forth. Going from `11` to a single switch stops the motor, because the
  "both registers set" branch applies. The user must release both switches
  and then give the command again.
- **Doorway barrier (door only).** In every clock where the close switch is
  on and `phd` = 1, the door drive becomes stop and `r2` is set. Because `r2`
  stays set, the door does **not** restart when the doorway clears. The user
  has to release the close switch and press it again. The same check also
  applies when a `11` reversal would turn the door to closing. An assertion
  in `door_ctrl` states the rule: whenever `phd` = 1 and close is requested
  without fire, the next drive word is not "close".
- **Fire.** While `fs` = 1, both drive words are forced to "open" on every
  clock. The command registers go on following the switches. When the smoke
  clears, a drive word that no switch rule rewrites keeps the value "open".
  For example, a door that was closing before the fire stays open-driven
  until its switches change.

The drive words use only `0`, `3` hex and `C` hex, so one transistor pair of
the H-bridge is never on together with the other. Assertions in both motor
units check this.

## Lights

With `sw[4]` = 0 the lights are automatic. `l1` is always on, and `l2`
follows the room photo sensor, so both groups are on in the dark. With
`sw[4]` = 1 the two light switches drive the groups directly.

## Fire alarm and climate

The `alarm` output is `fs` delayed by one clock. It is not latched. The
emergency request reaches the motor units without delay, so the alarm and
the forced opening appear on the same clock edge.

`hvac_ctrl` turns the comparator code into outputs: `01` gives `cool`, `10`
gives `heat`, and `00` turns both off. The comparators cannot produce `11`;
if it does occur, both outputs keep their values.

## The circuits around the controller (behavioural models)

These are not CPLD logic. They exist so that the room can be simulated from
physical quantities.

- `temp_sensor_circuit`: the LM35 outputs 10 mV per °C. Its output in mV
  therefore equals the temperature in tenths of a degree. Two comparators
  check it against 200 mV and 250 mV: `ts[1]` is set below 20.0 °C and
  `ts[0]` above 25.0 °C. Exactly 20.0 °C and exactly 25.0 °C lie in the
  comfort band. The comparators have no hysteresis.
- `light_sensor_circuit`: the LDR runs from VCC to a node, and R runs from
  the node to ground. The node feeds an inverting Schmitt trigger (7414).
  Node voltage = VCC·R/(R+R_ldr), with VCC = 5 V and R = 10 kΩ. The output
  goes 0 above 1.7 V and 1 below 0.9 V, and in between it keeps its last
  value. So the output is 1 for R_ldr above about 45.6 kΩ and 0 below about
  19.4 kΩ. Synthesis infers a latch for that memory, which is intended. The
  same circuit serves as the doorway sensor and the room sensor.
- `h_bridge`: drive word `3` hex (transistors Q2 and Q3) turns the motor
  left, which opens. `C` hex (Q4 and Q5) turns it right, which closes. Any
  word that turns on a transistor of each pair raises `shoot_through` and a
  warning.

## Fitting the device

The model board carries an EPM3032A CPLD, which has 32 macrocells and 34 user
I/O pins in its 44-pin package. Synthesis of `room_controller` gives 17
flip-flops:

| register | bits |
|---|---|
| `p`, `n` | 4 + 4 |
| command registers | 4 |
| `l1`, `l2` | 2 |
| `alarm`, `cool`, `heat` | 3 |

The controller uses 27 signal pins: 14 inputs including the clock and
reset, and 13 outputs. This should fit. A vendor fitter was not run.

## What follows the original description, and what is this design's own

Taken from the original design:

- the switch assignments and the motor codes;
- the door, curtain, light, fire and temperature rules;
- the photo-sensor polarity;
- the 20/25 °C thresholds and the 10 mV/°C sensor slope;
- the LDR/Schmitt-trigger topology;
- the left-open / right-close rule of the H-bridge;
- the 25.175 MHz clock.

Decided here:

- **The meaning of the command registers.** The original prose says a
  register is set "when the door is open" and that the motor then stops.
  Its own source code instead sets the register when the motor starts and
  keeps the motor running. The source-code behaviour is implemented. Without
  a limit switch or travel timer, the prose version would stop the motor one
  clock after starting it.
- **The barrier latch.** A barrier stops the door and the door stays stopped
  until the command is given again. The other reading, that the door resumes
  closing when the doorway clears, was not chosen.
- **The manual light mapping** `{l1, l2} = sww`.
- **The room light sensor.** The automatic lights use their own sensor,
  `phd1`, not the doorway sensor.
- **Holding on code `11`.** `hvac_ctrl` keeps its outputs on the impossible
  code `11`.
- **Reset.** The added synchronous reset, and its values.
- **Model values.** The resistor value, the supply voltage, the Schmitt
  thresholds and the H-bridge bit order used in the models.

The temperature circuit also contains an amplifier whose gain could not be
established. The comparator thresholds are therefore taken at the sensor
output.

Not modelled:

- the microphones, which are switched by the user but have no defined signal;
- the power supply;
- the smoke detector itself, which is represented only by its digital output
  `fs`;
- the CPLD board.

Switch bounce and metastability are not handled. The original design has
neither debouncers nor synchronisers. A user switch that bounces can
therefore send a motor through several commands before it settles.

## Files

`rtl/`:

- `room_pkg.sv`: drive codes, the switch-command enum and the temperature
  codes;
- `door_ctrl.sv`, `curtain_ctrl.sv`: the motor channels;
- `light_ctrl.sv`, `fire_alarm.sv`, `hvac_ctrl.sv`;
- `room_controller.sv`: the CPLD logic;
- `temp_sensor_circuit.sv`, `light_sensor_circuit.sv`, `h_bridge.sv`:
  behavioural models;
- `conference_room.sv`: the whole room.

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
Each ends by printing `TB_RESULT checks=N failures=M`. The unit testbenches
for the motor channels compare 4000 random clocks against a transition-table
reference. `tb_conference_room` plays one complete session at the default
parameters:

- the door opens;
- the door closes, is blocked, and closes again;
- the curtain opens, closes and reverses;
- the room goes dark, then the lights are switched by hand;
- the temperature passes through hot, cold and comfortable;
- a fire breaks out.

It counts each of the 13 mechanisms and fails if any of them never happens.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl rtl/room_pkg.sv \
    tb/tb_conference_room.sv --top-module tb_conference_room -Mdir obj_room -o sim
./obj_room/sim
```

Replace `conference_room` with any other module name to run its unit test.
Every testbench finishes in well under a second. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/room_pkg.sv rtl/<module>.sv`.
The only warnings are unused package constants, plus unused observation
signals in `room_controller` and `conference_room`.
