# Two-digit combination lock on a rotary knob

A small FPGA design for an evaluation board with a rotary knob, three push
buttons, a bank of DIP switches and some LEDs. The user turns the knob to
pick a hexadecimal digit, shown on four LEDs. Pressing the knob commits the
digit. The lock opens after the right two digits in order (0x2 then 0x3 by
default). A wrong digit anywhere leads to an error state, and the lock stays
there until it is explicitly relocked. Five state codes and an "open" light are
shown on the LEDs.

The design is a classic teaching example of a Moore state machine with its
input conditioning around it. Most of the subtlety is in that conditioning:
turning a bouncing knob and bouncing buttons into clean single-cycle events.

```
 FPGA_CPU_RESET_B --> Debouncer --> Reset (to every block below)
 GPIO_COMPSW -------> Debouncer --> ResetLock --------------+
 FPGA_ROTARY_PUSH --> Debouncer --> Enter ------------------+
 GPIO_DIP_SW ---------------------> DebugState -------------+
                                                            v
 FPGA_ROTARY_INCA --> RotaryEncoder --Up---> Decrement
 FPGA_ROTARY_INCB -->               --Down-> Increment
                                            Lab3Counter --Combination--> Lab3Lock --> LED_State
                                                        |                         --> LED_Open
                                                        +--------------------------> LED_Combination
```

## The lock state machine (`Lab3Lock`)

Five states, held in a 3-bit register:

| code | state  | meaning                                   | `Open` |
|------|--------|-------------------------------------------|--------|
| 0    | Locked | waiting for the first digit               | 0      |
| 1    | OK1    | first digit was right                     | 0      |
| 2    | Bad1   | first digit was wrong (not yet revealed)  | 0      |
| 3    | Open   | both digits right                         | 1      |
| 4    | Bad2   | error: some digit was wrong               | 0      |

Transitions happen only on a cycle where `Enter` is high:

* Locked → OK1 if `Combination == DIGIT1`, else → Bad1.
* OK1 → Open if `Combination == DIGIT2`, else → Bad2.
* Bad1 → Bad2 whatever the digit. A wrong first digit is reported only after
  the second one, so someone guessing learns nothing about the first digit.
* Open and Bad2 stay where they are.

Two resets act on the lock, both synchronous:

* `Reset` (system reset, highest priority) goes to Locked.
* `ResetLock` closes the lock. It loads `DebugState` if that is a valid code
  (0–4). Otherwise it goes to Locked. With the DIP switches all off this simply
  relocks. Other settings let you drop the lock into any state to test it.

The machine is written in three separate parts: next-state logic in
`always_comb`, the state register in `always_ff`, and `State`/`Open` as
continuous assignments of the current state only. So the outputs change on
the clock edge that samples `Enter`, and never combinationally from an input.
If the register ever holds one of the unused codes 5–7, the next cycle returns
it to Locked.

The state names, transitions, port list and sample combination come from the
original lab description. The numeric codes, the reset priorities and the
treatment of invalid `DebugState` values are this design's choices.
`lab3_pkg.sv` holds the state enum and the default digits.

## From knob to digit (`RotaryEncoder`, `Lab3Counter`)

The knob has two contacts, A and B, that form a 2-bit Gray code. One
direction runs {A,B} = 00 → 01 → 11 → 10 → 00; the other runs the reverse
sequence. `RotaryEncoder` passes A and B through a two-flop synchroniser. It
remembers the last code and, on each move to a neighbouring code, pulses `Up`
or `Down` for one cycle. The forward sequence above is taken to be clockwise
(`Up`). If both bits change at once, the direction is unknown, so no pulse is
made. Contact bounce therefore shows up as matched Up/Down pairs that cancel
downstream. A pulse comes 3 cycles after the contact changes.

One mechanical detent of the wheel moves through all four codes, so there are
four pulses per click. `Lab3Counter` absorbs this: it keeps a 6-bit count and
shows only the top 4 bits. The digit therefore moves once per four pulses.
Counter-clockwise turns raise the digit, so `Down` drives `Increment`.
Clockwise turns lower it, so `Up` drives `Decrement`. The count wraps modulo 64,
which means the digit wraps F↔0. If both inputs are high in the same cycle, the
count does not change. Reset clears it to 0.

If the knob is turned while the count is not a multiple of four, the digit
changes partway through a click. Because reset clears the count and every
click is four steps, this normally does not happen, but bounce that is lost
(e.g. a two-bit jump) can shift the phase by one step.

## Button conditioning (`Debouncer`)

Each push button passes through a `Debouncer`, which gives exactly one
one-cycle pulse per press. Every bit is synchronised, then sampled only on
cycles where `Enable` is high. The top level drives `Enable` with a shared tick
every 2^`DEBOUNCE_TICK_W` cycles. A bit's debounced level flips only after
`STABLE_SAMPLES` consecutive samples that differ from it. Any sample that agrees
with the current level restarts the count, so a bouncing contact never gets
through. A rising level produces the output pulse; a release produces nothing.

With the defaults (tick every 16 384 cycles, 8 samples) a press must be steady
for about 1.3 ms at 100 MHz. The pulse comes between 7 and 8 ticks plus 3
cycles after the press settles.

The debouncer for the system reset button cannot itself be reset by the reset
it produces. Its `Reset` is tied low instead. Its registers are a synchroniser,
a level, a counter and the output flop. After the button has been still for one
filter period they settle to a consistent state by themselves, whatever they
powered up with. At power-up it may or may not emit one reset pulse. Press the
reset button once after configuration to bring the rest of the design to a
known state.

## Top level (`Lab3Top`)

| port               | dir | width | use                                         |
|--------------------|-----|-------|---------------------------------------------|
| `Clock`            | in  | 1     | board clock                                 |
| `FPGA_CPU_RESET_B` | in  | 1     | system reset button, **active low**         |
| `GPIO_COMPSW`      | in  | 1     | ResetLock button                            |
| `FPGA_ROTARY_PUSH` | in  | 1     | knob push, commits a digit                  |
| `FPGA_ROTARY_INCA` | in  | 1     | knob contact A                              |
| `FPGA_ROTARY_INCB` | in  | 1     | knob contact B                              |
| `GPIO_DIP_SW`      | in  | 3     | DebugState for ResetLock                    |
| `LED_Combination`  | out | 4     | dialled digit                               |
| `LED_State`        | out | 3     | lock state code                             |
| `LED_Open`         | out | 1     | lock is open                                |

Parameters: `DIGIT1` = 4'h2 and `DIGIT2` = 4'h3 set the combination.
`DEBOUNCE_TICK_W` = 14 and `DEBOUNCE_SAMPLES` = 8 set the button filter.

Pin names follow the board signals. The LED port names are this design's own.
The board parts themselves (buttons, knob, DIP switches, LEDs) are outside the
RTL.

## Size

Coarse synthesis of `Lab3Top` gives 43 flip-flops plus 12 bits of
debounce counters. Of these, `Lab3Lock` uses 3 flip-flops (the state register)
and `Lab3Counter` uses 6. The rest are the debounce tick counter (14), the
synchronisers and the debouncers.

## Departures and open points

* The rotation direction that counts as clockwise is assumed: only the two
  Gray-code sequences are known. If the digit moves the wrong way on real
  hardware, swap the `Up`/`Down` connections in `Lab3Top` (or swap A and B).
* The original debouncer and encoder were supplied ready-made and their
  internals are not described. Both modules here are fresh, minimal designs
  that do the stated job, and they may differ in latency and filtering from
  the originals.
* The system reset button is assumed active low. The other buttons are assumed
  active high.
* An optional extension in which the open lock can be re-programmed with a new
  combination (two extra states) is not included.
* The encoder gives one pulse per Gray-code step, which is four per click.
  The counter turns that into one digit per click. A decoder that pulsed once
  per click would need `SUB_W = 0` in `Lab3Counter`.
* Two assertions guard the pulse interfaces. `RotaryEncoder` never raises
  `Up` and `Down` together. Every `Debouncer` output pulse is one cycle
  wide. Run with `--assert` to check them in simulation.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --top-module Lab3Top_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/lab3_pkg.sv tb/Lab3Top_tb.sv -o sim
./obj_dir/sim
```

Replace `Lab3Top_tb` with `Lab3Lock_tb`, `Lab3Counter_tb`,
`RotaryEncoder_tb` or `Debouncer_tb` to run the unit tests.

* `Lab3Top_tb` runs the whole design at its default parameters, in about
  6 million cycles (a few seconds). It presses the reset button, dials with
  contact bounce, enters digits with switch bounce, and opens the lock. It also
  takes both error paths, wraps the digit in both directions, and uses
  ResetLock with and without a DebugState. It checks the LEDs against a
  reference model after every action, and checks the exact number of encoder
  pulses. It fails if any of those mechanisms never happened.
* `Lab3Lock_tb` walks every arc of the state diagram, then checks 4000 random
  cycles against a reference model.
* `Lab3Counter_tb` checks four pulses per digit, wrap-around both ways,
  simultaneous inputs and reset.
* `RotaryEncoder_tb` checks the direction, the 3-cycle latency and the
  one-cycle width of every pulse, plus two-bit jumps and bounce.
* `Debouncer_tb` checks single pulses, the press-to-pulse latency window,
  bounce rejection on press and release, `Enable`, reset and independent bits.

The simulator is two-state. Registers that have no reset (synchronisers, the
tick counter) start at arbitrary values, and the testbenches are written so
that this does not matter.
