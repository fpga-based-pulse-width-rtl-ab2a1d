# Counter/compare PWM generator with an R/S output stage

This is an N-bit pulse width modulator (N = 8 by default) for driving an LED or a DC
motor from an FPGA. Software PWM or an analog comparator is not needed. A free-running
counter is the digital sawtooth. An equality comparator finds the point in each period
where the count reaches the stored duty word. A set/reset element turns those two
events into the output pulse. The average output voltage is the supply times the duty
cycle, so the duty word sets LED brightness or motor speed.

```
             data_in[N-1:0]
                  |
            +-----v------+  load
            |  register  |<----------------------+
            +-----+------+                       |
                  | A                            |
            +-----v------+  aeb (A=B)   +-----+  |
            | comparator |------------->| R   |  |
            +-----^------+              |   Q |--+--> q (PWM output)
                  | B                   | S   |  |
            +-----+------+  cout        +--^--+  |
            |  counter   |-----------------+-----+
            +------------+  (overflow)
```

## How one period works

The counter runs 0, 1, ..., 2^N-1 and wraps, so one period is 2^N clocks.

- **Overflow (`cout`).** This is 1 during the last clock of a period, when the count
  is 2^N-1. On the edge where the count wraps to 0, it does two things:
  - it sets the output stage, so `q` is 1 from count 0;
  - it loads `data_in` into the register, so the new word holds for the whole period.
- **Compare (`aeb`).** This is 1 while the count equals the stored word D. On that
  edge the output stage is reset, so `q` is 0 from count D+1.

So, for a stored word D:

| quantity | value |
|---|---|
| on time | D + 1 clocks |
| off time | 2^N - 1 - D clocks |
| period | 2^N clocks |
| duty cycle | (D + 1) / 2^N |

A larger word always gives a longer pulse. D = 2^N-1 gives a constant 1 (100 %). The
smallest duty is one clock per period. A fully-off output (0 %) cannot be produced.
The rising edge is fixed at the start of the period, and only the falling edge moves
with the data. This is trailing-edge modulation.

**Case: set and reset at once.** When D = 2^N-1, the compare and the overflow happen
in the same clock. The output stage gives **set priority**, so the output stays high.
With reset priority, the largest word would give 0 % instead of 100 %.

**Data-word timing.** The data input is sampled only at the end of a period. Changing
it mid-period does not shorten or lengthen the pulse already running. The change shows
from the next period on. After reset, the counter, register and output are all 0, and
the output stays low for the whole first period.

`pwm` states the two output rules as concurrent assertions: `q` is 1 after every
overflow, and 0 after every compare that is not also an overflow. Simulators that
check assertions report any break of these rules.

Signal timing: `q` is a flip-flop output. `cout` and `aeb` are decoded from registers
without further logic. The names `q`, `cout` and `aeb` are kept from the original
schematic.

## Modules

| file | module | what it is |
|---|---|---|
| `rtl/pwm_pkg.sv` | `pwm_pkg` | `PWM_WIDTH` = 8, the default N |
| `rtl/pwm_counter.sv` | `pwm_counter` | N-bit up-counter, `cout` = count is all ones |
| `rtl/pwm_register.sv` | `pwm_register` | N-bit register with load enable, sync clear |
| `rtl/pwm_comparator.sv` | `pwm_comparator` | `aeb = (a == b)` |
| `rtl/rs_latch.sv` | `rs_latch` | clocked set/reset flip-flop, set has priority |
| `rtl/pwm.sv` | `pwm` | the four above wired into the generator |
| `rtl/pwm_de0_top.sv` | `pwm_de0_top` | board top: switches, button, LEDs, motor driver |

All resets are synchronous and active low (`rst_n`). There is one clock.

The output stage is called a latch, following the block diagram it comes from. It is
built as an edge-triggered flip-flop, so that the whole design is synchronous. A
level-sensitive S/R latch would have to be fed with glitch-free set and reset pulses.

## Board top (`pwm_de0_top`)

This top targets a DE0-style board (Cyclone III EP3C16, 50 MHz oscillator, 10 slide
switches, 3 active-low pushbuttons, 10 active-high green LEDs, 40-pin GPIO headers). It
drives one half of an L293D dual H-bridge.

| port | use |
|---|---|
| `CLOCK_50` | clock |
| `BUTTON[0]` | reset, active low, through a two-flip-flop synchroniser |
| `SW[7:0]` | duty word D (switch up = 1) |
| `SW[9]` | motor direction |
| `LEDG[0]` | PWM output (brightness follows the duty cycle) |
| `LEDG[1]`, `LEDG[2]` | overflow and compare pulses |
| `motor_en12` | L293D Enable 1,2 (pin 1) = PWM output |
| `motor_in1`, `motor_in2` | L293D Input 1 / Input 2 (pins 2 / 7) = `SW[9]` / `!SW[9]` |

The PWM gates the driver's enable pin. While enable is high, the bridge drives the
motor in the direction set by Input 1 and Input 2. While it is low, the motor outputs
are off. So the motor's mean voltage is the supply times the duty cycle.

The following are choices of this top. Other boards need only a different wrapper
around `pwm`:

- which switches, button and LEDs are used;
- the direction switch;
- the reset synchroniser.

`BUTTON[2:1]` is unused. With N = 8, `SW[8]` is unused as well. N can be at most 9,
because `SW[9]` is the direction switch, and an elaboration-time check enforces this.

**Frequency.** At 50 MHz with N = 8, the PWM runs at 50 MHz / 256 = 195.3 kHz
(5.12 µs period). That is fine for an LED. Bipolar bridge drivers such as the L293D and
small DC motors are normally run much slower, at a few kHz or less. A slower PWM needs
a larger N or a clock enable on the counter. Neither is part of this design.

## Where this RTL departs from, or adds to, its source description

- **Taken from the source:**
  - the four blocks and their connections;
  - the 8-bit counter width;
  - overflow driving both the set and the register load;
  - compare-equal driving the reset;
  - the LED and L293D use.
- **Added here:**
  - the overflow defined as terminal count;
  - set priority in the output stage;
  - synchronous resets to 0;
  - a counter with no enable;
  - the board pin assignment and reset synchroniser.
- **One variant not followed.** The source also shows a 3-bit version that compares the
  counter with a constant and has no data register. This RTL always has the register.
  The 3-bit size is covered by setting `N = 3`.
- **Fixed period.** The source says the off time is changed "by the counter". Here the
  off time follows from the counter length: the period is 2^N clocks, set by N at build
  time. No separate period register exists.
- **Not included:**
  - other PWM forms (leading-edge and centre-aligned);
  - the L293D, the motor and the board itself, which are bought-in parts.

## Simulation

Each testbench in `tb/` checks its module against values it works out itself. Each
ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_pwm_counter` | count = clocks since reset mod 256; `cout` only at 255, 256 clocks apart |
| `tb_pwm_register` | loads exactly when `load` = 1; holds otherwise; reset clears it |
| `tb_pwm_comparator` | all 65,536 input pairs |
| `tb_rs_latch` | every set/reset combination, including both at once; 1000 random steps |
| `tb_pwm` | N = 3 (8-clock period). Every word 0..7, then random data changes, also mid-period. Each cycle it checks `q == (pos <= D)`, `aeb == (pos == D)` and `cout == (pos == 7)`, using its own period count. It also checks each period's pulse length. |
| `tb_pwm_de0_top` | Full size (N = 8), driven through switches and button. Sweeps every duty word 0..255 and flips the direction switch. Moves the switches at random times and presses reset mid-period. It makes sure that each of these happened at least once: set, reset, new word, 100 % period, ignored mid-period change, button reset, direction change. |

All of them run in well under a second. Example with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pwm_pkg.sv tb/tb_pwm_de0_top.sv --top-module tb_pwm_de0_top -o sim
./obj_dir/sim
```

Swap the testbench name to run another one. The testbenches are two-state safe: every
register that is read is reset first.

## Size

After generic synthesis, `pwm` is 17 flip-flops:

- 8 for the counter;
- 8 for the register;
- 1 for the output.

It also has an 8-bit incrementer, an 8-bit equality compare and a few multiplexers.
The board top adds the 2 synchroniser flip-flops. On a 15k-LE FPGA this is a few
dozen logic elements.
