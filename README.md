# Time-controlled four-digit PIN input system

A small FPGA design that lets a user key in a four-digit PIN with ten slide
switches and two push buttons, shows the PIN on four seven-segment displays,
and checks it against two built-in PINs. The user has a limited time to get
it right. When the time runs out the entry locks; only an administrator,
pressing a separate reset button, can give the user a new time window. It is
meant as a simple access-control front end: a door, a machine or a lab.

The design targets a board with ten switches, two push buttons, ten LEDs and
six active-low seven-segment displays (the layout of common Intel MAX 10
evaluation boards) and a 50 MHz clock, but nothing in the RTL is
board-specific.

## How a user enters a PIN

Switch *k* stands for the digit *k*. The two buttons choose which position of
the PIN the switch sets:

| key0 | key1 | position set                         |
|------|------|--------------------------------------|
| 1    | 1    | first digit (units, rightmost)       |
| 0    | 1    | second digit (tens)                  |
| 1    | 0    | third digit (hundreds)               |
| 0    | 0    | fourth digit (thousands, leftmost)   |

On every clock edge on which exactly one switch is on, the digit of the
selected position takes that switch's number. With no switch or several
switches on, nothing changes. Note that with both buttons at 1 (released, on
boards whose buttons are active low) the first digit follows the switches
all the time; the other positions change only while their button pattern is
held. The PIN 2024 is entered as 4, 2, 0, 2 in positions one to four.

Because loading happens on any clock edge while the pattern is present, no
debouncing or edge detection is needed: holding a button longer loads the
same value again.

## What the displays show

| displays          | meaning                                         |
|-------------------|-------------------------------------------------|
| `ex1`..`ex4`      | the four digits, `ex1` = thousands, `ex4` = units |
| `ex5 ex6` = `E I` | the PIN is 0000: nothing entered yet ("enter input") |
| `ex5 ex6` = `F A` | a PIN is entered and it is wrong ("false")      |
| `ex5 ex6` = `- -` | the PIN equals PIN1 or PIN2; all ten LEDs light |

At power-up the digits are 0 and the displays read `0000EI`. The check is
continuous: the message changes as soon as a digit changes, so `FA` is what
the user sees while a PIN is still incomplete. A PIN of 0000 always means
"nothing entered", which is why PIN1 and PIN2 must not be 0000 (the checker
stops elaboration with an error if they are).

## Time control and the administrator reset

`second_timer` divides the clock by `CLK_HZ` to count seconds from
configuration. Digits may change only while `seconds <= TIME_LIMIT_S`, so the
user has `TIME_LIMIT_S + 1` seconds: with the defaults, 31 seconds, i.e. the
last digit can be taken on clock edge 1,549,999,999 and none after it. Once
the window closes the digit registers freeze; the displays and LEDs keep
showing whatever was entered, so a PIN that was correct when time ran out
stays shown as correct.

The administrator's button is the active-low synchronous reset `n_rst`. It
clears only the timer: the digits already entered are kept, and while the
button is held no digit can change. On release the user has a fresh window
and can correct the digits. The seconds counter saturates at its maximum, so
a locked system never unlocks by counter wrap-around.

On the board, the reset button is an extra push button wired to a spare I/O
pin with a pull-down resistor. Any synchroniser or polarity inversion that
the chosen wiring needs belongs in the board wrapper; the core expects a
clean, synchronous, active-low `n_rst`.

## Structure

```
pin_system_top
├── second_timer          tick counter + saturating seconds counter, window flag
├── switch_decoder        10 switches -> digit 0..9 + "exactly one on"
├── digit_entry x4        one register per position, SLOT = 0..3
├── pin_assembler         1000*d3 + 100*d2 + 10*d1 + d0 (shift-and-add)
├── pin_checker           0 -> ENTER, PIN1/PIN2 -> CORRECT, else FALSE; LED
├── seg7_digit_decoder x4 digit -> active-low segments
└── seg7_status_decoder   status -> E I / F A / - -
```

`pin_pkg` holds the shared types (`digit_t`, `pin_t`, `seg7_t`, the
`status_e` enum with codes 0000 false, 0001 correct, 0011 enter) and the
glyph constants. Seven-segment bytes are bit 7 = decimal point (always off),
bits 6..0 = segments g..a, 0 = lit.

The only state is the tick counter (26 bits at 50 MHz), the 32-bit seconds
counter and the four 4-bit digits. Everything from the digits to the
displays and LEDs is combinational, so outputs follow a digit change in the
same cycle it is registered.

## Parameters of `pin_system_top`

| parameter      | default    | meaning                                  |
|----------------|------------|------------------------------------------|
| `CLK_HZ`       | 50,000,000 | clock cycles per second                  |
| `TIME_LIMIT_S` | 30         | last second in which entry is allowed    |
| `PIN1`         | 2024       | first accepted PIN (1..9999)             |
| `PIN2`         | 2023       | second accepted PIN (1..9999)            |

The PINs and the time limit are fixed when the design is built; changing
them means rebuilding the bitstream. The 30-second default follows the
original program; a window of a few minutes is just a larger
`TIME_LIMIT_S`.

## Where this design departs from, or adds to, the original

* One switch decoder is shared by the four digit registers; the original
  repeated the decode for each position. Behaviour is the same.
* The window comparison sits in the timer (`window_open`) instead of in each
  digit register.
* The seconds counter saturates instead of being an unbounded integer.
* The PIN check is written as a clean combinational priority decision; the
  original process, written with incomplete assignments, would infer
  latches but gives the same result for every PIN value.
* Extra outputs `second_tick` and `entry_open` are brought out for
  observation.
* Initial values of registers come from declaration initialisers (FPGA
  configuration values). A flow without initial values (an ASIC) would need
  a power-on reset for the digits and the timer.
* Inputs are assumed synchronous and bounce-free; add two-flop
  synchronisers in the board wrapper for real switches and buttons.

## Simulation

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M` at the end. With Verilator 5, for example:

```
verilator --binary --timing -Irtl -y rtl rtl/pin_pkg.sv tb/tb_pin_system_top.sv \
          --top-module tb_pin_system_top
./obj_dir/Vtb_pin_system_top
```

| testbench                | what it covers |
|--------------------------|----------------|
| `tb_switch_decoder`      | all 1024 switch patterns |
| `tb_digit_entry`         | four slots, random keys/switches/window/reset against a model |
| `tb_pin_assembler`       | all 10,000 digit combinations |
| `tb_pin_checker`         | all 16,384 input values, default PINs |
| `tb_seg7_digit_decoder`  | all 16 inputs against segment lists |
| `tb_seg7_status_decoder` | all 16 status codes |
| `tb_second_timer`        | 5-cycle seconds, window, saturation, resets mid-second |
| `tb_pin_system_top`      | whole system, 10-cycle seconds and a 5 s limit: EI, FA, PIN1, PIN2, invalid switches, lockout on the exact edge, entry refused during reset, extra time, return to EI; every output checked every cycle against a model |
| `tb_pin_system_full`     | whole system at the defaults: a wrong digit, then PIN1, then exactly 50,000,000 cycles to the first second (about half a minute of simulation) |

Lockout at the default settings needs 1.55 billion cycles and is exercised
only with the short time base of `tb_pin_system_top`; the logic is the same,
only `CLK_HZ` and `TIME_LIMIT_S` differ.

Verilator's lint reports `PROCASSINIT` on the registers that have both a
declaration initialiser and a reset; that is intended (power-up value plus
administrator reset).
