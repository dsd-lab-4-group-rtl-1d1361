# Base-100 converter and N-th root unit

Two small sequential arithmetic circuits for a board with seven-segment
displays, buttons and switches. Both produce numbers as *base-100 digits*:
7-bit values 0..99, each standing for a pair of decimal digits.

* **Part 1, binary to base 100.** A 26-bit binary number becomes four
  base-100 digits (eight decimal digits) in 29 clocks, with a
  shift-and-add-14 algorithm. This is double dabble in base 100.
* **Part 2, N-th root.** For X in 0..99 and N in 1..63 the unit computes
  Y = X^(1/N) as an unsigned fixed-point number with 7 integer bits and 14
  fraction bits. It then shows Y as an integer digit and two pairs of
  decimals.

Both are written in synthesizable SystemVerilog (IEEE 1800-2017). Each one
comes with a board wrapper, and both wrappers sit side by side in `lab4_top`.

## Shift-and-add-14: how a binary number becomes base 100

Shifting a binary number into a register MSB first doubles the register's
value and adds the new bit, once per bit. If the register is a row of
base-100 digits, each 7 bits wide, then doubling a digit d is correct only
while 2d < 100. When d >= 50, the doubled digit must hold 2d - 100, and a one
must carry into the next digit.

The converter does this with a correction before each shift. A digit above
49 has 14 added to it. Doubling d + 14 gives 2d + 28 = (2d - 100) + 128.
Bit 7 of the result (value 128) is exactly the bit that leaves the 7-bit
register during the shift, so it becomes the carry into the next digit. The
7 bits left behind hold 2d - 100. The largest digit, 99, becomes 113, which
still fits in 7 bits. This is the base-100 form of the "add 3 above 4" rule
of binary-to-BCD conversion: add (128 - 100) / 2 = 14 above 49.

The datapath (`binary_to_base100`):

```
binary --load--> [shift_register26] --MSB--> digit0 --carry--> digit1 --> digit2 --> digit3
                                              ^  |
                                   adder14 ---+  +--> in7
```

* `shift_register26` loads the number in parallel and shifts it left one bit
  per clock. Its MSB is the serial output. It has no shift enable: after 26
  shifts it holds zeros, and shifting zeros changes nothing.
* Each digit is a `shift_register7` with its own `adder14`. On an enabled
  clock edge the register takes `{corrected[5:0], shift_in}`. Its
  `shift_out` is `corrected[6]`, taken combinationally, so the carry moves
  on the same edge. Correcting and shifting happen in one clock.
* `counter` is an 8-bit down counter that runs 25, 24, ..., 0: one count
  per shifted bit. From 0 it wraps to 31. The controller resets it to 25
  before every conversion, so 31 is only seen after a conversion ends.

Example: 11347559 becomes the digits 11 34 75 59. `digit[0]` is the least
significant digit (59), and `digit[3]` the most significant (11). Since
2^26 - 1 = 67,108,863, the top digit is at most 67, and no carry ever
leaves it.

## The converter's controller

`b2b100_fsm` has six states. `stateB` shows the state number. Each action
in the table is a registered output, set on the edge that leaves the state.

| state | waits for | on leaving |
|-------|-----------|------------|
| S0 | `start` low | (done is high) |
| S1 | `start` high | clear all registers and reset the counter (`reseting_reg`), `done` low |
| S2 | all register bits zero (`done_reseting` = 0) | stop clearing, `load_binary` high |
| S3 | one clock | (load held a second clock) |
| S4 | one clock | `load_binary` low, `counting26` high |
| S5 | counter = 0 (`done_counting` = 0) | `counting26` low, `done` high, back to S0 |

The controller watches two signals. `done_reseting` is the OR of every
register bit. `done_counting` is the OR of the counter bits. The registers
clear asynchronously, so S2 normally lasts one clock.

Timing, counted from the clock edge that sees `start` high:

* The number is loaded on edges 2 and 3.
* `counting26` is high for edges 4 to 29. These are the 26 edges on which
  the counter reads 25 down to 0, so exactly 26 bits are shifted.
* On edge 29 the controller sees the counter at 0. It raises `done` and
  returns to S0, and the counter wraps to 31.
* The digits then hold until the next start.

A conversion takes 29 clocks, or about 0.6 us at 50 MHz.

`reset` is asynchronous. It puts the controller in S0 with `done` high, and
it also clears the digit registers, the input register and the counter.

## N-th root by bit-serial search

`nth_root` finds the 21 bits of Y one at a time, from the MSB down. For
each bit it does three steps:

1. **S3:** set the bit in a trial value T, and set the power P = 1.0.
2. **S4, N clocks:** P := (P * T) >> 14, a 22 x 21-bit multiplication
   truncated back to 7.14 (with one extra integer bit). A product too large
   for the 22-bit register saturates to all ones.
3. **S5:** keep the bit if P <= X.

Saturation is safe. A power can only overflow when T >= 1.0, and then every
later product stays at least as large, so the final comparison still gives
the right answer.

Precision: truncating each product makes P a little low, so a trial can
pass where the exact power would just fail. As a result, Y is
floor(X^(1/N) * 2^14) or one unit of the last place above it. An exhaustive
check of all 99 x 63 inputs found no case off by more than one unit. The
square root of 69 comes out exactly as 136095 = `0001000.01001110011111`.
That is 8.3065: the fraction is truncated, where a calculator shows 8.3066.
The square root of 3 is one of the cases one unit high (28378 instead of
28377), and it still reads 1.7320.

Two special cases finish after 2 clocks with Y = 0: X = 0, and a start while
`err` is high. `err` is combinational: it is high whenever X > 99 or N = 0.

Latency is 1 + 21 * (N + 2) + 1 clocks after the edge that sees `start`
high. That is 86 clocks for a square root and 1367 for N = 63 (27 us at
50 MHz). `done` is high only in the idle state S0. `start` uses the same
low-then-high handshake as Part 1.

### Showing the fraction in decimal

`frac_to_digits` turns the 14-bit fraction f into two base-100 digits with
two multiplications by 100:

* 100 * f is a 7.14 number. Its integer part is the first pair of decimals.
* Its fraction part, multiplied by 100 again, gives the second pair in its
  integer part.

Both multiplications are combinational in one clock. For the square root of
69, f = 5023: 5023 * 100 / 2^14 = 30.66 gives 30, and the remainder gives
65. The outputs of `nth_root` are `digit1` = integer part, `digit2` = 0 (a
placeholder for the decimal point), `digit3` = decimals 1-2 and `digit4` =
decimals 3-4.

## Board wrappers

`b2b100_testbed` and `nth_root_testbed` connect the two units to four push
buttons (`key`, low while pressed), ten switches (`sw`), four seven-segment
displays and LEDs. While a button is held, a register takes the switches on
every clock:

| button | Part 1 (`b2b100_testbed`) | Part 2 (`nth_root_testbed`) |
|--------|---------------------------|-----------------------------|
| key[0] | sw[9:0] -> number[9:0] | sw[6:0] -> X |
| key[1] | sw[9:0] -> number[19:10] | sw[5:0] -> N |
| key[2] | sw[5:0] -> number[25:20] | nothing |
| key[3] | sw[9] -> start, sw[8] -> reset | sw[9] -> start, sw[8] -> reset |

To run a conversion:

1. Load the inputs.
2. Press key[3] with sw[9] = 0, then again with sw[9] = 1.

At power-up the reset register is 1. Each unit stays in reset until key[3]
is first pressed with sw[8] = 0.

The displays use `seg7_decoder`. This is a hexadecimal decoder, active low,
with segments in the order abcdefg (bit 6 = a). Each display shows the low
four bits of its digit. So digits 0..15 read correctly: 10111214 shows as
A b C E. A larger digit shows only its low four bits. Part 1 puts the most
significant digit on `hex3`. Part 2 shows the integer part on `hex3`, the
point (0) on `hex2` and the decimals on `hex1` and `hex0`. The Part 1 LED
shows `done`. The Part 2 LEDs show `done` and `err`.

`lab4_top` holds both wrappers. They share only the clock. Its ports are
`p1_*` and `p2_*`, and the displays come out as the arrays
`p1_hex[4]` and `p2_hex[4]`.

## Files

| file | contents |
|------|----------|
| `rtl/lab4_pkg.sv` | widths, `digit_t`, the state enums of both controllers |
| `rtl/adder14.sv` | add 14 above 49 |
| `rtl/shift_register7.sv` | one base-100 digit register |
| `rtl/shift_register26.sv` | input load/shift register (`WIDTH` = 26) |
| `rtl/counter.sv` | 25-to-0 step counter (`START` = 25, `WRAP` = 31) |
| `rtl/b2b100_fsm.sv` | Part 1 controller |
| `rtl/binary_to_base100.sv` | Part 1 converter |
| `rtl/seg7_decoder.sv` | hexadecimal seven-segment decoder |
| `rtl/b2b100_testbed.sv` | Part 1 board wrapper |
| `rtl/frac_to_digits.sv` | fraction to two base-100 digits |
| `rtl/nth_root.sv` | Part 2 root unit with its controller |
| `rtl/nth_root_testbed.sv` | Part 2 board wrapper |
| `rtl/lab4_top.sv` | both wrappers side by side |

Every module has a testbench `tb/tb_<module>.sv` that checks itself. Each
compares the outputs with values it works out on its own:

* arithmetic by division or `$pow`;
* segment codes from a table of lit segments;
* register models.

Where a latency is defined, the testbenches also check it. Each one ends by
printing `TB_RESULT checks=N failures=M`.

`tb_lab4_top` runs both designs through their board pins at full size. It
covers the worked examples and random inputs. It also counts each
mechanism (start wait, register clear, add-14 correction, carries, counter
wrap, resets, error flag, X = 0, kept and dropped bits, saturation) and
fails if any of them never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_lab4_top \
    -y rtl -y tb +libext+.sv rtl/lab4_pkg.sv tb/tb_lab4_top.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_lab4_top` with its name. The
testbenches reset or initialize everything they read, so they also pass
with random initial values (`+verilator+rand+reset+2`). The two
controllers carry concurrent assertions, which `--assert` enables:

* in Part 1, at most one of clear, load and count is high;
* in Part 2, the multiply loop never starts with N = 0.

## What comes from the original design and what does not

These parts follow the original lab circuits:

* the converter's structure: the 26-bit register, four 7-bit digit
  registers, the add-14 rule, and the 25-to-0 counter with the zero tests
  by OR;
* its state sequence and start handshake;
* the Part 2 interface, number format, `err` rule and display digits;
* the two multiplications by 100;
* the button maps of both board wrappers.

These are choices made here:

* **Converter timing.** The exact clock of each control is chosen here, and
  so is what S3 does (it holds the load for a second clock). The counter
  wraps to 31; the wrap value is also described as 32 in one place, while
  31 matches the observed count sequence.
* **Converter reset.** The global reset also clears the datapath.
* **Root method.** Part 2's method is not taken from the original circuit,
  which is known only by its interface and results. The bit-serial search
  and its truncated powers are this design's. So are the state list S0..S6
  and the Y = 0 results for X = 0 and for errors.
* **Board wrappers.** The button polarity, the power-up reset, the
  low-four-bit display of digits, the display order of Part 2 and its LEDs
  are chosen here.
* **Not built.** The original converter also held a clock divider. It is
  known only by name, and the converter described here runs on the system
  clock.
