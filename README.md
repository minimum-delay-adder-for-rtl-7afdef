# Digit-serial adder for Redundant Complex Binary numbers

A complex number can be written as a single string of digits in the complex
radix (-1+j): `X = sum_i x_i (-1+j)^i`. With plain binary digits (the Complex
Binary Number System) addition carries across several positions (1+1 = 1100).
Letting each digit range over -3..+3 instead (the *Redundant* Complex Binary
Number System, RCBNS) makes it possible to add two numbers digit by digit
with no carry at all, as long as each digit sum stays within -3..+3.

This RTL builds such an adder. Its core is a one-digit adder made directly
from a 64-row truth table: a 6-to-64 decoder (an AND plane) and three OR gates.
Around it sits a digit-serial datapath. Two operand memories feed one digit
pair per clock through 3-bit shift registers into the digit adder. A 3-bit
register catches each sum digit, and the digit is then stored in a result
memory.

```
 memory A -> shift reg --A_n--\
                               > digit adder (6x64 decoder + OR) -> 3-bit reg -> memory C
 memory B -> shift reg --B_n--/
            ^ read index            sequencer               write index ^
```

## Digit encoding

Each digit has three bits in sign-magnitude form. `rcbns_pkg::digit_t` is
`{sign, mag[1:0]}`:

| code | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|------|-----|-----|-----|-----|-----|-----|-----|-----|
| value|  0  | +1  | +2  | +3  |  0  | -1  | -2  | -3  |

In the truth table's bit names, a digit is `a0 a1 a2`: `a0` is the sign and
`a1` is the more significant magnitude bit. The truth-table row of an operand
pair is therefore the 6-bit number `{a, b}`. An input of `100` (minus zero)
counts as zero, and the adder never outputs it.

Word `i` of every memory holds the digit of weight (-1+j)^i. Example: 6+j7 is
`0 0 -1 -2 1 -1 -1 -1`, written most significant digit first. Its digit 0 is
-1, coded `101`.

## The minimum-delay digit adder (`rcbns_digit_adder`, `rcbns_decoder`)

The decoder raises exactly one of 64 lines. Line `k` is the AND of the six
select bits, each taken true or inverted to match row `k`. Each sum bit is then
the OR of the rows where that bit is 1:

* `c0` (sign): rows 5,6,7,14,15,23,37,38,39,40,44,45,46,48,49,52,53,56,57,58,60
* `c1` (magnitude MSB): rows 2,3,6,7,9,10,15,16,17,20,24,28,29,34,35,38,39,43,45,46,48,52,53,56,57,60
* `c2` (magnitude LSB): rows 1,3,5,7,8,10,12,14,17,21,23,24,28,30,33,35,37,39,40,42,44,46,49,51,53,56,58,60

These sets are exactly the sign-magnitude sum of the two digits. Twelve rows
(11,18,19,25,26,27,47,54,55,61,62,63) have a sum outside -3..+3, for example
+1 + +3 = 4. The truth table gives no result for them, so the three OR gates
output `000`. This design adds a fourth OR gate over those twelve rows, the
`no_result` output, so that the condition is not lost. The ten rows whose sum
is 0 drive no gate, and lint reports them as unused decoder lines.

The path from operands to sum is one AND level and one OR level, whatever the
operand length. That is where the name "minimum delay" comes from.

## Out-of-range digit sums

Carry-free addition holds only while every digit pair sums to -3..+3. Larger
sums (up to ±6) need a normalisation step: a carry into the neighbouring
digits, which in radix (-1+j) spreads over more than one position. **This
design has no normalisation stage.** A pair that overflows is written to
memory C as `0`, and the top-level `range_error` flag is set for that
operation. Treat the contents of C as the true sum only when `range_error` is
low. One way to get that guarantee is to keep operands whose digit pairs are
known not to overflow.

## Serial operation and timing (`rcbns_serial_adder`, `rcbns_serial_ctrl`)

1. While idle, load the operands through `a_we/a_waddr/a_wdata` and
   `b_we/b_waddr/b_wdata`, one digit per clock.
2. Pulse `start` for one cycle with `num_digits` = n. A value of 0 is read as
   1, and a value above `DIGITS` is read as `DIGITS`. `start` is ignored
   while `busy` is high.
3. The sequencer reads index 0, 1, …, n-1, one per clock. Each digit pair
   goes memory read → shift register → adder → output register → write to C
   at the same index.
4. Say `start` is sampled at clock edge 0. Digit i is read in the cycle after
   edge i and written to C at edge i+4. `done` is high for one cycle,
   sampled at edge n+4, and `busy` falls at the same time. Throughput is one
   digit per clock. A 12-digit addition takes 16 clocks.
5. Read the result with `c_raddr`. `c_rdata` follows one cycle later. Words
   at index n and above keep their old contents. The memory arrays are not
   reset.

The shift registers shift on every cycle of an operation, which keeps the
latency fixed. The controller tracks each digit with a valid bit and its index
in a delay line as long as the datapath. The shift-register depth (`STAGES`,
default 1: a single 3-bit stage) is a parameter of `rcbns_shift_reg` and
`rcbns_serial_ctrl`, and the schedule stretches with it.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `rcbns_serial_adder` | `DIGITS` | 12 | digits per operand, i.e. depth of memories A, B and C |
| `rcbns_digit_mem` | `DEPTH` | 12 | words of 3 bits |
| `rcbns_shift_reg` | `STAGES` | 1 | 3-bit stages between a memory and the adder |
| `rcbns_serial_ctrl` | `DIGITS`, `SR_STAGES` | 12, 1 | must match the datapath |

## What follows the reference design and what is this design's own

Taken from the reference design:
* the digit adder's truth table, its decoder + OR-gate structure and its minterm sets;
* the datapath order: memories A and B, 3-bit shift registers, adder, 3-bit register, memory C;
* digit-serial processing of the operand digits.

This design's own choices:
* the 12-digit depth, chosen because the reference examples use 12-digit operands;
* the memory ports and their timing;
* the start/done handshake and the schedule;
* the `no_result` and `range_error` flags;
* reset behaviour.

Not built:
* normalisation of out-of-range digit sums;
* conversion from ordinary binary real and imaginary parts into RCBNS digits.

## Files

| file | contents |
|------|----------|
| `rtl/rcbns_pkg.sv` | `digit_t`, digit value/encode helpers |
| `rtl/rcbns_decoder.sv` | 6-to-64 decoder (AND plane) |
| `rtl/rcbns_digit_adder.sv` | minimum-delay digit adder (decoder + OR plane) |
| `rtl/rcbns_digit_mem.sv` | digit memory, 1 write + 1 synchronous read port |
| `rtl/rcbns_shift_reg.sv` | 3-bit operand shift register |
| `rtl/rcbns_out_reg.sv` | 3-bit sum register |
| `rtl/rcbns_serial_ctrl.sv` | sequencer |
| `rtl/rcbns_serial_adder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a fixed number of cycles (a watchdog).

* `tb_rcbns_digit_adder` runs all 64 operand pairs. It checks them against
  integer addition of the decoded digits, including the 12 out-of-range rows.
* `tb_rcbns_decoder` checks that every select value gives a one-hot output.
* `tb_rcbns_serial_ctrl` checks the schedule cycle by cycle for every length
  from 1 to 12. It also checks the clamping of `num_digits`, that a start
  during an operation is ignored, and that `range_error` sets and clears
  correctly.
* `tb_rcbns_serial_adder` runs the whole design at its default size. It
  covers:
  * the worked addition (18+j25) + (4+j9) = 22+j34;
  * 6+j7 as an 8-digit operand;
  * 40 random in-range additions of every length;
  * 20 random additions with overflowing digits;
  * starts issued while busy.

  Results are checked digit by digit and by value: it evaluates
  `sum x_i (-1+j)^i` in Gaussian integers and requires
  value(C) = value(A) + value(B). It also checks the n+4 latency on every
  operation.

Run any of them with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/rcbns_pkg.sv tb/tb_rcbns_serial_adder.sv --top-module tb_rcbns_serial_adder
./obj_dir/Vtb_rcbns_serial_adder
```

The sequencer also carries assertions for its handshake: reads, loads and
writes happen only while `busy` is high, and `done` is never high together
with `busy`. Lint (`verilator --lint-only -Wall`) reports only one
warning: the ten unused decoder lines described above.
