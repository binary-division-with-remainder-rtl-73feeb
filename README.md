# Division with remainder on a 9+8 bit ALU

This unit divides two 8-bit numbers and returns the quotient and the
remainder. It does not use a subtractor or a trial subtraction at every bit,
and it needs no count of quotient bits. It works like long division on paper:

1. It slides the dividend right under the divisor until their leading ones
   line up.
2. It compares the two numbers bit by bit from the left to find out whether
   the divisor "goes in" at this position.
3. Only where it does go in, it subtracts. The subtraction is an addition of
   the negative divisor in a 9-bit adder.

A shifting-pointer register counts the dividend bits that were moved away
during the alignment. Each later left shift takes one bit back. When the
pointer is empty, the division is finished.

The core handles positive operands. A small block in front of it accepts
8-bit two's complement operands in -127..127. It catches the cases the core
cannot run: divisor 0, divisor ±1, and -128. It also gives the results their
signs.

## The register set

Bits are numbered from the left, as the sequence control counts them.
Position 1 is the most significant bit. In a 9-bit register, position 1 is a
sign-extension bit, position 2 the sign, and positions 3..9 the magnitude of a
positive operand. The RTL declares the registers as `logic [1:9]` and
`logic [1:8]`, so `AL1[bitpos]` is exactly the compared bit.

| register | width | role |
|---|---|---|
| AL1 | 9 | partial dividend: the operand as loaded, later the difference after a subtraction |
| AL2 | 9 | divisor, `0` & divisor |
| ALC | 9 | carries of the last addition, one per bit position |
| ALR | 9 | result of the addition; at the end, the remainder |
| ALS | 8 | shifting pointer. One 1 enters from the left for every alignment shift, and every later left shift removes one. Its leftmost bit (`bs`) says whether a dividend bit is still to come. |
| ALD | 8 | dividend shift register: holds the dividend bits shifted out of AL1 |
| ALN | 8 | negative divisor, formed once at the start |
| ALP | 8 | positive divisor |
| ARL | 8 | quotient. Bits are appended from the right. |
| f, t, a | 1 each | control bits: first pass of the outer loop, second partial loop needed, add the negative divisor |

## The sequence

Every step takes one clock cycle (`div_ctrl`). Each step picks one register
transfer, which `div_datapath` carries out (`div_op_e` in `div_pkg`). What
the step does depends on `b1` and `b2`, the bits of AL1 and AL2 at the bit
counter, and on `bs`.

**Start.** The unit loads the operands and clears ALS, ALD and ARL. It sets
f, clears t and a, and forms ALN = −ALP in the adder. The bit counter starts
at 3, the first magnitude bit.

**First partial loop (S_LOOP1).** It compares bits from the left.

- 0/0: go to the next bit.
- 1/0 on the first pass: the dividend has a 1 further left than the divisor.
  Shift AL1 right into ALD, enter a 1 into ALS and go to the next bit. Because
  the dividend moved one place right, the same dividend bit now faces the next
  divisor bit. This is how alignment works.
- 1/0 on a later pass: the partial dividend is the larger. Append quotient
  bit 1, then subtract.
- 0/1: the partial dividend is the smaller. If `bs` is set, shift AL1 left,
  take the next bit from ALD, and append quotient bit 0; the bit counter stays
  where it is. If `bs` is clear, the division ends: quotient bit 0, and AL1 is
  the remainder.
- 1/1: the leading bits agree, so the following bits decide. Go to the second
  loop at the next bit.

**Second partial loop (S_LOOP2).** It compares the remaining bits.

- Equal bits: go to the next bit. If the last bit is also equal, the two
  values are the same: append quotient bit 1, then subtract if `bs` is set,
  or end with remainder 0 if it is not.
- 1/0: append quotient bit 1, then subtract.
- 0/1: the partial dividend is smaller after all. If `bs` is set, shift left
  once more, append 0 and then 1, and subtract. If `bs` is clear, end with
  quotient bit 0 and AL1 as the remainder.

**Subtraction (S_ADD).** ALR ← AL1 + ALN, both sign-extended to 9 bits. If
`bs` is set, the difference goes back to AL1 and the next ALD bit comes down
into it. ALS shifts left, f is cleared, and a new pass starts at bit 3. If
`bs` is clear, the division ends and ALR holds the remainder.

### Example: 100 / 7

`100 = 001100100`, `7 = 000000111`. Steps that only move the bit counter on
are not shown.

| steps | what happens | AL1 | ALS | ARL | ALR |
|---|---|---|---|---|---|
| 4× 1/0 | align: shift right four times | `000000110` | `11110000` | 0 | |
| 1/1, then equal | second loop | | | | |
| 0/1 with bs | shift left, append `01` | `000001100` | `11100000` | `1` | |
| add | 12 − 7 = 5, next bit down | `000001011` | `11000000` | `1` | 5 |
| 1/0 | append `1` | | | `11` | |
| add | 11 − 7 = 4, next bit down | `000001000` | `10000000` | `11` | 4 |
| 1/0 | append `1` | | | `111` | |
| add | 8 − 7 = 1, last bit down | `000000010` | `00000000` | `111` | 1 |
| 0/1, bs clear | append `0`, remainder = AL1 | | | `1110` = 14 | 2 |

The whole division takes 23 steps. Over all positive operands the longest
takes 48 steps.

### Cases the sequence cannot run

The sequence is not defined for a divisor of 0 or 1. If such a divisor
reached it, the bit counter would run past position 9. In `div_ctrl` such a
run simply ends, so the controller never hangs, but its result means
nothing. `div_intercept` makes sure these cases never reach the sequence.

## Signs and intercepted cases (`div_intercept`)

- A divisor of 0 sets `div_by_zero`.
- An operand of −128 sets `overflow`, because its two's complement magnitude
  does not fit in 8 bits.
- Both errors return quotient 0 and remainder 0.
- For a divisor of +1 the result is x remainder 0; for −1 it is −x
  remainder 0.
- In all other cases the core divides the magnitudes. The quotient is then
  negated if the signs differ, and the remainder takes the sign of the
  dividend. This is truncating division, as in C, so
  `dividend = quotient × divisor + remainder`.

## Interface and timing (`alu_div`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request; `dividend` and `divisor` are registered in this cycle |
| `dividend`, `divisor` | in | 8 | two's complement |
| `busy` | out | 1 | from the cycle after `start` until `done`; `start` is ignored while busy |
| `done` | out | 1 | high for one cycle; the results are valid then and are held until the next `start` |
| `quotient`, `remainder` | out | 8 | two's complement |
| `div_by_zero`, `overflow` | out | 1 | error flags, valid with `done` |

`done` comes 2 cycles after `start` for an intercepted case. For a real
division it comes 4 cycles plus the number of sequence steps after `start`,
at most 52 cycles. The 4 cycles are the operand register, the load, forming
the negative divisor, and the result register.

The unit has no parameters. The 9- and 8-bit widths are package constants
(`div_pkg`). Scaled to other widths, the sequence does not divide
correctly, so a width parameter would be misleading.

## What is design choice

The register set, the control bits, the sequence of comparisons, shifts and
additions, the 9-bit adder with sign extension, the restriction to
−128..127, and the need to catch divisors 0 and 1 all come from the
algorithm this unit implements. The following are this implementation's own
choices:

- one step per clock cycle, and the state encoding of the loops;
- the start/busy/done handshake and the asynchronous reset;
- ALN is formed in the adder (`~ALP + 1`) in a cycle of its own;
- ALC holds the per-bit carries of the ripple-carry adder;
- the subtraction step feeds ALN to the adder directly instead of first
  copying it into AL2. AL2 afterwards holds what the algorithm leaves in it:
  ALN when the division ends, and the positive divisor when it goes on;
- signed operands are handled through their magnitudes. The sign rule, the
  treatment of −1 and the results returned on an error are also choices.

Only division is built. The register table hints at other operations of the
same ALU (an addition result in ALR, the low byte of a 16-bit result in ARL),
but those operations are not described.

## Files

| file | contents |
|---|---|
| `rtl/div_pkg.sv` | widths, register types, register-transfer and state enums, register struct |
| `rtl/alu_add9.sv` | 9-bit ripple-carry adder with per-bit carry outputs |
| `rtl/div_datapath.sv` | the nine registers and the register transfers |
| `rtl/div_ctrl.sv` | sequence control: bit counter, f/t/a, states |
| `rtl/div_intercept.sv` | operand checks, magnitudes, result signs |
| `rtl/alu_div.sv` | top: interception, sequence, handshake |
| `tb/div_ref_regs.sv` | testbench package: integer model of the register transfers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_alu_add9` tries every pair of 9-bit addends with both carry-in values.
  It checks the sum and every carry bit against integer arithmetic.
- `tb_div_datapath` applies 50,000 random register transfers. After each one
  it compares all registers, and `b1`, `b2`, `bs`, with an integer model.
- `tb_div_ctrl` connects the controller to that integer model. It runs every
  dividend 0..127 with every divisor 2..127 and checks the quotient, the
  remainder, the handshake and the bound of 48 steps.
- `tb_div_intercept` tries all 65,536 operand pairs against integer
  division.
- `tb_alu_div` runs the whole unit on all 65,536 operand pairs, followed by
  back-to-back error cases. It checks results, flags, latency and the
  handshake. It also counts every mechanism: alignment, left shifts, the
  second loop, subtractions with and without a further pass, each way of
  ending, each intercepted case, negative operands and a `start` while busy.
  It fails if any of these never occurs.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/div_pkg.sv tb/div_ref_regs.sv \
  tb/tb_alu_div.sv --top-module tb_alu_div
./obj_dir/Vtb_alu_div
```

Replace `tb_alu_div` with the name of another testbench to run it.
