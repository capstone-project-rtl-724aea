# An 8-bit CPU whose control unit is a multiplexer

This is a small teaching CPU with an 8-bit datapath and sixteen operations
selected by a 4-bit opcode. It has no instruction decoder and no state
machine. All sixteen operations are computed at the same time by separate
units, and the control unit is a 16-to-1 multiplexer whose select lines are
the opcode. Multiplexer input *k* carries the result of the operation whose
opcode is *k*, so the instruction set table *is* the control unit.

The CPU is run by hand on an FPGA board's switches, LEDs and seven-segment
displays, and it has no clock. You set an operand on eight switches and store
it with a select switch. You pick the operation on four more switches. The
result then appears at once in binary on LEDs and in decimal on three
displays.

## Instruction set

| Opcode | Operation | Result `O` (8 bits, operands unsigned 0-255) |
|-------:|-----------|----------------------------------------------|
| 0000 | add | `(A + B) mod 256` |
| 0001 | subtract | `(A - B) mod 256` |
| 0010 | multiply | low 8 bits of `A * B` |
| 0011 | integer divide | `A / B` truncated; `B = 0` gives 255 |
| 0100 | shift left | `A << N`, zero fill |
| 0101 | shift right | `A >> N`, zero fill |
| 0110 | rotate left | `A` rotated left by `N` |
| 0111 | rotate right | `A` rotated right by `N` |
| 1000 | AND | `A & B` |
| 1001 | OR | `A \| B` |
| 1010 | XOR | `A ^ B` |
| 1011 | NOR | `~(A \| B)` |
| 1100 | NAND | `~(A & B)` |
| 1101 | XNOR | `~(A ^ B)` |
| 1110 | A > B | 1 or 0 |
| 1111 | A = B | 1 or 0 |

`N` is a parameter of the ALU (default 1). It is not an operand: the shifts
and rotates ignore `B`. The opcode values and the mnemonic names
(`cpu_pkg::opcode_e`) are in `rtl/cpu_pkg.sv`. The CPU has no flags: there is
no zero, carry, negative or overflow output, and no jumps.

## The multiplexer control unit

`rtl/mux16.sv` is written as a gate network, not as a `case` statement. Each
data input `d[k]` goes into a 5-input AND gate. The other four inputs are the
select lines S3..S0, each taken either true or inverted. Bit *j* of *k* picks
`S_j` when it is 1 and `~S_j` when it is 0. For example, the gate of `d[0]`
sees `~S3 ~S2 ~S1 ~S0` and the gate of `d[1]` sees `~S3 ~S2 ~S1 S0`. For any
opcode exactly one gate is open. The other fifteen output 0 (`X & 0 = 0`), so
they do not change the 16-input OR that forms `y` (`X | 0 = X`). An immediate
assertion checks that exactly one gate is enabled.

The network is one bit wide by default (`WIDTH = 1`). The ALU uses it at
`WIDTH = 8`, which repeats the same gates for each result bit.

## The ALU units (`alu_code`)

`rtl/alu_code.sv` instantiates one unit per group of operations and feeds
their results into the multiplexer in opcode order:

* **Add and subtract.** There are two copies of `ripple_adder`, an 8-bit
  ripple-carry adder. The second copy subtracts by adding the two's
  complement: it gets `~B` and carry-in 1.
* **Multiply (`shift_add_mul`).** This unit uses only left shifts of `A` and
  additions or subtractions. `B` is written as a signed sum of powers of two
  by radix-2 Booth recoding. Digit *i* is `b[i-1] - b[i]`, so each run of
  ones costs one subtraction where it starts and one addition where it ends.
  For example, 11 is recoded as 16 - 4 - 1. The digit above bit 7 only adds
  a multiple of 256, which is outside the 8 bits kept, so it is dropped.
* **Divide (`restoring_div`).** This is restoring long division, unrolled
  into eight combinational subtract-and-compare stages. Its remainder output
  is computed but not used by the CPU. When the divisor is 0 every trial
  subtraction succeeds, so the quotient is 255.
* **Shift/rotate (`shift_rotate`).** This is wiring only, for a fixed
  distance `N`.
* **Logic (`logic_unit`).** Six bitwise operations.
* **Compare (`comparator`).** An unsigned `>` found by scanning from the most
  significant bit, and an `=` formed as the AND of the bitwise XNORs. The
  result is in bit 0.

Everything in `alu_code` is combinational. The slowest path runs through the
divider's eight stages and then the multiplexer.

## Board-level design (`de2_cpu_top`)

| Signal | Use |
|--------|-----|
| `SW[7:0]` | operand value |
| `SW[10]` | store into register A (while up) |
| `SW[11]` | store into register B (while up) |
| `SW[17:14]` | opcode |
| `LEDR[7:0]`, `LEDR[17:10]` | register A, register B in binary (`LEDR[9:8]` off) |
| `LEDG[7:0]` | result in binary |
| `HEX2 HEX1 HEX0` | result in decimal: hundreds, tens, ones |
| `HEX5 HEX4` | register A: tens, ones |
| `HEX7 HEX6` | register B: tens, ones |

Each value is decoded by a `bin2bcd` converter and shown by one `bcd_7segment`
driver per digit. The board has eight displays, and three of them show the
result. That leaves two digits per operand, so the hundreds digit of the
operand converters is not connected. An operand from 100 to 255 is used in
full and shown in full on the LEDs, but its displays show only the last two
digits (for example, 200 shows as "00"). The result uses three digits, so 123
shows as 1-2-3. Switches 8, 9, 12 and 13 and display HEX3 are unused. The
instance names in the top (`inst`, `inst1` to `inst13`) follow the original
schematic.

**Operand registers without a clock.** `register8` has ports `i`, `o`, `s`
(store) and `e` (enable, tied high in the top). Because the CPU has no clock,
the register is a level-sensitive latch. While `s & e` is 1 it is
transparent: the register, its LEDs and its digits follow the operand
switches. When the select switch goes down, the register keeps its value.
Synthesis therefore infers 16 latch bits and no flip-flops. This is intended,
and it is why tools report a latch in `register8`. The latches have no reset,
so a register's content is undefined until it is first stored.

**Seven-segment convention.** `Seven_Segment[0:6]` (and each `HEXk[0:6]`) is
segments a to g. Segment a is at the top, then the segments go clockwise, and
g is the middle. The outputs are active low, as on the common-anode displays
of DE2 boards. BCD codes 10 to 15 leave the digit dark. If your board's
displays are active high or wired in another order, change only
`bcd_7segment`.

## Where this RTL makes its own choices

The instruction set, the multiplexer gate structure, the port names of the
ALU-CU (`A`, `B`, `OP`, `O`, generic `N = 1`), and the board wiring and
display layout come from the original design. The following are choices made
here, each noted in its module header:

* The ALU is built as parallel units plus the gate-level multiplexer. A
  single `case` statement would select the same results.
* The adder structure, the Booth recoding in the multiplier and the
  restoring divider.
* Division by zero returns 255.
* Comparisons return 1 or 0 in bit 0.
* Shifts use zero fill.
* Operands are treated as unsigned.
* The operand registers are latches, with `s` as store and `e` as enable.
* The segment order and polarity, and the dark display for non-decimal codes.
* The opcode switches are `SW[17:14]`. Reading the opcode from switches 13-17
  is the other possible reading. It is not used, because the opcode has only
  four bits.

## Files

`rtl/`, one module or package per file:
`cpu_pkg` (types and opcodes), `mux16`, `ripple_adder`, `shift_add_mul`,
`restoring_div`, `shift_rotate`, `logic_unit`, `comparator`, `alu_code`,
`register8`, `bin2bcd`, `bcd_7segment`, and the top `de2_cpu_top`.

`tb/`: a self-checking testbench `tb_<module>` for each module. Each one
compares the module's outputs with values computed independently and ends
with a line `TB_RESULT checks=N failures=M`:

* The arithmetic, logic and compare units are tested exhaustively over all
  operand pairs.
* `tb_alu_code` tests all 16 opcodes over all 65,536 operand pairs.
* `tb_de2_cpu_top` drives the whole CPU through its switches only, at its
  default parameters. It checks the LEDs and the decoded display digits for
  all 16 operations on directed operands (including 100 + 23 shown as 1-2-3,
  division by zero and 255/255) and on 300 random operand pairs. It also
  checks that the registers follow while stored and hold afterwards. It
  counts each of these events and fails if any never happened.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cpu_pkg.sv tb/tb_de2_cpu_top.sv --top-module tb_de2_cpu_top
./obj_dir/Vtb_de2_cpu_top
```

Replace `de2_cpu_top` with any other module name to run that module's test.
Every testbench finishes in well under a second.

## Limits

* This is a combinational calculator, not a stored-program machine. It has no
  program counter, no instruction memory and no flags, and there is no way to
  chain operations except by storing a result again by hand.
* Arithmetic is unsigned and 8 bits wide. Overflow of add, subtract and
  multiply wraps silently.
* The latch-based registers suit switch input. In a clocked system they
  should be replaced by flip-flops with a load enable.
