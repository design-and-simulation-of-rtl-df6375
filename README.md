# 64-bit pipelined ALU for signed numbers

This is a 64-bit arithmetic logic unit for a CPU datapath. It works on
two's-complement operands and covers 19 operations: signed add, subtract,
multiply, divide and remainder; eight bitwise operations; and six shifts
and rotations. Three units (arithmetic, logic, shift/rotate) compute in
parallel on every operation. A five-bit control word picks which unit's
result, error bit and flags reach the outputs.

Addition and subtraction use a **conditional sum adder** (COSA) instead
of a ripple-carry adder. Every bit is added twice, once for each possible
carry-in. Blocks are then joined pairwise, and the carry of the lower block
selects the matching version of the upper block. The carry is therefore
never propagated bit by bit. The delay grows with log2 of the word width,
not linearly, and the cost is more full adders and multiplexers.

The whole ALU is pipelined. It accepts a new operation on every clock and
returns each result **12 clock cycles** later, whatever the operation.

## Interface

`alu_64bit` (no parameters):

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock; all state changes on the rising edge |
| `input1`   | in  | 64    | operand A |
| `input2`   | in  | 64    | operand B (the count for shifts and rotates) |
| `alu_cont` | in  | 5     | operation code, see below |
| `alu_out`  | out | 64    | result |
| `error`    | out | 1     | the operation failed (see *Errors*) |
| `flag_reg` | out | 4     | `{parity, overflow, sign, zero}` |

There is no reset and no valid signal. Operands and code are sampled on
every rising edge. The outputs on the 12th edge after that belong to that
operation. For the first 12 cycles after power-up the outputs are
meaningless. Holding the inputs steady gives the same result on every
cycle.

## Operation codes

`alu_cont[4:3]` selects the unit and `alu_cont[2:0]` the operation inside it.

| code    | operation | result |
|---------|-----------|--------|
| `00000` | ADD  | A + B |
| `00001` | SUB  | A − B |
| `00010` | MULT | A × B, only for A and B in the signed 32-bit range |
| `00011` | DIV  | A / B, truncated toward zero |
| `00100` | MOD  | remainder of A / B, with the sign of A |
| `01000` | AND  | A & B |
| `01001` | OR   | A \| B |
| `01010` | XOR  | A ^ B |
| `01011` | NOT A | ~A |
| `01100` | NOT B | ~B |
| `01101` | NAND | ~(A & B) |
| `01110` | NOR  | ~(A \| B) |
| `01111` | XNOR | ~(A ^ B) |
| `10000` | sll  | A shifted left by B, zero fill |
| `10001` | srl  | A shifted right by B, zero fill |
| `10010` | sla  | A shifted left by B, filling with A[0] |
| `10011` | sra  | A shifted right by B, filling with A[63] |
| `10100` | rotl | A rotated left by B |
| `10101` | rotr | A rotated right by B |

The codes `00101`–`00111`, `10110`, `10111` and `11xxx` are unused. They
return result 0 with `error = 1`. For `11xxx` the flags are also 0.

## The conditional sum adder (`cosa`)

This is the least obvious part of the design.

Think of the sum as blocks that double in width at each level. At level k
the word is split into blocks of 2^k bits. For each block there are two
precomputed versions: its sum and carry-out if its carry-in is 0
(`s0`, `c0`), and if its carry-in is 1 (`s1`, `c1`).

- **Level 0.** Each bit i ≥ 1 has two registered `full_adder`s, with
  carry-in 0 and carry-in 1. Bit 0 has one full adder, fed by the real
  `cin`. Its two versions are the same signal.
- **Level k.** Two neighbouring blocks, *lo* and *hi*, are joined into
  one. For the joined block's version v, the low part is `lo`'s version v.
  The high part is `hi.s1`/`hi.c1` if `lo`'s version-v carry is 1,
  otherwise `hi.s0`/`hi.c0`. This choice is one registered 2:1 `cosa_mux`.
  The low part goes through a plain register so that both halves stay
  aligned.
- **Level log2(W).** One block is left. Because block 0 always carries the
  real `cin`, its version 0 is the answer.

```
 bit:    3        2        1        0
       FA0 FA1  FA0 FA1  FA0 FA1   FA(cin)     level 0 (registered)
         \  /     \ /      \ /       |
          mux(c of bit 2)  mux(c of bit 0)      level 1: 2-bit blocks
                 \                 /
                  mux(c of bits 1..0)           level 2: 4-bit block
```

For 64 bits this gives 127 full adders and six levels of multiplexers. The
top level picks one of two 32-bit upper halves, computed for carry 0 and
carry 1, using the carry of the lower 32 bits. Each level is one pipeline
register, so a W-bit adder has a latency of 1 + log2(W) cycles: 4, 5, 6
and 7 cycles for 8, 16, 32 and 64 bits.

`adds_64` and `subs_64` each wrap one `cosa`:

- **Subtraction** is computed as A + ~B + ~bin. In the ALU `bin` (borrow-in)
  is tied to 0, so this is A + ~B + 1.
- **Overflow.** `overflow_detection` flags a signed overflow when both
  addends have the same sign and the sum has the other sign. For
  subtraction, the addends it checks are A and ~B.
- **Alignment.** The operand sign bits run through a 7-stage delay line
  next to the adder. A final register stage then emits the sum and the
  overflow together, 8 cycles after the operands.

## Multiplier (`mults_64`)

This is a radix-2 Booth multiplier on the low 32 bits of each operand.
The 64-bit product of two signed 32-bit numbers always fits the result.

An operand whose value lies outside the signed 32-bit range cannot be
multiplied: `error` is set and the result is 0. Such an operand has bits
63..31 not all equal.

Booth's algorithm works on the register `{acc, mq, q_m1}`:

- `acc` is 33 bits, so subtracting −2^31 cannot overflow.
- `mq` holds the multiplier.

Each step looks at `mq[0], q_m1`:

- `01`: add the multiplicand.
- `10`: subtract the multiplicand.
- Then shift the whole register right arithmetically.

The 32 steps are spread over 8 register stages of 4 steps each. The
product therefore appears 8 cycles after the operands, the same as the
adder.

## Divider and remainder (`divs_64`, `mods_64`)

`divs_64` works in four steps:

1. Take the magnitudes of both operands.
2. Run 64 steps of restoring long division. Each step shifts the next
   dividend bit into the partial remainder and subtracts the divisor if it
   fits.
3. Put the signs back. The quotient is negative when the signs differ. The
   remainder takes the dividend's sign, which gives C-style `/` and `%`.
4. Emit the quotient and the remainder, after 64 steps spread over 8
   register stages, so 8 cycles.

`mods_64` is the same divider with the remainder taken as its output.

Errors are a zero divisor (both 0/0 and x/0) and the one case whose
quotient does not fit: −2^63 / −1. On an error both results are 0.

## Shifts and rotates (`shifter_64`, `shift_rotate_unit`)

The count is operand B, read as a **signed** 64-bit number, and the rules
follow the classic HDL shift operators:

- A negative count shifts or rotates the other way, by its magnitude.
- A magnitude of 64 or more shifts every bit out. The result is then
  all zeros for `sll`/`srl`, all copies of A[0] for `sla`, and all copies
  of A[63] for `sra`.
- Rotations use the count modulo 64.
- `sla` fills the vacated low bits with A[0], not with zeros. This is the
  HDL operator's definition. It differs from the "arithmetic left shift" of
  most CPUs, which is the same as `sll`.

One module, `shifter_64`, implements all six operations and its parameter
`OP` picks one. The unit instantiates it six times.

## Flags and errors

`flag_reg_set` forms the flags from the result the unit selected:

- **parity (bit 3):** 1 when the result has an *even* number of one bits.
- **overflow (bit 2):** signed overflow of ADD or SUB. It is always 0 for
  other operations.
- **sign (bit 1):** result bit 63.
- **zero (bit 0):** the result is all zeros.

`error` is set for any of these:

- ADD or SUB overflow. The wrapped result is still delivered.
- MULT operand outside the 32-bit range.
- DIV or MOD by zero, or −2^63 / −1.
- An unused operation code.

The logic unit never raises an error.

## Pipeline

| stage (cycles after operands) | what happens |
|---|---|
| 1 – 7   | COSA levels (add/sub), Booth steps, division steps; logic and shift components finish in cycle 1 and their unit multiplexer in cycle 2, then a delay line follows |
| 8       | adder output and overflow register; last multiplier/divider stage |
| 9       | arithmetic-unit multiplexer (registered); last delay stage in the other two units |
| 10      | unit output register and unit flag register |
| 11      | top-level multiplexer (registered), selected by `alu_cont[4:3]` delayed 10 cycles |
| 12      | output registers `alu_out`, `error`, `flag_reg` |

All components of a unit have the same latency
(`alu_pkg::COMP_LAT` = 8), and all units have the same latency
(`UNIT_LAT` = 10). The operation code travels with the data in
`pipe_delay` shift registers. Back-to-back operations of different units
therefore never collide, and no stall logic is needed.

## Where this design departs from, or adds to, its source description

The published design gives the operation set, the codes, the port list, the
split into three units with their components, the COSA structure, Booth
multiplication on 32-bit operands, the error causes and the flag order. The
following points are this implementation's own, or differ from it:

- **Latency.** The source reports its first addition result after 280 ns
  at 50 MHz, which is 14 clock periods. It does not say where its
  registers are or when its test applied the operands. This design takes
  12 cycles for every operation, 7 of them in the 64-bit adder.
- **Adder sizes.** In the source, adder delay grows by about one 50 MHz
  clock period per doubling of the word width (8 → 64 bits). This design
  grows the same way (4 → 7 cycles). The source's absolute delays are about
  three periods longer.
- **Top level of the 64-bit adder.** The source builds it from three
  separate 32-bit adders: a low half with `cin`, and two upper halves with
  carry 0 and carry 1. Here the two upper-half versions share their lower
  levels. The function and latency are the same, with fewer full adders.
- **Multiplier range check.** The source checks the upper 32 bits of each
  operand against its sign. This design also requires bit 31 to match, so
  that the low 32 bits are a valid signed number.
- **MOD.** The operation table calls it "mod", but the text describes it as
  the division remainder. The remainder is implemented (sign of A).
  A floored modulo (sign of B) would differ for operands of mixed sign.
- **−2^63 / −1** raises `error`. The source only names division by zero.
- **Shift-unit error.** The source derives it from the flag path without a
  stated rule. Here it is raised only for unused codes.
- **Parity polarity** (1 = even) and the behaviour of **unused codes** are
  not specified by the source.
- **No reset.** The source's pin count leaves no room for one, so none is
  added.
- **Logic unit.** Its internals are not documented. It is built like the
  other two units.

## Files

`rtl/` (one module or package per file):

- `alu_pkg.sv`: operation codes, flag struct, latencies.
- `alu_64bit.sv`: the top level.
- `arith_unit.sv`, `logic_unit.sv`, `shift_rotate_unit.sv`: the three
  units.
- `adds_64.sv`, `subs_64.sv`, `mults_64.sv`, `divs_64.sv`, `mods_64.sv`:
  the arithmetic components.
- `cosa.sv`, `cosa_mux.sv`, `full_adder.sv`, `overflow_detection.sv`: the
  adder.
- `shifter_64.sv`, `flag_reg_set.sv`, `pipe_delay.sv`: the remaining
  components and helpers.

`tb/`:

- `tb_<module>.sv`: one self-checking testbench per module.
- `tb_util_pkg.sv`: random operands biased toward corner cases, and a
  reference model of the whole ALU built from plain language operators and
  bit-by-bit loops.
- `tb_cosa_widths.sv`: runs the adder at 8, 16, 32 and 64 bits and prints
  the latency of each.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It
also has a watchdog that counts a failure if it hangs. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/alu_pkg.sv tb/tb_util_pkg.sv tb/tb_alu_64bit.sv \
    --top-module tb_alu_64bit -o sim
./obj_dir/sim
```

Replace `tb_alu_64bit` with any other testbench name.

`tb_alu_64bit` runs the full-size ALU in three phases:

1. Measures the 12-cycle latency with a single addition.
2. Runs a directed list: every code, both operand signs, ADD and SUB
   overflow, multiplication beyond 32 bits, 0/0, x/0 and MOD by 0.
3. Issues 6000 random operations, changing unit and operation on almost
   every cycle.

It compares every result, error and flag word. It also fails if any code,
error cause or flag never occurred. The unit and component testbenches
stream one random operation per cycle and check both values and the exact
cycle count.

## Changing it

- **Word width.** The modules take a `WIDTH` parameter (64 by default),
  and `cosa` takes a power-of-two `W`. The top is fixed at 64 bits to
  match the operation table.
- **Multiplier and divider depth.** Their `STAGES` parameter sets how many
  register stages the steps are spread over. If you change it, keep it
  equal to `COMP_LAT` in `alu_pkg`, which is what keeps all components of
  a unit aligned.
- **Adder depth.** Adding or removing a register level in the adder
  changes `COMP_LAT`. The logic and shift units follow it automatically
  through their delay lines.
