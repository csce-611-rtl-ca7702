# A 32-bit MIPS-style ALU built from four parallel operation classes

This is a purely combinational 32-bit arithmetic-logic unit. It covers the
logical, arithmetic, comparison and shift operations of the MIPS integer
instruction set: 13 operations in all, with signed-overflow and zero-result
flags.

The main idea is to split the operations into four classes. Each class has its
own sub-block, and all four work on the operands at the same time. A 4-way
multiplexer then passes one class result to the output. The two high bits of
the 4-bit operation code choose the class. The two low bits go to every class
block and choose the operation inside the class.

The comparison class computes no difference of its own. It reads the sign bits
and the carry of the subtraction that the arithmetic block performs at the same
moment. This sharing is the least obvious part of the design. It is explained
in [Comparison](#comparison-set-on-less-than-from-the-shared-subtraction).

```
                 ALUOp[1:0] to every class block          ALUOp[3:2]
                                                               |
  A, B -------> logical ------------ LogicalR -------------> +-------+
  A, B -------> arithmetic --------- ArithmeticR ----------> |       |
                  |  CarryOut, ArithmeticR[31]               | mux4  |---> R
  A[31], B[31] ---+-> comparison --- ComparisonR ----------> | bus32 |
  A, SHAMT ---> shifter ------------ ShifterR -------------> +-------+
                  |
  arithmetic ---> Overflow, Zero (straight to the ALU outputs)
```

## Interface (`alu`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `A`, `B`   | in  | 32    | operands |
| `ALUOp`    | in  | 4     | operation (table below) |
| `SHAMT`    | in  | 5     | shift amount for the shift class |
| `R`        | out | 32    | result |
| `Overflow` | out | 1     | signed overflow of ADD or SUB |
| `Zero`     | out | 1     | the adder's output is all zeros |

The ALU has no clock and no state. Outputs settle one combinational delay after
any input changes. The parameter `WIDTH` (default 32) sets the operand width.
`SHW = $clog2(WIDTH)` sets the width of `SHAMT`. `WIDTH` must be a power of two
because of the shifter.

## Operation codes

The codes are in `rtl/alu_pkg.sv` as the enum `alu_op_e`.

| ALUOp[3:2] | class      | ALUOp[1:0] | operation |
|------------|------------|-----------|-----------|
| 00 | logical    | 00 / 01 / 10 / 11 | AND / OR / XOR / NOR |
| 01 | arithmetic | 00 / 01 / 10 / 11 | ADD / ADDU / SUB / SUBU |
| 10 | comparison | 10 / 11           | SLT / SLTU (result 1 or 0) |
| 11 | shift      | 00 / 10 / 11      | SLL / SRL / SRA |

The comparison codes have the same low bits as SUB and SUBU. That is deliberate.
Whenever the comparison class is selected, the shared adder is subtracting.

Three codes are unused. `1000` and `1001` give `R = 0`. `1101` behaves like
SLL, because the shifter shifts left whenever `ALUOp[1]` is 0.

Shifts act on operand **A**, not on B as the MIPS `sll rd, rt, sa` form does.
If this ALU is put in a MIPS datapath, route `rt` to `A` for shift
instructions.

## Arithmetic: one adder for four operations

`arithmetic` holds four small blocks:

- **`bor_not_b`** passes B, or its bitwise complement when `ALUOp[1]` is 1.
- **`add32`** is a plain adder with carry in and carry out. Its carry-in is also
  `ALUOp[1]`. A subtraction is therefore `A + ~B + 1`, which equals `A - B` in
  two's complement.
- **`calc_zero`** forwards the sum as `ArithmeticR`. It also raises `Zero` when
  no sum bit is set.
- **`overflow_detect`** is a truth table on the code and three sign bits:
  - ADD (`00`) overflows when A and B have the same sign and the sum has the
    other sign.
  - SUB (`10`) overflows when A and B have different signs and the result's sign
    differs from A's.
  - ADDU and SUBU never flag overflow. This matches MIPS, where `addu` and
    `subu` do not trap.

The sign used for B in the overflow rule is that of the **original** B, not of
the complemented operand. The SUB rule above is written for that sign.

## Comparison: set-on-less-than from the shared subtraction

`comparison` receives `A[31]`, `B[31]`, the sign of the subtraction result
`ArithmeticR[31]`, and the adder's `CarryOut`. It returns 1 in bit 0 when
A < B. All other bits are always 0, so synthesis reports them as constant.

- **SLT (signed)**
  - If A and B have different signs, the negative one is smaller, so the result
    is `A[31]`.
  - If they have the same sign, `A - B` cannot overflow, so the sign of the
    difference is the answer.
- **SLTU (unsigned)**
  - `A + ~B + 1` carries out exactly when A ≥ B. A carry of 0 means a borrow,
    which means A < B.

Codes `00` and `01` in this class give 0.

## Shifter

`shifter` is a logarithmic shifter. Stage *i* shifts by 2^i when `SHAMT[i]` is
set, and otherwise passes its input through. Five stages cover shifts of 0 to
31.

- `ALUOp[1] = 0` shifts left and fills with zeros.
- For a right shift, `ALUOp[0]` chooses the fill. 0 fills with zeros (SRL).
  1 fills with copies of `A[31]` (SRA).

## What the flags mean

`Overflow` and `Zero` come straight from the arithmetic block. They are not
gated by the selected class. They always describe the adder's result for the
current `ALUOp[1:0]`, even when the logical, comparison or shift class drives
`R`. For example, `Overflow` can be 1 during an SLT whose internal subtraction
overflows. Treat the flags as valid only for the arithmetic class. `Zero` after
a SUB also serves as an equality test (`A == B`). A datapath that needs
class-gated flags should add the gating outside the ALU.

## Design choices and how far to trust them

The structure follows the source design:

- four parallel class blocks and a final selector;
- the logical, comparison and shift code assignments;
- the overflow and comparison truth tables;
- the shifter's per-bit stages;
- the zero NOR.

The following are this implementation's own readings or choices:

- **ADDU and SUB code positions.** ADDU = `0101` and SUB = `0110` are inferred.
  The overflow table only fixes that the signed operations use `00` and `10`.
  The adder's carry-in fixes that bit 1 means subtract.
- **Sign of B in the overflow rule.** It uses the original B, not the
  complemented operand, as described under Arithmetic.
- **The adder.** The source design uses a ready-made 32-bit library adder and
  gives only its ports. Here `add32` is a behavioural `+`, and synthesis
  chooses the adder architecture.
- **Result port name.** The result port is named `R`. An early version of the
  interface called it `C`.
- **No registers.** The ALU has no clock, reset or pipeline registers.

## Files

- `rtl/alu_pkg.sv`: operation-code enums and per-class constants.
- `rtl/alu.sv`: top level. It instantiates `logical`, `arithmetic`,
  `comparison`, `shifter` and `mux4bus32`.
- `rtl/arithmetic.sv`: instantiates `bor_not_b`, `add32`, `calc_zero` and
  `overflow_detect`.
- `tb/alu_ref_pkg.sv`: reference model for the testbenches. It computes results
  from the operations' definitions (`<`, `$signed`, `>>>`, 64-bit sums), not
  from the RTL's structure.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

Every testbench checks its outputs against values it computes independently.
Each one ends by printing `TB_RESULT checks=N failures=M`.

- **`tb_alu`** runs the whole ALU at its default width. It first runs directed
  cases for all 13 operations. It then runs 2000 random rounds over the 13
  operations and 2000 random vectors over all 16 codes. Operands are biased
  toward 0, all-ones and the sign boundaries. The test counts how often each
  mechanism occurred and fails if any never did:
  - every operation;
  - ADD overflow and SUB overflow;
  - zero result;
  - all three SLT cases (same sign, A negative, B negative);
  - SLTU borrow;
  - SRA sign fill.
- **`tb_overflow_detect`** is exhaustive over its 64 input combinations.
- **`tb_shifter`** covers every shift amount for every code.
- The other testbenches use directed corner cases plus random vectors.

Each testbench was also shown to fail on a deliberately broken copy of its
module, for example SRA filling with zeros or SLT ignoring the sign-differ case.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_alu \
    -y rtl -y tb +libext+.sv rtl/alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_alu.sv
./obj_dir/Vtb_alu
```

Replace `tb_alu` with any other `tb_<module>` to test one sub-block.
`tb_alu` takes well under a second.

The testbenches and the reference model assume `WIDTH = 32`. The RTL lints
cleanly at 16 and 64 bits. To verify another width, widen the reference model.
