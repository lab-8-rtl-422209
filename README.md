# A 16-bit MIPS processor with a floating-point co-processor

This is a small single-cycle MIPS processor with a 16-bit floating-point unit
(FPU) attached to it. The processor has 32-bit MIPS instructions, a 16-bit
datapath and eight registers. The FPU handles a 16-bit floating-point format
(1 sign bit, 5 exponent bits, 10 mantissa bits). Three R-type instructions,
`FPadd`, `FPsub` and `FPmult`, send two registers to the FPU and write its
result back. The FPU is a multi-cycle state machine inside a single-cycle
processor. The processor simply freezes until the FPU's known latency has
passed. That handshake is the least obvious part of the design, and
[Waiting for the FPU](#waiting-for-the-fpu) covers it in detail.

The default configuration runs a reference program. It adds, subtracts and
multiplies the four sign combinations of 11 and 34 and stores the twelve
results in data memory. The results match the known-good memory image.

## The number format

```
 15 | 14 ........ 10 | 9 ................ 0
sign|    exponent    |       mantissa
```

value = (-1)^sign × 1.mantissa × 2^(exponent − 15)

| word   | value |
|--------|-------|
| 0x4980 | 11    |
| 0x5040 | 34    |
| 0x51A0 | 45    |
| 0x4DC0 | 23    |
| 0x5DD8 | 374   |

The bias of 15 is what makes the reference words above decode correctly.
The rest of this format's rules are choices made for this design, and they
are not IEEE 754 half precision:

* **Zero.** An exponent field of 0 means zero, whatever the mantissa holds.
  There are no subnormals. A zero result is always `0x0000`.
* **No infinity or NaN.** Exponent 31 is an ordinary exponent, so the
  largest magnitude is `0x7FFF` (about 131008).
* **Overflow** saturates to ±`0x7FFF`. **Underflow** (a result below 2^−14)
  flushes to `0x0000`.
* **Rounding** is to nearest, ties to even, for all operations.
* **Division by zero** gives ±`0x7FFF`, with the sign of the quotient.
  0 / x gives 0.

`rtl/fp16_pkg.sv` holds these rules. It also holds the `round_pack`
function that every FPU path uses for its last step.

## The FPU state machine

`rtl/fpu.sv` keeps the port list the processor expects: `clock`, `data_rdy`,
`opcode[1:0]`, `A_in`, `B_in` and `FPU_out`. There is no reset and no
done/busy output. The machine idles in `FPU_wait`. When `data_rdy` is 1 it
latches the opcode and both operands, then follows one of three chains of
states, one state per clock, and returns to `FPU_wait`:

| opcode | path     | states | what each state does |
|--------|----------|--------|----------------------|
| `00` add, `01` subtract | Add/Sub | 4 | align (swap so that \|A\| ≥ \|B\|, then shift the smaller mantissa right into a 44-bit field so that no bit is lost) → add or subtract → normalise (leading-zero count, shift, adjust the exponent) → round and pack |
| `10` | Multiply | 3 | 11×11-bit mantissa product and exponent sum → one-place normalisation, with round and sticky bits → round and pack |
| `11` | Divide | 16 | set up → 14 restoring-division steps, one quotient bit each → round and pack |

`FPU_out` is a register. It is loaded at the edge that leaves a path's last
state and holds its value until the next operation finishes. If `data_rdy`
is sampled at edge 0, the result is visible after edge N, where N is the
state count above. For subtraction, the machine inverts B's sign when it
latches the operands, so subtraction then runs the add path.

There is no reset, so the machine may power up in any state. Every unused
state code goes to `FPU_wait` and every path ends there. With `data_rdy` held
low, the machine is therefore idle within 16 cycles. An assertion flags a
`data_rdy` pulse that arrives while the machine is busy.

The divide path is there because the FPU's opcode space reserves `11` for
it. No processor instruction uses it. To reach it, drive the FPU directly or
add a function code (0x16 would fit the pattern below).

## Waiting for the FPU

Each floating-point instruction is an R-type word with function code 0x10,
0x12 or 0x14. Bits [2:1] of those codes are exactly the FPU opcode (00, 01,
10), and `alu_control` passes them straight through. The FPU takes its
operands from the same Read Data 1 and Read Data 2 buses that the ALU uses.
A multiplexer then picks the FPU's result instead of the ALU's on the way to
the register file.

The FPU has no done signal, so `mips_fpu_top` counts cycles. `fp_cnt` starts
at 0 when a floating-point instruction is fetched. With
N = `fpu_states(op)`:

| cycle of the instruction | what happens |
|--------------------------|--------------|
| 0       | `data_rdy` = 1 (FPU latches rs and rt); PC held; no register write |
| 1 … N   | FPU works; PC held; no register write (`fpu_stall_out` = 1) |
| N + 1   | `FPU_out` is valid; rd is written; the PC advances |

As a result, `FPadd` and `FPsub` take 6 clocks, `FPmult` takes 5, and every
other instruction takes one. Back-to-back and dependent FP instructions work
with no extra logic, because the FPU is back in `FPU_wait` by cycle N + 1. If
you change the number of states on an FPU path, change `fpu_states` in
`fp16_pkg` with it. The processor reads that function, so the two stay in
step. Stores and loads do not stall.

## Instruction set

All instructions are 32 bits wide, in the standard MIPS fields
`op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]`. Only the low
three bits of each register field are decoded.

| instruction | encoding | notes |
|-------------|----------|-------|
| add, addu, sub, subu, and, or, slt | op 0, funct 0x20, 0x21, 0x22, 0x23, 0x24, 0x25, 0x2A | no overflow trap, so the unsigned forms behave like add and sub; slt is signed |
| sll, srl rd, rt, shamt | op 0, funct 0x00, 0x02 | logical shifts of rt |
| jr rs | op 0, funct 0x08 | |
| FPadd, FPsub, FPmult rd, rs, rt | op 0, funct 0x10, 0x12, 0x14 | multi-cycle, see above |
| addi rt, rs, imm | op 0x08 | |
| lui rt, imm | op 0x0F | rt ← imm: with 16-bit registers, the register *is* the upper half |
| lw, sw rt, off(rs) | op 0x23, 0x2B | word address = rs + off |
| beq, bne rs, rt, off | op 0x04, 0x05 | target = PC + 4 + 4·off |
| j, jal target | op 0x02, 0x03 | PC ← target·4; jal writes PC + 4 to **R7** |

R0 always reads as zero. Unknown opcodes and function codes write nothing.

## Datapath and memories

* **PC** (`pc_unit`): 16-bit byte address, reset to 0, normally PC + 4. It has
  a branch adder (PC + 4 + offset·4), jump and jr paths, and a `hold` input
  for the FPU stall. Priority: jr, then jump, then a taken branch.
* **Instruction memory** (`instruction_memory`): 256 × 32 ROM, read
  combinationally at PC[9:2]. It is loaded by `$readmemh` from
  `PROGRAM_FILE`. Unset words are 0, which is `sll r0, r0, 0`, a no-op.
* **Registers** (`register_file`): 8 × 16, two combinational read ports and
  one write port. A synchronous reset clears them.
* **ALU** (`alu`), **ALU control** (`alu_control`), **control unit**
  (`control_unit`): the usual single-cycle MIPS decode. The control word is
  the `ctrl_t` struct in `mips_pkg` (RegDst, Branch, BranchNE, MemRead,
  MemtoReg, ALUOp, MemWrite, ALUSrc, RegWrite, Jump, Link). MemRead is
  decoded but not needed, because the memory reads combinationally.
* **Data memory** (`data_memory`): 256 × 16 RAM, **word-addressed** by the
  low 8 bits of the ALU result. It reads combinationally, writes at the
  clock edge, and is preloaded from `DATA_FILE`.
* **Sign extension** of the 16-bit immediate to the 16-bit datapath is an
  identity. It is one assignment in the top module.

`mips_fpu_top` has these ports: `clk`, `rst` (synchronous, active high) and
some observation outputs (`pc_out`, `instruction_out`, `write_data_out`,
`reg_write_out`, `mem_write_out`, `fpu_stall_out`). Hold `rst` for at least 20
clocks after power-up, so that the FPU, which has no reset, is idle.

## The reference program

`rtl/program.hex` holds 48 instructions. Each of the four operand pairs
follows the same pattern: `lw R2`, `lw R3`, an FP operation into R1, then
`sw R1`. The pattern runs for add, then subtract, then multiply.
`rtl/dmemory.hex` preloads words 0x02–0x09 with 11, 34, −11, 34, 11, −34,
−11 and −34. Every other word is zero. After 104 clocks (36 one-cycle
instructions, 8 × 6 and 4 × 5 FP cycles), words 0x10–0x1B hold:

```
0x10: 51A0 4DC0 CDC0 D1A0   (add:  45, 23, -23, -45)
0x14: CDC0 D1A0 51A0 4DC0   (sub: -23, -45,  45,  23)
0x18: 5DD8 DDD8 DDD8 5DD8   (mult: 374, -374, -374, 374)
```

Larger programs fit if they stay within 256 instructions and 256 data words.

## Files

* `rtl/fp16_pkg.sv`: number format, FPU opcode enum, path lengths, `round_pack`
* `rtl/mips_pkg.sv`: opcodes, function codes, ALU operations, control struct
* `rtl/fpu.sv`: the FPU state machine
* `rtl/alu.sv`, `rtl/alu_control.sv`, `rtl/control_unit.sv`,
  `rtl/register_file.sv`, `rtl/pc_unit.sv`, `rtl/instruction_memory.sv`,
  `rtl/data_memory.sv`: processor blocks
* `rtl/mips_fpu_top.sv`: the processor
* `rtl/program.hex`, `rtl/dmemory.hex`: default memory images
* `tb/`: one self-checking testbench per block, plus:
  * `tb_mips_fpu_sample`: the reference program at the default configuration
  * `tb_mips_fpu_top`: an end-to-end test running `tb/isa_test.hex`, which
    uses every instruction, taken and untaken branches, a loop, jal/jr,
    dependent back-to-back FP instructions and a write to R0. It counts each
    mechanism and checks the cycle counts.
  * `tb/fp16_ref_pkg.sv`: a floating-point reference model written with
    `real` arithmetic, independent of the RTL

## Simulating

Memory image paths are relative to the directory you run from, which must
contain `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp16_pkg.sv rtl/mips_pkg.sv tb/fp16_ref_pkg.sv \
    tb/tb_mips_fpu_top.sv --top-module tb_mips_fpu_top -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_*.sv` for the testbench. Each one prints
`TB_RESULT checks=N failures=M` and stops. To run your own program, assemble
it into one 32-bit hex word per line and pass it as `PROGRAM_FILE`. For
different data, pass a `$readmemh` image as `DATA_FILE`.

## What is verified

* The FPU testbench runs about 6,600 operations through all four opcodes and
  compares every result with the `real`-arithmetic model. The operations
  include the reference operands, corner cases (zeros, the largest and
  smallest values, cancellation, overflow, underflow, division by zero) and
  random operands, some with nearby exponents. It also checks that
  `FPU_out` changes at exactly the stated state count.
* Every block testbench passes.
* Each block testbench was also run against a copy of its block with one
  deliberate fault, and it fails on every one of these copies.
* The reference program produces all twelve expected words in 104 cycles and
  changes no other memory word.

## Limits and choices to be aware of

* The FPU follows its own rules for zero, saturation and special values (see
  above). Do not expect bit-exact IEEE half-precision results outside the
  normal range.
* `srl` uses function code 0x02, the standard MIPS code, so that it differs
  from `sll`.
* `lui` loads the immediate unchanged. With 16-bit registers, a shift left
  by 16 would always give 0.
* `jal` links into R7, because only eight registers exist.
* The stall scheme depends on fixed FPU latencies. An FPU whose latency
  depended on its data would need a done output.
