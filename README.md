# miniMIPS: a five-stage pipelined MIPS subset with bypassing and a load interlock

This is a 32-bit MIPS-subset processor cut into five pipeline stages: IF, RF,
ALU, MEM and WB. The aim is one instruction per clock without changing what
programs compute, except for one deliberate change to the instruction set:
the branch delay slot. Pipelining creates three kinds of hazard, and each one
has its own piece of hardware here:

| hazard | cause | fix |
|---|---|---|
| control | the next PC is known only after the branch is decoded | branches resolve at the end of RF; the one instruction fetched behind a branch (the delay slot) always executes |
| data | a result is needed before it reaches the register file | two bypass muxes in RF take values from the ALU, MEM and WB stages, and from the PC pipeline for `jal`/`jalr` |
| load delay | `lw` data arrives only in WB | an interlock freezes IF and RF and injects bubbles until the load reaches WB |

The whole design is the module `minimips5`. It has no caches, no exceptions
and no interrupts. Its instruction and data memories are simple on-chip arrays.

## Pipeline at a glance

```
        IF              RF                     ALU            MEM              WB
 PC ─► IMEM ─► IR^REG ─► decode, regfile ─► IR^ALU ─► ALU ─► IR^MEM ─► DMEM ─► IR^WB ─► WDSEL ─► regfile
 PC+4 ───────► PC^REG ─────────────────► PC^ALU ────────► PC^MEM ─────────► PC^WB
                        bypass A/B, '=',    A, B, WD^ALU     Y^MEM, WD^MEM    Y^WB, RD
                        BT/JT/J, PCSEL
```

Each stage keeps a copy of its instruction word (`ir_reg`, `ir_alu`, `ir_mem`,
`ir_wb`) and decodes it with its own `mm_decode` instance. The PC of each
instruction travels beside it, as *address + 4* (`pc_reg` … `pc_wb`). A
`valid` bit also travels with each instruction. It tells a bubble from a real
`nop`, and it is used only to report the retiring instruction.

Reset is synchronous and active high. It loads the PC with `0x8000_0000` and
fills all instruction registers with `nop` (the all-zero word, `sll $0,$0,0`).

## Branches and the delay slot (`mm_branch`)

The branch decision is made at the end of RF, one cycle after fetch. By then
the instruction after the branch has already been fetched, and it is always
executed. No instruction is ever annulled. `mm_branch` computes:

* `BZ = (A == B)`, where A and B are the bypassed operands, so a branch can
  test a result made one cycle earlier;
* `BT = PC^REG + 4·sext(imm)`, which is the branch address + 4 + 4·offset;
* `JT = A`, the target of `jr`/`jalr`;
* `J = {PC^REG[31:28], target26, 2'b00}`, the target of `j`/`jal`.

It then sets PCSEL: 0 selects PC+4, 1 selects BT, 2 selects JT and 3 selects J.
Input 6 of the PC mux is the reset vector.

## The bypass network (`mm_bypass`)

This is the hardest part of the design to follow. There are two copies of
`mm_bypass`: A compares against `rs` and B against `rt`. Both sit in front of
the ASEL/BSEL operand muxes, not behind them. That order matters: the branch
comparator, the register-jump target and the store data (`WD^ALU`) all need
the bypassed register value, not the shifted or immediate operand.

**Which source wins.** The source register is compared with the destination
register of the instructions in ALU, MEM and WB. An instruction that writes no
register (`sw`, branches, `j`, `jr`) offers destination `$0`, so it can never
match. The youngest match wins:

| condition | operand comes from |
|---|---|
| source is `$0` | constant 0 |
| matches the ALU stage | ALU output (combinational, same cycle) |
| else matches the MEM stage | `Y^MEM` |
| else matches the WB stage | WDSEL mux output (ALU result, load data or return address) |
| otherwise | register file |

The register file is written at the end of WB. A read in that same cycle sees
the old value, and the WB bypass covers that case.

**Return addresses.** A `jal` at address *p* must write *p + 8*. With a delay
slot, that is the instruction after the delay slot. This value does not come
out of the ALU. It is already in the PC pipeline, as the *address + 4* of the
instruction one stage behind the link instruction, which is the delay slot.
So while a `jal`/`jalr` is in flight, its result is taken from:

| link instruction in | value taken from |
|---|---|
| ALU | `PC^REG` (the delay slot is in RF) |
| MEM | `PC^ALU` |
| WB | `PC^MEM`, through WDSEL input 0, which also writes the register file |

A bubble inserted by the interlock copies `PC^REG` into `PC^ALU`. So "the PC
one stage behind" stays *p + 8* even if the delay slot was held back by a
stall. Counting all of these, the operand mux has seven selections
(`byp_e`): 0, register file, ALU, PC^REG, MEM, PC^ALU and WB.

## The load interlock (`mm_interlock`)

The data memory gets almost two cycles for a load. The address (`Y^MEM`) is
ready at the start of MEM, and the data is needed only by the end of WB. So a
load's value exists only in WB, and no bypass can hand it to an instruction
that reaches RF earlier. When the instruction in RF reads a register whose
youngest pending writer is a `lw` in ALU or MEM, `mm_bypass` raises
`load_wait`. If that operand is actually used by the instruction, the
interlock then does three things:

* it clears the clock enable of `PC`, `PC^REG` and `IR^REG`, so IF and RF hold;
* it selects `nop` into `IR^ALU`, so a bubble moves down the pipe;
* it lets everything from ALU onward advance.

The result, counted in the cycles a `lw` appears to take:

```
lw  $4,0($9)        lw  $4,0($9)        lw  $4,0($9)
add $5,$9,$4        nop                 nop
                    add $5,$9,$4        nop
                                        add $5,$9,$4
2 bubbles (3 clk)   1 bubble (2 clk)    none (1 clk, WB bypass)
```

If a younger non-load instruction writes the same register in between, the
bypass takes its value and there is no stall. An assertion in `minimips5`
checks that a stall only happens while a `lw` is in ALU or MEM.

## Memories

* `mm_imem`: word array with a combinational read at the PC. `IR^REG`
  captures the word at the end of IF. A synchronous write port loads programs.
  The byte address wraps modulo the size, so `0x8000_0000` is word 0.
* `mm_dmem`: word array, word access only (`lw`/`sw`). It latches the word at
  `Y^MEM` at the clock edge that ends MEM, so the data is valid throughout WB.
  A store writes at that same edge. A second, combinational port is for
  inspection.
* `mm_regfile`: 32×32 bits, two combinational read ports, one write port, and
  an inspection read port. Writes to `$0` are dropped. There is no reset, as in
  MIPS.

## Instruction set (`mm_decode`, `mm_pkg`)

`add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv srav jr jalr
addi addiu slti sltiu andi ori xori lui lw sw beq bne j jal`, with the standard
MIPS encodings. Points to note:

* Overflow does not trap: `add` behaves as `addu`.
* `lui` is computed by the ALU as the immediate shifted left by the constant 16
  (ASEL input 2).
* Any other encoding is flagged `illegal` and executes as a `nop`.

The control signals keep the classic names: ALUFN, ASEL, BSEL, SEXT, WASEL,
WDSEL, WERF, Wr and PCSEL. The mux inputs are numbered as follows:

* ASEL: 0 = register, 1 = shamt, 2 = 16
* BSEL: 0 = register, 1 = immediate
* WASEL: 0 = rt, 1 = rd, 2 = 31
* WDSEL: 0 = PC, 1 = ALU, 2 = memory

## Top-level interface (`minimips5`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock, synchronous active-high reset |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | write one instruction word (byte address) |
| `dbg_reg_addr` / `dbg_reg_data` | in/out | read any register |
| `dbg_mem_addr` / `dbg_mem_data` | in/out | read any data-memory word |
| `retire` | out | `valid`, `pc` of the instruction leaving WB, and whether IF/RF are stalled |

Parameters:

* `IMEM_WORDS` (1024)
* `DMEM_WORDS` (1024)
* `RESET_PC` (`32'h8000_0000`)

To run a program:

1. Hold `rst`.
2. Write the program starting at `RESET_PC`.
3. Release `rst`.

The first instruction leaves WB four cycles later. After that, one instruction
retires per cycle, apart from load bubbles.

## Choices made here, and what is not built

* **Where WB gets the return address.** The `jal`/`jalr` write-back value comes
  from `PC^MEM`, not `PC^WB`. In a plain PC pipeline `PC^WB` holds the link
  instruction's own address + 4, which is the wrong return address with a
  delay slot. `PC^WB` is kept only for the retire report.
* **One NOP mux.** A NOP mux in front of `IR^MEM` is sometimes drawn for this
  pipeline. The load interlock does not need it, so it is not built.
* **Sizes.** Memory sizes, the load and inspection ports, the ALU encoding and
  the instruction subset are this design's own choices.
* **Reset.** Reset loads `0x8000_0000` into the PC directly.
* **Traps and interrupts are not implemented.** That covers the vectors
  `0x8000_0040` and `0x8000_0080` (PCSEL inputs 5 and 4) and saving a return
  address in `$27`. The ALU's N/V/C/Z flags are computed but nothing in the
  pipeline uses them.
* **Jump target bits.** The jump target takes its upper four bits from the
  address of the delay slot (`PC^REG[31:28]`), as in MIPS.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_minimips5` | end-to-end, default sizes. Hand-written programs (load-delay cases, a loop with an operand bypassed into the branch, `jal` with `$ra` read in the delay slot and in the next three instructions, `jalr`) plus 40 random 300-instruction programs with loads, stores, forward branches and `jal`. A delayed-branch instruction-level model in the testbench predicts all registers, all 1024 data words and the exact cycle count, including every load bubble. The testbench also counts each operand source, both stall lengths, taken and untaken branches, jumps and links, and fails if any of them never happens. |
| `tb_mm_alu` | every function on corner and random operands |
| `tb_mm_regfile` | random reads and writes, with read-during-write and `$0` |
| `tb_mm_imem`, `tb_mm_dmem` | contents, address wrap, one-cycle read latency, read-before-write |
| `tb_mm_decode` | every opcode of the subset, and that illegal encodings come out as `illegal` |
| `tb_mm_branch` | targets and PCSEL for all branch kinds |
| `tb_mm_bypass` | source priority, PC bypasses and `load_wait` on random stage contents |
| `tb_mm_interlock` | exhaustive truth table |

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mm_pkg.sv tb/tb_minimips5.sv \
          --top-module tb_minimips5 -o sim
obj_dir/sim
```

Swap the testbench name to run any other test. The end-to-end test finishes in
well under a second. Verilator has only two signal states, so the testbench
copies the register file's and data memory's power-up contents into its model
before each program. Nothing needs initialising.

## Files

* `rtl/mm_pkg.sv`: shared types, mux encodings and opcodes
* `rtl/minimips5.sv`: top module: the pipeline registers, the stage wiring and the memories
* `rtl/mm_decode.sv`, `rtl/mm_alu.sv`, `rtl/mm_regfile.sv`, `rtl/mm_branch.sv`, `rtl/mm_bypass.sv`, `rtl/mm_interlock.sv`, `rtl/mm_imem.sv`, `rtl/mm_dmem.sv`: the blocks described above
* `tb/tb_*.sv`: one testbench per module
