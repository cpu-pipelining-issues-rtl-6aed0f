# miniMIPS: a five-stage pipeline with delay slot, bypasses and load interlock

This is a 32-bit MIPS-subset processor pipelined into five stages: instruction
fetch (IF), register fetch (RF), execute (ALU), memory (MEM) and write-back (WB).
Pipelining creates three hazards, and the design handles each one in a specific way:

| Hazard | Cause | Remedy in this design |
|---|---|---|
| Control | The next PC is not known until a branch has been decoded | Branches and jumps are decided in RF. The one instruction already fetched behind them, the *delay slot*, is always executed. |
| Data | A result is written to the register file only in WB, three stages after RF reads it | Each of the two RF operands has a bypass mux. It takes the newest value from the ALU output, the MEM stage, the WB write data, or the PC pipeline. |
| Load-use | Load data exists only in WB | An interlock freezes IF and RF and sends NOPs (bubbles) into the ALU stage until the load reaches WB. |

Storing a return address (`jal`) adds one more detail. The value comes from the PC
pipeline, not from the ALU, so the bypass muxes get extra PC inputs. Also, because
the delay slot is always executed, the return address is the jal's address + 8.

## Pipeline at a glance

```
        +----+   PC_REG  +--------------------+  PC_ALU   +-----+  PC_MEM  +------+  PC_WB  +--------+
 PC --->| IF |---------->| RF                 |---------->| ALU |--------->| MEM  |-------->| WB     |
  ^     |imem|   IR_REG  | regfile read       |  IR_ALU   |     |  IR_MEM  | dmem |  IR_WB  | WASEL  |
  |     +----+           | A/B bypass muxes   |  A, B     |     |  Y_MEM   | (adr |  Y_WB   | WDSEL  |
  |                      | "=" comparator, BT |  WD_ALU   |     |  WD_MEM  |  =Y) |  RD     | regfile|
  +------- PCSEL --------| ASEL / BSEL muxes  |           |     |          |      |         | write  |
                         +--------------------+           +-----+          +------+         +--------+
```

* The PC pipeline (`PC_REG`, `PC_ALU`, `PC_MEM`, `PC_WB`) holds each
  instruction's address **+ 4**. The IR pipeline carries the instruction word,
  and every stage decodes its own IR with its own `decoder` instance.
* `WD_ALU`/`WD_MEM` carry the store data (the bypassed rt value) to the data memory.
* The data memory gets its address (`Y_MEM`) at the start of MEM and returns
  data in WB. The read is registered at the end of MEM, which leaves the read
  almost two clock cycles.

Mux input numbering (also the encoding of the select signals in `minimips_pkg`):

| Mux | Inputs |
|---|---|
| PCSEL | 0 PC+4, 1 BT (branch target), 2 JT (register, `jr`/`jalr`), 3 `{PC_REG[31:28], J<25:0>, 00}`, 4 `0x80000080`, 5 `0x80000040`, 6 `0x80000000` |
| ASEL | 0 bypassed rs, 1 `shamt` (IR<10:6>), 2 constant 16 |
| BSEL | 0 bypassed rt, 1 extended immediate (SEXT selects sign or zero extension) |
| WASEL | 0 rt, 1 rd, 2 `$31`, 3 `$27` |
| WDSEL | 0 `PC_WB + 4`, 1 `Y_WB` (ALU result), 2 `RD` (load data) |

## Control transfers and the delay slot

A branch's operands are compared in RF by the `=` comparator, which produces BZ.
The comparator reads the *bypassed* operands, so a branch may test a value computed
by the instruction right before it. The next PC is selected in the same cycle.
By then the instruction after the branch has already been fetched. It is
executed whatever the branch decides, so there is no branch penalty and no
annulling. The branch target is `BT = PC_REG + sext(imm)*4`. Here `PC_REG` is the
branch's address + 4, which is the delay-slot address.

Only `beq` and `bne` exist as conditional branches, because the only comparator
is an equality test. `j`/`jal` use the region-relative target. `jr`/`jalr` use the
bypassed rs value (JT).

## Bypassing

Two identical `bypass_unit`s sit between the register file and the ASEL/BSEL
muxes. They are ahead of those muxes because the branch comparator, the jump
register target and the store data all need the corrected values too. Each unit
compares its source register field (5 bits) with `$0` and with the destination
register of the instructions in the ALU, MEM and WB stages. The youngest match
wins:

| Condition (first true wins) | Operand |
|---|---|
| source is `$0` | 0 |
| ALU-stage instruction writes it | ALU output, or **PC_ALU + 4** if that instruction links (`jal`, `jalr`, trap) |
| MEM-stage instruction writes it | `Y_MEM`, or **PC_MEM + 4** if it links |
| WB-stage instruction writes it | WDSEL mux output (covers ALU results, load data and links) |
| otherwise | register file |

That makes six bypass inputs per operand, twelve in all. An instruction that
writes no register (`sw`, branches, `j`, `jr`) is decoded with destination 0. It
therefore never matches, because `$0` is caught first. The register file has no
write-through: a read in the cycle of the write is served by the WB bypass.

The PC inputs matter for code like this (registers as in MIPS, `$ra = $31`):

```
      add  $ra,$0,$0
      jal  f
      addi $ra,$ra,4     # delay slot: $ra from PC_ALU+4 (jal is in ALU)
f:    xor  $t0,$ra,$0    # $ra from the ALU output (addi in ALU)
      or   $1,$0,$ra     # $ra from Y_MEM (addi in MEM)
      add  $t2,$0,$ra    # $ra from the WB bypass (addi in WB)
```

All four instructions see jal address + 12. The PC_MEM input is used when a
linked value is read two instructions after the jal with nothing in between
overwriting it. An example is the first instruction of a called function that
reads `$ra`.

Naming note: this RTL names a PC bypass after the stage that holds the linking
instruction. `PC_ALU + 4` is the return address of the instruction now in ALU,
read from the `PC_ALU` register. Some descriptions of this pipeline name the
same path after the register it is about to enter (PC^MEM).

## Load interlock

A `lw` that is in ALU or MEM has no data yet. The `interlock` block checks
whether the RF-stage instruction reads (according to its decode) a register
whose nearest writer in ALU or MEM is a load. If it does:

* the clock enables of `PC`, `PC_REG` and `IR_REG` are off, so IF and RF repeat;
* a NOP (`0x00000000`, `sll $0,$0,0`) is loaded into `IR_ALU` instead of the
  RF instruction.

The dependent instruction moves on once the load is in WB, and it gets the load
data over the WB bypass. With five stages this means two bubbles directly
after a load and one bubble when one instruction lies between them:

```
cycle   i    i+1  i+2  i+3  i+4  i+5  i+6
IF      lw   add  xor  xor  xor  ...
RF           lw   add  add  add  xor
ALU               lw   nop  nop  add  xor
MEM                    lw   nop  nop  add
WB                          lw   nop  nop
```

(`lw $t4,0($t1); add $t5,$t1,$t4; xor $t6,$t3,$t4`. The xor reads `$t4` from the
register file once the lw has written it.) An assertion in `minimips_top`
checks that an operand that is really used is never taken from a load still
in ALU or MEM.

## Return addresses, traps and reset

* `jal` writes `$31` and `jalr` writes `rd`, both with `PC_WB + 4`, the
  address after the delay slot.
* An unknown opcode or function code acts like a `jal` to `0x80000040` that
  links into `$27`. Its delay slot is executed, and a handler returns with
  `jr $27`. This use of PCSEL input 5 and WASEL input 3 is this design's choice.
* Reset (synchronous, active high) selects `0x80000000` (PCSEL 6), fills
  IR_REG/IR_ALU/IR_MEM/IR_WB with NOPs and clears the register file.
* PCSEL input 4 (`0x80000080`) is present but never selected. Interrupts are
  not implemented.

## Instruction set

Standard MIPS encodings, word accesses only, no overflow exceptions:
`add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv srav jr jalr`,
`addi addiu slti sltiu andi ori xori lui lw sw beq bne j jal`. `lui` runs
through the ALU as `imm << 16`: ASEL selects the constant 16, BSEL the
zero-extended immediate, and the ALU function is a left shift of B by A.
`andi`/`ori`/`xori` zero-extend their immediate. All other immediates are
sign-extended.

## Interface and parameters

`minimips_top #(IMEM_WORDS = 1024, DMEM_WORDS = 1024)`

| Port | Dir | Width | Use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `imem_load_we/addr/data` | in | 1 / log2(IMEM_WORDS) / 32 | write one instruction word per clock (hold `rst` meanwhile) |
| `dmem_host_we/addr/wdata` | in | 1 / log2(DMEM_WORDS) / 32 | write one data word per clock (the pipeline's store has priority) |
| `dmem_host_rdata` | out | 32 | combinational read of word `dmem_host_addr` |

Instruction and data addresses are byte addresses. Each memory uses bits
`[log2(WORDS)+1:2]` and ignores the rest, so the reset vector `0x80000000` is
word 0 and the trap vector `0x80000040` is word 16.

## Source files

| File | Contents |
|---|---|
| `rtl/minimips_pkg.sv` | types, opcodes, mux encodings, control bundle `ctrl_t` |
| `rtl/minimips_top.sv` | the pipeline: pipeline registers, stall/NOP logic, ASEL/BSEL/WDSEL muxes |
| `rtl/decoder.sv` | instruction → control bundle (one instance per stage) |
| `rtl/bypass_unit.sv` | one operand's compare logic and bypass mux |
| `rtl/interlock.sv` | load-use stall detection |
| `rtl/branch_unit.sv` | BT adder, `=` comparator, jump target, PCSEL mux |
| `rtl/alu.sv` | ALU with N/V/C/Z flags |
| `rtl/regfile.sv` | 32×32 register file, 2 read / 1 write |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction memory (combinational read), data memory (registered read) |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The system-level ones are:

* `tb/tb_minimips_top.sv` runs the design at its default sizes. It uses one
  directed program (the sequences above, a branch on loaded data, a call/return,
  a trap and return through `$27`, a loop) and 20 random programs with loads,
  stores, forward branches, `jal` and traps. After each program it compares all
  registers, the whole data memory and the exact cycle in which the last
  instruction leaves RF with `tb/tb_mips_pkg.sv`. That package is an
  instruction-level reference model that also predicts stall cycles. The test
  fails if any mechanism (load stall, each of the six bypass sources, taken
  branch, `jr`, `j`/`jal`, trap) never fires.
* `tb/tb_doc_sequences.sv` follows the two sequences above cycle by cycle. It
  checks the `lw, nop, nop, add, xor` order in IR_ALU and which bypass source
  each instruction used.

To run one with Verilator, list the package files first:

```
verilator --binary --timing --assert --top-module tb_minimips_top \
  rtl/minimips_pkg.sv tb/tb_mips_pkg.sv rtl/*.sv tb/tb_minimips_top.sv -Irtl -Itb
./obj_dir/Vtb_minimips_top
```

The unit testbenches (`tb_alu`, `tb_regfile`, `tb_decoder`, `tb_bypass_unit`,
`tb_interlock`, `tb_branch_unit`, `tb_imem`, `tb_dmem`) run the same way with
their own top module. All testbenches finish in seconds.

## Where this implementation makes its own choices

The stage structure follows the reference description of this pipeline. So do
the mux inputs and their numbering, the bypass priority, the PC bypasses, the
NOP-at-IR_ALU interlock and the always-executed delay slot. The following are
this implementation's own choices:

* Instruction subset and encodings (standard MIPS), the ALU function codes and
  the flag definitions. The N/V/C/Z flags are produced but nothing in the
  pipeline uses them.
* Memory sizes (1024 words each), the combinational instruction read, the
  registered data read, and the host load ports.
* Trap behaviour for unknown instructions (vector `0x80000040`, link in
  `$27`). No interrupt entry at `0x80000080`.
* The jump target uses PC bits 31:28, as MIPS does. The drawing this design
  follows labels the field `PC<31:29>`, which would give only 31 bits.
* The interlock compares only registers the instruction really reads, and it
  ignores a load in MEM when the instruction in ALU overwrites the same
  register. Both avoid stalls that are not needed.
* The final datapath drawing also shows a NOP mux in front of `IR_MEM`. The
  description never says what selects it, and nothing in this design needs it,
  so it is not built.
