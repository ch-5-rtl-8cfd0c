# Single-cycle MIPS subset processor

A 32-bit processor that executes one MIPS instruction per clock cycle. It is
built the way a single-cycle datapath is usually taught: start from a PC and
an instruction memory, add a register file and an ALU for `ADD`, then add
only the multiplexers, adders and control signals that each further
instruction needs. The result runs sixteen instructions:

| group | instructions | opcode (hex) | function (hex) |
|---|---|---|---|
| R-format ALU | `ADD` `SUB` `OR` `SLT` | 00 | 20, 22, 25, 2a |
| immediate ALU | `ADDI` `SLTI` | 08, 0a | – |
| memory | `LW` `LB` `SW` `SB` | 23, 20, 2b, 28 | – |
| branch | `BEQ` `BNE` | 04, 05 | – |
| jump | `J` `JAL` | 02, 03 | – |
| register jump | `JR` `JALR` | 00 | 08, 09 |

There are no pipeline stages, no stalls and no exceptions. Every
instruction reads its operands, computes, reaches memory and writes back
within one clock period, and all state (register file, data memory, NPC and
PC) changes together on the rising edge.

## Datapath

```
        +-----+   +----+   +-------------+  instr  +---------+
  mux ->| NPC |-->| PC |-->| instr_mem   |-------->| control |--> ctrl_t
   ^    +-----+   +----+   +-------------+    |    +---------+
   |       |  +1                              | 25-21 Rs, 20-16 Rt
   |       v                                  v
   |   NPC+4 ----------------------+     +---------+ Drs  +-----+   +----------+
   |   branch target (NPC+4*imm)   |     | regfile |----->| ALU |-->| data_mem |
   |   jump {PC[31:28],tgt,00}     |     |         | Drt  |     | y +----------+
   +-- Drs (JR/JALR)               |     |         |--+-->|  B  |        |
                                   |     +---------+  |   +-----+  load_align
                                   |        ^  D/IN   | imm32 (sign_extend)
                                   +--------+----- mux: ALU y / load data / NPC+4
```

* **Register file** (`regfile`): 32 x 32 bits, Rs and Rt read
  combinationally, one write per cycle. The write address is chosen by two
  cascaded multiplexers: Rt (bits 20-16) or Rd (bits 15-11), and then that
  or the constant 31 for `JAL`. Register 0 always reads zero.
* **ALU** (`alu`): ADD, SUB, signed SLT, AND, OR, pass-A, pass-B, and a
  zero flag. Operand B is Drt or the sign-extended immediate. Loads and
  stores use the ALU to add base and offset, so the ALU result is the data
  address.
* **Sign extension** (`sign_extend`): bit 15 of the immediate selects
  sixteen zeros or sixteen ones for bits 31-16.
* **Write-back multiplexer (D/IN)**: the ALU result, the loaded value, or
  the return address NPC + 4.

## NPC, PC and the delay slot

This is the part that most differs from a textbook single-PC datapath.
`pc_unit` holds two address registers. **PC** is the address of the
instruction executing now and drives the instruction memory. **NPC** is the
address of the next one. On every clock edge PC takes NPC, and NPC takes one
of four values:

| `pc_sel` | NPC becomes | used by |
|---|---|---|
| `PC_SEQ` | NPC + 4 | everything else |
| `PC_BRANCH` | NPC + 4 x sign-extended offset if the condition holds, else NPC + 4 | `BEQ` (ALU zero), `BNE` (not zero) |
| `PC_JUMP` | `{PC[31:28], target[25:0], 2'b00}` | `J`, `JAL` |
| `PC_REG` | Drs | `JR`, `JALR` |

The registers store only address bits 31-2. Instructions are four bytes
long and word aligned, so "+4" is a 30-bit "+1".

A branch or jump only changes NPC, so **the instruction right after it
always executes** before control reaches the target. This is the MIPS
branch delay slot. It falls out of the two-register structure, and
programs must be written for it. For the same reason `JAL` and `JALR` save
**NPC + 4 = PC + 8**, the address after the delay slot: `JAL` saves it in
r31, `JALR rs, rd` saves it in rd.

The branch condition is gated by the branch control signal. An ordinary
`SUB` whose result is zero does not redirect the PC.

Examples:
* `j 0x2000` executed at PC 0x10000000 goes to
  `{0x1, 0x0002000, 00}` = 0x10008000.
* `BEQ` at 0x1000 with offset 12, taken, goes to 0x1004 + 48 = 0x1034.

## Loads and stores: byte lanes

The data memory (`data_mem`) always reads a whole 4-byte word. Bits 1-0 of
the address are ignored for the word index. Writes go through four byte
enables. Byte 0 of a word is bits 7-0 (little-endian lane order).

* **Loads** (`load_align`): `LW` passes the word through. `LB` moves the
  byte selected by address bits 1-0 down to bits 7-0 and fills bits 31-8
  with **zeros**.
* **Stores** (`store_align`): `SW` writes Drt with all four enables. `SB`
  copies Drt[7:0] onto every lane and sets only the enable of the addressed
  lane. The other three bytes stay untouched, so no read-modify-write is
  needed.

## Control

`control` decodes bits 31-26 and, for opcode 0, bits 5-0 into one packed
struct, `mips_pkg::ctrl_t`. The struct holds the ALU operation, the
operand-B select, the destination and write-back selects, the register
write and memory write enables, the byte/word flag, the next-PC select and
the BEQ/BNE flag. The full decode table is in the header comment of
`rtl/control.sv`. Any encoding outside the table is a no-op: nothing is
written and NPC advances by 4.

## Interface of `mips_single_cycle`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one instruction per rising edge |
| `rst_n` | in | 1 | synchronous, active low. Sets PC = `RESET_PC`, NPC = `RESET_PC`+4 and clears the registers. Data memory is not cleared. |
| `imem_load_we/addr/data` | in | 1/32/32 | writes one instruction word at a byte address. Use it while `rst_n` is low. |
| `pc`, `npc`, `instr` | out | 32 | address in PC, address in NPC, the instruction executing |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1/5/32 | the register write of this cycle. A write to r0 shows here but is discarded. |
| `dmem_be`, `dmem_addr`, `dmem_wdata` | out | 4/32/32 | the data-memory write of this cycle |

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 1024 | instruction memory size. Addresses wrap modulo this. |
| `DMEM_WORDS` | 1024 | data memory size. Addresses wrap modulo this. |
| `RESET_PC` | 0 | first instruction address |

The observation outputs are valid during the cycle. They take effect at the
next rising edge.

## Where this design makes its own choices

The datapath follows the classic instruction-by-instruction derivation,
including its opcode table, its NPC/PC arrangement, its jump-target formula
and its byte-truncation logic. Where that derivation leaves details open,
this design settles them as follows:

* **LB zero-extends.** Opcode 0x20 behaves like MIPS `LBU`: the byte is
  padded with 24 zero bits. Standard MIPS `LB` would sign-extend.
* **The jump target takes bits 31-28 from the PC of the jump itself.**
  Standard MIPS takes them from PC + 4. The two differ only for a jump in
  the last word of a 256 MB region.
* **Branch offsets are relative to NPC** (PC + 4), as in MIPS.
* **The ALU's AND, pass-A and pass-B operations exist but no instruction
  uses them.** The instruction set has no `AND` opcode.
* **Overflow is ignored.** `ADD`, `ADDI` and `SUB` wrap around.
* **Unaligned `LW`/`SW` use the aligned word** that contains the address.
* **Sizes and board-level details are this design's own:** both memory
  sizes, the reset behaviour, r0 reading as zero, the instruction-memory
  load port and the observation outputs.
* **At the default sizes, addresses 0x10000000 and 0x10008000 share one
  instruction-memory word** (memory index = word address modulo 1024). The
  jump example above therefore needs `IMEM_WORDS` of at least 8193 to hold
  code at both addresses. `tb/mips_examples_tb.sv` uses 16384.

## Files

`rtl/`: `mips_pkg` (encodings, `ctrl_t`), `alu`, `regfile`, `sign_extend`,
`instr_mem`, `data_mem`, `load_align`, `store_align`, `control`, `pc_unit`,
and the top `mips_single_cycle`.

`tb/`:
* Each block has a self-checking testbench `<block>_tb.sv`.
* `mips_single_cycle_tb` runs the processor at its default sizes. It runs
  a directed program first: it clears all of data memory with a loop, then
  exercises every instruction, every byte lane, and taken and untaken
  branches, and checks the resulting register values against
  hand-computed ones. It then runs 24 random programs that fill the whole
  instruction memory, checked cycle by cycle against an instruction-set
  model inside the testbench. It fails if any instruction kind, branch
  outcome or byte lane never occurred.
* `mips_examples_tb` runs the worked instructions (`ADD R1,R2,R3`,
  `LW R7,8(R9)`, `SB R10,11(R12)`, `BNE R10,R11,12`, `j 0x2000`, `jr R10`,
  `jal`, `jalr R10,R11`, and the rest) and checks every register and memory
  write.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

## Simulating

With Verilator 5. Compile the package first, then the RTL, then the
testbench:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_pkg.sv rtl/*.sv tb/mips_single_cycle_tb.sv \
    --top-module mips_single_cycle_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Any other testbench runs the same way with its own `--top-module`. The
testbenches initialise everything they read, so they run under random
initial values. The processor testbench needs about 60,000 cycles and
finishes in well under a second.

To load your own program, hold `rst_n` low and write words through
`imem_load_*` at byte addresses starting at `RESET_PC`, then release
reset. Remember that the instruction after each branch or jump executes.
Uninitialised data memory holds whatever the simulator put there.
