# Single-cycle MIPS-subset processor

A processor in which every instruction takes exactly one clock cycle. Fetch, register read,
decode, ALU operation, memory access, register write-back and next-PC selection all happen
inside the same cycle, through one pass of combinational logic. All state (PC, register
file, data memory) updates together at the following rising clock edge. Control therefore
needs no state at all: it is a pure decode of the instruction bits. The price is that the
clock period must fit the slowest instruction, a load (instruction memory, register file,
ALU, data memory, write-back mux).

The processor runs a subset of the MIPS instruction set that covers every kind of datapath
use:

| class       | instructions             | effect                                            |
|-------------|--------------------------|---------------------------------------------------|
| register    | `addu`, `subu`, `and`, `slt` | `R[rd] <- R[rs] op R[rt]`                     |
| immediate   | `ori`                    | `R[rt] <- R[rs] OR ZeroExt(imm)`                  |
| memory      | `lw`, `sw`               | `addr = R[rs] + SignExt(imm)`; load into `R[rt]` or store `R[rt]` |
| branch      | `beq`                    | if `R[rs] == R[rt]`: `PC <- PC + 4 + SignExt(imm)*4` |
| jump        | `j`                      | `PC <- {PC[31:28], target, 00}`                   |

`add` and `sub` (function codes 10 0000 and 10 0010) are decoded too. They behave exactly
like `addu`/`subu`: no instruction in this design detects overflow.

## Instruction formats

All instructions are 32 bits. The source register fields are always in the same place. So
the register file is read straight from the instruction bits, before the opcode is decoded.

```
R: | op=0 [31:26] | rs [25:21] | rt [20:16] | rd [15:11] | sa [10:6] | funct [5:0] |
I: | op   [31:26] | rs [25:21] | rt [20:16] |           imm [15:0]               |
J: | op   [31:26] |                  target [25:0]                               |
```

Opcodes: R-type `00 0000`, `ori` `00 1101`, `lw` `10 0011`, `sw` `10 1011`, `beq` `00 0100`,
`j` `00 0010`. Function codes: `add` 20h, `addu` 21h, `sub` 22h, `subu` 23h, `and` 24h,
`or` 25h, `slt` 2Ah.

## Datapath

```
 PC --> instruction --> reg_file read --> ALU ------------> data memory --> MemtoReg --> reg_file
  ^     memory          (rs, rt)          A = rs            (addr = ALU     mux          write
  |                                       B = rt or         result, din     (ALU result  (rd or rt)
  |                                           ext(imm)      = rt)           or load)
  |                                        | Zero
  +-- ifu: PC + 4 / branch target / jump target  <-- Branch AND Zero, Jump, imm16, target
```

* **Fetch** (`ifu`, `comb_memory` as instruction memory). Instructions are 4 bytes and
  aligned, so the PC register holds only the word address `PC[31:2]`, 30 bits. Its +4 adder
  is a +1 on 30 bits. The instruction memory is addressed by `{PC[31:2], 00}`.
* **Register read** (`reg_file`). `rs` drives read port 1. `rt` drives read port 2.
* **Operand select.** The ALU B input is `rt` for register instructions and `beq`. It is the
  extended immediate for `ori`, `lw` and `sw` (ALUSrc). The extender (`extender`)
  zero-extends for `ori` and sign-extends for `lw`/`sw` (ExtOp).
* **Execute** (`alu`). It computes add, sub, and, or or slt (signed). Zero = result is 0.
  For `beq` the ALU subtracts `rs - rt`, and Zero means equal.
* **Memory** (`comb_memory` as data memory). The address is the ALU result. The store data
  is `rt`. The read is combinational, so a load completes in the cycle.
* **Write-back.** The written register is `rd` for R-type and `rt` for `ori`/`lw` (RegDst).
  The written value is the ALU result, or the loaded word for `lw` (MemtoReg).
* **Next address** (`ifu`). Three candidates:
  * sequential: `PC[31:2] + 1`
  * branch target: `PC[31:2] + 1 + SignExt30(imm16)`, taken when Branch AND Zero
  * jump target: `{PC[31:28], target[25:0]}`, taken when Jump

  The branch mux comes first; the jump mux follows it. The fetch unit has its own 16-to-30-bit
  sign extender for the branch offset. So a branch does not depend on the datapath
  extender's mode, which the control table leaves open for `beq`.

The datapath is assembled from the basic elements: `adder`, `mux2` and `dff_reg` (the PC is a
30-bit `dff_reg`).

## Control: two-level decoding

Only the ALU needs the function field. The control is therefore split in two:

1. `main_control` decodes the 6-bit opcode into the datapath control points. It also gives
   a 2-bit ALU class, ALUop.
2. `alu_control` is a local decoder next to the ALU. It combines ALUop with `funct` into
   the 3-bit ALU operation, ALUctr.

| opcode   | RegDst | ALUSrc | MemtoReg | RegWrite | MemWrite | Branch | Jump | ExtOp | ALUop  |
|----------|:------:|:------:|:--------:|:--------:|:--------:|:------:|:----:|:-----:|--------|
| R-type   | 1 | 0 | 0 | 1 | 0 | 0 | 0 | - | R-type |
| `ori`    | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | or     |
| `lw`     | 0 | 1 | 1 | 1 | 0 | 0 | 0 | 1 | add    |
| `sw`     | - | 1 | - | 0 | 1 | 0 | 0 | 1 | add    |
| `beq`    | - | 0 | - | 0 | 0 | 1 | 0 | - | sub    |
| `j`      | - | - | - | 0 | 0 | 0 | 1 | - | -      |

Entries shown as `-` are don't-cares in the decode; the RTL drives 0 for them. An opcode
outside the subset decodes to all zeros. Such an instruction writes nothing and simply
advances the PC by 4.

Encodings (in `mips_pkg`):

* ALUop: add `00`, sub `01`, R-type `10`, or `11`.
* ALUctr: and `000`, or `001`, add `010`, sub `110`, slt `111`.
* With ALUop = R-type, `alu_control` maps add/addu to add, sub/subu to sub, and, or and slt
  to their operations, and any other function code to add.

## Memories and timing

Both memories are instances of `comb_memory`, 1024 words each by default. The interface is
Address, DataIn, WriteEn, DataOut. The read is combinational, because an instruction fetch
and a load must each finish inside the one cycle of the instruction. The write happens at
the rising edge when WriteEn is high. That is one write per cycle, after address and data
have settled, at the same moment as the register-file and PC updates. Addresses are byte
addresses. The two low bits are ignored, since only aligned words are accessed. Address bits
above the memory size wrap.

The register file has 32 registers of 32 bits. Its two reads are combinational and its
write happens at the rising edge. An instruction that reads and writes the same register
therefore reads the old value. Register 0 always reads 0 and ignores writes.

Critical path of one cycle, for `lw`:
`PC -> imem -> reg_file read -> ALU add -> dmem read -> MemtoReg mux -> reg_file write setup`.

## Top level: `mips_single_cycle`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state updates at the rising edge |
| `rst` | in | 1 | synchronous, active high; PC = 0, registers = 0, writes held off |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 32, 32 | program load into the instruction memory; use only while `rst` is high (an assertion checks this) |
| `pc`, `instr` | out | 32, 32 | current instruction and its byte address |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1, 5, 32 | register write the current instruction commits at the next edge |
| `dm_we`, `dm_addr`, `dm_wdata` | out | 1, 32, 32 | data-memory write it commits at the next edge |
| `branch_taken`, `jump_taken` | out | 1, 1 | next-PC selection of the current instruction |

Parameters: `IMEM_ADDR_BITS` and `DMEM_ADDR_BITS`, both 10 (1024 words each).

To use it: hold `rst`, write the program word by word through the load port starting at
address 0, release `rst`. Execution starts at address 0, one instruction per cycle. A
program can stop by jumping to itself. The observation outputs show what each instruction
does.

## Design choices beyond the basic datapath

These points are decisions of this implementation rather than part of the classic
single-cycle datapath:

* The synchronous reset, its values, and holding off writes during reset.
* The program-load port and the observation outputs.
* Memory sizes (1024 words each), wrap-around addressing, no reset of the memory arrays.
* Register 0 is hardwired to zero.
* The binary encodings of ALUop and ALUctr. The ALU operation code is 3 bits wide.
* The function codes of `and`, `or` and `slt`, which are the standard MIPS ones.
* `slt` is a signed compare.
* Don't-care control entries are driven 0. Unknown opcodes and function codes decode as
  described above.
* There is no MemRead signal. The combinational data memory is read every cycle, and the
  result is used only when MemtoReg selects it.
* Memory writes happen on the clock edge, not as a write pulse in the middle of the cycle.
* The jump target takes its upper four bits from the current PC, not from PC + 4. This only
  matters for a jump in the last word of a 256 MB region.

## Files

* `rtl/mips_pkg.sv`: opcodes, function codes, ALUop/ALUctr enums, control struct.
* `rtl/mips_single_cycle.sv`: the top, which wires the datapath.
* `rtl/ifu.sv`: PC and next-address logic.
* `rtl/main_control.sv`, `rtl/alu_control.sv`: the two levels of control.
* `rtl/alu.sv`, `rtl/reg_file.sv`, `rtl/extender.sv`, `rtl/comb_memory.sv`: datapath units.
* `rtl/adder.sv`, `rtl/mux2.sv`, `rtl/dff_reg.sv`: basic elements.
* `tb/tb_<module>.sv`: one self-checking bench per module.

## Verification

Every bench compares the unit with values it computes itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* Unit benches: exhaustive decode tables for both control levels. Random and corner
  operands for the ALU, adder, extender and mux. A bench-side array model for the register
  file and the memory, which checks the combinational read and the write-at-edge. Random
  sequential, branch and jump sequences for the fetch unit.
* `tb_mips_single_cycle` runs the whole processor at its default sizes. The bench assembles
  programs and loads them through the load port. An instruction-set model in the bench
  executes the same program in step. Every cycle the bench compares the PC and the committed
  register and memory writes with the model, which also proves one instruction per cycle.
  * Program 1 computes 7! = 5040 by repeated addition in nested loops, stores it with a
    negative offset and loads it back.
  * Program 2 is about 500 random `addu`/`subu`/`and`/`slt`/`ori`/`lw`/`sw`/`beq`
    instructions.

  The bench counts every instruction kind and also these events: taken and untaken
  branches, jumps, dropped writes to register 0, zero-extended immediates with bit 15 set,
  negative offsets, slt true and false, and a load of a just-stored word. An event that
  never happens counts as a failure.

Simulating one bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_single_cycle.sv --top-module tb_mips_single_cycle
./obj_dir/Vtb_mips_single_cycle
```

Replace the bench name to run any other. The benches use two-state simulation: every state
element that is read is reset or written first.

## Not included

Pipelining is the natural next step for this design: splitting the instruction into stages
so the units work in parallel. It is not implemented here. Neither are the instructions
outside the subset (shifts, `jal`/`jr`, byte and halfword accesses, `bne`, overflow traps)
or any exception handling.
