# A single-cycle RV32I processor

This is a RISC-V RV32I processor that executes each instruction in one clock cycle.
Nothing is pipelined and nothing is shared in time. At every rising clock edge the
processor commits a whole instruction: the PC moves on, and at most one register write and
one data-memory write take effect. In between, the instruction flows through five
combinational steps: fetch, decode, execute, memory and write-back. The cost is a long
clock period. It must cover the slowest instruction, a load that passes through the
instruction memory, the register file, the ALU, the data memory and back into the register
file. The benefit is that the datapath is easy to follow, block by block.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, apart from the optional
`$readmemh` start-up file of the instruction memory. Verilator and slang accept it without
errors.

## Datapath at a glance

```
            +--------------------------- ALU result (branch / jump target) ----------------+
            |                                                                               |
   +----+   v   +----+   +-----------+   +---------+   +----------+ reg1  +---+             |
   |4/2 |-->( + )<--|PC|-->| instr_mem |-->| decoder |-->| reg_file |------>|op1|--+          |
   +----+   |       +----+   +-----------+   +---------+   |          | reg2  |mux|  |  +-----+ |
            | pc_plus  ^                      | inst_id |   |          |--+--->+---+  +->|     | |
            |          |                      v         |   +----------+  |   +---+     | ALU |-+--> data_mem addr
            |      next-PC select        +---------+    |        ^        +-->|op2|---->|     |
            |   (branch & taken) | jump  | imm_gen |----+--------|-----imm--->|mux|     +-----+
            |                            +---------+             |        |   +---+
            |                            +---------+             |        +--> branch_unit --> taken
            |                            | control |--> all select/enable signals
            |                            +---------+             |
            |                                                    |   write-back mux:
            +--------------------------------------------------->+-- 0 pc_plus, 1 ALU result, 2 memory data
```

| Block | File | Role |
|---|---|---|
| program counter | `rtl/pc_reg.sv` | 32-bit register; loads the next PC at every edge; synchronous reset to `RESET_PC` |
| next-PC logic | `rtl/next_pc.sv` | `pc_plus = PC + 4` (or `+ 2`, see below); `pc_next = ((branch & taken) \| jump) ? ALU result : pc_plus` |
| instruction memory | `rtl/instr_mem.sv` | word array, combinational read at the PC; read-only to the processor |
| decoder | `rtl/decoder.sv` | rd/rs1/rs2 fields; names the instruction with a 6-bit code; PC-step select |
| immediate generator | `rtl/imm_gen.sv` | I, S, B, U and J immediates, sign-extended from bit 31 |
| register file | `rtl/reg_file.sv` | 32 × 32 bits, two combinational read ports, one write port written at the edge, x0 fixed at zero |
| control unit | `rtl/control.sv` | a table from the 6-bit instruction code to the control bundle |
| ALU | `rtl/alu.sv` | arithmetic, logic, shifts, compares; also the address and target adder |
| branch unit | `rtl/branch_unit.sv` | its own 33-bit subtractor comparing rs1 with rs2 for the six branch conditions |
| data memory | `rtl/data_mem.sv` | byte-addressed; byte, half and word loads and stores; combinational read, write at the edge |
| selector | `rtl/mux.sv` | N-input word selector used for Op1, Op2 and write-back |
| top | `rtl/rv32i_single_cycle.sv` | wires the blocks together |
| shared types | `rtl/rv32i_pkg.sv` | opcodes, the instruction code, the control encodings and the `ctrl_t` bundle |

## How each instruction class uses the datapath

All five steps happen within one cycle. The selector inputs are numbered as in the top:
Op1 is 0 = PC or 1 = rs1. Op2 is 0 = rs2 or 1 = immediate. Write-back is 0 = PC + 4,
1 = ALU result or 2 = memory data.

| Class | Op1 | Op2 | ALU | Memory | Write-back | Next PC |
|---|---|---|---|---|---|---|
| R-type (`add rd, rs1, rs2`) | rs1 | rs2 | the operation | – | ALU → rd | PC + 4 |
| I-type ALU (`addi`) | rs1 | imm | the operation | – | ALU → rd | PC + 4 |
| load (`lw rd, imm(rs1)`) | rs1 | imm | add: address | read | memory data → rd | PC + 4 |
| store (`sw rs2, imm(rs1)`) | rs1 | imm | add: address | write rs2 | – | PC + 4 |
| branch (`beq` … `bgeu`) | PC | imm | add: target | – | – | target if the branch unit says taken |
| `jal` | PC | imm | add: target | – | PC + 4 → rd | target |
| `jalr` | rs1 | imm | add, then clear bit 0 | – | PC + 4 → rd | target |
| `lui` | – | imm | pass Op2 | – | ALU → rd | PC + 4 |
| `auipc` | PC | imm | add | – | ALU → rd | PC + 4 |
| `fence`, `ecall`, `ebreak`, unknown | – | – | – | – | – | PC + 4 |

Two things follow from this table and may be unexpected.

- **The ALU computes every target.** There is no separate branch-target adder. For a
  branch the ALU adds PC and the B-immediate whether or not the branch is taken. The branch
  unit, with its own subtractor, decides whether the PC takes that sum.
- **`jalr` clears bit 0 inside the ALU.** It has its own ALU operation, `ALU_ADD_J`, which
  gives `(rs1 + imm) & ~1`. The target is therefore always even.

## Decode: a 6-bit instruction code

The decoder does not pass the raw opcode to the control unit. It names each RV32I base
instruction with a 6-bit code, `inst_id_t` in `rv32i_pkg`: `I_ADD`, `I_LW`, `I_BEQ` and so
on, plus `I_FENCE`, `I_ECALL`, `I_EBREAK` and `I_ILLEGAL`. The decoder reads opcode
`[6:0]`, funct3 `[14:12]` and funct7 `[31:25]`. It rejects encodings whose funct fields do
not belong to a base instruction, for example `sll` with funct7 = `0100000`. Two blocks use
the code:

- `imm_gen` uses it to pick the immediate format.
- `control` turns it into the control bundle `ctrl_t`, in the declared field order:
  `reg_wr_en`, `op1_sel`, `op2_sel`, `alu_ctrl[4:0]`, `mem_mode[3:0]`, `mem_wr_en`,
  `wb_sel[1:0]`, `br_cond[2:0]`, `branch` and `jump`.

`br_cond` is the branch funct3. `mem_mode` is the load/store funct3 zero-extended to four
bits: bit 2 selects unsigned and bits 1:0 give the size. The register fields never need
decoding, because RV32I keeps them at the same positions in every format: rd `[11:7]`,
rs1 `[19:15]` and rs2 `[24:20]`.

The immediate generator builds these bit orders:

| Format | Immediate |
|---|---|
| I | `sext(instr[31:20])` |
| S | `sext({instr[31:25], instr[11:7]})` |
| B | `sext({instr[31], instr[7], instr[30:25], instr[11:8], 1'b0})`, range ±4 KiB |
| U | `{instr[31:12], 12'b0}` |
| J | `sext({instr[31], instr[19:12], instr[20], instr[30:21], 1'b0})`, range ±1 MiB |

## The PC step of 4 or 2

The PC adder takes its increment from a two-way selector between the constants 4 and 2.
The decoder drives the select: it asks for 2 when the low two instruction bits are not
`11`, which marks a 16-bit (compressed) encoding. An RV32I program contains only 32-bit
encodings, so it always steps by 4. The processor does not execute compressed
instructions: such an encoding decodes as `I_ILLEGAL` and is skipped like a no-op.

## Memories

- **Instruction memory:** `IMEM_WORDS` words, 1024 by default (4 KiB). It is indexed by
  `PC[AW+1:2]`; higher address bits wrap. The processor only reads it. A program gets there
  in one of two ways:
  - `IMEM_INIT`, a `$readmemh` file of hex words read at start-up;
  - the load port `imem_load_we` / `imem_load_addr` (a word index) / `imem_load_data`,
    written at the rising edge, normally while `rst_n` is low.
- **Data memory:** `DMEM_WORDS` words, 1024 by default (4 KiB). Addresses wrap at the
  array size.
  - Loads read combinationally. `lb`/`lh` sign-extend and `lbu`/`lhu` zero-extend.
  - Stores write only the addressed byte lanes, at the rising edge.
  - Accesses must be naturally aligned. On a misaligned half or word the low address bits
    are ignored. No trap is raised.
- Neither memory, nor the register file, is reset. Software must write a location before
  reading it.

## Interface and timing of the top, `rv32i_single_cycle`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | all state changes at the rising edge |
| `rst_n` | in | 1 | synchronous, active low: PC ← `RESET_PC` (default 0) |
| `imem_load_we`, `imem_load_addr`, `imem_load_data` | in | 1, log2(`IMEM_WORDS`), 32 | instruction-memory load port |
| `pc_o`, `instr_o` | out | 32, 32 | instruction executing in this cycle |
| `rf_we_o`, `rf_wr_idx_o`, `rf_wr_data_o` | out | 1, 5, 32 | register write this instruction makes at the next edge (writes to x0 are discarded) |
| `dmem_we_o`, `dmem_addr_o`, `dmem_wdata_o`, `dmem_mode_o` | out | 1, 32, 32, 4 | memory access of this instruction (`dmem_wdata_o` is the unshifted rs2 value) |

Parameters: `IMEM_WORDS = 1024`, `DMEM_WORDS = 1024`, `RESET_PC = 0` and `IMEM_INIT = ""`.

Each instruction takes exactly one cycle (CPI = 1). The longest combinational path runs
from the PC through the instruction memory, the decoder and control, the register file,
the ALU, the data memory and the write-back selector to the register-file input: this is a
load. A register or memory location written by one instruction is visible to the next one
without any forwarding, because the write has already happened at the edge between them.

## Where this design goes beyond its source description

The block structure, the selector inputs, the five-step flow, the x0 rule, the `jalr` bit-0
clearing and the one-cycle timing follow the source description. The following are this
design's own choices:

- **Memories:** the sizes, combinational reads, the instruction-memory load port and
  `IMEM_INIT`, and the alignment rule described above.
- **Reset:** a synchronous active-low reset of the PC only.
- **Encodings:** the 6-bit instruction code and the ALU, memory-mode and branch-condition
  encodings.
- **Instruction set:**
  - `lbu`/`lhu`, `slti`/`sltiu` and the other RV32I instructions that the description does
    not list by name are completed from the RV32I specification.
  - `fence`, `ecall`, `ebreak` and illegal encodings are treated as no-ops. There are no
    exceptions, interrupts or CSRs.
- **Debug outputs:** the observation ports on the top.

The description ends by naming pipelining as the way past the single-cycle clock limit. No
pipelined version is included here.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block with a model
written independently in the testbench and prints `TB_RESULT checks=N failures=M`. The
helper package `tb/rv32i_asm_pkg.sv` encodes RV32I instructions for the testbenches.

| Testbench | What it checks |
|---|---|
| `tb_alu` | every operation on corner and random operands against integer arithmetic |
| `tb_branch_unit` | six conditions, corner, random and equal pairs |
| `tb_imm_gen` | encodes random immediates in every format and expects them back, including the range limits |
| `tb_decoder` | every instruction with random fields, malformed encodings, the PC-step select |
| `tb_control` | the whole control table against a table written from the instruction semantics |
| `tb_reg_file` | random traffic against an array; x0; old value before the edge, new value after |
| `tb_data_mem` | all access sizes against a byte-array model; store timing |
| `tb_instr_mem` | `$readmemh` start-up from `tb/tb_instr_mem.hex`; load port; address wrap |
| `tb_pc_reg`, `tb_next_pc`, `tb_mux` | reset value and load timing; the select logic; the selectors |
| `tb_rv32i_single_cycle` | the whole processor at its default parameters |

`tb_rv32i_single_cycle` runs in four parts:

1. It assembles a program and loads it through the load port while reset is held.
   - The program starts with the worked examples `addi`, `add`, `sw`, `lw`, `auipc` and
     `jalr` with an odd target, and checks them against hand-computed values.
   - It then gives every register a random value and fills a 256-byte data region.
   - The rest is about 600 random instructions covering all 37 RV32I instructions: forward
     branches and jumps, `jalr`, byte, half and word accesses, a backward loop, and
     `fence`/`ecall`/`ebreak`.
2. An instruction-set model inside the testbench runs in lock-step with the processor. At
   every cycle it compares the PC, the instruction, the register write and the memory
   write.
3. It checks that the number of cycles equals the number of instructions.
4. It counts each mechanism and fails if one never occurred: a taken branch, a backward
   branch, a not-taken branch, `jal`, `jalr` with bit 0 cleared, a write to x0, a
   sign-extended negative load, a zero-extended load and a partial store.

One run executes about 720 instructions in about 720 cycles and finishes in well under a
second.

## Simulating

Run from the repository root. The path of the `$readmemh` file in `tb_instr_mem` is
relative to it. The end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rv32i_pkg.sv tb/rv32i_asm_pkg.sv tb/tb_rv32i_single_cycle.sv \
    --top-module tb_rv32i_single_cycle -o sim
./obj_dir/sim
```

Any other testbench runs the same way: replace the testbench file and the top-module name.

To run your own program, write it as hex words, one per line, and instantiate the top with
`.IMEM_INIT("prog.hex")`. Alternatively, drive the load port during reset. Then release
`rst_n` and watch `pc_o` and the write buses.

## Changing it

- **New instruction:** give it a code in `inst_id_t`, recognise it in `decoder.sv`, give it
  a format in `imm_gen.sv` and a row in `control.sv`. Add an ALU operation to `alu_op_t`
  and `alu.sv` if it needs one.
- **Memory size:** change `IMEM_WORDS` / `DMEM_WORDS`. The width of the load-port address
  follows `IMEM_WORDS`.
- **Memory timing:** the single-cycle timing relies on combinational memory reads. A
  synchronous-read (SRAM-style) memory would need another clock phase or a pipeline.
