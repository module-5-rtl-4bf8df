# Single-cycle RISC-V processor (reduced RV32I)

This is a processor that finishes every instruction in one clock cycle. It
runs a 13-instruction subset of the 32-bit RISC-V integer set. In each cycle
the instruction is fetched, its registers are read, the ALU computes, memory
is read or written, and the result and the next PC are stored. All of these
transfers share one rising clock edge. The design has no pipeline, no stalls
and no multi-cycle state machine, so the cycles per instruction are exactly 1.
The cost is the cycle time: the clock must be slow enough for the slowest
instruction, which is `lw` (PC → instruction memory → register file → ALU →
data memory → register file).

The processor has two parts. The **data path** holds the programmer-visible
state and the units that operate on it. The **controller** is purely
combinational and turns the instruction bits into the data path's select and
enable signals. Instruction memory and data memory are separate, because
both are accessed in the same cycle.

## Instruction subset

| Class | Instructions | Register transfer | Format |
|---|---|---|---|
| load | `lw rd, imm(rs1)` | rd ← Mem[rs1 + sExt(imm)] | I |
| store | `sw rs2, imm(rs1)` | Mem[rs1 + sExt(imm)] ← rs2 | S |
| register ALU | `add sub and or slt` | rd ← rs1 op rs2 | R |
| immediate ALU | `addi andi ori slti` | rd ← rs1 op sExt(imm) | I |
| branch | `beq rs1, rs2, imm` | PC ← (rs1 = rs2) ? PC + sExt(imm) : PC + 4 | B |
| jump | `jal rd, imm` | rd ← PC + 4; PC ← PC + sExt(imm) | J |

Every instruction that does not branch also does PC ← PC + 4. `slt` and
`slti` compare as signed numbers. The encodings are standard RV32I:

| Instr. | opcode | funct3 | funct7 |
|---|---|---|---|
| lw | 0000011 | 010 | – |
| sw | 0100011 | 010 | – |
| add / sub | 0110011 | 000 | 0000000 / 0100000 |
| slt / or / and | 0110011 | 010 / 110 / 111 | 0000000 |
| addi / slti / ori / andi | 0010011 | 000 / 010 / 110 / 111 | – |
| beq | 1100011 | 000 | – |
| jal | 1101111 | – | – |

Any other opcode writes neither the register file nor memory, and the PC
advances by 4. This behaviour is this design's own choice.

## Data path

```
            +-------------------------------------------(PCsrc)-----+
            v                                                       |
  next_pc  [mux2] <- pc4 <-[+4 adder]<-+                            |
     |        ^                        |                            |
     v        +-- pc_target <-[adder]<-+<- imm                      |
   [PC]--pc--+-------------------------+                            |
             v                                                      |
      [instr ROM]--instr--+--> rs1,rs2,rd --> [reg_file] rd1 --> A [ALU]--r--+--> dmem addr
                          |                            rd2 -+--> [mux2]-B-^   |
                          +--> [sign_ext]--imm------------- ALUsrc ---^       |
                                                                               v
               rd write data <- [mux3: 00 dmem rdata | 01 ALU r | 10 pc4] <- [data mem]
```

Each unit is used at most once per instruction, so the data path needs two
adders besides the ALU. One adder computes PC + 4. The other computes the
branch/jump target PC + imm. Both work in the same cycle as the ALU.

- **PC** (`pc_reg`): 32 flip-flops with no load enable, loaded every cycle.
- **Register file** (`reg_file`): 32 × 32 bits. It has two combinational
  read ports (rs1 = instr[19:15], rs2 = instr[24:20]) and one write port
  (rd = instr[11:7]), written at the clock edge when BRwr = 1. x0 is not
  storage: it always reads 0, and writes to it are lost. The registers have
  no reset.
- **Immediate generator** (`sign_ext`): see below.
- **ALU** (`alu`): ALUctr 000 add, 001 sub, 010 and, 011 or, 101 signed
  set-less-than. The other codes give 0. The zero flag Z is set when the
  result is 0; `beq` subtracts and tests Z. Add and subtract share one adder.
  Set-less-than takes the sign of A − B, or the sign of A when the operands'
  signs differ, so that overflow cannot corrupt it.
- **Multiplexers**: ALUsrc picks rs2 (0) or the immediate (1) as ALU operand
  B. PCsrc picks PC + 4 (0) or the target (1). ResSrc picks the rd write data:
  data memory (00), ALU result (01) or PC + 4 (10, the `jal` return address).
- **Data memory address and write data** are the ALU result and the rs2 value.

### Immediate generator

The immediate bits are scattered differently in each format, and the two
branch formats leave out bit 0 (always 0). ImmSrc selects the format; x is
the instruction:

| ImmSrc | Format | 32-bit immediate |
|---|---|---|
| 00 | I | {20×x[31], x[31:20]} |
| 01 | S | {20×x[31], x[31:25], x[11:7]} |
| 10 | B | {20×x[31], x[7], x[30:25], x[11:8], 0} |
| 11 | J | {12×x[31], x[19:12], x[20], x[30:21], 0} |

The unit is built field by field, because each output field has at most four
sources. z[31:20] is always the sign. z[19:12] is x[19:12] for J and the sign
otherwise. z[11] is the sign, x[7] or x[20]. z[10:5] is always x[30:25].
z[4:1] is x[24:21] (I, J) or x[11:8] (S, B). z[0] is x[20], x[7] or 0.

## Controller

The controller (`controller`) has no state. It is built from four pieces.

**Main decoder** (`main_dec`) works from the opcode alone:

| op | Branch | Jump | BRwr | ALUsrc | ALUop | MemWr | ResSrc |
|---|---|---|---|---|---|---|---|
| lw | 0 | 0 | 1 | 1 | 00 add | 0 | 00 |
| sw | 0 | 0 | 0 | 1 | 00 add | 1 | – |
| I-type | 0 | 0 | 1 | 1 | 10 operate | 0 | 01 |
| R-type | 0 | 0 | 1 | 0 | 10 operate | 0 | 01 |
| beq | 1 | 0 | 0 | 0 | 01 subtract | 0 | – |
| jal | 0 | 1 | 1 | – | – | 0 | 10 |

The RTL drives every "–" as 0.

**ALU decoder** (`alu_dec`) turns ALUop into ALUctr. ALUop 00 gives add and
01 gives subtract. For ALUop 10 the choice comes from funct3: 000 add, 010
slt, 110 or, 111 and. funct3 000 gives a subtract only if both opcode bit 5
and funct7[5] (instruction bit 30) are 1. The opcode bit is needed because
an I-type instruction has no funct7 field: its bit 30 is immediate bit 10. For
example, `addi x1, x2, -1` has bit 30 set and must still add.

**Immediate decoder** (`imm_dec`) needs only three opcode bits:
ImmSrc[1] = op[6] and ImmSrc[0] = op[2] | (op[5] & ~op[6]). These give lw,
I-type → 00, sw → 01, beq → 10 and jal → 11.

**Next-PC logic**: PCsrc = (Branch & Z) | Jump. A taken `beq` and every
`jal` load the target into the PC.

`riscv_core` wires the controller to the data path. It sends op
(instr[6:0]), funct3 (instr[14:12]) and funct7[5] (instr[30]) to the
controller and returns Z from the ALU. An assertion in `riscv_core` checks
that the PC stays word-aligned.

## Memories

Both memories are idealised. Reads are combinational and their access fits
in one clock cycle. Addresses are byte addresses, but only aligned 32-bit
words are ever moved, so address bits 1:0 are ignored.

- **Instruction memory** (`instr_mem`) is a ROM with no write port. It can
  be loaded from a hex file (one word per line) with the `INIT_FILE` /
  `IMEM_INIT` parameter, or a testbench can write its `mem` array directly.
- **Data memory** (`data_mem`) has separate write-data and read-data ports.
  It reads combinationally and writes at the clock edge when MemWr = 1. It is
  built from four byte-wide modules (`byte_ram`) and is little-endian: lane i
  holds the byte at address 4·w + i, which is bits 8i+7:8i of word w. A full
  RV32I would add an access-size input that, together with a[1:0], enables
  only some lanes. This subset always enables all four.

**Size.** A 32-bit address could reach 4 GiB (2^30 words). Verilator does not
accept an array of 2^29 entries or more, so `MEM_ADDR_W` (and `ADDR_W` of each
memory) defaults to 30 bits. That gives 1 GiB each: 2^28 instruction words,
and four 256 MiB byte lanes. Address bits above `MEM_ADDR_W` are ignored, so
the memory repeats through the address space. Smaller values make smaller and
faster simulations.

## Timing and reset

Everything follows one rising clock edge. During a cycle the combinational
paths settle from the PC through both memories, the register file and the
ALU. At the edge the PC, the destination register and (for `sw`) the memory
word all take their new values together. A register read in the cycle that
writes the same register returns the old value.

`rst` is synchronous and active high, and loads `RESET_PC` (default 0) into
the PC. Nothing else is reset: software must write a register before reading
it, and memory before loading from it.

For scale, a gate-level estimate of this organisation in a 90 nm CMOS cell
library comes to about 59,200 µm². Its critical path is `lw` at about 27.6 ns
(36 MHz). The PC + 4 path alone is about 9.7 ns, R-type about 18.9 ns and
`beq` about 18.5 ns. The RTL here is not tied to that library.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `riscv_sc_system` | `MEM_ADDR_W` | 30 | byte-address bits decoded by each memory |
| `riscv_sc_system`, `riscv_core`, `datapath`, `pc_reg` | `RESET_PC` | 0 | PC after reset |
| `riscv_sc_system` / `instr_mem` | `IMEM_INIT` / `INIT_FILE` | "" | optional program hex file |
| `adder`, `mux2`, `mux3` | `W` | 32 | data width |

## Where this design makes its own choices

The instruction set, the encodings, the data path organisation, the four
controller tables, the immediate layout, x0 wired to zero, the ROM and
separate-port data memory, and the four byte lanes all follow the source
design. The following are this design's own:

- The reset (synchronous, active high, to `RESET_PC` = 0).
- 0 for every don't-care control value, for unused ALU codes and for
  unlisted opcodes. `mux3` select 11 gives input 2.
- The name PCsrc and the form of the next-PC logic.
- The ALU's inner structure.
- The memory size of 1 GiB each instead of 4 GiB. This limit comes from the
  simulator.
- The observation ports of the top level and the `IMEM_INIT` file option.
- The ImmSrc table labels `jal`'s code 11 as an I-type. Code 11 is the
  J-type format, and that is what `jal` gets here.

## Files

`rtl/` (one module or package per file):

- `riscv_pkg.sv`: opcodes and the ALUctr, ALUop, ImmSrc and ResSrc enums, and
  the main-decoder struct.
- `riscv_sc_system.sv`: top level = `riscv_core` + `instr_mem` + `data_mem`.
- `riscv_core.sv` = `controller` + `datapath`.
- `controller.sv` = `main_dec` + `alu_dec` + `imm_dec` + next-PC logic.
- `datapath.sv` = `pc_reg`, two `adder`, two `mux2`, `reg_file`, `sign_ext`,
  `alu`, `mux3`.
- `data_mem.sv` = four `byte_ram`; `instr_mem.sv`.

`tb/`: one self-checking testbench `tb_<module>.sv` per module. The shared
files are:

- `rv_asm_pkg.sv`: instruction encoders, a reference instruction-set model
  and the test program.
- `sc_lockstep.svh`: the lockstep checker used by the two system testbenches.

Highlights:

- `tb_riscv_core` runs a four-instruction loop (`lw`, `sw`, `or`, `beq` at
  0x1000) three times. It uses behavioural memories and checks the values
  cycle by cycle, and that each pass takes exactly 4 cycles.
- `tb_riscv_sc_system` runs a 29-instruction program (53 cycles) on the full
  system with 64 KiB memories. It runs in lockstep with the reference model,
  which checks PC, stores and register writes every cycle. It also counts
  every instruction and mechanism: taken and not-taken `beq`, `jal` with and
  without link, dropped x0 write, and reload of a stored word. It fails if any
  count is zero.
- `tb_sim_example` runs the same four-instruction loop on the complete
  system, with the real instruction ROM and byte-lane data memory.
- `tb_random_program` runs a random program of 3000 instructions on the
  system with 64 KiB memories, in lockstep with the reference model. The
  program covers all 13 instructions: random registers and immediates,
  loads and stores in a 1 KiB window, and forward `beq`/`jal`. At the end it
  compares all registers and the data window.
- `tb_riscv_sc_full` runs the same program on the top level at its default
  size (2 × 1 GiB). It takes about 20 s and needs about 2.1 GB of memory.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (testbenches use `--timing`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/riscv_pkg.sv tb/rv_asm_pkg.sv tb/tb_riscv_sc_system.sv \
    --top-module tb_riscv_sc_system -Mdir obj -o sim
./obj/sim
```

Change the testbench name to run another. To run your own program, write it
as hex words in a file and pass it as `IMEM_INIT`, or write
`dut.u_imem.mem[i]` from a testbench. The encoder functions in `rv_asm_pkg`
(`ADDI(rd, rs1, imm)`, `BEQ(rs1, rs2, off)`, `JAL(rd, off)`, …) help here.
Lint a module with
`verilator --lint-only -Wall -Irtl rtl/riscv_pkg.sv rtl/<module>.sv`.

Lint reports unused input bits in `sign_ext` (the opcode bits), `imm_dec`
(the opcode bits it does not need) and the memories (address bits 1:0 and
those above the memory size). These are deliberate.
