# Single-cycle MIPS-subset processor with two-level control

This is a processor that executes every instruction in exactly one clock
cycle. It implements seven MIPS instructions: `add`, `sub`, `ori`, `lw`,
`sw`, `beq` and `j`. The datapath is the classic single-cycle one. An
instruction is fetched, decoded, executed, goes to memory and writes back,
all as one combinational pass between two clock edges. The part that needs
the most care is the control. It is split in two levels:

* a **main control** that looks only at the 6-bit opcode and is built as a
  two-level PLA (an AND plane of one product term per instruction class and
  an OR plane);
* a **local ALU control** that combines a 3-bit `ALUop` from the main control
  with the R-type `func` field to produce the 3-bit `ALUctr`.

Splitting the decode this way keeps the main control small. It never needs
to see `func`. The ALU control is a handful of gates beside the ALU.

The design follows the single-cycle control lecture of Berkeley's CS152
course (Patterson and Kong, 1995). Section [Departures and own choices](#departures-and-own-choices)
lists the details that the lecture leaves open and this RTL fills in.

## Instruction formats

```
          31    26 25   21 20   16 15   11 10    6 5      0
R-type   |  op   |  rs   |  rt   |  rd   | shamt |  funct |   add, sub (and, or, slt)
I-type   |  op   |  rs   |  rt   |       immediate        |   ori, lw, sw, beq
J-type   |  op   |            target address              |   j
```

| instruction        | op        | effect                                           |
|--------------------|-----------|--------------------------------------------------|
| `add rd, rs, rt`   | 00 0000, funct 10 0000 | R[rd] = R[rs] + R[rt]               |
| `sub rd, rs, rt`   | 00 0000, funct 10 0010 | R[rd] = R[rs] - R[rt]               |
| `ori rt, rs, imm`  | 00 1101   | R[rt] = R[rs] \| ZeroExt(imm)                     |
| `lw rt, imm(rs)`   | 10 0011   | R[rt] = M[R[rs] + SignExt(imm)]                  |
| `sw rt, imm(rs)`   | 10 1011   | M[R[rs] + SignExt(imm)] = R[rt]                  |
| `beq rs, rt, imm`  | 00 0100   | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm)·4  |
| `j target`         | 00 0010   | PC = {PC[31:28], target, 00}                     |

The ALU control also decodes the R-type `and` (10 0100), `or` (10 0101) and
`slt` (10 1010) function codes. The processor therefore executes those too.

## Datapath

```
            +---------------------------+  Instruction<31:0>
 Branch --->| Instruction fetch unit    |----+--> op <31:26>  -> main control
 Jump   --->| PC, PC+1, branch adder,   |    +--> rs <25:21>, rt <20:16>, rd <15:11>
 Zero   --->| jump mux, instr. memory   |    +--> imm16 <15:0>, func <5:0>
            +---------------------------+
 RegDst: Rw = rd (1) / rt (0)
 register file: busA = R[rs], busB = R[rt]
 ALUSrc: ALU B = busB (0) / Extender(imm16, ExtOp) (1)
 ALU(ALUctr): result -> data memory Adr, MemtoReg mux input 0; Zero -> fetch unit
 data memory: Data In = busB, WrEn = MemWr
 MemtoReg: busW = ALU result (0) / memory data (1) -> register file (RegWr)
```

**Fetch unit** (`instruction_fetch_unit`). Instructions are aligned words,
so the PC register holds only PC[31:2], 30 bits. The instruction memory's
low address bits are tied to `00`. One adder makes PC+1. A second adder
adds the sign-extended 16-bit offset to PC+1, which gives the branch target.
A multiplexer picks the target when `Branch` and `Zero` are both 1. A second
multiplexer, selected by `Jump`, replaces the result with
{PC[31:28], target[25:0]}. The four upper bits come from the current PC.

**Register file** (`register_file`). 32 × 32 bits. Its two read ports are
combinational and its write port is clocked. Register 0 reads as zero and
ignores writes.

**Extender** (`extender`). `ExtOp` = 1 sign-extends `imm16`; `ExtOp` = 0
zero-extends it. `ori` zero-extends, while `lw` and `sw` sign-extend.

**ALU** (`alu`). Add, subtract, and, or, set-on-less-than, plus a `Zero`
flag. For `beq` the ALU subtracts the two registers, and `Zero` tells
whether they are equal.

**Memories** (`instruction_memory`, `data_memory`). Both are read
asynchronously, within the cycle. The data memory is written at the clock
edge. Both are word-organised arrays.

### Clocking

Every storage element is updated at the **falling** edge of `clk`: the PC,
the register file and the data memory. The cycle runs from one falling edge
to the next. In that time the new PC fetches an instruction and the control
settles. The operands are read, the ALU computes and, for a load, the data
memory is read. At the closing edge the PC, the destination register and
the memory word all change together. So:

* a loaded value is usable by the very next instruction, with no load delay slot;
* `beq` and `j` redirect the very next fetch, with no branch delay slot;
* CPI is exactly 1. The price is a cycle long enough for the slowest
  instruction, the load: PC clock-to-Q + instruction memory + register
  file read + ALU + data memory + register setup + clock skew.

## Control

### Control signals per instruction

| signal    | R-type | ori | lw | sw | beq | j |
|-----------|:------:|:---:|:--:|:--:|:---:|:-:|
| RegDst    | 1 | 0 | 0 | x | x | x |
| ALUSrc    | 0 | 1 | 1 | 1 | 0 | x |
| MemtoReg  | 0 | 0 | 1 | x | x | x |
| RegWrite  | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWrite  | 0 | 0 | 0 | 1 | 0 | 0 |
| Branch    | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump      | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp     | x | 0 | 1 | 1 | x | x |
| ALUop     | 100 (R-type) | 010 (or) | 000 (add) | 000 (add) | 001 (subtract) | x |

### Main control as a PLA (`main_control`)

The AND plane has six product terms. Each term matches one full 6-bit opcode
(R-type, ori, lw, sw, beq, jump). The OR plane forms the outputs:

```
RegWrite = R-type + ori + lw        ALUSrc   = ori + lw + sw
RegDst   = R-type                   MemtoReg = lw
MemWrite = sw                       Branch   = beq
Jump     = jump                     ExtOp    = lw + sw
ALUop<2> = R-type   ALUop<1> = ori  ALUop<0> = beq
```

Every `x` in the table above comes out as 0. An opcode outside the subset
matches no product term, so every control line is 0. Such an instruction
writes nothing, and the PC moves on by one word.

The control lines travel as one packed struct, `mips_pkg::ctrl_t`.

### Local ALU control (`alu_control`)

`ALUop` has 3 bits. Two bits would be enough for this subset (R-type, or,
add, subtract), but the third leaves room for `andi` in the full
instruction set.

| ALUop | func<3:0> | operation | ALUctr |
|-------|-----------|-----------|--------|
| 000   | x         | add       | 010    |
| 001   | x         | subtract  | 110    |
| 010   | x         | or        | 001    |
| 1xx   | 0000      | add       | 010    |
| 1xx   | 0010      | subtract  | 110    |
| 1xx   | 0100      | and       | 000    |
| 1xx   | 0101      | or        | 001    |
| 1xx   | 1010      | slt       | 111    |

The RTL uses these sums of products. They rely on ALUop<1> and ALUop<0>
never both being 1, and they do not look at func<5:4>:

```
ALUctr<2> = !ALUop<2> & ALUop<0>  +  ALUop<2> & !func<2> & func<1> & !func<0>
ALUctr<1> = !ALUop<2> & !ALUop<1> +  ALUop<2> & !func<2> & !func<0>
ALUctr<0> = !ALUop<2> & ALUop<1>
          +  ALUop<2> & !func<3> & func<2> & !func<1> & func<0>
          +  ALUop<2> & func<3> & !func<2> & func<1> & !func<0>
```

In the encoding, ALUctr<2> means "subtract" (B is inverted and a carry is
fed into the adder). ALUctr<1> selects the adder's result, and ALUctr<0>
selects or/slt.

## Top-level interface (`single_cycle_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state changes at its falling edge |
| `rst` | in | 1 | asynchronous, active high: PC = `RESET_PC`, register and memory writes blocked |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 30, 32 | writes one instruction word (word address) at the falling edge; use while `rst` is high |
| `dbg_pc`, `dbg_instr` | out | 32, 32 | PC and instruction of the current cycle |
| `dbg_reg_we`, `dbg_reg_waddr`, `dbg_reg_wdata` | out | 1, 5, 32 | register write the current instruction makes (RegWr, Rw, busW) |
| `dbg_mem_we`, `dbg_mem_addr`, `dbg_mem_wdata` | out | 1, 32, 32 | data memory write the current instruction makes |

| parameter | default | meaning |
|-----------|---------|---------|
| `IMEM_WORDS` | 2048 | instruction memory size in words (8 KiB) |
| `DMEM_WORDS` | 1024 | data memory size in words (4 KiB) |
| `RESET_PC` | 0 | PC after reset |

The `dbg_*` outputs are read in the second half of the cycle, before the
falling edge that commits them.

To run a program, hold `rst` high and write the words through `imem_*`, one
per cycle. Then release `rst`. The registers and the data memory have no
reset, so software must set a register or memory word before reading it.

## Departures and own choices

The following were not fixed by the source lecture and are this design's
choices:

* **Memory sizes.** The instruction memory has 2048 words, so that code at
  byte address 0x1000 fits. The data memory has 1024 words. Address bits
  above the size are ignored, so addresses wrap around. Only whole, aligned
  words are accessed, and address bits 1:0 are ignored.
* **Reset** of the PC, the **program load port** and the **observation
  outputs** are additions.
* **Register 0** is hard-wired to zero, as in MIPS.
* **`slt` is signed**. Add and subtract wrap around, with no overflow
  detection.
* **Falling-edge clocking** follows the clock symbols and the timing diagram
  of the lecture. For a rising-edge version, change the `always_ff` edges in
  `instruction_fetch_unit`, `register_file`, `data_memory` and
  `instruction_memory`.
* **Jump target.** The upper four bits of the jump target come from the
  current PC, not from PC+4. The two differ only when an instruction sits in
  the last word of a 256 MiB region.

Not built:

* the input and output devices of a complete computer;
* any cycle-time or delay model, since the RTL has no delays.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `main_control_tb` | all 64 opcodes against the control table (x entries skipped); unknown opcodes give all zeros |
| `alu_control_tb` | every func for the three I-type ALUop codes, and the five R-type func codes |
| `alu_tb` | 5 operations × corner and random operands, result and Zero |
| `extender_tb` | sign and zero extension, corners and random |
| `register_file_tb` | random read/write against a model, write timing at the falling edge, $0 stays 0 |
| `instruction_memory_tb`, `data_memory_tb` | fill, random access, write enable, address wrap and bits 1:0 ignored |
| `instruction_fetch_unit_tb` | random Branch/Jump/Zero for 3000 cycles against next-PC rules; counts each kind |
| `datapath_tb` | datapath with the testbench acting as control, random program vs. reference model |
| `single_cycle_cpu_tb` | whole processor, default parameters: 20000 cycles of a random program, compared every cycle with an instruction-level model (`mips_tb_pkg::isa_model`) |
| `lecture_examples_tb` | jump from 0x0 to 0x1000 with no delay slot; `lw` followed at once by a use of the loaded register; a taken `beq` |

`single_cycle_cpu_tb` counts how often each of the following happened, and
fails if any never did:

* each instruction;
* taken and untaken branches;
* jumps;
* a load used by the next instruction;
* a write to `$0`.

The random programs come from `mips_tb_pkg::gen_program`. It first sets
every register to a random value and stores 16 known words, then emits
random instructions with forward branches and jumps, and ends with a jump
back to the start of the body.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/single_cycle_cpu_tb.sv \
    --top-module single_cycle_cpu_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run another testbench.
Verilator finds the RTL modules through `-Irtl`.

## Files

* `rtl/mips_pkg.sv`: opcodes, func codes, ALUctr/ALUop enums, the `ctrl_t` bundle
* `rtl/main_control.sv`, `rtl/alu_control.sv`: the two control levels
* `rtl/instruction_fetch_unit.sv`, `rtl/instruction_memory.sv`
* `rtl/register_file.sv`, `rtl/extender.sv`, `rtl/alu.sv`, `rtl/data_memory.sv`
* `rtl/datapath.sv`: the units wired together with the RegDst, ALUSrc and MemtoReg multiplexers
* `rtl/single_cycle_cpu.sv`: top level, the control plus the datapath
* `tb/mips_tb_pkg.sv`: instruction encoders, reference model, random program generator
* `tb/*_tb.sv`: testbenches
