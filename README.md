# Single-cycle processor control

A single-cycle processor finishes every instruction in one clock period. The
whole instruction, from fetch to write-back, is one pass of combinational
logic, and the PC, registers and memory update together at the end of the
cycle. All of the "control" in such a machine is therefore a combinational
decoder. It turns the instruction's opcode (and, for ALU instructions, its
function field) into the select lines of the datapath multiplexers, the write
enables and the ALU operation.

The RTL here builds that idea twice, plus a few gate-level teaching examples:

1. **A MIPS-subset processor** (32-bit): `add`, `sub`, `and`, `or`, `slt`,
   `ori`, `lw`, `sw`, `beq`, `j`. Its control is split into a *main control*
   (a PLA that decodes the 6-bit opcode) and a *local ALU control* (a small
   decoder for the ALU operation).
2. **A 16-bit teaching core** with a 4-bit PC, 16-word memories and four
   instructions (`load`, `store`, `add`, `noop`). It has a built-in
   demonstration program.
3. **Combinational examples**: a half adder, a full adder built from two
   half adders and an OR gate, and a sum-of-squares circuit.

`design_top` instantiates all three side by side. They share nothing, and
each keeps its own clock, reset and ports.

## 1. The MIPS-subset processor

### Instruction formats

| format | 31:26 | 25:21 | 20:16 | 15:11 | 10:6  | 5:0   |
|--------|-------|-------|-------|-------|-------|-------|
| R      | op    | rs    | rt    | rd    | shamt | funct |
| I      | op    | rs    | rt    | immediate (15:0) |||
| J      | op    | target address (25:0) |||||

Opcodes: R-type `000000`, `ori` `001101`, `lw` `100011`, `sw` `101011`,
`beq` `000100`, `j` `000010`. Function codes: `add` `100000`,
`sub` `100010`, `and` `100100`, `or` `100101`, `slt` `101010`. `shamt` is
not used because the subset has no shifts.

### Two-level decoding: main control and ALU control

The key idea is *local decoding*. The main control (`main_control.sv`) does
not need to know about the function field. It only tells the ALU decoder
what kind of operation the instruction needs, through a 3-bit **ALUop**:

| ALUop | meaning        | used by   |
|-------|----------------|-----------|
| `100` | look at funct  | R-type    |
| `010` | or             | `ori`     |
| `000` | add            | `lw`, `sw`|
| `001` | subtract       | `beq`     |

A 2-bit ALUop would be enough for this subset. Three bits make room for
more I-type ALU operations (for example `andi`), and they give the simple
one-hot-like encoding above.

The main control is a PLA. The AND plane has one product term per opcode
(R, ori, lw, sw, beq, j). The OR plane builds each output from these terms:

| output     | product terms that set it | meaning when 1 |
|------------|---------------------------|----------------|
| RegWrite   | R, ori, lw                | write the register file |
| ALUSrc     | ori, lw, sw               | ALU B = extended immediate (else busB) |
| RegDst     | R                         | destination is rd (else rt) |
| MemtoReg   | lw                        | busW = memory data (else ALU result) |
| MemWrite   | sw                        | write the data memory |
| Branch     | beq                       | branch if ALU Zero |
| Jump       | j                         | jump |
| ExtOp      | lw, sw                    | sign-extend imm16 (else zero-extend) |
| ALUop[2:0] | R, ori, beq               | one term per bit |

An opcode outside the subset fires no product term. All controls are then 0,
so the instruction does nothing except advance the PC.

The ALU control (`alu_control.sv`) is three sum-of-products equations, one
per bit of the 3-bit **ALUctr** (`000` and, `001` or, `010` add,
`110` subtract, `111` slt). Only funct[3:0] takes part:

```
ALUctr[2] = ~op2 & op0  |  op2 & ~f2 &  f1 & ~f0
ALUctr[1] = ~op2 & ~op1 |  op2 & ~f2 & ~f0
ALUctr[0] = ~op2 & op1  |  op2 & ~f3 & f2 & ~f1 & f0  |  op2 & f3 & ~f2 & f1 & ~f0
```

Here `opN` is ALUop[N] and `fN` is funct[N]. For function codes outside the
five defined ones, the result is whatever these equations give.

### Datapath and timing (`mips_single_cycle.sv`)

```
 instruction_fetch_unit --instr--> main_control --ctrl--> (muxes, enables)
   (PC, next-PC, IMEM)       |         \--ALUop--> alu_control --ALUctr--> alu
                             |
   rs,rt --> mips_regfile --busA-------------------------------> alu --result--> mips_data_memory (Adr)
   rt/rd (RegDst mux) -> Rw   --busB--+--> ALUSrc mux (busB | extender(imm16)) -^      |
                                      +------------------------------------> Data In   |
   busW <-- MemtoReg mux (ALU result | memory data) <------------------------------------+
```

Within one cycle, the current PC addresses the instruction memory. That
memory is read combinationally, so the instruction is available at once. The
decoders, the register reads, the extender, the ALU and the data memory read
all settle after that. On the rising clock edge that ends the cycle:

- the register file writes busW to Rw if RegWrite is set;
- the data memory writes busB if MemWrite is set;
- the PC takes its next value.

Register 0 always reads 0 and ignores writes. Reset (`rst`) is synchronous
and active high. It clears the PC and all registers but not the data memory.

**Next PC** (`instruction_fetch_unit.sv`):

- normally: PC + 4;
- `beq` taken (nPC_sel = Branch & Zero): PC + 4 + (sign_ext(imm16) << 2),
  made by two adders in series;
- `j`: {PC+4 [31:28], target, 00}.

Zero is high when the ALU result is 0. `beq` makes the ALU subtract, so Zero
means rs == rt.

**Program loading.** The instruction memory has a write port of its own
(`imem_we`, `imem_addr` word index, `imem_wdata`). Load the program through
it while `rst` is high. Both memories are 256 words by default
(`IMEM_WORDS`, `DMEM_WORDS`). Addresses are byte addresses, and memory word
`addr[9:2]` is used. The bits above the memory size and the two low bits are
ignored.

**Observation ports.** `reg_we`/`reg_waddr`/`reg_wdata` and
`mem_we`/`mem_addr`/`mem_wdata` show the register write and the memory write
that the current instruction will make at the end of its cycle. `alu_result`
shows the ALU output. They exist so that a testbench can follow execution.
They are not part of the processor proper.

## 2. The 16-bit teaching core (`single_cycle_core.sv`)

Sizes: 16-bit data, a 4-bit PC, a 16 × 16 instruction memory, 16 registers
(register 0 always reads 0) and a 16 × 16 data memory. The ALU is just a
16-bit adder.

Instruction: `op[15:12] rs[11:8] rt[7:4] rd/offset[3:0]`.

| op  | instruction         | effect                      | RegDst RegWrite ALUSrc MemWrite MemToReg |
|-----|---------------------|-----------------------------|------------------------------------------|
| `1` | load rt, off(rs)    | rt ← DM[rs + sext(off)]     | 0 1 1 0 1 |
| `3` | store rt, off(rs)   | DM[rs + sext(off)] ← rt     | 0 0 1 1 0 |
| `8` | add rd, rs, rt      | rd ← rs + rt                | 1 1 0 0 0 |
| other | noop              | —                           | 0 0 0 0 0 |

The data memory address is the low 4 bits of the adder output. The opcode
values are this design's own. The instruction fields and control signals
follow the core's block diagram.

**Two-edge timing**, which is the point to understand in this core:

- *Rising edge.* The PC loads PC + 1 (from a 4-bit adder). In the same edge,
  the instruction memory registers the word at the *old* PC onto `insn`.
  The instruction shown during a cycle is therefore the one whose address
  the PC held in the cycle before. Execution runs one cycle behind the PC,
  but in order. There are no branches, so this never matters.
- *High phase.* The instruction is decoded, the registers are read, the
  adder and the memory read settle.
- *Falling edge.* The register file and the data memory write.

Reset is asynchronous and active high. It clears the PC and the registers,
loads the data memory with 5, 8, 0, 0, …, reloads the program and sets
`insn` to a noop. Hold reset across at least one clock edge, or raise it
after time 0. The memories act on the reset *edge* or on a clock edge while
reset is high.

Built-in program (`instruction_memory.sv`):

```
0: 1010  load  $1, 0($0)      $1 = 5
1: 1021  load  $2, 1($0)      $2 = 8
2: 8013  add   $3, $0, $1     $3 = 5
3: 8124  add   $4, $1, $2     $4 = 13
4: 3032  store $3, 2($0)      DM[2] = 5
5: 3043  store $4, 3($0)      DM[3] = 13
6-15: noop
```

The PC wraps after word 15, so the program repeats with the same results.

## 3. Combinational examples

- `half_adder`: carry = x & y, result = x ^ y.
- `or_2`: a two-input OR gate.
- `full_adder`:
  - half adder 1 adds in1 and in2, giving s1 and carry s3;
  - half adder 2 adds s1 and c_in, giving sum and carry s2;
  - `or_2` merges s2 and s3 into c_out.
- `square_sum`: 1² + 2² + … + x² for a signed 32-bit x, and 0 for x < 1.
  A loop with a data-dependent bound is not hardware. The circuit instead
  evaluates x(x+1)(2x+1)/6, with one wide product and a division by the
  constant 6. The result wraps modulo 2³². For x = 1…5 it gives 1, 5, 14,
  30, 55.

## Shared building blocks

- `mux_2to1` is a WIDTH-bit two-input multiplexer built as a row of
  `mux_2to1_1b` slices. The 16-bit core uses it at 4 and 16 bits, and the
  MIPS datapath at 5 and 32 bits.
- `adder` (WIDTH bits, with carry out) serves as the core's PC incrementer
  and as its ALU.
- `mips_pkg` holds the MIPS encodings and the control struct `ctrl_t`.
- `sc_core_pkg` holds the 16-bit core's opcodes.

## Choices made where the source material is silent

The following are not fixed by the source material.

- **MIPS processor:**
  - all state is written on the rising edge;
  - reset is synchronous;
  - register 0 is hard-wired to zero;
  - the memories hold 256 words and have a program-load port;
  - the jump target is {PC+4[31:28], target, 00};
  - `slt` compares signed numbers;
  - ALUctr codes 011, 100 and 101 give 0.
- **Branch target.** The branch target adds the offset to PC + 4. This
  follows the datapath's two-adder chain; a register-transfer line that
  reads "PC + offset" was taken as shorthand.
- **RegWrite for `j`.** `j` does not write a register. One control equation
  says RegWrite is 0 only for store and beq, but the control truth table and
  the PLA also clear it for `j`; this design follows the table and the PLA.
- **`sw` data.** A store writes rt (busB is the memory's Data In).
- **16-bit core:**
  - the opcode values are this design's own;
  - the program counter's reset is asynchronous;
  - `insn` is cleared to a noop at reset;
  - the observation ports are added.

## Files and simulation

`rtl/` holds one module or package per file. `design_top.sv` is the top
module. `tb/` holds one self-checking testbench per module (`tb_<module>.sv`)
and two reference-model packages:

- `tb_mips_model_pkg` is an instruction-level MIPS model and a program
  generator. The generated program clears the data memory with a store
  loop, then runs random instructions with forward branches and jumps.
- `tb_sc_core_model_pkg` models the 16-bit core.

Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_design_top` runs everything at the default sizes:

- 8000 cycles of the MIPS processor, compared with the model every cycle;
  it also counts every instruction kind, taken and untaken branches, jumps
  and ignored writes to $0;
- 40 cycles of the 16-bit core;
- all full-adder inputs;
- a sum-of-squares sweep.

To run it with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
    rtl/mips_pkg.sv rtl/sc_core_pkg.sv \
    tb/tb_mips_model_pkg.sv tb/tb_sc_core_model_pkg.sv \
    tb/tb_design_top.sv --top-module tb_design_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own file and
`--top-module`.

The testbenches use only two-state values and `$urandom`. They initialise
everything they read, except MIPS data memory words that the program has
not yet written; the generated program clears these first. Every testbench
was also run against a copy of its module with one deliberate bug, and
each one caught its bug.
