# Mini-MIPS: a single-cycle 16-bit teaching processor

Mini-MIPS is a very small load/store processor in the MIPS style. It has
nine instructions, a 16-bit data path, an 8-bit address bus and sixteen
registers. Every instruction completes in one clock cycle. In that cycle
the processor fetches the instruction at the PC and decodes its opcode
into a handful of control lines. It then reads two registers, runs the
ALU, optionally reads or writes data memory, optionally writes one
register and loads the next PC. Nothing is pipelined and nothing stalls.
The design is meant to be read and probed, and every control line has a
single, visible job.

The RTL is plain synthesizable SystemVerilog. Each datapath component is
its own module: PC, adders, sign extender, shifter, multiplexers, register
file, ALU and the two memories. The processor is built from them
structurally, so the module hierarchy mirrors the classic single-cycle
block diagram.

## Programmer's model

- **Registers:** sixteen 16-bit registers. R0 always reads 0 and R1 always
  reads 1. Writes to either are discarded. R2-R15 are general purpose.
- **Addresses:** the PC is 8 bits and counts in bytes. Instructions are
  16 bits, so they sit at even addresses and the PC steps by 2. After
  reset the PC is 0, and every program starts there.
- **Memories:** separate instruction and data memories.
  - The instruction memory holds 128 instructions (byte addresses
    0-254).
  - The data memory holds 256 words of 16 bits, one word per address.

### Instruction set and encoding

An instruction is four 4-bit fields: `op[15:12] rs[11:8] rt[7:4] rd[3:0]`.
For LW, SW and BEQ the `rd` field is a signed 4-bit offset (-8..7). For JMP,
bits 11:0 are a 12-bit offset.

| op   | instruction         | effect |
|------|---------------------|--------|
| 0000 | `LW  Rt,off(Rs)`    | Rt := Mem[Rs + sext(off)] |
| 0001 | `SW  Rt,off(Rs)`    | Mem[Rs + sext(off)] := Rt |
| 0010 | `ADD Rs,Rt,Rd`      | Rd := Rs + Rt |
| 0011 | `SUB Rs,Rt,Rd`      | Rd := Rs - Rt |
| 0100 | `AND Rs,Rt,Rd`      | Rd := Rs AND Rt |
| 0101 | `OR  Rs,Rt,Rd`      | Rd := Rs OR Rt |
| 0110 | `SLT Rs,Rt,Rd`      | Rd := (Rs < Rt) ? 1 : 0, signed compare |
| 0111 | `BEQ Rs,Rt,off`     | if Rs = Rt: PC := PC + 2 + 2*sext(off), else PC := PC + 2 |
| 1000 | `JMP off12`         | PC := 2*off12, truncated to 8 bits |
| 1001-1111 | (undefined)    | no operation: nothing written, PC := PC + 2 |

Note the operand order: in `ADD Rs,Rt,Rd` the destination is written
**last**. In `LW`/`SW` the register named first is Rt, the data register.
The memory address is the low 8 bits of `Rs + sext(off)`.

## One cycle through the datapath

```
          +-----------------------------  instruction_fetch  ---------------------------+
 PC ----> | instruction memory --> instruction                                          |
  ^       | PC + 2 ---------------------------------------------+--> mux(Branch&Zero) --+--> mux(Jump) --> PC
  |       | sext8(off) << 1 --> (PC + 2) + that -----------------+                        |
  |       | {off12, 0}[7:0] -------------------------------------------------------------+
  |       +------------------------------------------------------------------------------+
  |                     | op
  |                control_unit --> RegDst RegWr ALUSrc MemRd MemWr MemtoReg ALUOp Branch Jump
  |                     | rs rt rd
  |       +--------------------------------  datapath  ----------------------------------+
  |       | regfile[rs] --> ALU A                                                        |
  |       | regfile[rt] --> mux(ALUSrc) <-- sext16(rd)    --> ALU B                      |
  |       | ALU result[7:0] --> data memory address,  regfile[rt] --> data memory data   |
  |       | mux(MemtoReg): ALU result / memory data --> register write data              |
  |       | mux(RegDst): rd / rt --> register write address (written at the clock edge)  |
  +------ | ALU Zero --> back to fetch                                                   |
          +------------------------------------------------------------------------------+
```

All paths from the PC to the register-file, data-memory and PC inputs are
combinational. The three state elements are the PC, the register file and
the data memory, and all three change on the rising clock edge. The
clock period must therefore cover this whole path:

instruction read → decode → register read → ALU → data-memory read →
write-back multiplexer, and in parallel → ALU Zero → next-PC
multiplexers.

### The control lines

These lines are the part of the design that most needs care. Two of them
are **active low**:

| line      | 0 means                         | 1 means |
|-----------|---------------------------------|---------|
| RegDst    | write register is **Rd**        | write register is **Rt** (LW) |
| RegWr     | no register write               | register written at the clock edge |
| ALUSrc    | ALU B = Rt data                 | ALU B = sign-extended offset |
| MemRd     | **memory is read** (Read data valid) | memory output idle (reads 0) |
| MemWr     | **memory is written** at the clock edge | no write |
| MemtoReg  | write back the ALU result       | write back memory data |
| Branch    | -                               | BEQ: take the branch if Zero |
| Jump      | -                               | JMP |

ALUOp is 4 bits: 0 AND, 1 OR, 2 add, 6 subtract, 7 set-on-less-than. Other
codes give 0.

The decoder (`control_unit`) produces:

| instr | RegDst | RegWr | ALUSrc | MemRd | MemWr | MemtoReg | ALUOp | Branch | Jump |
|-------|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|
| LW    | 1 | 1 | 1 | 0 | 1 | 1 | 2 | 0 | 0 |
| SW    | 1 | 0 | 1 | 1 | 0 | 0 | 2 | 0 | 0 |
| ADD / SUB / AND / OR / SLT | 0 | 1 | 0 | 1 | 1 | 0 | 2 / 6 / 0 / 1 / 7 | 0 | 0 |
| BEQ   | 0 | 0 | 0 | 1 | 1 | 0 | 6 | 1 | 0 |
| JMP   | 0 | 0 | 0 | 1 | 1 | 0 | 2 | 0 | 1 |

BEQ reuses the ALU to compare: it subtracts, and the branch is taken when
the result is zero. Some entries are don't-cares in principle: RegDst of
SW, BEQ and JMP, and ALUOp of JMP. They are fixed at the values shown.

The three reference operations below are the checks the design is built
around. `tb_datapath` applies them with exactly these control values.
`tb_mini_mips` runs them as instructions.

| operation | ALUOp | Rs | Rt | Rd | RegWr | RegDst | ALUSrc | MemRd | MemWr | MemtoReg | ALU result | effect |
|-----------|:--:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|-------|
| ADD R1,R1,R5 | 2 | 1 | 1 | 5 | 1 | 0 | 0 | 1 | 1 | 0 | 2 | R5 := 2 |
| SW R5,0(R0)  | 2 | 0 | 5 | 0 | 0 | 1 | 1 | 1 | 0 | 0 | 0 | Mem[0] := 2 |
| LW R3,0(R0)  | 2 | 0 | 3 | 0 | 1 | 1 | 1 | 0 | 1 | 1 | 0 | R3 := 2 |

### Next PC

`instruction_fetch` builds the next PC as follows:

1. It computes PC + 2.
2. It sign-extends the 4-bit offset to 8 bits, shifts it left by one and
   adds it to PC + 2. This is the branch target.
3. A 2x8 multiplexer picks the branch target when `Branch AND Zero`,
   otherwise PC + 2.
4. A second 2x8 multiplexer overrides both on JMP with `{off12, 0}`,
   keeping the low 8 bits.

All adds wrap modulo 256. As a result, a backward branch is just a
negative offset, and `BEQ R0,R0,-1` is a one-instruction halt loop.

## Where this RTL makes its own choices

The architecture fixes the instruction set, widths, register
conventions, control-line meanings and the datapath structure above.
This RTL chose the following points itself:

- **Instruction field positions.** The fields are placed op, rs, rt, rd
  from the top bit down.
- **Timing.** The design is single-cycle, one instruction per clock. Both
  memories are read combinationally, and all writes happen on the rising
  edge.
- **Reset.** Reset is synchronous and active high. It sets the PC to 0
  and clears R2-R15. Memory contents are not reset.
- **RegDst polarity.** 0 selects Rd and 1 selects Rt. This matches the
  control-line definition and the reference operations above. The
  architecture's block diagram numbers that multiplexer's inputs the
  other way round (0 Rt, 1 Rd). Swap the `d0`/`d1` connections of
  `u_mux_regdst` in `datapath.sv` if you need the diagram's numbering.
- **SLT is signed** (two's complement).
- **ALU Carry and Overflow.** The ALU has Carry and Overflow outputs.
  Carry is the adder's carry out; on subtract, 1 means no borrow.
  Overflow is two's-complement overflow of add and subtract. No
  instruction uses either flag, and the top level brings them out only
  for observation.
- **Data memory organisation and enables.**
  - The memory is word-per-address: 256 x 16.
  - Read data is 0 while MemRd = 1.
  - A write needs only MemWr = 0 and a rising clock edge, whatever
    MemRd is.
- **JMP target.** The 13-bit target `2*off12` is cut to the 8-bit address
  bus.
- **Undefined opcodes** 1001-1111 execute as no-operations.
- **Program loading.** The instruction memory has a synchronous load
  port (`load_we`, `load_addr`, `load_data`), brought out of the top. Use
  it while reset is held. `load_addr` is a byte address and bit 0 is
  ignored.
- **No write-to-read bypass** in the register file. None is needed in a
  single-cycle machine, because a register is written at the end of the
  cycle that produced its value.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/mips_pkg.sv` | `mips_pkg` | widths, opcode and ALUOp enums, `instr_t`, `ctrl_t` control-word struct |
| `rtl/mini_mips.sv` | `mini_mips` | top: fetch + decoder + datapath |
| `rtl/instruction_fetch.sv` | `instruction_fetch` | PC, instruction memory, next-PC logic |
| `rtl/control_unit.sv` | `control_unit` | opcode → control lines |
| `rtl/datapath.sv` | `datapath` | register file, ALU, data memory and their multiplexers, driven by a `ctrl_t` |
| `rtl/register_file.sv` | `register_file` | 16 x 16, 2 read / 1 write, R0 = 0, R1 = 1 |
| `rtl/alu.sv` | `alu` | AND, OR, add, subtract, SLT; Zero, Carry, Overflow |
| `rtl/data_memory.sv` | `data_memory` | 256 x 16, active-low read/write enables |
| `rtl/instruction_memory.sv` | `instruction_memory` | 128 x 16 program store with load port |
| `rtl/pc_register.sv` | `pc_register` | 8-bit PC, reset to 0 |
| `rtl/adder.sv`, `sign_extend.sv`, `shift_left.sv`, `mux2.sv` | | small parameterised components |

`datapath` can be used on its own, as a bench circuit. Drive `rs`, `rt`
and `rd` and the control struct by hand, and watch `alu_result`,
`write_back` and the two register read ports.

Top-level ports of `mini_mips`:

- inputs: `clk`, `reset`, `load_we`, `load_addr[7:0]`, `load_data[15:0]`
- outputs: `pc[7:0]`, `instruction[15:0]`, `alu_result[15:0]`,
  `write_back[15:0]`, `zero`, `carry`, `overflow`

Synthesised with a generic flow, the processor is about 80 word-level
cells. It has 8 flip-flop bits (the PC) and 6400 memory bits:

- register file: 16 x 16 = 256 bits
- data memory: 256 x 16 = 4096 bits
- instruction memory: 128 x 16 = 2048 bits

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one:

- compares the module against a model written independently in the
  testbench;
- ends with a single line `TB_RESULT checks=N failures=M`;
- has a watchdog.

The coverage of each testbench:

- **Small components.** `tb_adder` is exhaustive. `tb_sign_extend`
  tries every input at 8 and 16 bits. `tb_shift_left` tries every input.
  `tb_mux2` uses random data on both inputs and both select values.
- **`tb_alu`.** Corner and random operands for every defined code and
  some undefined ones. It checks the result and all three flags.
- **Register file and memories.** Reference-array models. They check R0
  and R1 against writes, the write enable, the active-low memory
  enables, and odd instruction addresses.
- **`tb_control_unit`.** All 16 opcodes against the table above, plus
  rules that must always hold (never write a register and memory
  together, never branch and jump together).
  The decoder itself also asserts these rules on every decode.
- **`tb_instruction_fetch`.** A random program with random
  Branch/Zero/Jump. It checks the PC and the fetched instruction every
  cycle against the next-PC rule.
- **`tb_datapath`.** The three reference operations with their exact
  control values, then 2000 random R-type/LW/SW operations against a
  register and memory model.
- **`tb_mini_mips`.** The whole processor at its default sizes.
  - First, a directed program: the three reference operations, then a
    counting loop closed by BEQ and JMP, SLT/AND/OR, a negative offset and
    writes aimed at R1. It checks every register, three memory words,
    and that the halt address is reached after exactly 26 cycles
    (one instruction per clock).
  - Then, 20 random programs of 128 instructions run for 300 cycles each,
    in lockstep with an instruction-set model inside the testbench. The
    PC, instruction, ALU result and write-back value are compared every
    cycle, and all registers at the end.
  - It counts each mechanism and fails if any never occurred: each of
    the nine instructions, BEQ taken and not taken, backward branch, JMP,
    writes aimed at R0/R1, and reset.

Each testbench was also run against a deliberately broken copy of its
module. Examples: RegDst swapped, unsigned SLT, unshifted branch offset,
inverted write-enable polarity. Every testbench reported failures against
its broken copy.

### Running a test with Verilator

From the project root. Name the package first; Verilator finds every
other module through `-Irtl`, from its file name:

```sh
verilator --binary --timing --assert -Irtl \
    rtl/mips_pkg.sv tb/tb_mini_mips.sv --top-module tb_mini_mips
./obj_dir/Vtb_mini_mips
```

Substitute any other `tb_<module>` for a unit test. Verilator is a
two-state simulator, so memories that a program reads before writing
them hold arbitrary values. The processor testbench copies the data
memory's initial contents into its model for that reason. Lint with
`verilator --lint-only -Wall -Irtl rtl/mips_pkg.sv rtl/<file>.sv`. The
remaining warnings are about unused bits: bit 0 of the instruction
address, the top bits of the JMP product, and package constants that a
given module does not use.

### Writing programs

Encode instructions as `{op, rs, rt, rd}`. The functions `rtype`, `lw`,
`sw`, `beq` and `jmp` in `tb/tb_mini_mips.sv` do this. Load word *i* at
byte address `2*i` through the load port while `reset` is high, then
release reset. The processor starts at address 0 on the next edge.
