# A single-cycle RV32 processor for R-type instructions

This is a minimal 32-bit RISC-V core that executes only register-register
(R-type) instructions. Each instruction reads two source registers, runs
one ALU operation on them and writes the result to a destination register,
all in one clock cycle. There are no immediates, loads, stores, branches or
jumps, so the program counter only moves forward by 4. The core is meant as
a small, readable base for the RISC-V decode and execute path. It can be
simulated end to end with plain Verilator.

## The instruction word

Every instruction is 32 bits and is cut into six fixed fields:

| bits  | 31..25 | 24..20 | 19..15 | 14..12 | 11..7 | 6..0    |
|-------|--------|--------|--------|--------|-------|---------|
| field | funct7 | rs2    | rs1    | funct3 | rd    | opcode  |

All register-register instructions share the opcode `0110011`. funct3 and
funct7 together select the operation:

| instr | funct7 | funct3 | result in rd                         | ALU code |
|-------|--------|--------|--------------------------------------|----------|
| add   | 0x00   | 0      | rs1 + rs2                            | 0        |
| sub   | 0x20   | 0      | rs1 - rs2                            | 1        |
| and   | 0x00   | 7      | rs1 & rs2                            | 2        |
| or    | 0x00   | 6      | rs1 \| rs2                           | 3        |
| slt   | 0x00   | 2      | signed rs1 < rs2 ? 1 : 0             | 4        |
| mul   | 0x01   | 0      | low 32 bits of rs1 * rs2             | 5        |
| xor   | 0x00   | 4      | rs1 ^ rs2                            | 6        |
| sll   | 0x00   | 1      | rs1 << rs2[4:0]                      | 7        |
| srl   | 0x00   | 5      | rs1 >> rs2[4:0] (zero fill)          | 8        |
| sra   | 0x20   | 5      | rs1 >> rs2[4:0] (sign fill)          | 9        |
| sltu  | 0x00   | 3      | unsigned rs1 < rs2 ? 1 : 0           | 10       |

The funct encodings are the standard RISC-V ones. `mul` is the RV32M
multiply. It is included because the design treats funct7 as the field
that separates shifts and multiplies from the basic operations. The 4-bit
ALU code is internal to the core:

- Codes 0 to 5 follow a short operation list that goes with the design
  (ADD, SUB, AND, OR, SLT, MUL).
- Codes 6 to 10 are this implementation's own.

They are defined once, as the enum `alu_op_e` in `rtl/rv_pkg.sv`.

Any other word does nothing except advance the PC. That covers other
opcodes, which include all the I/S/B/U/J formats, and any funct3/funct7
pair not listed above. The core does not trap. An all-zero word therefore
acts as a no-op.

## One clock cycle

```
        +----+   +4                +-----------------------+
  +---->| PC |------+              |   control_unit        |
  |     +----+      |   opcode,    |   (alu_decoder inside)|--alu_control--+
  |        |        |   funct3/7 ->|                       |--regwrite--+  |
  +--------+--------+              +-----------------------+            |  |
           |                                                            v  v
           v         instr    rs1,rs2,rd   +---------------+  data1  +------+
   instruction_memory --------------------> | register_file |-------->| ALU  |--> zero
                                            |   32 x 32     |  data2  |      |
                                            +---------------+-------->|      |
                                                    ^                 +------+
                                                    |   write_data        |
                                                    +---------------------+
```

Within one period:

1. The PC addresses the instruction memory. The read is combinational.
2. The instruction's fields go straight to the control unit and to the
   register file's read ports. Those reads are also combinational.
3. The ALU result is ready before the clock edge. So is `zero`, which is
   high when the result is zero.
4. At the rising edge, two things happen together:
   - If `regwrite` is high, the result is stored in `rd`.
   - The PC moves to PC + 4.

The next instruction sees the new register value with no bypass or stall,
because nothing is in flight between cycles. The core therefore retires one
instruction per clock. The critical path runs from the PC through the
memory, the decode, the register read and the 32-bit multiplier back to
the register file.

The processor is described in terms of five stages: fetch, decode, execute,
memory and write-back. Here all five take place in the same cycle, and
there are no pipeline registers. The memory stage is empty, since no
R-type instruction touches data memory. Because of this, the core has no
data memory at all.

## Registers and reset

`reset` is synchronous and active high. It does two things:

- It sets the PC to 0.
- It loads every register `xi` with the value `i`. For example, x8 = 8 and
  x9 = 9. This gives programs known, distinct operands without a way to
  load constants. `add x1, x8, x9` right after reset returns 17.

`x0` always reads as 0, and writes to it are dropped, as in RISC-V.

## Default program

The instruction memory holds 64 words. By default it contains a built-in
program, given by the function `demo_program_word` in `rtl/rv_pkg.sv`,
followed by zeros. Because the contents come from a function rather than a
file, synthesis also sees them and builds an initialised ROM. The program
runs the eleven operations on the reset register values. Each result below
was worked out by hand:

| pc  | instruction         | result      |
|-----|---------------------|-------------|
| 0   | add  x1, x8, x9     | 17          |
| 4   | sub  x2, x18, x19   | 0xffffffff  |
| 8   | mul  x3, x20, x21   | 420         |
| 12  | xor  x4, x22, x23   | 1           |
| 16  | sll  x5, x24, x25   | 0x30000000  |
| 20  | srl  x6, x26, x27   | 0           |
| 24  | and  x7, x28, x29   | 28          |
| 28  | or   x10, x12, x13  | 13          |
| 32  | sra  x11, x2, x4    | 0xffffffff  |
| 36  | slt  x14, x2, x1    | 1           |
| 40  | sltu x15, x2, x1    | 0           |
| 44  | add  x16, x1, x3    | 437         |

The rest of the memory is zero, so those words are no-ops. After 64 words
the address wraps and the program runs again.

There are two ways to run your own program:

- Edit `demo_program_word`. The helper `encode_rtype()` builds a word from
  its fields.
- Write one word per line in a hex file, where each word is
  `{funct7, rs2, rs1, funct3, rd, 7'b0110011}`. Pass the file's path
  through the `INIT_FILE` parameter, and raise `IMEM_DEPTH` if the program
  is longer than 64 words. The path is relative to the directory the
  simulator runs in, and words the file does not give read as zero.
  `tb/e2e_program.hex` is an example.

## Modules

| file                         | what it is                                                      |
|------------------------------|-----------------------------------------------------------------|
| `rtl/rv_pkg.sv`              | widths, opcode/funct constants, `alu_op_e`, `rtype_t` field struct, `encode_rtype()`, the built-in program |
| `rtl/rv_rtype_processor.sv`  | top: ifu + control_unit + datapath                              |
| `rtl/ifu.sv`                 | fetch: program_counter + instruction_memory                     |
| `rtl/program_counter.sv`     | PC register with +4 incrementer, reset to 0                     |
| `rtl/instruction_memory.sv`  | `IMEM_DEPTH` x 32 ROM, combinational read, built-in or hex-file contents |
| `rtl/control_unit.sv`        | opcode check + alu_decoder -> `alu_control`, `regwrite_control` |
| `rtl/alu_decoder.sv`         | funct3/funct7 -> ALU code and a valid flag                      |
| `rtl/datapath.sv`            | register_file + alu, result fed back as write data             |
| `rtl/register_file.sv`       | 32 x 32, two combinational reads, one clocked write, x0 = 0    |
| `rtl/alu.sv`                 | the eleven operations and the zero flag                         |

These are the top's ports:

| port          | dir | width | meaning                                           |
|---------------|-----|-------|---------------------------------------------------|
| `clock`       | in  | 1     | clock; all state changes on the rising edge       |
| `reset`       | in  | 1     | synchronous, active high                          |
| `zero`        | out | 1     | ALU result of the current instruction is zero     |
| `pc`          | out | 32    | address of the current instruction                |
| `instruction` | out | 32    | the current instruction                           |
| `write_data`  | out | 32    | ALU result, stored in rd at the next edge         |
| `regwrite`    | out | 1     | the result will be stored                         |

There are two parameters: `IMEM_DEPTH` (default 64) and `INIT_FILE`
(default `""`, which selects the built-in program).

## Choices made in this implementation

The following points were not fixed by the original description of the
design. Each was settled as stated here.

- **Timing:** single cycle, with combinational instruction memory and
  register reads.
- **Reset:** synchronous and active high. The register reset values
  (`xi = i`) were chosen to match the published simulation of the design.
  In that run, 8+9, 18-19, 22^23 and 26>>27 give 17, -1, 1 and 0, and this
  core reproduces those values.
- **MUL:** uses the RV32M encoding and keeps the low 32 bits of the
  product.
- **Shift amount:** the low 5 bits of rs2, as in RISC-V.
- **Undecoded instructions:** they are ignored rather than trapped.
- **Memory:** 64 words deep, with a built-in program or one loaded from a
  file.
- **ALU codes:** codes 6 to 10, as listed above.
- **Observation ports:** `pc`, `instruction`, `write_data` and `regwrite`
  are brought out for observation. The described top had only `zero` as
  an output.

Two things are not provided, because the design defines no R-type use for
them:

- a data memory and load/store;
- the other RISC-V instruction formats (immediates, branches, jumps, upper
  immediates).

Adding them would mean adding an immediate generator, an ALU operand
multiplexer, a data memory and a next-PC multiplexer.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench
computes its expected values independently of the RTL. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog that stops a hung
simulation.

| testbench                | what it checks                                                                 |
|--------------------------|--------------------------------------------------------------------------------|
| `tb_alu`                 | every operation on corner values and 5000 random pairs; unused codes give 0    |
| `tb_alu_decoder`         | all 1024 funct3/funct7 pairs; exactly eleven are valid                         |
| `tb_control_unit`        | all funct pairs under the R-type opcode and under eight other opcodes          |
| `tb_register_file`       | reset contents, write timing, regwrite gating, x0, 3000 random writes, re-reset |
| `tb_datapath`            | 4000 random operations against a register model, checked in the cycle they execute |
| `tb_program_counter`     | reset to 0, +4 per clock, reset mid-run                                        |
| `tb_instruction_memory`  | built-in contents, zero fill, low address bits ignored, wrap-around, loading from a file |
| `tb_ifu`                 | one instruction per clock, PC = 4 x cycle count, across a memory wrap         |
| `tb_rv_rtype_processor`  | end to end: a 200-instruction random program in a 256-word memory, see below  |
| `tb_rv_rtype_full`       | default configuration: the default program, two passes, every result checked  |

The end-to-end testbench has its own instruction-level model of the core,
which reads the same program file. In each of 600 cycles it compares `pc`,
`instruction`, `regwrite`, `write_data` and `zero` with the model, which
also shows that each instruction takes exactly one clock. It counts the
following events and fails if any of them never occurs:

- each of the eleven operations;
- a zero result;
- a write to x0;
- a non-R-type opcode;
- an unsupported funct pair;
- a read of the register written by the previous instruction;
- a memory wrap-around;
- a reset in the middle of the run.

The program in `tb/e2e_program.hex` is a fixed random mix of R-type words
(biased towards back-to-back dependences), unsupported funct pairs and
words with other opcodes.

To run a testbench with Verilator from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rv_rtype_processor \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rv_pkg.sv tb/tb_rv_rtype_processor.sv
./obj_dir/Vtb_rv_rtype_processor
```

Run it from that directory, because the hex files are opened by paths
relative to it. The simulator is two-state, and registers that are not
reset start random. Only the register file and the PC hold state, and both
are reset.

## Extending it

To add an R-type operation:

1. Give it a new code in `alu_op_e`.
2. Add its funct3/funct7 case in `alu_decoder`.
3. Add its result in `alu`.

The testbenches' reference tables (`expected()` in the decoder and
control tests, `ref_op`/`ref_alu` in the end-to-end test) must be extended
too.

Any format with an immediate also needs more hardware. The second ALU
operand needs a multiplexer, the control unit needs more outputs, and for
loads and stores the write-back path needs a data memory and a result
multiplexer.
