// rv_rtype_processor: single-cycle 32-bit RISC-V processor for R-type
// (register-register) instructions.
//
// Structure (one instruction per clock):
//   ifu          - PC (reset to 0, +4 per clock) and instruction memory,
//                  giving Instruction_Code[31:0]
//   control_unit - opcode, funct3, funct7 -> alu_control[3:0], regwrite
//   datapath     - register file read at rs1/rs2, ALU, result written to
//                  rd on the next rising clock edge when regwrite is high
// The instruction fields are cut from Instruction_Code as in the R-type
// format: funct7[31:25] rs2[24:20] rs1[19:15] funct3[14:12] rd[11:7]
// opcode[6:0].
//
// Ports: clock, synchronous active-high reset, and zero (the ALU zero flag
// of the instruction currently executing). pc, instruction, write_data and
// regwrite are additional observation outputs of this design: they show
// which instruction executes in a cycle and what it writes back at the
// end of it.
module rv_rtype_processor
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 64,
  parameter string       INIT_FILE  = ""
) (
  input  logic            clock,
  input  logic            reset,
  output logic            zero,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instruction,
  output logic [XLEN-1:0] write_data,
  output logic            regwrite
);

  rtype_t     instr;
  logic [3:0] alu_control;
  logic       regwrite_control;

  ifu #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .INIT_FILE  (INIT_FILE)
  ) u_ifu (
    .clock            (clock),
    .reset            (reset),
    .Instruction_Code (instruction),
    .pc               (pc)
  );

  assign instr = rtype_t'(instruction);

  control_unit u_control_unit (
    .opcode           (instr.opcode),
    .funct3           (instr.funct3),
    .funct7           (instr.funct7),
    .alu_control      (alu_control),
    .regwrite_control (regwrite_control)
  );

  datapath u_datapath (
    .clock         (clock),
    .reset         (reset),
    .alu_control   (alu_control),
    .read_reg_num1 (instr.rs1),
    .read_reg_num2 (instr.rs2),
    .write_reg     (instr.rd),
    .regwrite      (regwrite_control),
    .zero_flag     (zero),
    .write_data    (write_data)
  );

  assign regwrite = regwrite_control;

endmodule
