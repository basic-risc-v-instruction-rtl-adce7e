// control_unit: main decoder of the single-cycle R-type processor.
//
// Combinational. Receives the opcode, funct3 and funct7 fields of the
// instruction being executed and produces the two control signals of the
// datapath: alu_control[3:0], which selects the ALU operation, and
// regwrite_control, which lets the ALU result be written to rd at the next
// clock edge. funct3/funct7 are mapped to an ALU operation by the
// alu_decoder submodule.
//
// Only the register-register opcode 7'b0110011 is executed. An instruction
// with any other opcode, or an R-type encoding outside the supported set,
// leaves regwrite_control low, so it does nothing but advance the PC; that
// handling of unsupported encodings is this design's choice.
module control_unit
  import rv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output logic [3:0] alu_control,
  output logic       regwrite_control
);

  logic funct_valid;

  alu_decoder u_alu_decoder (
    .funct3      (funct3),
    .funct7      (funct7),
    .alu_control (alu_control),
    .valid       (funct_valid)
  );

  assign regwrite_control = (opcode == OPCODE_OP) && funct_valid;

endmodule
