// alu_decoder: the "ALU operations" step of the control path.
//
// Combinational. Turns the funct3 and funct7 fields of an R-type instruction
// into the 4-bit ALU control code of rv_pkg::alu_op_e, following the RISC-V
// R-type table (funct7 0x00 for ADD/SLL/SLT/SLTU/XOR/SRL/OR/AND, 0x20 for
// SUB/SRA, 0x01 with funct3 0 for MUL). valid is low for a funct3/funct7
// pair that is not one of these eleven instructions; alu_control is then
// ALU_ADD, a don't-care value chosen here, and the caller must not write
// the result back.
module alu_decoder
  import rv_pkg::*;
(
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output logic [3:0] alu_control,
  output logic       valid
);

  alu_op_e op;

  always_comb begin
    op    = ALU_ADD;
    valid = 1'b1;
    unique case (funct7)
      F7_BASE: begin
        unique case (funct3)
          F3_ADD_SUB: op = ALU_ADD;
          F3_SLL:     op = ALU_SLL;
          F3_SLT:     op = ALU_SLT;
          F3_SLTU:    op = ALU_SLTU;
          F3_XOR:     op = ALU_XOR;
          F3_SRL_SRA: op = ALU_SRL;
          F3_OR:      op = ALU_OR;
          F3_AND:     op = ALU_AND;
          default:    valid = 1'b0;
        endcase
      end
      F7_ALT: begin
        unique case (funct3)
          F3_ADD_SUB: op = ALU_SUB;
          F3_SRL_SRA: op = ALU_SRA;
          default:    valid = 1'b0;
        endcase
      end
      F7_MUL: begin
        if (funct3 == F3_ADD_SUB) op = ALU_MUL;
        else                      valid = 1'b0;
      end
      default: valid = 1'b0;
    endcase
  end

  assign alu_control = op;

endmodule
