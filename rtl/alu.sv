// alu: 32-bit arithmetic and logic unit of the R-type processor.
//
// Purely combinational. Operand a comes from source register rs1, operand b
// from rs2, and alu_control selects the operation; the result goes to the
// register write-back path and zero_flag is high when the result is zero.
//
// Operations (as defined for the RISC-V R-type instructions):
//   ADD  a + b             SUB  a - b
//   AND  a & b             OR   a | b          XOR a ^ b
//   SLL  a << b[4:0]       SRL  a >> b[4:0]    SRA a >>> b[4:0] (signed)
//   SLT  signed a < b      SLTU unsigned a < b (result 1 or 0)
//   MUL  low 32 bits of a * b
// Only the low five bits of b are used as shift amount, as in RISC-V; an
// unused alu_control code gives a zero result. Both are choices of this
// design where the description leaves them open.
module alu
  import rv_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic [WIDTH-1:0] a,            // rs1 data
  input  logic [WIDTH-1:0] b,            // rs2 data
  input  logic [3:0]       alu_control,  // operation, see rv_pkg::alu_op_e
  output logic [WIDTH-1:0] result,
  output logic             zero_flag     // result == 0
);

  localparam int unsigned SHW = $clog2(WIDTH);

  logic [SHW-1:0] shamt;
  assign shamt = b[SHW-1:0];

  always_comb begin
    unique case (alu_op_e'(alu_control))
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_SLL:  result = a << shamt;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = WIDTH'($signed(a) >>> shamt);
      ALU_SLT:  result = WIDTH'($signed(a) < $signed(b));
      ALU_SLTU: result = WIDTH'(a < b);
      ALU_MUL:  result = a * b;
      default:  result = '0;
    endcase
  end

  assign zero_flag = (result == '0);

endmodule
