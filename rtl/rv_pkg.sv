// rv_pkg: types and constants shared by the R-type processor.
//
// The R-type instruction word is split into the six fields of the RISC-V
// base format (funct7, rs2, rs1, funct3, rd, opcode, from bit 31 down to 0).
// All R-type instructions share the major opcode 7'b0110011 and are told
// apart by funct3 and funct7 exactly as in the RISC-V specification.
//
// The 4-bit ALU control code is this design's own encoding. Its low values
// follow the short operation-code list that accompanies the design
// (ADD=0, SUB=1, AND=2, OR=3, SLT=4, MUL=5), cut to the 4 bits of the
// alu_control bus; the remaining operations (XOR, shifts, SLTU) take the
// next free codes.
package rv_pkg;

  localparam int unsigned XLEN     = 32;   // data and instruction width
  localparam int unsigned NUM_REGS = 32;   // x0..x31
  localparam int unsigned REG_AW   = 5;    // register number width

  // Major opcode of all register-register instructions
  localparam logic [6:0] OPCODE_OP = 7'b0110011;

  // funct7 values used by the R-type instructions
  localparam logic [6:0] F7_BASE = 7'h00;  // ADD, SLL, SLT, SLTU, XOR, SRL, OR, AND
  localparam logic [6:0] F7_ALT  = 7'h20;  // SUB, SRA
  localparam logic [6:0] F7_MUL  = 7'h01;  // MUL (multiply extension)

  // funct3 values
  localparam logic [2:0] F3_ADD_SUB = 3'h0;
  localparam logic [2:0] F3_SLL     = 3'h1;
  localparam logic [2:0] F3_SLT     = 3'h2;
  localparam logic [2:0] F3_SLTU    = 3'h3;
  localparam logic [2:0] F3_XOR     = 3'h4;
  localparam logic [2:0] F3_SRL_SRA = 3'h5;
  localparam logic [2:0] F3_OR      = 3'h6;
  localparam logic [2:0] F3_AND     = 3'h7;

  // ALU operation select (alu_control[3:0])
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_SLT  = 4'd4,
    ALU_MUL  = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_SLL  = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SRA  = 4'd9,
    ALU_SLTU = 4'd10
  } alu_op_e;

  // Field view of an R-type instruction word
  typedef struct packed {
    logic [6:0] funct7;   // [31:25]
    logic [4:0] rs2;      // [24:20]
    logic [4:0] rs1;      // [19:15]
    logic [2:0] funct3;   // [14:12]
    logic [4:0] rd;       // [11:7]
    logic [6:0] opcode;   // [6:0]
  } rtype_t;

  // Assemble an R-type word from its fields
  function automatic logic [31:0] encode_rtype(input logic [6:0] funct7,
                                               input logic [4:0] rs2,
                                               input logic [4:0] rs1,
                                               input logic [2:0] funct3,
                                               input logic [4:0] rd);
    rtype_t w;
    w.funct7 = funct7;
    w.rs2    = rs2;
    w.rs1    = rs1;
    w.funct3 = funct3;
    w.rd     = rd;
    w.opcode = OPCODE_OP;
    return w;
  endfunction

  // Built-in demonstration program, word i of the instruction memory
  // (zero, an ignored word, beyond its end). It runs every R-type
  // operation on the reset register contents xi = i.
  localparam int unsigned DEMO_PROGRAM_LEN = 12;

  function automatic logic [31:0] demo_program_word(input int unsigned i);
    case (i)
      0:  return encode_rtype(F7_BASE, 5'd9,  5'd8,  F3_ADD_SUB, 5'd1);   // add  x1,  x8,  x9
      1:  return encode_rtype(F7_ALT,  5'd19, 5'd18, F3_ADD_SUB, 5'd2);   // sub  x2,  x18, x19
      2:  return encode_rtype(F7_MUL,  5'd21, 5'd20, F3_ADD_SUB, 5'd3);   // mul  x3,  x20, x21
      3:  return encode_rtype(F7_BASE, 5'd23, 5'd22, F3_XOR,     5'd4);   // xor  x4,  x22, x23
      4:  return encode_rtype(F7_BASE, 5'd25, 5'd24, F3_SLL,     5'd5);   // sll  x5,  x24, x25
      5:  return encode_rtype(F7_BASE, 5'd27, 5'd26, F3_SRL_SRA, 5'd6);   // srl  x6,  x26, x27
      6:  return encode_rtype(F7_BASE, 5'd29, 5'd28, F3_AND,     5'd7);   // and  x7,  x28, x29
      7:  return encode_rtype(F7_BASE, 5'd13, 5'd12, F3_OR,      5'd10);  // or   x10, x12, x13
      8:  return encode_rtype(F7_ALT,  5'd4,  5'd2,  F3_SRL_SRA, 5'd11);  // sra  x11, x2,  x4
      9:  return encode_rtype(F7_BASE, 5'd1,  5'd2,  F3_SLT,     5'd14);  // slt  x14, x2,  x1
      10: return encode_rtype(F7_BASE, 5'd1,  5'd2,  F3_SLTU,    5'd15);  // sltu x15, x2,  x1
      11: return encode_rtype(F7_BASE, 5'd3,  5'd1,  F3_ADD_SUB, 5'd16);  // add  x16, x1,  x3
      default: return '0;
    endcase
  endfunction

endpackage
