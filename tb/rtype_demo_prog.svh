// Expected contents of the default program, built from the instruction
// fields so that it does not depend on the hex file it is checked against.
// R-type word: {funct7, rs2, rs1, funct3, rd, 7'b0110011}
`define RT(f7, rs2, rs1, f3, rd) {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011}
localparam int DEMO_LEN = 12;
localparam logic [31:0] DEMO_PROG [DEMO_LEN] = '{
  `RT(7'h00,  9,  8, 0,  1),  // add  x1,  x8,  x9
  `RT(7'h20, 19, 18, 0,  2),  // sub  x2,  x18, x19
  `RT(7'h01, 21, 20, 0,  3),  // mul  x3,  x20, x21
  `RT(7'h00, 23, 22, 4,  4),  // xor  x4,  x22, x23
  `RT(7'h00, 25, 24, 1,  5),  // sll  x5,  x24, x25
  `RT(7'h00, 27, 26, 5,  6),  // srl  x6,  x26, x27
  `RT(7'h00, 29, 28, 7,  7),  // and  x7,  x28, x29
  `RT(7'h00, 13, 12, 6, 10),  // or   x10, x12, x13
  `RT(7'h20,  4,  2, 5, 11),  // sra  x11, x2,  x4
  `RT(7'h00,  1,  2, 2, 14),  // slt  x14, x2,  x1
  `RT(7'h00,  1,  2, 3, 15),  // sltu x15, x2,  x1
  `RT(7'h00,  3,  1, 0, 16)   // add  x16, x1,  x3
};
// Results worked out by hand from the reset contents xi = i
localparam logic [31:0] DEMO_RESULT [DEMO_LEN] = '{
  32'd17, 32'hffff_ffff, 32'd420, 32'd1, 32'h3000_0000, 32'd0,
  32'd28, 32'd13, 32'hffff_ffff, 32'd1, 32'd0, 32'd437
};
localparam logic [4:0] DEMO_RD [DEMO_LEN] = '{1, 2, 3, 4, 5, 6, 7, 10, 11, 14, 15, 16};
