// register_file: the 32 x 32-bit general-purpose registers x0..x31.
//
// Two read ports (source register 1 and 2) are combinational: read_data1/2
// follow read_reg_num1/2 in the same cycle. One write port stores
// write_data into register write_reg on the rising clock edge when regwrite
// is high. x0 always reads as zero and ignores writes, as in RISC-V.
//
// reset is synchronous and active high. It loads every register xi with
// the value i, so a freshly reset processor has known, distinct operands
// (for example, add with rs1 = x8 and rs2 = x9 returns 17). The reset
// values are this design's choice, taken to match the demonstration run
// of the design.
module register_file
  import rv_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN,
  parameter int unsigned DEPTH = NUM_REGS,
  parameter int unsigned AW    = REG_AW
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [AW-1:0]    read_reg_num1,
  input  logic [AW-1:0]    read_reg_num2,
  input  logic [AW-1:0]    write_reg,
  input  logic [WIDTH-1:0] write_data,
  input  logic             regwrite,
  output logic [WIDTH-1:0] read_data1,
  output logic [WIDTH-1:0] read_data2
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= WIDTH'(i);
    end else if (regwrite && write_reg != '0) begin
      regs[write_reg] <= write_data;
    end
  end

  assign read_data1 = (read_reg_num1 == '0) ? '0 : regs[read_reg_num1];
  assign read_data2 = (read_reg_num2 == '0) ? '0 : regs[read_reg_num2];

endmodule
