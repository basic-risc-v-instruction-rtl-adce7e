// datapath: register file plus ALU with the write-back loop.
//
// The two source register numbers select the operands (DATA1, DATA2) that
// feed the ALU; the ALU performs the operation chosen by alu_control and its
// result is fed back as the register file's write data, stored into
// write_reg at the rising clock edge when regwrite is high. An instruction
// therefore reads, computes and writes back in one clock cycle.
// zero_flag reports a zero ALU result. write_data is also brought out so the
// result can be observed.
module datapath
  import rv_pkg::*;
(
  input  logic             clock,
  input  logic             reset,
  input  logic [3:0]       alu_control,
  input  logic [REG_AW-1:0] read_reg_num1,
  input  logic [REG_AW-1:0] read_reg_num2,
  input  logic [REG_AW-1:0] write_reg,
  input  logic             regwrite,
  output logic             zero_flag,
  output logic [XLEN-1:0]  write_data
);

  logic [XLEN-1:0] read_data1, read_data2;

  register_file u_register_file (
    .clock         (clock),
    .reset         (reset),
    .read_reg_num1 (read_reg_num1),
    .read_reg_num2 (read_reg_num2),
    .write_reg     (write_reg),
    .write_data    (write_data),
    .regwrite      (regwrite),
    .read_data1    (read_data1),
    .read_data2    (read_data2)
  );

  alu u_alu (
    .a           (read_data1),
    .b           (read_data2),
    .alu_control (alu_control),
    .result      (write_data),
    .zero_flag   (zero_flag)
  );

endmodule
