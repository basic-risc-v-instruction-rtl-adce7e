// tb_datapath: test of register file + ALU + write-back.
// Starting from the reset contents (xi = i), random operations are driven
// for one clock each; the testbench keeps its own register model,
// computes each result from the RISC-V definitions, and checks write_data
// and zero_flag in the cycle the operation is applied, which also checks
// that results written earlier are read back correctly.
module tb_datapath;
  logic        clock = 1'b0, reset;
  logic [3:0]  alu_control;
  logic [4:0]  read_reg_num1, read_reg_num2, write_reg;
  logic        regwrite, zero_flag;
  logic [31:0] write_data;
  logic [31:0] model_regs [32];
  int checks = 0, failures = 0, nzero = 0, ndep = 0;

  datapath dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (50000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] f(input int op, input logic [31:0] x, input logic [31:0] y);
    case (op)
      0: return x + y;            1: return x - y;
      2: return x & y;            3: return x | y;
      4: return 32'(signed'(x) < signed'(y));
      5: return 32'(x * y);       6: return x ^ y;
      7: return x << y[4:0];      8: return x >> y[4:0];
      9: return 32'(signed'(x) >>> y[4:0]);
      10: return 32'(x < y);
      default: return 0;
    endcase
  endfunction

  task automatic step(input int op, input logic [4:0] r1, input logic [4:0] r2,
                      input logic [4:0] rd, input logic we);
    logic [31:0] exp;
    alu_control = 4'(op); read_reg_num1 = r1; read_reg_num2 = r2;
    write_reg = rd; regwrite = we;
    #1;
    exp = f(op, model_regs[r1], model_regs[r2]);
    checks++;
    if (write_data !== exp || zero_flag !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d x%0d x%0d got %h exp %h", op, r1, r2, write_data, exp);
    end
    if (exp == 0) nzero++;
    @(posedge clock); #1;
    if (we && rd != 0) model_regs[rd] = exp;
  endtask

  initial begin
    reset = 1'b1; regwrite = 1'b0; alu_control = '0;
    read_reg_num1 = '0; read_reg_num2 = '0; write_reg = '0;
    @(posedge clock); #1;
    reset = 1'b0;
    for (int i = 0; i < 32; i++) model_regs[i] = 32'(i);
    // add x1, x8, x9 gives 17; then x1 is used as an operand
    step(0, 5'd8, 5'd9, 5'd1, 1'b1);
    checks++;
    if (model_regs[1] != 32'd17) failures++;
    step(1, 5'd1, 5'd8, 5'd2, 1'b1);   // x2 = 17 - 8 = 9
    step(1, 5'd2, 5'd9, 5'd3, 1'b1);   // x3 = 9 - 9 = 0 (zero flag)
    for (int n = 0; n < 4000; n++) begin
      logic [4:0] r1 = 5'($urandom_range(0, 7));
      if (r1 != 0) ndep++;
      step(int'($urandom_range(0, 10)), r1, 5'($urandom_range(0, 7)),
           5'($urandom_range(0, 7)), 1'($urandom));
    end
    checks++;
    if (nzero == 0) begin failures++; $display("FAIL zero flag never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
