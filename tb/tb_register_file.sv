// tb_register_file: test of the 32 x 32 register file.
// Checks the reset contents (xi = i), that reads are combinational, that
// a write lands at the rising edge and not before, that x0 stays zero,
// that regwrite low blocks a write, and a long random sequence of writes
// and reads against a shadow copy kept by the testbench.
module tb_register_file;
  logic        clock = 1'b0, reset;
  logic [4:0]  read_reg_num1, read_reg_num2, write_reg;
  logic [31:0] write_data, read_data1, read_data2;
  logic        regwrite;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (50000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [4:0] r1, input logic [4:0] r2);
    read_reg_num1 = r1; read_reg_num2 = r2;
    #1;
    checks++;
    if (read_data1 !== shadow[r1] || read_data2 !== shadow[r2]) begin
      failures++;
      $display("FAIL read x%0d=%h x%0d=%h exp %h %h", r1, read_data1, r2, read_data2, shadow[r1], shadow[r2]);
    end
  endtask

  initial begin
    reset = 1'b1; regwrite = 1'b0; write_reg = '0; write_data = '0;
    read_reg_num1 = '0; read_reg_num2 = '0;
    @(posedge clock); #1;
    reset = 1'b0;
    for (int i = 0; i < 32; i++) shadow[i] = 32'(i);
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'(31 - i));

    // A write is not visible before the clock edge, visible after it
    write_reg = 5'd5; write_data = 32'hdead_beef; regwrite = 1'b1;
    check_read(5'd5, 5'd5);
    @(posedge clock); #1;
    shadow[5] = 32'hdead_beef;
    check_read(5'd5, 5'd4);
    // regwrite low: no write
    write_reg = 5'd6; write_data = 32'h1111_2222; regwrite = 1'b0;
    @(posedge clock); #1;
    check_read(5'd6, 5'd5);
    // x0 ignores writes
    write_reg = 5'd0; write_data = 32'hffff_ffff; regwrite = 1'b1;
    @(posedge clock); #1;
    check_read(5'd0, 5'd0);

    for (int n = 0; n < 3000; n++) begin
      write_reg = 5'($urandom); write_data = $urandom; regwrite = 1'($urandom);
      @(posedge clock); #1;
      if (regwrite && write_reg != 0) shadow[write_reg] = write_data;
      check_read(5'($urandom), 5'($urandom));
    end

    // Reset restores xi = i
    reset = 1'b1; regwrite = 1'b0;
    @(posedge clock); #1;
    reset = 1'b0;
    for (int i = 0; i < 32; i++) shadow[i] = 32'(i);
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'(i ^ 7));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
