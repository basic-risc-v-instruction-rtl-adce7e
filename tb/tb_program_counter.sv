// tb_program_counter: checks that the PC is zero after reset, grows by 4
// on every rising clock edge and returns to zero on a
// reset applied mid-run.
module tb_program_counter;
  logic        clock = 1'b0, reset;
  logic [31:0] pc, exp;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    checks++;
    if (pc !== exp) begin failures++; $display("FAIL pc=%h exp %h", pc, exp); end
  endtask

  initial begin
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1; exp = 0; chk();
    reset = 1'b0;
    for (int n = 0; n < 100; n++) begin
      @(posedge clock); #1; exp += 4; chk();
    end
    reset = 1'b1;
    @(posedge clock); #1; exp = 0; chk();
    reset = 1'b0;
    @(posedge clock); #1; exp = 4; chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
