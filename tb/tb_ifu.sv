// tb_ifu: runs the fetch unit with its default program for two passes
// through the memory. In every cycle the PC must equal 4 x (cycles since
// reset), and Instruction_Code must be the program word at that PC, the
// memory address wrapping after 64 words: one new instruction per clock.
module tb_ifu;
  `include "rtype_demo_prog.svh"

  logic        clock = 1'b0, reset;
  logic [31:0] Instruction_Code, pc, exp;
  int checks = 0, failures = 0;

  ifu dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1; reset = 1'b0;
    for (int n = 0; n < 2 * 64 + 5; n++) begin
      exp = ((n % 64) < DEMO_LEN) ? DEMO_PROG[n % 64] : 32'd0;
      checks++;
      if (pc !== 32'(4 * n) || Instruction_Code !== exp) begin
        failures++;
        $display("FAIL cycle %0d pc=%h instr=%h exp %h", n, pc, Instruction_Code, exp);
      end
      @(posedge clock); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
