// tb_instruction_memory: checks the built-in program contents word by word
// against an independently encoded copy, the zero fill after it, that the
// two low address bits are ignored and that addresses wrap modulo the
// memory size (64 and 8 words). A third instance loaded from a hex file
// must return the file's words, then zeros.
module tb_instruction_memory;
  `include "rtype_demo_prog.svh"

  logic [31:0] addr, instruction, addr_s, instruction_s, addr_f, instruction_f;
  logic [31:0] file_words [256];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  instruction_memory dut (.addr(addr), .instruction(instruction));
  instruction_memory #(.DEPTH(8)) dut_small (.addr(addr_s), .instruction(instruction_s));
  instruction_memory #(.DEPTH(256), .INIT_FILE("tb/e2e_program.hex"))
    dut_file (.addr(addr_f), .instruction(instruction_f));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    addr_s = '0; addr_f = '0;
    #1;
    for (int w = 0; w < 2 * 64; w++) begin
      for (int lo = 0; lo < 4; lo += 3) begin
        addr = 32'(w * 4 + lo);
        #1;
        exp = ((w % 64) < DEMO_LEN) ? DEMO_PROG[w % 64] : 32'd0;
        checks++;
        if (instruction !== exp) begin
          failures++;
          $display("FAIL addr=%h got %h exp %h", addr, instruction, exp);
        end
      end
    end
    for (int w = 0; w < 24; w++) begin
      addr_s = 32'(w * 4);
      #1;
      checks++;
      if (instruction_s !== DEMO_PROG[w % 8]) begin
        failures++; $display("FAIL small mem word %0d: %h", w, instruction_s);
      end
    end
    for (int i = 0; i < 256; i++) file_words[i] = 32'd0;
    $readmemh("tb/e2e_program.hex", file_words);
    for (int w = 0; w < 256; w++) begin
      addr_f = 32'(w * 4);
      #1;
      checks++;
      if (instruction_f !== file_words[w] || (w >= 200 && instruction_f !== 32'd0)) begin
        failures++; $display("FAIL file mem word %0d: %h", w, instruction_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
