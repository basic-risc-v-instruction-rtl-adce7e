// tb_rv_rtype_full: the processor at its default configuration (64-word
// instruction memory, default program) executing the demonstration
// program. For each of the twelve instructions the testbench checks, in
// the cycle it executes, the PC, the instruction word, regwrite,
// write_data and zero against results worked out by hand from the reset
// register contents (xi = i). It then runs the zero-filled rest of the
// memory (no register writes) and the second pass after wrap-around,
// where every instruction reads only registers that already held the same
// values in the first pass, so all twelve results repeat.
module tb_rv_rtype_full;
  `include "rtype_demo_prog.svh"

  logic        clock = 1'b0, reset;
  logic        zero, regwrite;
  logic [31:0] pc, instruction, write_data;
  int checks = 0, failures = 0;

  rv_rtype_processor dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (400) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1; reset = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < 64; n++) begin
        checks++;
        if (pc !== 32'(4 * (64 * pass + n))) begin
          failures++; $display("FAIL pc=%h at step %0d", pc, n);
        end
        if (n < DEMO_LEN) begin
          checks++;
          if (instruction !== DEMO_PROG[n] || regwrite !== 1'b1 ||
              write_data !== DEMO_RESULT[n] || zero !== (DEMO_RESULT[n] == 0)) begin
            failures++;
            $display("FAIL pass %0d instr %0d: %h wr=%b data=%h zero=%b exp %h",
                     pass, n, instruction, regwrite, write_data, zero, DEMO_RESULT[n]);
          end
        end else begin
          checks++;
          if (instruction !== 32'd0 || regwrite !== 1'b0) begin
            failures++; $display("FAIL empty word %0d: %h wr=%b", n, instruction, regwrite);
          end
        end
        @(posedge clock); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
