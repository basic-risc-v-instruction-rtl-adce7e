// ifu: instruction fetch unit.
//
// Combines the program counter, its +4 adder and the instruction memory.
// After reset the PC is zero; each rising clock edge moves it to the next
// word, and Instruction_Code is the 32-bit instruction at the current PC,
// available combinationally in the same cycle. One instruction is fetched
// per clock cycle. The PC is also brought out for observation.
module ifu
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 64,
  parameter string       INIT_FILE  = ""
) (
  input  logic            clock,
  input  logic            reset,
  output logic [XLEN-1:0] Instruction_Code,
  output logic [XLEN-1:0] pc
);

  program_counter u_program_counter (
    .clock   (clock),
    .reset   (reset),
    .pc      (pc)
  );

  instruction_memory #(
    .DEPTH     (IMEM_DEPTH),
    .INIT_FILE (INIT_FILE)
  ) u_instruction_memory (
    .addr        (pc),
    .instruction (Instruction_Code)
  );

endmodule
