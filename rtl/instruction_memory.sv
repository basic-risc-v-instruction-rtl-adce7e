// instruction_memory: read-only program store.
//
// DEPTH words of 32 bits, read combinationally: instruction is the word at
// byte address addr (addr[1:0] is ignored, addresses wrap modulo the
// memory size). With the default empty INIT_FILE the memory holds the
// built-in demonstration program of rv_pkg::demo_program_word, followed
// by zeros; this form is also what synthesis turns into an initialised
// ROM. A non-empty INIT_FILE names a hex file (one 32-bit word per line,
// path relative to the simulator's working directory) that replaces the
// contents at start of simulation, words it does not give being zero.
// The depth and both ways of loading are choices of this design.
module instruction_memory
  import rv_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter string       INIT_FILE = ""
) (
  input  logic [XLEN-1:0] addr,
  output logic [XLEN-1:0] instruction
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [XLEN-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE == "") begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] = demo_program_word(i);
    end else begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
      $readmemh(INIT_FILE, mem);
    end
  end

  logic [AW-1:0] word_addr;
  assign word_addr   = addr[AW+1:2];
  assign instruction = mem[word_addr];

endmodule
