// program_counter: the PC register with its +4 incrementer.
//
// pc holds the byte address of the instruction being executed. A
// synchronous, active-high reset sets it to zero; on every other rising
// clock edge it takes pc_next = pc + 4, the address of the next 32-bit
// instruction. The R-type-only processor has no jumps or branches, so the
// incrementer is the only source of the next PC.
module program_counter
  import rv_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic             clock,
  input  logic             reset,
  output logic [WIDTH-1:0] pc
);

  logic [WIDTH-1:0] pc_next;

  assign pc_next = pc + WIDTH'(4);

  always_ff @(posedge clock) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end

endmodule
