// tb_rv_rtype_processor: end-to-end test of the processor.
//
// The processor runs a 200-instruction program (tb/e2e_program.hex) from a
// 256-word instruction memory, so it also executes the zero fill and wraps
// around to the start. The testbench reads the same file and runs its own
// instruction-level model of RV32 R-type execution (registers reset to
// xi = i). In every cycle it checks pc, the fetched instruction, regwrite,
// write_data and the zero output against the model: each instruction must
// complete in exactly one clock. A reset in the middle of the run must
// restore the PC and the registers.
//
// Counted mechanisms (each must occur at least once): each of the eleven
// operations, a zero result, a write to x0 that is discarded, a non-R-type
// opcode skipped, an unsupported funct3/funct7 skipped, an operand read
// from the register written by the previous instruction, and instruction
// memory wrap-around.
module tb_rv_rtype_processor;
  localparam int DEPTH = 256;
  localparam int NCYC  = 600;

  logic        clock = 1'b0, reset;
  logic        zero, regwrite;
  logic [31:0] pc, instruction, write_data;
  logic [31:0] prog [DEPTH];
  logic [31:0] mregs [32];
  logic [31:0] mpc;
  int checks = 0, failures = 0;
  int op_seen [11];
  int n_zero = 0, n_x0 = 0, n_nonr = 0, n_badfunct = 0, n_dep = 0, n_wrap = 0, n_reset = 0;
  logic [4:0] last_rd;
  logic       last_wrote;

  rv_rtype_processor #(.IMEM_DEPTH(DEPTH), .INIT_FILE("tb/e2e_program.hex")) dut (.*);

  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference execution of one instruction word; returns -1 when it does
  // not write a register, else the operation index.
  function automatic int ref_op(input logic [31:0] w);
    if (w[6:0] != 7'b0110011) return -1;
    case ({w[31:25], w[14:12]})
      {7'h00, 3'd0}: return 0;  {7'h20, 3'd0}: return 1;
      {7'h00, 3'd7}: return 2;  {7'h00, 3'd6}: return 3;
      {7'h00, 3'd2}: return 4;  {7'h01, 3'd0}: return 5;
      {7'h00, 3'd4}: return 6;  {7'h00, 3'd1}: return 7;
      {7'h00, 3'd5}: return 8;  {7'h20, 3'd5}: return 9;
      {7'h00, 3'd3}: return 10;
      default:       return -2;
    endcase
  endfunction

  function automatic logic [31:0] ref_alu(input int op, input logic [31:0] x, input logic [31:0] y);
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

  task automatic model_reset();
    for (int i = 0; i < 32; i++) mregs[i] = 32'(i);
    mpc = 0;
    last_wrote = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("tb/e2e_program.hex", prog);
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1; reset = 1'b0;
    model_reset();
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      logic [31:0] w, a, b, exp;
      int op;
      if (cyc == 350) begin
        reset = 1'b1;
        @(posedge clock); #1;
        reset = 1'b0;
        model_reset();
        n_reset++;
      end
      w  = prog[(mpc >> 2) % DEPTH];
      op = ref_op(w);
      a  = (w[19:15] == 0) ? 0 : mregs[w[19:15]];
      b  = (w[24:20] == 0) ? 0 : mregs[w[24:20]];
      checks++;
      if (pc !== mpc || instruction !== w) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h instr=%h exp %h", cyc, pc, mpc, instruction, w);
      end
      checks++;
      if (regwrite !== (op >= 0)) begin
        failures++;
        $display("FAIL cycle %0d instr %h regwrite=%b", cyc, w, regwrite);
      end
      if (op >= 0) begin
        exp = ref_alu(op, a, b);
        checks++;
        if (write_data !== exp || zero !== (exp == 0)) begin
          failures++;
          $display("FAIL cycle %0d instr %h result %h exp %h zero=%b", cyc, w, write_data, exp, zero);
        end
        op_seen[op]++;
        if (exp == 0) n_zero++;
        if (w[11:7] == 0) n_x0++;
        if (last_wrote && last_rd != 0 && (w[19:15] == last_rd || w[24:20] == last_rd)) n_dep++;
        if (w[11:7] != 0) mregs[w[11:7]] = exp;
        last_rd = w[11:7]; last_wrote = 1'b1;
      end else begin
        if (op == -2) n_badfunct++;
        else if (w != 0) n_nonr++;
        last_wrote = 1'b0;
      end
      mpc += 4;
      if (mpc[31:2] % DEPTH == 0) n_wrap++;
      @(posedge clock); #1;
    end
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL operation %0d never executed", i); end
    end
    checks += 7;
    if (n_zero == 0)     begin failures++; $display("FAIL no zero result"); end
    if (n_x0 == 0)       begin failures++; $display("FAIL no write to x0"); end
    if (n_nonr == 0)     begin failures++; $display("FAIL no non-R-type opcode"); end
    if (n_badfunct == 0) begin failures++; $display("FAIL no unsupported funct"); end
    if (n_dep == 0)      begin failures++; $display("FAIL no back-to-back dependence"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no memory wrap"); end
    if (n_reset == 0)    begin failures++; $display("FAIL no mid-run reset"); end
    $display("ops add=%0d sub=%0d and=%0d or=%0d slt=%0d mul=%0d xor=%0d sll=%0d srl=%0d sra=%0d sltu=%0d",
             op_seen[0], op_seen[1], op_seen[2], op_seen[3], op_seen[4], op_seen[5],
             op_seen[6], op_seen[7], op_seen[8], op_seen[9], op_seen[10]);
    $display("zero=%0d x0_writes=%0d non_rtype=%0d bad_funct=%0d dependences=%0d wraps=%0d resets=%0d",
             n_zero, n_x0, n_nonr, n_badfunct, n_dep, n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
