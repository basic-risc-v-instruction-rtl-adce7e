// tb_control_unit: test of the main decoder.
// Applies every funct3/funct7 pair under the R-type opcode and under a set
// of other opcodes (including the I/S/B/U/J major opcodes of RISC-V) and
// checks regwrite_control and, for supported R-type instructions, the ALU
// code against an independent table.
module tb_control_unit;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [3:0] alu_control;
  logic       regwrite_control;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  control_unit dut (.opcode(opcode), .funct3(funct3), .funct7(funct7),
                    .alu_control(alu_control), .regwrite_control(regwrite_control));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input logic [6:0] f7, input logic [2:0] f3);
    case ({f7, f3})
      {7'h00, 3'd0}: return 0;   // add
      {7'h20, 3'd0}: return 1;   // sub
      {7'h00, 3'd7}: return 2;   // and
      {7'h00, 3'd6}: return 3;   // or
      {7'h00, 3'd2}: return 4;   // slt
      {7'h01, 3'd0}: return 5;   // mul
      {7'h00, 3'd4}: return 6;   // xor
      {7'h00, 3'd1}: return 7;   // sll
      {7'h00, 3'd5}: return 8;   // srl
      {7'h20, 3'd5}: return 9;   // sra
      {7'h00, 3'd3}: return 10;  // sltu
      default:       return -1;
    endcase
  endfunction

  logic [6:0] others [8] = '{7'b0010011, 7'b0000011, 7'b0100011, 7'b1100011,
                             7'b0110111, 7'b1101111, 7'b0000000, 7'b0110010};

  initial begin
    for (int f7 = 0; f7 < 128; f7++) begin
      for (int f3 = 0; f3 < 8; f3++) begin
        int e;
        opcode = 7'b0110011; funct7 = 7'(f7); funct3 = 3'(f3);
        #1;
        e = expected(funct7, funct3);
        checks++;
        if (regwrite_control !== (e >= 0) || (e >= 0 && alu_control !== 4'(e))) begin
          failures++;
          $display("FAIL R f7=%h f3=%0d got %0d/%b exp %0d", f7, f3, alu_control, regwrite_control, e);
        end
        foreach (others[k]) begin
          opcode = others[k];
          #1;
          checks++;
          if (regwrite_control !== 1'b0) begin
            failures++;
            $display("FAIL opcode %b writes", opcode);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
