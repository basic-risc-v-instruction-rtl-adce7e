// tb_alu_decoder: exhaustive test of the funct3/funct7 decoder.
// All 1024 funct3/funct7 pairs are applied; the expected ALU code and
// valid flag come from a table of the eleven supported instructions.
module tb_alu_decoder;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic [3:0] alu_control;
  logic       valid;
  int checks = 0, failures = 0, nvalid = 0;
  logic clk = 1'b0;

  alu_decoder dut (.funct3(funct3), .funct7(funct7), .alu_control(alu_control), .valid(valid));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {funct7, funct3} -> ALU code (ADD0 SUB1 AND2 OR3 SLT4 MUL5 XOR6 SLL7 SRL8 SRA9 SLTU10)
  function automatic int expected(input logic [6:0] f7, input logic [2:0] f3);
    case ({f7, f3})
      {7'h00, 3'd0}: return 0;
      {7'h20, 3'd0}: return 1;
      {7'h00, 3'd7}: return 2;
      {7'h00, 3'd6}: return 3;
      {7'h00, 3'd2}: return 4;
      {7'h01, 3'd0}: return 5;
      {7'h00, 3'd4}: return 6;
      {7'h00, 3'd1}: return 7;
      {7'h00, 3'd5}: return 8;
      {7'h20, 3'd5}: return 9;
      {7'h00, 3'd3}: return 10;
      default:       return -1;
    endcase
  endfunction

  initial begin
    for (int f7 = 0; f7 < 128; f7++) begin
      for (int f3 = 0; f3 < 8; f3++) begin
        int e;
        funct7 = 7'(f7); funct3 = 3'(f3);
        #1;
        e = expected(funct7, funct3);
        checks++;
        if (e < 0) begin
          if (valid !== 1'b0) begin failures++; $display("FAIL f7=%h f3=%0d should be invalid", f7, f3); end
        end else begin
          nvalid++;
          if (valid !== 1'b1 || alu_control !== 4'(e)) begin
            failures++;
            $display("FAIL f7=%h f3=%0d got %0d/%b exp %0d", f7, f3, alu_control, valid, e);
          end
        end
      end
    end
    checks++;
    if (nvalid != 11) begin failures++; $display("FAIL %0d valid encodings", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
