// tb_alu: self-checking test of the ALU.
// Every operation is tried on directed corner values and on random
// operands; the expected result is computed here from the RISC-V
// definition of each operation and compared with result and zero_flag.
module tb_alu;
  import rv_pkg::*;

  logic [31:0] a, b, result;
  logic [3:0]  alu_control;
  logic        zero_flag;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  alu dut (.a(a), .b(b), .alu_control(alu_control), .result(result), .zero_flag(zero_flag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input int op, input logic [31:0] x, input logic [31:0] y);
    logic [63:0] p;
    case (op)
      0:  return x + y;
      1:  return x - y;
      2:  return x & y;
      3:  return x | y;
      4:  return (signed'(x) < signed'(y)) ? 32'd1 : 32'd0;
      5:  begin p = {32'd0, x} * {32'd0, y}; return p[31:0]; end
      6:  return x ^ y;
      7:  return x << y[4:0];
      8:  return x >> y[4:0];
      9:  return 32'(signed'(x) >>> y[4:0]);
      10: return (x < y) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic apply(input int op, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp;
    a = x; b = y; alu_control = 4'(op);
    #1;
    exp = model(op, x, y);
    checks++;
    if (result !== exp || zero_flag !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h z=%b exp %h", op, x, y, result, zero_flag, exp);
    end
  endtask

  logic [31:0] corner [8] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                              32'h7fff_ffff, 32'd31, 32'd32, 32'h1234_5678};

  initial begin
    // Values from the demonstration run: 8+9, 18-19, 22^23, 26>>27
    apply(0, 32'd8, 32'd9);
    if (result != 32'd17) begin failures++; $display("FAIL add 8+9"); end
    apply(1, 32'd18, 32'd19);
    if (result != 32'hffff_ffff) begin failures++; $display("FAIL sub 18-19"); end
    apply(6, 32'd22, 32'd23);
    if (result != 32'd1) begin failures++; $display("FAIL xor"); end
    apply(8, 32'd26, 32'd27);
    if (result != 32'd0 || !zero_flag) begin failures++; $display("FAIL srl"); end
    // Hand-worked values
    apply(5, 32'd20, 32'd21);
    if (result != 32'd420) begin failures++; $display("FAIL mul"); end
    apply(9, 32'h8000_0000, 32'd4);
    if (result != 32'hf800_0000) begin failures++; $display("FAIL sra"); end
    apply(4, 32'hffff_ffff, 32'd1);
    if (result != 32'd1) begin failures++; $display("FAIL slt"); end
    apply(10, 32'hffff_ffff, 32'd1);
    if (result != 32'd0) begin failures++; $display("FAIL sltu"); end
    checks += 8;
    for (int op = 0; op <= 10; op++)
      foreach (corner[i]) foreach (corner[j]) apply(op, corner[i], corner[j]);
    for (int n = 0; n < 5000; n++) apply(int'($urandom_range(0, 10)), $urandom, $urandom);
    // Unused control codes give zero
    for (int op = 11; op < 16; op++) apply(op, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
