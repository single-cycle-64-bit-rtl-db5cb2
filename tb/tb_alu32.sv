// tb_alu32: checks the 32-bit ALU of the RV64I word instructions: the low 32
// bits of each result against a bitwise reference and the upper 32 bits
// against copies of bit 31, with garbage in the operands' upper halves.
module tb_alu32;
  import riscv_pkg::*;
  alu_funct_e  alu_funct;
  logic [63:0] operand_a, operand_b, result;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu32 dut (.alu_funct, .operand_a, .operand_b, .result);

  function automatic logic [31:0] ref32(alu_funct_e f, logic [31:0] a, b);
    logic [31:0] r = '0;
    int sh = int'(b[4:0]);
    case (f)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a + ~b + 32'd1;
      ALU_SLL:  for (int i = 0; i < 32; i++) r[i] = (i >= sh) ? a[i - sh] : 1'b0;
      ALU_SRL:  for (int i = 0; i < 32; i++) r[i] = (i + sh < 32) ? a[i + sh] : 1'b0;
      ALU_SRA:  for (int i = 0; i < 32; i++) r[i] = (i + sh < 32) ? a[i + sh] : a[31];
      ALU_SLT:  r = (a[31] != b[31]) ? 32'(a[31]) : 32'(a < b);
      ALU_SLTU: r = 32'(a < b);
      ALU_XOR:  r = a ^ b;
      ALU_OR:   r = a | b;
      ALU_AND:  r = a & b;
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic check(alu_funct_e f, logic [63:0] a, b);
    logic [31:0] e;
    alu_funct = f; operand_a = a; operand_b = b; #1;
    e = ref32(f, a[31:0], b[31:0]);
    checks++;
    if (result[31:0] !== e || result[63:32] !== {32{e[31]}}) begin
      failures++; $display("FAIL f=%0d a=%h b=%h r=%h exp=%h", f, a, b, result, e);
    end
  endtask

  initial begin
    for (int f = 0; f < 10; f++) begin
      for (int i = 0; i < 300; i++) check(alu_funct_e'(f), {$urandom, $urandom}, {$urandom, $urandom});
      for (int s = 0; s < 64; s++) check(alu_funct_e'(f), 64'h1234_5678_8765_4321, {32'hffff_0000, 32'(s)});
      check(alu_funct_e'(f), 64'h0000_0000_7fff_ffff, 64'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
