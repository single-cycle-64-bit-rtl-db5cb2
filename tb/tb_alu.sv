// tb_alu: checks every ALU function on corner and random operands against a
// reference written differently from the ALU (shifts bit by bit, signed
// compare through the sign bits), and checks result_eq_zero.
module tb_alu;
  import riscv_pkg::*;
  alu_funct_e  alu_funct;
  logic [63:0] operand_a, operand_b, result;
  logic        result_eq_zero;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.alu_funct, .operand_a, .operand_b, .result, .result_eq_zero);

  function automatic logic [63:0] ref_alu(alu_funct_e f, logic [63:0] a, b);
    logic [63:0] r = '0;
    int sh = int'(b[5:0]);
    case (f)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a + ~b + 64'd1;
      ALU_SLL:  for (int i = 0; i < 64; i++) r[i] = (i >= sh) ? a[i - sh] : 1'b0;
      ALU_SRL:  for (int i = 0; i < 64; i++) r[i] = (i + sh < 64) ? a[i + sh] : 1'b0;
      ALU_SRA:  for (int i = 0; i < 64; i++) r[i] = (i + sh < 64) ? a[i + sh] : a[63];
      ALU_SLT:  r = (a[63] != b[63]) ? 64'(a[63]) : 64'(a < b);
      ALU_SLTU: r = 64'(a < b);
      ALU_XOR:  for (int i = 0; i < 64; i++) r[i] = a[i] != b[i];
      ALU_OR:   for (int i = 0; i < 64; i++) r[i] = a[i] || b[i];
      ALU_AND:  for (int i = 0; i < 64; i++) r[i] = a[i] && b[i];
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic check(alu_funct_e f, logic [63:0] a, b);
    logic [63:0] e;
    alu_funct = f; operand_a = a; operand_b = b; #1;
    e = ref_alu(f, a, b);
    checks += 2;
    if (result !== e) begin failures++; $display("FAIL f=%0d a=%h b=%h r=%h exp=%h", f, a, b, result, e); end
    if (result_eq_zero !== (e == 0)) begin failures++; $display("FAIL zero f=%0d", f); end
  endtask

  logic [63:0] corners [6] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff, 64'h0000_0000_ffff_ffff};

  initial begin
    for (int f = 0; f < 10; f++) begin
      foreach (corners[i]) foreach (corners[j]) check(alu_funct_e'(f), corners[i], corners[j]);
      for (int i = 0; i < 200; i++) check(alu_funct_e'(f), {$urandom, $urandom}, {$urandom, $urandom});
      for (int s = 0; s < 64; s++) check(alu_funct_e'(f), 64'hf0e1_d2c3_b4a5_9687, 64'(s));
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
