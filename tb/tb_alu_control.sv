// tb_alu_control: walks every combination of ALU class, funct3 and funct7[5]
// and compares the ALU function code with a table written from the RV64I
// instruction definitions.
module tb_alu_control;
  import riscv_pkg::*;
  alu_op_e    alu_op;
  logic [2:0] funct3;
  logic       funct7_5;
  alu_funct_e alu_funct;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu_control dut (.alu_op, .funct3, .funct7_5, .alu_funct);

  function automatic alu_funct_e expected(alu_op_e op, logic [2:0] f3, logic f7);
    alu_funct_e rr [8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    if (op == ALUOP_ADD) return ALU_ADD;
    if (op == ALUOP_BRANCH) return f3[2] ? (f3[1] ? ALU_SLTU : ALU_SLT) : ALU_SUB;
    if (f3 == 3'b101 && f7) return ALU_SRA;
    if (f3 == 3'b000 && f7 && op == ALUOP_REG) return ALU_SUB;
    return rr[f3];
  endfunction

  initial begin
    for (int op = 0; op < 4; op++)
      for (int f3 = 0; f3 < 8; f3++)
        for (int f7 = 0; f7 < 2; f7++) begin
          alu_op = alu_op_e'(op); funct3 = 3'(f3); funct7_5 = 1'(f7); #1;
          if (op == ALUOP_BRANCH && f3[2:1] == 2'b01) continue;  // not a branch
          checks++;
          if (alu_funct !== expected(alu_op, funct3, funct7_5)) begin
            failures++; $display("FAIL op=%0d f3=%0d f7=%0d -> %0d", op, f3, f7, alu_funct);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
