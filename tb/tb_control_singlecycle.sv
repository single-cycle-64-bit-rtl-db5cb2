// tb_control_singlecycle: decodes one instruction of every RV64I kind and
// compares the control bundle with the expected settings, then checks that
// words outside the RV64I base encoding (unknown opcodes, bad funct3/funct7)
// are flagged illegal with every write enable cleared.
module tb_control_singlecycle;
  import riscv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_singlecycle dut (.inst, .ctrl);

  // expected: {reg_write, mem_read, mem_write, branch, jal, jalr, word_op, opb_imm}
  task automatic check(logic [31:0] w, logic [7:0] flags, wb_sel_e wb, imm_sel_e is, string name);
    inst = w; #1;
    checks++;
    if ({ctrl.reg_write, ctrl.mem_read, ctrl.mem_write, ctrl.branch, ctrl.jal, ctrl.jalr,
         ctrl.word_op, ctrl.opb_imm} !== flags || ctrl.illegal || ctrl.ecall ||
        ctrl.wb_sel !== wb || (flags[0] && ctrl.imm_sel !== is)) begin
      failures++; $display("FAIL %s: %p", name, ctrl);
    end
  endtask

  task automatic check_bad(logic [31:0] w, string name);
    inst = w; #1;
    checks++;
    if (!ctrl.illegal || ctrl.reg_write || ctrl.mem_read || ctrl.mem_write ||
        ctrl.branch || ctrl.jal || ctrl.jalr) begin
      failures++; $display("FAIL illegal %s %h: %p", name, w, ctrl);
    end
  endtask

  initial begin
    check(add(1, 2, 3),    8'b1000_0000, WB_ALU, IMM_I, "add");
    check(sub(1, 2, 3),    8'b1000_0000, WB_ALU, IMM_I, "sub");
    check(sra(1, 2, 3),    8'b1000_0000, WB_ALU, IMM_I, "sra");
    check(addi(1, 2, -5),  8'b1000_0001, WB_ALU, IMM_I, "addi");
    check(srai(1, 2, 63),  8'b1000_0001, WB_ALU, IMM_I, "srai");
    check(addw(1, 2, 3),   8'b1000_0010, WB_ALU, IMM_I, "addw");
    check(sraw(1, 2, 3),   8'b1000_0010, WB_ALU, IMM_I, "sraw");
    check(addiw(1, 2, 3),  8'b1000_0011, WB_ALU, IMM_I, "addiw");
    check(sraiw(1, 2, 31), 8'b1000_0011, WB_ALU, IMM_I, "sraiw");
    check(lui(1, 5),       8'b1000_0001, WB_ALU, IMM_U, "lui");
    check(auipc(1, 5),     8'b1000_0001, WB_ALU, IMM_U, "auipc");
    check(jal(1, 8),       8'b1000_1000, WB_PC4, IMM_J, "jal");
    check(jalr(1, 2, 8),   8'b1000_0101, WB_PC4, IMM_I, "jalr");
    check(beq(1, 2, 8),    8'b0001_0000, WB_ALU, IMM_B, "beq");
    check(bgeu(1, 2, 8),   8'b0001_0000, WB_ALU, IMM_B, "bgeu");
    check(ld(1, 2, 8),     8'b1100_0001, WB_MEM, IMM_I, "ld");
    check(lwu(1, 2, 8),    8'b1100_0001, WB_MEM, IMM_I, "lwu");
    check(sd(1, 2, 8),     8'b0010_0001, WB_ALU, IMM_S, "sd");
    check(sb(1, 2, 8),     8'b0010_0001, WB_ALU, IMM_S, "sb");
    check(FENCE,           8'b0000_0000, WB_ALU, IMM_I, "fence");
    // immediate formats
    checks += 4;
    inst = sd(1, 2, 8); #1;   if (ctrl.imm_sel !== IMM_S) failures++;
    inst = beq(1, 2, 8); #1;  if (ctrl.imm_sel !== IMM_B) failures++;
    inst = jal(1, 8); #1;     if (ctrl.imm_sel !== IMM_J) failures++;
    inst = lui(1, 8); #1;     if (ctrl.opa_sel !== OPA_ZERO) failures++;
    // ALU class
    checks += 3;
    inst = add(1, 2, 3); #1;  if (ctrl.alu_op !== ALUOP_REG) failures++;
    inst = addi(1, 2, 3); #1; if (ctrl.alu_op !== ALUOP_IMM) failures++;
    inst = blt(1, 2, 8); #1;  if (ctrl.alu_op !== ALUOP_BRANCH) failures++;
    // ECALL / EBREAK
    inst = ECALL; #1;  checks++; if (!ctrl.ecall || ctrl.illegal || ctrl.reg_write) begin failures++; $display("FAIL ecall"); end
    inst = EBREAK; #1; checks++; if (!ctrl.ecall || ctrl.illegal) begin failures++; $display("FAIL ebreak"); end
    // illegal encodings
    check_bad(32'hffff_ffff, "all ones");
    check_bad(32'h0000_0000, "all zeros");
    check_bad(r_type(7'h01, 3, 2, 3'd0, 1, 7'b0110011), "mul (not in RV64I)");
    check_bad(r_type(7'h20, 3, 2, 3'd1, 1, 7'b0110011), "sub-form sll");
    check_bad(r_type(7'h00, 3, 2, 3'd2, 1, 7'b0111011), "sltw");
    check_bad(i_type(0, 2, 3'd2, 1, 7'b0011011), "funct3=2 op-imm-32");
    check_bad(i_type('h020, 2, 3'd1, 1, 7'b0011011), "slliw shamt[5]");
    check_bad(i_type('h800, 2, 3'd5, 1, 7'b0010011), "bad srai funct6");
    check_bad(i_type(0, 2, 3'd7, 1, 7'b0000011), "load funct3=7");
    check_bad(s_type(0, 2, 3, 3'd4, 7'b0100011), "store funct3=4");
    check_bad(b_type(8, 1, 2, 3'd2), "branch funct3=2");
    check_bad(i_type(0, 2, 3'd1, 1, 7'b1100111), "jalr funct3=1");
    check_bad(32'h3420_0073, "mret (not in base)");
    for (int i = 0; i < 200; i++) begin
      logic [6:0] op = 7'($urandom);
      if (op inside {7'h03, 7'h0f, 7'h13, 7'h17, 7'h1b, 7'h23, 7'h33, 7'h37, 7'h3b, 7'h63, 7'h67, 7'h6f, 7'h73}) continue;
      check_bad({$urandom} & 32'hffff_ff80 | 32'(op), "random opcode");
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
