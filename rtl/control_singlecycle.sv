// control_singlecycle: the main instruction decoder of the single-cycle core.
// It is purely combinational: from the 32-bit instruction it produces, in the
// same cycle, every control signal the datapath needs (register write,
// memory read/write, branch/jump kind, use of the 32-bit ALU for the RV64I
// *W instructions, operand sources, write-back source, immediate format and
// ALU class), packed in riscv_pkg::ctrl_t.
// It also checks the funct3/funct7 fields of each opcode against the RV64I
// base encoding and raises 'illegal' for anything outside it; an illegal
// instruction has all write enables cleared. ECALL and EBREAK raise 'ecall'
// and otherwise behave as no-ops, as does FENCE. The set of opcodes is the
// RV64I base ISA; the way exceptions are signalled is this design's choice.
module control_singlecycle
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic       f7_zero, f7_alt;

  assign opcode  = inst[6:0];
  assign funct3  = inst[14:12];
  assign funct7  = inst[31:25];
  assign f7_zero = (funct7 == 7'b0000000);
  assign f7_alt  = (funct7 == 7'b0100000);

  always_comb begin
    ctrl = '{reg_write: 1'b0, mem_read: 1'b0, mem_write: 1'b0, branch: 1'b0,
             jal: 1'b0, jalr: 1'b0, word_op: 1'b0, opb_imm: 1'b0,
             opa_sel: OPA_RS1, wb_sel: WB_ALU, imm_sel: IMM_I,
             alu_op: ALUOP_ADD, illegal: 1'b0, ecall: 1'b0};
    unique case (opcode)
      OP_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.opa_sel = OPA_ZERO; ctrl.opb_imm = 1'b1;
        ctrl.imm_sel = IMM_U;
      end
      OP_AUIPC: begin
        ctrl.reg_write = 1'b1; ctrl.opa_sel = OPA_PC; ctrl.opb_imm = 1'b1;
        ctrl.imm_sel = IMM_U;
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1; ctrl.jal = 1'b1; ctrl.wb_sel = WB_PC4;
        ctrl.imm_sel = IMM_J;
      end
      OP_JALR: begin
        ctrl.reg_write = 1'b1; ctrl.jalr = 1'b1; ctrl.wb_sel = WB_PC4;
        ctrl.imm_sel = IMM_I; ctrl.opb_imm = 1'b1;
        ctrl.illegal = (funct3 != 3'b000);
      end
      OP_BRANCH: begin
        ctrl.branch = 1'b1; ctrl.imm_sel = IMM_B; ctrl.alu_op = ALUOP_BRANCH;
        ctrl.illegal = (funct3[2:1] == 2'b01);
      end
      OP_LOAD: begin
        ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1; ctrl.wb_sel = WB_MEM;
        ctrl.opb_imm = 1'b1; ctrl.imm_sel = IMM_I;
        ctrl.illegal = (funct3 == 3'b111);
      end
      OP_STORE: begin
        ctrl.mem_write = 1'b1; ctrl.opb_imm = 1'b1; ctrl.imm_sel = IMM_S;
        ctrl.illegal = funct3[2];
      end
      OP_IMM: begin
        ctrl.reg_write = 1'b1; ctrl.opb_imm = 1'b1; ctrl.alu_op = ALUOP_IMM;
        // 64-bit shifts take a 6-bit shamt, so only funct7[6:1] is checked
        if (funct3 == 3'b001)      ctrl.illegal = (inst[31:26] != 6'b000000);
        else if (funct3 == 3'b101) ctrl.illegal = (inst[31:26] != 6'b000000) &&
                                                  (inst[31:26] != 6'b010000);
      end
      OP_IMM_32: begin
        ctrl.reg_write = 1'b1; ctrl.opb_imm = 1'b1; ctrl.alu_op = ALUOP_IMM;
        ctrl.word_op = 1'b1;
        unique case (funct3)
          3'b000:  ctrl.illegal = 1'b0;
          3'b001:  ctrl.illegal = !f7_zero;
          3'b101:  ctrl.illegal = !(f7_zero || f7_alt);
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OP_OP: begin
        ctrl.reg_write = 1'b1; ctrl.alu_op = ALUOP_REG;
        ctrl.illegal = !(f7_zero || (f7_alt && (funct3 == 3'b000 || funct3 == 3'b101)));
      end
      OP_OP_32: begin
        ctrl.reg_write = 1'b1; ctrl.alu_op = ALUOP_REG; ctrl.word_op = 1'b1;
        ctrl.illegal = !(funct3 == 3'b000 || funct3 == 3'b001 || funct3 == 3'b101) ||
                       !(f7_zero || (f7_alt && (funct3 == 3'b000 || funct3 == 3'b101)));
      end
      OP_MISC_MEM: begin
        ctrl.illegal = (funct3 != 3'b000);   // FENCE: no-op in this in-order core
      end
      OP_SYSTEM: begin
        if (inst == 32'h0000_0073 || inst == 32'h0010_0073) ctrl.ecall = 1'b1;
        else                                                 ctrl.illegal = 1'b1;
      end
      default: ctrl.illegal = 1'b1;
    endcase
    if (ctrl.illegal) begin
      ctrl.reg_write = 1'b0; ctrl.mem_read = 1'b0; ctrl.mem_write = 1'b0;
      ctrl.branch = 1'b0; ctrl.jal = 1'b0; ctrl.jalr = 1'b0;
    end
  end
endmodule
