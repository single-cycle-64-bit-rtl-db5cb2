// alu_control: second-level decoder that turns the ALU class chosen by the
// main decoder (alu_op), funct3 and bit 30 of the instruction (funct7[5])
// into the 4-bit ALU function code.
//   ALUOP_ADD    : always ADD (loads, stores, LUI, AUIPC)
//   ALUOP_BRANCH : SUB for BEQ/BNE, SLT for BLT/BGE, SLTU for BLTU/BGEU
//   ALUOP_REG    : funct3 selects the operation; funct7[5] turns ADD into
//                  SUB and SRL into SRA
//   ALUOP_IMM    : as ALUOP_REG except that funct7[5] only matters for the
//                  right shift (ADDI has no subtract form)
// Combinational. The split into a main decoder and an ALU-control block
// follows the published schematic; the encoding is this design's.
module alu_control
  import riscv_pkg::*;
(
  input  alu_op_e     alu_op,
  input  logic [2:0]  funct3,
  input  logic        funct7_5,
  output alu_funct_e  alu_funct
);
  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_funct = ALU_ADD;
      ALUOP_BRANCH: begin
        unique case (funct3[2:1])
          2'b00:   alu_funct = ALU_SUB;
          2'b10:   alu_funct = ALU_SLT;
          2'b11:   alu_funct = ALU_SLTU;
          default: alu_funct = ALU_SUB;
        endcase
      end
      default: begin  // ALUOP_REG, ALUOP_IMM
        unique case (funct3)
          3'b000:  alu_funct = (alu_op == ALUOP_REG && funct7_5) ? ALU_SUB : ALU_ADD;
          3'b001:  alu_funct = ALU_SLL;
          3'b010:  alu_funct = ALU_SLT;
          3'b011:  alu_funct = ALU_SLTU;
          3'b100:  alu_funct = ALU_XOR;
          3'b101:  alu_funct = funct7_5 ? ALU_SRA : ALU_SRL;
          3'b110:  alu_funct = ALU_OR;
          default: alu_funct = ALU_AND;
        endcase
      end
    endcase
  end
endmodule
