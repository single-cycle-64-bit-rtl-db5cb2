// alu32: the 32-bit ALU used by the RV64I word instructions (ADDIW, SLLIW,
// SRLIW, SRAIW, ADDW, SUBW, SLLW, SRLW, SRAW). It works on the low 32 bits of
// both operands only, shifts by operand_b[4:0], and sign-extends bit 31 of
// the 32-bit result to 64 bits, which keeps 32-bit values sign-extended in
// the registers as RV64I specifies. The other function codes are also
// computed on 32 bits and sign-extended, for completeness. Combinational;
// the same 4-bit function code as the 64-bit ALU.
// A separate 32-bit ALU appears in the published schematic; its insides are
// this design's.
module alu32
  import riscv_pkg::*;
(
  input  alu_funct_e  alu_funct,
  input  logic [63:0] operand_a,
  input  logic [63:0] operand_b,
  output logic [63:0] result
);
  logic [31:0] a, b, r;
  logic [4:0]  shamt;

  assign a = operand_a[31:0];
  assign b = operand_b[31:0];
  assign shamt = b[4:0];

  always_comb begin
    unique case (alu_funct)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a - b;
      ALU_SLL:  r = a << shamt;
      ALU_SLT:  r = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_XOR:  r = a ^ b;
      ALU_SRL:  r = a >> shamt;
      ALU_SRA:  r = $unsigned($signed(a) >>> shamt);
      ALU_OR:   r = a | b;
      ALU_AND:  r = a & b;
      default:  r = '0;
    endcase
  end

  assign result = {{32{r[31]}}, r};
endmodule
