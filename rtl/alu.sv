// alu: the 64-bit arithmetic and logic unit of the core. It performs the ten
// RV64I register-register / register-immediate operations (add, sub, shift
// left, logical and arithmetic shift right, signed and unsigned set-less-than,
// xor, or, and) selected by the 4-bit alu_funct code from riscv_pkg. Shifts
// use the low six bits of operand_b, as RV64I requires. result_eq_zero is
// high when the result is all zeros; the branch logic reads it after a SUB
// (equal / not equal) or an SLT/SLTU (less than / greater or equal), so the
// ALU is the only comparator. Purely combinational. The port names and widths
// are those of the published ALU symbol; the function codes are this design's.
module alu
  import riscv_pkg::*;
(
  input  alu_funct_e  alu_funct,
  input  logic [63:0] operand_a,
  input  logic [63:0] operand_b,
  output logic [63:0] result,
  output logic        result_eq_zero
);
  logic [5:0] shamt;
  assign shamt = operand_b[5:0];

  always_comb begin
    unique case (alu_funct)
      ALU_ADD:  result = operand_a + operand_b;
      ALU_SUB:  result = operand_a - operand_b;
      ALU_SLL:  result = operand_a << shamt;
      ALU_SLT:  result = {63'b0, $signed(operand_a) < $signed(operand_b)};
      ALU_SLTU: result = {63'b0, operand_a < operand_b};
      ALU_XOR:  result = operand_a ^ operand_b;
      ALU_SRL:  result = operand_a >> shamt;
      ALU_SRA:  result = $unsigned($signed(operand_a) >>> shamt);
      ALU_OR:   result = operand_a | operand_b;
      ALU_AND:  result = operand_a & operand_b;
      default:  result = '0;
    endcase
  end

  assign result_eq_zero = (result == '0);
endmodule
