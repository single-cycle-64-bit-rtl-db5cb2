// control_transfer_singlecycle: decides where the next instruction comes
// from. For a conditional branch the ALU has already computed SUB (BEQ/BNE),
// SLT (BLT/BGE) or SLTU (BLTU/BGEU); the branch is taken when the zero flag
// of that result matches the condition:
//   BEQ, BGE, BGEU taken when result_eq_zero = 1
//   BNE, BLT, BLTU taken when result_eq_zero = 0
// which reduces to taken = result_eq_zero ^ funct3[0] ^ funct3[2]. JAL and
// taken branches select PC+immediate, JALR selects the register-relative
// target, and everything else selects PC+4. Combinational; decided in the
// same cycle as the instruction executes.
// That the ALU evaluates the condition and the control logic then decides
// follows the published design; the encoding is this design's.
module control_transfer_singlecycle
  import riscv_pkg::*;
(
  input  logic       branch,
  input  logic       jal,
  input  logic       jalr,
  input  logic [2:0] funct3,
  input  logic       result_eq_zero,
  output pc_sel_e    pc_sel
);
  logic cond;
  assign cond = result_eq_zero ^ funct3[0] ^ funct3[2];

  always_comb begin
    if (jalr)                     pc_sel = PC_JALR;
    else if (jal | (branch & cond)) pc_sel = PC_BRANCH;
    else                          pc_sel = PC_PLUS4;
  end
endmodule
