// riscv_pkg: types and constants shared by the single-cycle RV64I core.
// It holds the RV64I major opcodes, the 4-bit ALU function code driven on
// alu_funct[3:0], the immediate-format selector, the ALU class seen by
// alu_control, the next-PC selector and the control-signal bundle that the
// main decoder hands to the datapath. The opcodes are the RV64I standard
// ones; the ALU code values and the bundle layout are this design's choice.
package riscv_pkg;

  // RV64I major opcodes (inst[6:0])
  localparam logic [6:0] OP_LOAD     = 7'b0000011;
  localparam logic [6:0] OP_MISC_MEM = 7'b0001111;
  localparam logic [6:0] OP_IMM      = 7'b0010011;
  localparam logic [6:0] OP_AUIPC    = 7'b0010111;
  localparam logic [6:0] OP_IMM_32   = 7'b0011011;
  localparam logic [6:0] OP_STORE    = 7'b0100011;
  localparam logic [6:0] OP_OP       = 7'b0110011;
  localparam logic [6:0] OP_LUI      = 7'b0110111;
  localparam logic [6:0] OP_OP_32    = 7'b0111011;
  localparam logic [6:0] OP_BRANCH   = 7'b1100011;
  localparam logic [6:0] OP_JALR     = 7'b1100111;
  localparam logic [6:0] OP_JAL      = 7'b1101111;
  localparam logic [6:0] OP_SYSTEM   = 7'b1110011;

  // ALU function, 4 bits wide as on the ALU symbol
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_funct_e;

  // Class of ALU work requested by the main decoder
  typedef enum logic [1:0] {
    ALUOP_ADD    = 2'd0,  // address / link computation, LUI/AUIPC
    ALUOP_BRANCH = 2'd1,  // branch condition
    ALUOP_REG    = 2'd2,  // OP / OP-32 (funct7 selects SUB / SRA)
    ALUOP_IMM    = 2'd3   // OP-IMM / OP-IMM-32 (only shifts look at funct7)
  } alu_op_e;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_sel_e;

  // Operand A source
  typedef enum logic [1:0] {
    OPA_RS1  = 2'd0,
    OPA_PC   = 2'd1,
    OPA_ZERO = 2'd2
  } opa_sel_e;

  // Register write-back source
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  // Next-PC source
  typedef enum logic [1:0] {
    PC_PLUS4  = 2'd0,
    PC_BRANCH = 2'd1,  // PC + immediate (branch taken, JAL)
    PC_JALR   = 2'd2   // (rs1 + immediate) & ~1
  } pc_sel_e;

  typedef struct packed {
    logic       reg_write;
    logic       mem_read;
    logic       mem_write;
    logic       branch;
    logic       jal;
    logic       jalr;
    logic       word_op;    // RV64I *W instruction: use the 32-bit ALU
    logic       opb_imm;    // operand B is the immediate
    opa_sel_e   opa_sel;
    wb_sel_e    wb_sel;
    imm_sel_e   imm_sel;
    alu_op_e    alu_op;
    logic       illegal;    // unknown opcode or funct field
    logic       ecall;      // ECALL / EBREAK
  } ctrl_t;

endpackage
