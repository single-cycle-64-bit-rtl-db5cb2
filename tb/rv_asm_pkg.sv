// rv_asm_pkg: RV64I instruction encoders for the testbenches. Each function
// returns the 32-bit machine word of one instruction, built field by field
// from the RISC-V base encoding (R, I, S, B, U and J formats), so programs
// can be written in the testbench without an external assembler.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input longint imm, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input longint imm, input int rs2, rs1,
                                         input logic [2:0] f3, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], op};
  endfunction
  function automatic logic [31:0] b_type(input longint imm, input int rs2, rs1,
                                         input logic [2:0] f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(input longint imm20, input int rd, input logic [6:0] op);
    logic [19:0] i = 20'(imm20);
    return {i, 5'(rd), op};
  endfunction
  function automatic logic [31:0] j_type(input longint imm, input int rd);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  // register-register
  function automatic logic [31:0] add (int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sll (int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slt (int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sltu(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] srl (int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sra (int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] or_ (int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] and_(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd7, rd, 7'b0110011); endfunction
  function automatic logic [31:0] addw(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd0, rd, 7'b0111011); endfunction
  function automatic logic [31:0] subw(int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd0, rd, 7'b0111011); endfunction
  function automatic logic [31:0] sllw(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd1, rd, 7'b0111011); endfunction
  function automatic logic [31:0] srlw(int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd5, rd, 7'b0111011); endfunction
  function automatic logic [31:0] sraw(int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd5, rd, 7'b0111011); endfunction
  // register-immediate
  function automatic logic [31:0] addi (int rd, rs1, longint imm); return i_type(imm, rs1, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] slti (int rd, rs1, longint imm); return i_type(imm, rs1, 3'd2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] sltiu(int rd, rs1, longint imm); return i_type(imm, rs1, 3'd3, rd, 7'b0010011); endfunction
  function automatic logic [31:0] xori (int rd, rs1, longint imm); return i_type(imm, rs1, 3'd4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ori  (int rd, rs1, longint imm); return i_type(imm, rs1, 3'd6, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi (int rd, rs1, longint imm); return i_type(imm, rs1, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] slli (int rd, rs1, int sh); return i_type(longint'(sh & 63), rs1, 3'd1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srli (int rd, rs1, int sh); return i_type(longint'(sh & 63), rs1, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srai (int rd, rs1, int sh); return i_type(longint'((sh & 63) | 'h400), rs1, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] addiw(int rd, rs1, longint imm); return i_type(imm, rs1, 3'd0, rd, 7'b0011011); endfunction
  function automatic logic [31:0] slliw(int rd, rs1, int sh); return i_type(longint'(sh & 31), rs1, 3'd1, rd, 7'b0011011); endfunction
  function automatic logic [31:0] srliw(int rd, rs1, int sh); return i_type(longint'(sh & 31), rs1, 3'd5, rd, 7'b0011011); endfunction
  function automatic logic [31:0] sraiw(int rd, rs1, int sh); return i_type(longint'((sh & 31) | 'h400), rs1, 3'd5, rd, 7'b0011011); endfunction
  // upper immediates and jumps
  function automatic logic [31:0] lui  (int rd, longint imm20); return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] auipc(int rd, longint imm20); return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] jal  (int rd, longint off); return j_type(off, rd); endfunction
  function automatic logic [31:0] jalr (int rd, rs1, longint off); return i_type(off, rs1, 3'd0, rd, 7'b1100111); endfunction
  // branches
  function automatic logic [31:0] beq (int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] bne (int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] blt (int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd4); endfunction
  function automatic logic [31:0] bge (int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd5); endfunction
  function automatic logic [31:0] bltu(int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd6); endfunction
  function automatic logic [31:0] bgeu(int rs1, rs2, longint off); return b_type(off, rs2, rs1, 3'd7); endfunction
  // loads and stores
  function automatic logic [31:0] lb (int rd, rs1, longint off); return i_type(off, rs1, 3'd0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lh (int rd, rs1, longint off); return i_type(off, rs1, 3'd1, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lw (int rd, rs1, longint off); return i_type(off, rs1, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] ld (int rd, rs1, longint off); return i_type(off, rs1, 3'd3, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lbu(int rd, rs1, longint off); return i_type(off, rs1, 3'd4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lhu(int rd, rs1, longint off); return i_type(off, rs1, 3'd5, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lwu(int rd, rs1, longint off); return i_type(off, rs1, 3'd6, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sb (int rs2, rs1, longint off); return s_type(off, rs2, rs1, 3'd0, 7'b0100011); endfunction
  function automatic logic [31:0] sh (int rs2, rs1, longint off); return s_type(off, rs2, rs1, 3'd1, 7'b0100011); endfunction
  function automatic logic [31:0] sw (int rs2, rs1, longint off); return s_type(off, rs2, rs1, 3'd2, 7'b0100011); endfunction
  function automatic logic [31:0] sd (int rs2, rs1, longint off); return s_type(off, rs2, rs1, 3'd3, 7'b0100011); endfunction
  // system
  localparam logic [31:0] ECALL  = 32'h0000_0073;
  localparam logic [31:0] EBREAK = 32'h0010_0073;
  localparam logic [31:0] FENCE  = 32'h0ff0_000f;
  localparam logic [31:0] NOP    = 32'h0000_0013;

endpackage
