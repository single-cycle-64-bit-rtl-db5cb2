// imm_generator: the "sign extension, shift and shuffle" logic of the core.
// RISC-V scatters immediate bits over the instruction word so that the sign
// bit is always inst[31] and most bits sit in the same place in every format.
// This block reassembles the I, S, B, U and J immediates, puts the implicit
// zero at bit 0 of B and J offsets and the twelve zeros under a U immediate,
// and sign-extends the result to 64 bits. imm_sel picks the format; the
// output is combinational.
// The five formats and the role of this block follow the published design;
// the bit layout is the standard RISC-V one.
module imm_generator
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_e    imm_sel,
  output logic [63:0] imm
);
  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{52{inst[31]}}, inst[31:20]};
      IMM_S:   imm = {{52{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:   imm = {{51{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {{32{inst[31]}}, inst[31:12], 12'b0};
      IMM_J:   imm = {{43{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
