// datapath_singlecycle: a single-cycle, in-order RV64I processor core. Every
// instruction is fetched, decoded, executed, given its memory access and
// written back within one clock period, so one instruction retires per
// cycle; the only state is the 64-bit PC and the 32 x 64-bit register bank.
// Instruction and data memories sit outside, on the port list of the
// published top level (clkin, rst, sleep, inst, data_mem_*, pc).
//
// Inside, following the published schematic:
//   program_counter  64-bit PC; adder_pc_plus_4 forms PC+4 every cycle
//   control_singlecycle + alu_control  combinational decode of inst
//   imm_generator    sign extension, shift and shuffle of the immediate
//   regfile          two read ports (rs1, rs2), one write port (rd)
//   alu / alu32      64-bit ALU and 32-bit ALU for the *W instructions;
//                    operand muxes choose rs1/PC/0 and rs2/immediate
//   control_transfer_singlecycle  branch decision from the ALU zero flag
//   adder_pc_plus_immediate  dedicated target adder: PC+imm for branches
//                    and JAL, rs1+imm (bit 0 cleared) for JALR; the ALU
//                    never computes a jump target
//   mem_control      load/store request and load sign/zero extension
//   write-back mux   ALU result, loaded data or PC+4
//
// sleep: while high the PC holds and no register or memory write or memory
// read is issued, so the core freezes on the current instruction. The
// document names this input without describing it; this behaviour is this
// design's choice. rst is synchronous and clears the PC and registers.
// The pc and data_mem_addr outputs carry the low 32 bits of the 64-bit
// addresses, as on the published port list.
// exception is an addition to that port list: it is high during an illegal
// instruction, ECALL or EBREAK, which then do nothing but advance the PC.
module datapath_singlecycle
  import riscv_pkg::*;
(
  input  logic        clkin,
  input  logic        rst,
  input  logic        sleep,
  input  logic [31:0] inst,
  input  logic [63:0] data_mem_data_fetched,
  output logic        data_mem_read_en,
  output logic        data_mem_write_en,
  output logic [31:0] pc,
  output logic [31:0] data_mem_addr,
  output logic [63:0] data_mem_write_data,
  output logic [2:0]  data_mem_width,
  output logic        exception
);
  logic        run;
  ctrl_t       ctrl;
  logic [63:0] pc_q, pc_next, pc_plus4, target_base, target, imm;
  logic [63:0] rs1_data, rs2_data, operand_a, operand_b;
  logic [63:0] alu64_result, alu32_result, alu_result, load_data, wb_data;
  logic        result_eq_zero;
  alu_funct_e  alu_funct;
  pc_sel_e     pc_sel;
  logic        mem_rd, mem_wr;

  assign run = !sleep;

  // ---------------- fetch ----------------
  program_counter #(.XLEN(64)) program_counter (
    .clk(clkin), .rst, .en(run), .pc_next, .pc(pc_q));

  adder #(.WIDTH(64)) adder_pc_plus_4 (.a(pc_q), .b(64'd4), .sum(pc_plus4));

  assign pc = pc_q[31:0];

  // ---------------- decode ----------------
  control_singlecycle control_singlecycle (.inst, .ctrl);

  imm_generator imm_generator (.inst, .imm_sel(ctrl.imm_sel), .imm);

  alu_control alu_control (
    .alu_op(ctrl.alu_op), .funct3(inst[14:12]), .funct7_5(inst[30]), .alu_funct);

  // ---------------- register bank ----------------
  regfile #(.XLEN(64), .NREGS(32)) regfile (
    .clk(clkin), .rst,
    .we(ctrl.reg_write & run),
    .rs1(inst[19:15]), .rs2(inst[24:20]), .rd(inst[11:7]),
    .wd(wb_data), .rd1(rs1_data), .rd2(rs2_data));

  // ---------------- execute ----------------
  always_comb begin
    unique case (ctrl.opa_sel)
      OPA_PC:   operand_a = pc_q;
      OPA_ZERO: operand_a = '0;
      default:  operand_a = rs1_data;
    endcase
    operand_b = ctrl.opb_imm ? imm : rs2_data;
  end

  alu alu (
    .alu_funct, .operand_a, .operand_b, .result(alu64_result), .result_eq_zero);

  alu32 alu32 (.alu_funct, .operand_a, .operand_b, .result(alu32_result));

  assign alu_result = ctrl.word_op ? alu32_result : alu64_result;

  // ---------------- next PC ----------------
  control_transfer_singlecycle control_transfer_singlecycle (
    .branch(ctrl.branch), .jal(ctrl.jal), .jalr(ctrl.jalr),
    .funct3(inst[14:12]), .result_eq_zero, .pc_sel);

  assign target_base = ctrl.jalr ? rs1_data : pc_q;
  adder #(.WIDTH(64)) adder_pc_plus_immediate (.a(target_base), .b(imm), .sum(target));

  always_comb begin
    unique case (pc_sel)
      PC_BRANCH: pc_next = target;
      PC_JALR:   pc_next = {target[63:1], 1'b0};
      default:   pc_next = pc_plus4;
    endcase
  end

  // ---------------- memory ----------------
  assign mem_rd = ctrl.mem_read & run;
  assign mem_wr = ctrl.mem_write & run;

  mem_control mem_control (
    .mem_read(mem_rd), .mem_write(mem_wr), .funct3(inst[14:12]),
    .addr(alu_result), .store_data(rs2_data), .fetched(data_mem_data_fetched),
    .data_mem_read_en, .data_mem_write_en, .data_mem_addr,
    .data_mem_write_data, .data_mem_width, .load_data);

  // ---------------- write back ----------------
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = load_data;
      WB_PC4:  wb_data = pc_plus4;
      default: wb_data = alu_result;
    endcase
  end

  assign exception = ctrl.illegal | ctrl.ecall;
endmodule
