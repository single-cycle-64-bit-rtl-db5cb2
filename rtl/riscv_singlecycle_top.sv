// riscv_singlecycle_top: a complete single-cycle RV64I system: the core
// (datapath_singlecycle), an instruction memory of IMEM_WORDS 32-bit words
// and a byte-addressed data memory of DMEM_BYTES bytes, both read
// combinationally so that each instruction completes in one clock.
// Programs are written into the instruction memory through prog_we /
// prog_addr (word index) / prog_data, normally while rst is held; after rst
// falls the core starts at address 0 and retires one instruction per rising
// edge of clk, except while sleep is high. pc and exception are brought out
// for observation. Memory sizes and the load port are this design's choice.
module riscv_singlecycle_top #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sleep,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic        exception
);
  logic [31:0] inst, dm_addr;
  logic [63:0] dm_rdata, dm_wdata;
  logic        dm_re, dm_we;
  logic [2:0]  dm_width;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data), .pc, .inst);

  datapath_singlecycle u_core (
    .clkin(clk), .rst, .sleep, .inst,
    .data_mem_data_fetched(dm_rdata),
    .data_mem_read_en(dm_re), .data_mem_write_en(dm_we), .pc,
    .data_mem_addr(dm_addr), .data_mem_write_data(dm_wdata),
    .data_mem_width(dm_width), .exception);

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .read_en(dm_re), .write_en(dm_we), .addr(dm_addr),
    .width(dm_width), .wdata(dm_wdata), .rdata(dm_rdata));
endmodule
