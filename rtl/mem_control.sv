// mem_control: the memory control logic between the core and its data
// memory. For a load or store it puts the byte address (low 32 bits of the
// address the ALU computed), the access size and signedness (funct3 of the
// instruction, passed on as data_mem_width) and, for a store, the rs2 value
// on the data-memory port. Any byte address is allowed: the memory handles
// accesses that are not aligned to their size. For a load the memory returns
// the addressed bytes right-aligned in data_mem_data_fetched; this block
// keeps the low 1, 2, 4 or 8 bytes and sign-extends (LB, LH, LW) or
// zero-extends (LBU, LHU, LWU) them to 64 bits. width encoding (funct3):
// 0 byte, 1 half, 2 word, 3 double, 4..6 the unsigned byte/half/word forms.
// Combinational; the access completes in the cycle it is issued.
// That loads and stores may be misaligned follows the published design; the
// split of work between this block and the memory is this design's choice.
module mem_control (
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [2:0]  funct3,
  input  logic [63:0] addr,
  input  logic [63:0] store_data,
  input  logic [63:0] fetched,
  output logic        data_mem_read_en,
  output logic        data_mem_write_en,
  output logic [31:0] data_mem_addr,
  output logic [63:0] data_mem_write_data,
  output logic [2:0]  data_mem_width,
  output logic [63:0] load_data
);
  assign data_mem_read_en    = mem_read;
  assign data_mem_write_en   = mem_write;
  assign data_mem_addr       = addr[31:0];
  assign data_mem_write_data = store_data;
  assign data_mem_width      = funct3;

  always_comb begin
    unique case (funct3)
      3'b000:  load_data = {{56{fetched[7]}},  fetched[7:0]};
      3'b001:  load_data = {{48{fetched[15]}}, fetched[15:0]};
      3'b010:  load_data = {{32{fetched[31]}}, fetched[31:0]};
      3'b011:  load_data = fetched;
      3'b100:  load_data = {56'b0, fetched[7:0]};
      3'b101:  load_data = {48'b0, fetched[15:0]};
      3'b110:  load_data = {32'b0, fetched[31:0]};
      default: load_data = '0;
    endcase
  end
endmodule
