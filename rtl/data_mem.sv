// data_mem: byte-addressed data memory of BYTES bytes. A read returns the
// eight bytes starting at addr, right-aligned (byte addr in bits 7:0), with
// the read combinational so that a load completes in its own cycle; the core
// keeps as many bytes as the access needs. A write stores the low 1, 2, 4 or
// 8 bytes of wdata (size = 2**width[1:0], width being the load/store funct3)
// at addr, addr+1, ... on the rising clock edge. Any alignment is accepted;
// addresses wrap modulo BYTES. Size and wrap-around are this design's choice.
module data_mem #(
  parameter int unsigned BYTES = 4096,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic        read_en,
  input  logic        write_en,
  input  logic [31:0] addr,
  input  logic [2:0]  width,
  input  logic [63:0] wdata,
  output logic [63:0] rdata
);
  logic [7:0]    mem [BYTES];
  logic [AW-1:0] base;
  logic [3:0]    nbytes;

  assign base   = addr[AW-1:0];
  assign nbytes = 4'd1 << width[1:0];

  always_ff @(posedge clk) begin
    if (write_en) begin
      for (int i = 0; i < 8; i++)
        if (4'(i) < nbytes) mem[base + AW'(i)] <= wdata[8*i +: 8];
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) rdata[8*i +: 8] = mem[base + AW'(i)];
  end

  // A single-cycle core never loads and stores in the same instruction
  a_rw_exclusive: assert property (@(posedge clk) !(read_en && write_en));
endmodule
