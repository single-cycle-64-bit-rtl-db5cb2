// instr_mem: instruction memory of the single-cycle core, WORDS 32-bit words.
// The core reads it asynchronously: inst is the word at byte address pc
// (pc[1:0] ignored, address wraps modulo the memory size), so fetch and
// execute fit in one clock. A synchronous write port (we, waddr as a word
// index, wdata) loads the program before the core leaves reset. Size and
// load port are this design's choice.
module instr_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic [31:0] pc,
  output logic [31:0] inst
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  assign inst = mem[pc[AW+1:2]];
endmodule
