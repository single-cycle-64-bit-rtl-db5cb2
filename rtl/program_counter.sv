// program_counter: the XLEN-bit program counter register of the single-cycle
// core. On each rising clock edge it loads pc_next when en is high; a
// synchronous reset clears it to address 0. en is low while the core sleeps,
// so the PC holds. The 64-bit width is the RV64I architectural PC; the reset
// address 0 and the enable are this design's choice.
module program_counter #(
  parameter int unsigned XLEN = 64
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [XLEN-1:0] pc_next,
  output logic [XLEN-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end
endmodule
