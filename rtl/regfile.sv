// regfile: the integer register bank of the RV64I core, NREGS registers of
// XLEN bits (x0..x31). Two combinational read ports serve rs1 and rs2 in the
// same cycle as decode; one write port stores rd on the rising clock edge
// when we is high. Register x0 always reads as zero and writes to it are
// dropped. All registers clear on reset so that a program never reads an
// undefined value.
// The 32 x 64-bit architectural state is RV64I's; the two-read/one-write
// arrangement follows the published block diagram, and the reset clearing
// is this design's choice.
module regfile #(
  parameter int unsigned XLEN  = 64,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            we,
  input  logic [AW-1:0]   rs1,
  input  logic [AW-1:0]   rs2,
  input  logic [AW-1:0]   rd,
  input  logic [XLEN-1:0] wd,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rd != '0) begin
      regs[rd] <= wd;
    end
  end

  always_comb begin
    rd1 = (rs1 == '0) ? '0 : regs[rs1];
    rd2 = (rs2 == '0) ? '0 : regs[rs2];
  end
endmodule
