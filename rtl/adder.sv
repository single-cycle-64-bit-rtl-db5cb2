// adder: a plain WIDTH-bit two's-complement adder with no carry in or out.
// The core uses two of them beside the ALU, one to form PC+4 and one to form
// PC+immediate for branches and JAL, so target addresses never pass through
// the ALU. Purely combinational. Width 64 follows the RV64I program counter.
module adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  always_comb sum = a + b;
endmodule
