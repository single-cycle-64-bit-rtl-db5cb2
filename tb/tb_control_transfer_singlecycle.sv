// tb_control_transfer_singlecycle: for random operand pairs the testbench
// forms the zero flag that the ALU would give for the comparison each branch
// uses, and checks that the next-PC choice matches the branch condition
// evaluated directly on the operands; also checks JAL, JALR and fall-through.
module tb_control_transfer_singlecycle;
  import riscv_pkg::*;
  logic branch, jal, jalr, result_eq_zero;
  logic [2:0] funct3;
  pc_sel_e pc_sel;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_transfer_singlecycle dut (.branch, .jal, .jalr, .funct3, .result_eq_zero, .pc_sel);

  task automatic check(pc_sel_e exp, string what);
    #1; checks++;
    if (pc_sel !== exp) begin failures++; $display("FAIL %s: pc_sel=%0d exp=%0d", what, pc_sel, exp); end
  endtask

  initial begin
    logic [63:0] a, b;
    logic take;
    int f3s [6] = '{0, 1, 4, 5, 6, 7};
    for (int i = 0; i < 600; i++) begin
      a = {$urandom, $urandom};
      b = ($urandom % 3 == 0) ? a : {$urandom, $urandom};
      funct3 = 3'(f3s[i % 6]);
      case (funct3)
        3'd0: begin take = (a == b);                   result_eq_zero = (a - b) == 0; end
        3'd1: begin take = (a != b);                   result_eq_zero = (a - b) == 0; end
        3'd4: begin take = ($signed(a) <  $signed(b)); result_eq_zero = !($signed(a) < $signed(b)); end
        3'd5: begin take = ($signed(a) >= $signed(b)); result_eq_zero = !($signed(a) < $signed(b)); end
        3'd6: begin take = (a <  b);                   result_eq_zero = !(a < b); end
        default: begin take = (a >= b);                result_eq_zero = !(a < b); end
      endcase
      branch = 1; jal = 0; jalr = 0;
      check(take ? PC_BRANCH : PC_PLUS4, "branch");
    end
    branch = 0; jal = 1; jalr = 0; check(PC_BRANCH, "jal");
    branch = 0; jal = 0; jalr = 1; check(PC_JALR, "jalr");
    branch = 0; jal = 0; jalr = 0; result_eq_zero = 1; funct3 = 0; check(PC_PLUS4, "none");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
