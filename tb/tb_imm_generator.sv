// tb_imm_generator: encodes random immediates into I, S, B, U and J
// instructions with the encoders of rv_asm_pkg and checks that the generator
// recovers each value, sign-extended to 64 bits.
module tb_imm_generator;
  import riscv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst;
  imm_sel_e    imm_sel;
  logic [63:0] imm;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  imm_generator dut (.inst, .imm_sel, .imm);

  task automatic check(logic [31:0] w, imm_sel_e s, longint exp);
    inst = w; imm_sel = s; #1;
    checks++;
    if (imm !== 64'(exp)) begin
      failures++;
      $display("FAIL sel=%0d inst=%h imm=%h exp=%h", s, w, imm, exp);
    end
  endtask

  initial begin
    longint v;
    for (int i = 0; i < 200; i++) begin
      v = longint'($signed(12'($urandom)));
      check(i_type(v, $urandom % 32, 3'($urandom), $urandom % 32, 7'h13), IMM_I, v);
      check(s_type(v, $urandom % 32, $urandom % 32, 3'($urandom), 7'h23), IMM_S, v);
      v = longint'($signed(13'($urandom))) & ~longint'(1);
      check(b_type(v, $urandom % 32, $urandom % 32, 3'($urandom)), IMM_B, v);
      v = longint'($signed(20'($urandom)));
      check(u_type(v, $urandom % 32, 7'h37), IMM_U, v * 4096);
      v = longint'($signed(21'($urandom))) & ~longint'(1);
      check(j_type(v, $urandom % 32), IMM_J, v);
    end
    check(i_type(-1, 0, 0, 0, 7'h13), IMM_I, -1);
    check(b_type(-4096, 0, 0, 0), IMM_B, -4096);
    check(j_type(1048574, 0), IMM_J, 1048574);
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
