// tb_regfile: random writes and reads of the 32 x 64-bit register bank
// against an array model; checks that x0 stays zero, that reset clears all
// registers and that a write is visible on the read ports after the edge.
module tb_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] rs1, rs2, rd;
  logic [63:0] wd, rd1, rd2;
  logic [63:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  regfile #(.XLEN(64), .NREGS(32)) dut (.clk, .rst, .we, .rs1, .rs2, .rd, .wd, .rd1, .rd2);

  task automatic read_check();
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r); #1;
      checks += 2;
      if (rd1 !== model[r])      begin failures++; $display("FAIL rd1 x%0d %h exp %h", r, rd1, model[r]); end
      if (rd2 !== model[31 - r]) begin failures++; $display("FAIL rd2 x%0d", 31 - r); end
    end
  endtask

  initial begin
    rd = 0; wd = 0; rs1 = 0; rs2 = 0;
    @(posedge clk); #1; rst = 0;
    foreach (model[i]) model[i] = 0;
    read_check();
    for (int i = 0; i < 400; i++) begin
      we = $urandom % 3 != 0; rd = 5'($urandom); wd = {$urandom, $urandom};
      @(posedge clk); #1;
      if (we && rd != 0) model[rd] = wd;
      we = 0;
      rs1 = 5'($urandom); rs2 = rd; #1;
      checks += 2;
      if (rd1 !== model[rs1]) begin failures++; $display("FAIL rd1 x%0d", rs1); end
      if (rd2 !== model[rs2]) begin failures++; $display("FAIL rd2 x%0d %h exp %h", rs2, rd2, model[rs2]); end
    end
    read_check();
    rst = 1; @(posedge clk); #1; rst = 0;
    foreach (model[i]) model[i] = 0;
    read_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
