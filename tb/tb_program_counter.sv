// tb_program_counter: checks reset to 0, loading pc_next while enabled and
// holding while disabled, against a register model in the testbench.
module tb_program_counter;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] pc_next, pc, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  program_counter #(.XLEN(64)) dut (.clk, .rst, .en, .pc_next, .pc);

  initial begin
    pc_next = 64'hdead_beef_0000_1234;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset %h", pc); end
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 4) != 0;
      pc_next = {$urandom, $urandom};
      @(posedge clk);
      if (en) model = pc_next;
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc %h exp %h", pc, model); end
    end
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
