// tb_instr_mem: fills the instruction memory through its load port and reads
// every word back by byte address, including the ignored low PC bits and
// address wrap-around, against an array model.
module tb_instr_mem;
  localparam int WORDS = 1024;
  logic clk = 0, we = 0;
  logic [31:0] waddr, wdata, pc, inst;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .we, .waddr, .wdata, .pc, .inst);

  initial begin
    pc = 0;
    for (int i = 0; i < WORDS; i++) begin
      we = 1; waddr = i; wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      pc = $urandom; #1;
      checks++;
      if (inst !== model[(pc >> 2) % WORDS]) begin failures++; $display("FAIL pc=%h inst=%h", pc, inst); end
    end
    // a write with we low must not change anything
    waddr = 5; wdata = ~model[5]; @(posedge clk); #1;
    pc = 20; #1; checks++;
    if (inst !== model[5]) begin failures++; $display("FAIL write without we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
