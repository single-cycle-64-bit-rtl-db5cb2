// tb_data_mem: random stores of 1, 2, 4 and 8 bytes at any alignment
// (including across the wrap-around point) and random reads, compared with a
// byte-array model; every read returns the eight bytes from the address up.
module tb_data_mem;
  localparam int BYTES = 4096;
  logic clk = 0, re = 0, we = 0;
  logic [31:0] addr;
  logic [2:0] width;
  logic [63:0] wdata, rdata, exp;
  byte unsigned model [BYTES];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  data_mem #(.BYTES(BYTES)) dut (.clk, .read_en(re), .write_en(we), .addr, .width, .wdata, .rdata);

  initial begin
    width = 3; wdata = 0;
    for (int a = 0; a < BYTES; a += 8) begin
      we = 1; addr = a; @(posedge clk); #1;
    end
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      addr = ($urandom % 8 == 0) ? BYTES - 1 - ($urandom % 8) : $urandom;
      if ($urandom % 2) begin
        we = 1; re = 0; width = 3'($urandom % 7); wdata = {$urandom, $urandom};
        @(posedge clk); #1;
        for (int b = 0; b < (1 << width[1:0]); b++) model[(addr + b) % BYTES] = wdata[8 * b +: 8];
        we = 0;
      end else begin
        re = 1; #1;
        for (int b = 0; b < 8; b++) exp[8 * b +: 8] = model[(addr + b) % BYTES];
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL addr=%h rdata=%h exp=%h", addr, rdata, exp); end
        re = 0;
      end
    end
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
