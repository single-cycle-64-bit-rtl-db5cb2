// tb_adder: checks the 64-bit adder against the sum formed bit by bit with a
// ripple carry in the testbench, on corner values and random operands.
module tb_adder;
  logic [63:0] a, b, sum;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  adder #(.WIDTH(64)) dut (.a, .b, .sum);

  function automatic logic [63:0] ripple(logic [63:0] x, y);
    logic c = 0;
    logic [63:0] s;
    for (int i = 0; i < 64; i++) begin
      s[i] = x[i] ^ y[i] ^ c;
      c    = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    return s;
  endfunction

  task automatic check(logic [63:0] x, y);
    a = x; b = y; #1;
    checks++;
    if (sum !== ripple(x, y)) begin
      failures++;
      $display("FAIL %h + %h = %h", x, y, sum);
    end
  endtask

  initial begin
    check(0, 0); check('1, 1); check(64'h7fff_ffff_ffff_ffff, 1); check(64'h1000, 4);
    for (int i = 0; i < 500; i++) check({$urandom, $urandom}, {$urandom, $urandom});
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
