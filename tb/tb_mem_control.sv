// tb_mem_control: checks that the request fields reach the data-memory port
// unchanged and that loaded data is cut to 1, 2, 4 or 8 bytes and sign- or
// zero-extended as each load kind requires, on random data.
module tb_mem_control;
  logic mem_read, mem_write;
  logic [2:0] funct3;
  logic [63:0] addr, store_data, fetched, load_data, wdata;
  logic re, we;
  logic [31:0] maddr;
  logic [2:0] width;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mem_control dut (.mem_read, .mem_write, .funct3, .addr, .store_data, .fetched,
                   .data_mem_read_en(re), .data_mem_write_en(we), .data_mem_addr(maddr),
                   .data_mem_write_data(wdata), .data_mem_width(width), .load_data);

  function automatic logic [63:0] expect_load(logic [2:0] f, logic [63:0] d);
    int n = 1 << f[1:0];
    logic [63:0] v = 0;
    for (int i = 0; i < 8 * n && i < 64; i++) v[i] = d[i];
    if (!f[2] && n < 8) for (int i = 8 * n; i < 64; i++) v[i] = d[8 * n - 1];
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 700; i++) begin
      mem_read = $urandom % 2; mem_write = !mem_read;
      funct3 = 3'(i % 7);
      addr = {$urandom, $urandom}; store_data = {$urandom, $urandom}; fetched = {$urandom, $urandom};
      #1;
      checks += 2;
      if (re !== mem_read || we !== mem_write || maddr !== addr[31:0] || wdata !== store_data || width !== funct3) begin
        failures++; $display("FAIL request fields");
      end
      if (load_data !== expect_load(funct3, fetched)) begin
        failures++; $display("FAIL f3=%0d fetched=%h load=%h", funct3, fetched, load_data);
      end
    end
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
