// tb_datapath_singlecycle: tests the core on its own, with the instruction
// and data memories modelled in the testbench (combinational reads, writes
// on the clock edge). Every cycle it compares the core's outputs - pc,
// data_mem_read_en / write_en, data_mem_addr, data_mem_width,
// data_mem_write_data and exception - with what the reference model rv_iss
// says the current instruction does; with sleep high no memory request may
// be issued and the PC must hold. Random programs with loads, stores,
// branches and jumps are run, and the registers are compared at the end.
module tb_datapath_singlecycle;
  import rv_asm_pkg::*;
  import rv_iss_pkg::*;

  localparam int IW = 256, DB = 1024;
  logic clk = 0, rst = 1, sleep = 0;
  logic [31:0] inst, pc, maddr;
  logic [63:0] fetched, wdata;
  logic re, we, exception;
  logic [2:0] width;
  logic [31:0] imem [IW];
  byte unsigned dmem [DB];
  int checks = 0, failures = 0, n_loads = 0, n_stores = 0, n_sleep = 0;
  rv_iss iss;
  always #5 clk = ~clk;

  datapath_singlecycle dut (
    .clkin(clk), .rst, .sleep, .inst, .data_mem_data_fetched(fetched),
    .data_mem_read_en(re), .data_mem_write_en(we), .pc, .data_mem_addr(maddr),
    .data_mem_write_data(wdata), .data_mem_width(width), .exception);

  always_comb begin
    inst = imem[(pc >> 2) % IW];
    for (int b = 0; b < 8; b++) fetched[8 * b +: 8] = dmem[(maddr + b) % DB];
  end
  always @(posedge clk)
    if (we) for (int b = 0; b < (1 << width[1:0]); b++) dmem[(maddr + b) % DB] <= wdata[8 * b +: 8];

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL %s", m);
  endtask

  function automatic logic [31:0] pick(int i, int len);
    int rd = 1 + $urandom % 29, r1 = $urandom % 30, r2 = $urandom % 30;
    longint off = longint'($urandom % 100) - 50;
    int fwd = (i + 3 < len) ? 4 * (1 + $urandom % 3) : 4;
    case ($urandom % 10)
      0: return add(rd, r1, r2);
      1: return addi(rd, r1, longint'($signed(12'($urandom))));
      2: return lui(rd, longint'($urandom));
      3: return addw(rd, r1, r2);
      4: case ($urandom % 4) 0: return ld(rd, 30, off); 1: return lw(rd, 30, off);
                               2: return lhu(rd, 30, off); default: return lb(rd, 30, off); endcase
      5: case ($urandom % 4) 0: return sd(r2, 30, off); 1: return sw(r2, 30, off);
                               2: return sh(r2, 30, off); default: return sb(r2, 30, off); endcase
      6: return bne(r1, r2, fwd);
      7: return blt(r1, r2, fwd);
      8: return jal(rd, fwd);
      default: return (($urandom % 10) == 0) ? 32'hffff_ffff : sraiw(rd, r1, $urandom % 32);
    endcase
  endfunction

  initial begin
    step_info_t s;
    for (int p = 0; p < 10; p++) begin
      int len = 200;
      iss = new(DB, IW);
      foreach (imem[i]) imem[i] = jal(0, 0);
      imem[0] = addi(30, 0, 'h100);
      for (int i = 1; i < len; i++) imem[i] = pick(i, len);
      foreach (imem[i]) iss.imem[i] = imem[i];
      foreach (dmem[i]) begin dmem[i] = byte'($urandom); iss.dmem[i] = dmem[i]; end
      rst = 1; @(posedge clk); #1; rst = 0;
      for (int c = 0; c < len + 20; c++) begin
        sleep = ($urandom % 6 == 0);
        #1;
        checks++;
        if (pc !== iss.pc[31:0]) fail($sformatf("pc %h exp %h", pc, iss.pc[31:0]));
        if (sleep) begin
          n_sleep++;
          checks++;
          if (re || we) fail("memory request while asleep");
        end else begin
          s = iss.step();
          checks += 2;
          if (re !== s.load || we !== s.store) fail($sformatf("re/we %0b%0b exp %0b%0b at %h", re, we, s.load, s.store, pc));
          if (exception !== s.exc) fail($sformatf("exception at %h", pc));
          if (s.load || s.store) begin
            checks++;
            if (maddr !== s.maddr[31:0] || width !== inst[14:12]) fail($sformatf("addr %h exp %h", maddr, s.maddr[31:0]));
            n_loads += s.load; n_stores += s.store;
          end
          if (s.store) begin
            checks++;
            if (wdata !== s.wdata) fail("store data");
          end
        end
        @(posedge clk); #1;
      end
      sleep = 0;
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.regfile.regs[r] !== iss.x[r]) fail($sformatf("x%0d=%h exp %h", r, dut.regfile.regs[r], iss.x[r]));
      end
    end
    // Directed: an accumulating instruction held for several sleep cycles
    // must still execute exactly once.
    foreach (imem[i]) imem[i] = jal(0, 0);
    imem[0] = addi(7, 0, 3);
    imem[1] = addi(7, 7, 5);
    imem[2] = sd(7, 0, 'h40);
    rst = 1; @(posedge clk); #1; rst = 0;
    @(posedge clk); #1;               // addi x7 = 3 executed
    sleep = 1;
    repeat (4) begin @(posedge clk); #1; end
    checks++;
    if (pc !== 32'h4) fail("pc moved while asleep");
    sleep = 0;
    @(posedge clk); #1;               // addi x7 += 5
    checks++;
    if (dut.regfile.regs[7] !== 64'd8) fail($sformatf("x7=%0d after sleep, expected 8", dut.regfile.regs[7]));
    sleep = 1; #1;                    // store pending: must not be issued
    checks++;
    if (we) fail("store issued while asleep");
    sleep = 0;
    @(posedge clk); #1;
    checks++;
    if (dmem['h40] !== 8'd8) fail("store after sleep");
    checks++;
    if (n_loads == 0 || n_stores == 0 || n_sleep == 0) fail("a mechanism never occurred");
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
