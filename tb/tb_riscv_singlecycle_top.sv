// tb_riscv_singlecycle_top: end-to-end test of the single-cycle RV64I system
// at its default sizes. Programs are written through the load port while the
// core is in reset; then the core runs and, before every clock edge, the
// testbench compares the PC and the exception flag with the instruction-
// level reference model rv_iss, which it steps alongside. One instruction
// must retire per clock (the PC moves every cycle the core is awake) and
// none while sleep is high. At the end all 31 registers and the whole data
// memory are compared with the model.
// Programs: (1) a directed program covering every RV64I instruction class,
// a counted loop, a call and return, misaligned loads and stores, word
// operations, FENCE, ECALL, EBREAK and an illegal word, with a few results
// also checked against values worked out by hand; (2) a series of random
// programs. Each mechanism (taken and untaken branch, jump, load, store,
// misaligned access, word operation, exception, sleep) is counted and must
// occur at least once.
module tb_riscv_singlecycle_top;
  import rv_asm_pkg::*;
  import rv_iss_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int DMEM_BYTES = 4096;

  logic clk = 0, rst = 1, sleep = 0, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0, pc;
  logic exception;
  always #5 clk = ~clk;

  riscv_singlecycle_top dut (.clk, .rst, .sleep, .prog_we, .prog_addr, .prog_data, .pc, .exception);

  int checks = 0, failures = 0;
  int n_taken = 0, n_untaken = 0, n_jump = 0, n_load = 0, n_store = 0;
  int n_misaligned = 0, n_word = 0, n_exc = 0, n_sleep = 0, n_retired = 0, n_cycles = 0;
  logic [31:0] prog [$];
  rv_iss iss;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic load_and_reset();
    rst = 1;
    iss = new(DMEM_BYTES, IMEM_WORDS);
    for (int i = 0; i < IMEM_WORDS; i++) begin
      prog_we = 1; prog_addr = i;
      prog_data = (i < prog.size()) ? prog[i] : jal(0, 0);
      iss.imem[i] = prog_data;
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
    for (int i = 0; i < DMEM_BYTES; i++) iss.dmem[i] = dut.u_dmem.mem[i];
    rst = 0;
  endtask

  task automatic run(int cycles, bit random_sleep);
    step_info_t s;
    for (int c = 0; c < cycles; c++) begin
      sleep = random_sleep && ($urandom % 8 == 0);
      #1;
      checks++;
      if (pc !== iss.pc[31:0]) fail($sformatf("pc %h exp %h (cycle %0d)", pc, iss.pc[31:0], c));
      n_cycles++;
      if (sleep) begin
        n_sleep++;
        @(posedge clk); #2;
        checks++;
        if (pc !== iss.pc[31:0]) fail("pc moved during sleep");
        continue;
      end
      s = iss.step();
      checks++;
      if (exception !== s.exc) fail($sformatf("exception=%0b exp %0b at pc %h", exception, s.exc, pc));
      n_retired++;
      n_taken += s.taken_branch; n_untaken += s.untaken_branch; n_jump += s.jump;
      n_load += s.load; n_store += s.store; n_misaligned += s.misaligned;
      n_word += s.word_op; n_exc += s.exc;
      @(posedge clk); #1;
    end
    sleep = 0;
    #1;
  endtask

  task automatic compare_state(string name);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dut.u_core.regfile.regs[r] !== iss.x[r])
        fail($sformatf("%s x%0d=%h exp %h", name, r, dut.u_core.regfile.regs[r], iss.x[r]));
    end
    for (int i = 0; i < DMEM_BYTES; i++) begin
      if (dut.u_dmem.mem[i] !== iss.dmem[i]) begin
        checks++; fail($sformatf("%s dmem[%0d]=%h exp %h", name, i, dut.u_dmem.mem[i], iss.dmem[i]));
      end
    end
    checks++;
  endtask

  task automatic check_reg(int r, logic [63:0] v, string what);
    checks++;
    if (dut.u_core.regfile.regs[r] !== v)
      fail($sformatf("%s: x%0d=%h expected %h", what, r, dut.u_core.regfile.regs[r], v));
  endtask

  // Directed program. Data area at 0x200 (x10 holds the base).
  task automatic directed_program();
    prog = {};
    prog.push_back(addi(10, 0, 'h200));        // 0x00 x10 = data base
    prog.push_back(addi(5, 0, 0));             // 0x04 x5 = sum
    prog.push_back(addi(6, 0, 10));            // 0x08 x6 = counter
    prog.push_back(add(5, 5, 6));              // 0x0c loop: sum += i
    prog.push_back(addi(6, 6, -1));            // 0x10
    prog.push_back(bne(6, 0, -8));             // 0x14 back to 0x0c
    prog.push_back(lui(7, 'h12345));           // 0x18 x7 = 0x12345000
    prog.push_back(addi(7, 7, 'h678));         // 0x1c x7 = 0x12345678
    prog.push_back(slli(8, 7, 32));            // 0x20 x8 = 0x12345678_00000000
    prog.push_back(or_(8, 8, 7));              // 0x24 x8 = 0x12345678_12345678
    prog.push_back(sd(8, 10, 3));              // 0x28 misaligned double store at 0x203
    prog.push_back(ld(9, 10, 3));              // 0x2c load it back
    prog.push_back(lw(11, 10, 5));             // 0x30 misaligned word 0x205..0x208
    prog.push_back(lbu(12, 10, 3));            // 0x34 0x78
    prog.push_back(addi(13, 0, -1));           // 0x38 x13 = -1
    prog.push_back(sh(13, 10, 17));            // 0x3c misaligned half
    prog.push_back(lh(14, 10, 17));            // 0x40 sign-extended -1
    prog.push_back(lhu(15, 10, 17));           // 0x44 0xffff
    prog.push_back(sw(13, 10, 24));            // 0x48
    prog.push_back(lwu(16, 10, 24));           // 0x4c 0xffffffff
    prog.push_back(sb(7, 10, 32));             // 0x50 byte 0x78
    prog.push_back(lb(17, 10, 32));            // 0x54 0x78
    prog.push_back(addiw(18, 13, 0));          // 0x58 -1
    prog.push_back(lui(19, 'h80000));          // 0x5c x19 = 0xffffffff_80000000
    prog.push_back(addw(20, 19, 19));          // 0x60 0
    prog.push_back(subw(21, 0, 19));           // 0x64 0xffffffff80000000
    prog.push_back(sraiw(22, 19, 4));          // 0x68 0xfffffffff8000000
    prog.push_back(srliw(23, 19, 4));          // 0x6c 0x08000000
    prog.push_back(slliw(24, 7, 4));           // 0x70 0x23456780
    prog.push_back(sllw(25, 7, 6));            // 0x74 x6 = 0 -> 0x12345678
    prog.push_back(srlw(26, 13, 10));          // 0x78 shift by 0x200&31 = 0 -> -1
    prog.push_back(sraw(27, 19, 7));           // 0x7c shift by 0x78&31=24 -> 0xffffffffffffff80
    prog.push_back(jal(1, 16));                // 0x80 call 0x90
    prog.push_back(addi(28, 0, 77));           // 0x84 after return
    prog.push_back(jal(0, 16));                // 0x88 -> 0x98
    prog.push_back(NOP);                       // 0x8c
    prog.push_back(addi(29, 0, 5));            // 0x90 subroutine
    prog.push_back(jalr(0, 1, 0));             // 0x94 return to 0x84
    prog.push_back(auipc(30, 1));              // 0x98 x30 = 0x98 + 0x1000
    prog.push_back(blt(13, 0, 8));             // 0x9c taken (-1 < 0)
    prog.push_back(addi(31, 0, 1));            // 0xa0 skipped
    prog.push_back(bltu(13, 0, 8));            // 0xa4 not taken
    prog.push_back(bge(0, 13, 8));             // 0xa8 taken
    prog.push_back(addi(31, 31, 2));           // 0xac skipped
    prog.push_back(bgeu(13, 0, 8));            // 0xb0 taken
    prog.push_back(addi(31, 31, 4));           // 0xb4 skipped
    prog.push_back(beq(5, 5, 8));              // 0xb8 taken
    prog.push_back(addi(31, 31, 8));           // 0xbc skipped
    prog.push_back(beq(5, 0, 8));              // 0xc0 not taken
    prog.push_back(slt(2, 13, 0));             // 0xc4 1
    prog.push_back(sltu(3, 13, 0));            // 0xc8 0
    prog.push_back(sra(4, 13, 7));             // 0xcc -1
    prog.push_back(srl(4, 19, 0));             // 0xd0
    prog.push_back(sub(4, 4, 7));              // 0xd4
    prog.push_back(xor_(4, 4, 8));             // 0xd8
    prog.push_back(and_(4, 4, 13));            // 0xdc
    prog.push_back(sll(4, 4, 6));              // 0xe0
    prog.push_back(slti(2, 2, 2));             // 0xe4 1
    prog.push_back(sltiu(3, 13, 5));           // 0xe8 0
    prog.push_back(xori(3, 3, -1));            // 0xec -1
    prog.push_back(ori(3, 3, 0));              // 0xf0
    prog.push_back(andi(3, 3, 'h7f0));         // 0xf4 0x7f0
    prog.push_back(srli(4, 13, 60));           // 0xf8 0xf
    prog.push_back(srai(4, 19, 63));           // 0xfc -1
    prog.push_back(FENCE);                     // 0x100
    prog.push_back(ECALL);                     // 0x104
    prog.push_back(EBREAK);                    // 0x108
    prog.push_back(32'hffff_ffff);             // 0x10c illegal
    prog.push_back(addi(0, 0, 99));            // 0x110 write to x0 dropped
    prog.push_back(jal(0, 0));                 // 0x114 halt loop
  endtask

  // Random program: straight-line code with forward branches and jumps.
  // x31 holds the data base 0x400 and is never a destination.
  function automatic logic [31:0] rand_inst(int idx, int len);
    int rd = 1 + $urandom % 30, r1 = $urandom % 31, r2 = $urandom % 31;
    longint imm = longint'($signed(12'($urandom)));
    longint off = longint'($urandom % 200) - 100;
    int fwd = 4 * (1 + $urandom % 4);
    if (idx + fwd / 4 >= len) fwd = 4;
    case ($urandom % 24)
      0:  return add(rd, r1, r2);
      1:  return sub(rd, r1, r2);
      2:  return (($urandom % 2) ? sll(rd, r1, r2) : srl(rd, r1, r2));
      3:  return (($urandom % 2) ? sra(rd, r1, r2) : slt(rd, r1, r2));
      4:  return (($urandom % 2) ? sltu(rd, r1, r2) : xor_(rd, r1, r2));
      5:  return (($urandom % 2) ? or_(rd, r1, r2) : and_(rd, r1, r2));
      6:  return addi(rd, r1, imm);
      7:  return (($urandom % 2) ? slti(rd, r1, imm) : sltiu(rd, r1, imm));
      8:  return (($urandom % 2) ? xori(rd, r1, imm) : ori(rd, r1, imm));
      9:  return (($urandom % 3 == 0) ? andi(rd, r1, imm) :
                  ($urandom % 2) ? slli(rd, r1, $urandom % 64) :
                  ($urandom % 2) ? srli(rd, r1, $urandom % 64) : srai(rd, r1, $urandom % 64));
      10: return lui(rd, longint'($urandom));
      11: return auipc(rd, longint'($urandom % 16));
      12: return (($urandom % 2) ? addw(rd, r1, r2) : subw(rd, r1, r2));
      13: return (($urandom % 3 == 0) ? sllw(rd, r1, r2) : ($urandom % 2) ? srlw(rd, r1, r2) : sraw(rd, r1, r2));
      14: return (($urandom % 4 == 0) ? addiw(rd, r1, imm) : ($urandom % 3 == 0) ? slliw(rd, r1, $urandom % 32) :
                  ($urandom % 2) ? srliw(rd, r1, $urandom % 32) : sraiw(rd, r1, $urandom % 32));
      15, 16: case ($urandom % 7)
            0: return lb(rd, 31, off);  1: return lh(rd, 31, off);  2: return lw(rd, 31, off);
            3: return ld(rd, 31, off);  4: return lbu(rd, 31, off); 5: return lhu(rd, 31, off);
            default: return lwu(rd, 31, off);
          endcase
      17, 18: case ($urandom % 4)
            0: return sb(r2, 31, off); 1: return sh(r2, 31, off);
            2: return sw(r2, 31, off); default: return sd(r2, 31, off);
          endcase
      19, 20: case ($urandom % 6)
            0: return beq(r1, r2, fwd);  1: return bne(r1, r2, fwd);  2: return blt(r1, r2, fwd);
            3: return bge(r1, r2, fwd);  4: return bltu(r1, r2, fwd); default: return bgeu(r1, r2, fwd);
          endcase
      21: return jal(rd, fwd);
      22: return ($urandom % 8 == 0) ? 32'(ECALL) : addi(rd, r1, imm);
      default: return xori(rd, r1, imm);
    endcase
  endfunction

  initial begin
    // ---------------- directed program ----------------
    directed_program();
    load_and_reset();
    run(200, 1'b1);
    compare_state("directed");
    check_reg(5, 64'd55, "loop sum 1..10");
    check_reg(9, 64'h1234_5678_1234_5678, "misaligned ld");
    check_reg(11, 64'h0000_0000_5678_1234, "misaligned lw");
    check_reg(12, 64'h78, "lbu");
    check_reg(14, '1, "lh sign extension");
    check_reg(15, 64'hffff, "lhu");
    check_reg(16, 64'hffff_ffff, "lwu");
    check_reg(21, 64'hffff_ffff_8000_0000, "subw");
    check_reg(22, 64'hffff_ffff_f800_0000, "sraiw");
    check_reg(23, 64'h0800_0000, "srliw");
    check_reg(27, 64'hffff_ffff_ffff_ff80, "sraw");
    check_reg(28, 64'd77, "return address");
    check_reg(29, 64'd5, "subroutine");
    check_reg(30, 64'h1098, "auipc");
    check_reg(31, 64'd0, "skipped by taken branches");
    check_reg(3, 64'h7f0, "andi");
    checks++;
    if (pc !== 32'h114) fail($sformatf("did not reach the halt loop, pc=%h", pc));

    // ---------------- random programs ----------------
    for (int p = 0; p < 100; p++) begin
      int len = 400;
      prog = {};
      prog.push_back(addi(31, 0, 'h400));
      for (int i = 1; i < len; i++) prog.push_back(rand_inst(i, len));
      load_and_reset();
      run(len + 60, 1'b1);
      compare_state($sformatf("random %0d", p));
    end

    // ---------------- mechanisms and rate ----------------
    checks++;
    if (n_cycles != n_retired + n_sleep) fail("cycle count is not one instruction per awake cycle");
    $display("mechanisms: taken=%0d untaken=%0d jump=%0d load=%0d store=%0d misaligned=%0d word=%0d exception=%0d sleep=%0d retired=%0d",
             n_taken, n_untaken, n_jump, n_load, n_store, n_misaligned, n_word, n_exc, n_sleep, n_retired);
    checks += 9;
    if (n_taken == 0)      fail("no taken branch");
    if (n_untaken == 0)    fail("no untaken branch");
    if (n_jump == 0)       fail("no jump");
    if (n_load == 0)       fail("no load");
    if (n_store == 0)      fail("no store");
    if (n_misaligned == 0) fail("no misaligned access");
    if (n_word == 0)       fail("no word operation");
    if (n_exc == 0)        fail("no exception");
    if (n_sleep == 0)      fail("no sleep cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
