// rv_iss_pkg: an instruction-level reference model of RV64I for the
// testbenches. rv_iss::step() executes one instruction on its own copy of
// the registers, PC and a byte-addressed data memory, following the RISC-V
// base ISA definitions directly (it shares no code with the RTL). It reports
// what the instruction did so the testbench can count branches, jumps,
// loads, stores, misaligned accesses, word operations and exceptions.
package rv_iss_pkg;

  typedef struct {
    bit taken_branch, untaken_branch, jump, load, store, misaligned, word_op, exc;
    bit        mem_write;
    longint unsigned wdata;
    longint unsigned maddr;
    int        msize;
  } step_info_t;

  class rv_iss;
    longint unsigned x [32];
    longint unsigned pc;
    byte unsigned    dmem [];
    int unsigned     imem [];
    int              dmask, imask;

    function new(int dbytes, int iwords);
      dmem = new[dbytes];
      imem = new[iwords];
      dmask = dbytes - 1;
      imask = iwords - 1;
      foreach (x[i]) x[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
      pc = 0;
    endfunction

    function automatic longint unsigned sext(longint unsigned v, int bits);
      return longint'(v << (64 - bits)) >>> (64 - bits);
    endfunction

    function automatic longint unsigned rd_mem(longint unsigned a, int n);
      longint unsigned v = 0;
      for (int i = n - 1; i >= 0; i--) v = (v << 8) | dmem[(a + i) & dmask];
      return v;
    endfunction

    function automatic step_info_t step();
      step_info_t s = '{default: 0};
      int unsigned ins = imem[(pc >> 2) & imask];
      int unsigned op = ins & 'h7f, rd = (ins >> 7) & 31, f3 = (ins >> 12) & 7;
      int unsigned r1 = (ins >> 15) & 31, r2 = (ins >> 20) & 31, f7 = ins >> 25;
      longint unsigned a = x[r1], b = x[r2], res = 0, npc = pc + 4;
      longint unsigned immi = sext(ins >> 20, 12);
      longint unsigned imms = sext(((ins >> 25) << 5) | ((ins >> 7) & 31), 12);
      longint unsigned immb = sext((((ins >> 31) & 1) << 12) | (((ins >> 7) & 1) << 11) |
                                   (((ins >> 25) & 63) << 5) | (((ins >> 8) & 15) << 1), 13);
      longint unsigned immu = sext(ins & 'hffff_f000, 32);
      longint unsigned immj = sext((((ins >> 31) & 1) << 20) | (((ins >> 12) & 255) << 12) |
                                   (((ins >> 20) & 1) << 11) | (((ins >> 21) & 1023) << 1), 21);
      bit wr = 0;
      case (op)
        'h37: begin res = immu; wr = 1; end
        'h17: begin res = pc + immu; wr = 1; end
        'h6f: begin res = pc + 4; wr = 1; npc = pc + immj; s.jump = 1; end
        'h67: if (f3 == 0) begin res = pc + 4; wr = 1; npc = (a + immi) & ~64'd1; s.jump = 1; end
              else s.exc = 1;
        'h63: begin
          bit t;
          case (f3)
            0: t = a == b;
            1: t = a != b;
            4: t = longint'(a) < longint'(b);
            5: t = longint'(a) >= longint'(b);
            6: t = a < b;
            7: t = a >= b;
            default: begin t = 0; s.exc = 1; end
          endcase
          if (!s.exc) begin
            if (t) begin npc = pc + immb; s.taken_branch = 1; end
            else s.untaken_branch = 1;
          end
        end
        'h03: if (f3 != 7) begin
          int n = 1 << (f3 & 3);
          longint unsigned ad = a + immi;
          res = rd_mem(ad, n);
          if (f3 < 3) res = sext(res, 8 * n);
          wr = 1; s.load = 1; s.misaligned = (ad % n) != 0;
          s.maddr = ad; s.msize = n;
        end else s.exc = 1;
        'h23: if (f3 < 4) begin
          int n = 1 << f3;
          longint unsigned ad = a + imms;
          for (int i = 0; i < n; i++) dmem[(ad + i) & dmask] = byte'(b >> (8 * i));
          s.store = 1; s.misaligned = (ad % n) != 0;
          s.mem_write = 1; s.maddr = ad; s.msize = n; s.wdata = b;
        end else s.exc = 1;
        'h13, 'h33: begin
          bit isr = (op == 'h33);
          longint unsigned bb = isr ? b : immi;
          int sh = int'(bb & 63);
          if (isr && !(f7 == 0 || (f7 == 'h20 && (f3 == 0 || f3 == 5)))) s.exc = 1;
          if (!isr && f3 == 1 && (f7 >> 1) != 0) s.exc = 1;
          if (!isr && f3 == 5 && (f7 >> 1) != 0 && (f7 >> 1) != 'h10) s.exc = 1;
          case (f3)
            0: res = (isr && f7 == 'h20) ? a - bb : a + bb;
            1: res = a << sh;
            2: res = longint'(a) < longint'(bb);
            3: res = a < bb;
            4: res = a ^ bb;
            5: if ((f7 >> 5) & 1) res = longint'(a) >>> sh;
               else              res = a >> sh;
            6: res = a | bb;
            7: res = a & bb;
          endcase
          wr = !s.exc;
        end
        'h1b, 'h3b: begin
          bit isr = (op == 'h3b);
          int unsigned a32 = int'(a);
          int unsigned b32 = isr ? int'(b) : int'(immi);
          int sh = int'(b32 & 31);
          int unsigned r32 = 0;
          s.word_op = 1;
          if (!(f3 == 0 || f3 == 1 || f3 == 5)) s.exc = 1;
          else if (!isr && f3 == 0) ;
          else if (!(f7 == 0 || (f7 == 'h20 && f3 != 1))) s.exc = 1;
          case (f3)
            0: r32 = (isr && f7 == 'h20) ? a32 - b32 : a32 + b32;
            1: r32 = a32 << sh;
            5: if (f7 == 'h20) r32 = int'(a32) >>> sh;
               else            r32 = a32 >> sh;
            default: r32 = 0;
          endcase
          res = sext(longint'(r32), 32);
          wr = !s.exc;
          if (s.exc) s.word_op = 0;
        end
        'h0f: if (f3 != 0) s.exc = 1;
        'h73: s.exc = 1;   // ECALL / EBREAK / anything else: flagged, no effect
        default: s.exc = 1;
      endcase
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
      return s;
    endfunction
  endclass

endpackage
