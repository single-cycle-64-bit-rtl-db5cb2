# Single-cycle RV64I processor

A small 64-bit RISC-V core that executes the RV64I base integer instruction
set with one instruction per clock. Each instruction goes through every
step within a single clock period: fetch, decode, register read, ALU,
data-memory access and register write-back. So there are no pipeline
registers, no hazards, no forwarding and no stalls. The only state in the
core is the 64-bit program counter and the 32 x 64-bit register bank. The
aim is low cost and low complexity for small embedded devices. Clock rate is
traded for simplicity: the slowest instruction (a load) sets the clock
period.

The RTL follows the processor described in the paper *Single Cycle 64-bit
RISC-V Processor and It's FPGA Prototype*. That design was prototyped on a
Spartan-6 FPGA, with a reported maximum clock of 140.4 MHz and 0.037 W
estimated power. The module and port names of the core
(`datapath_singlecycle`, `control_singlecycle`, `alu`, `alu32`, ...) are
those of the paper's synthesized design. The inside of each block is written
here from the functions the paper gives. Where the paper is silent, choices
were made; they are listed under [Departures and choices](#departures-and-choices).

## One instruction per cycle: the datapath

```
           +--------------+  pc   +-------------+ inst
  +------->|program_counter|----->| instr. mem. |-----+-------------------------+
  |        +--------------+   |   +-------------+     |                         |
  |                           |                  control_singlecycle      imm_generator
  |     adder_pc_plus_4 <-----+                  (+ alu_control)              |
  |        (pc+4)             |                       | ctrl                 imm
  |                           |          regfile  rs1 | rs2                   |
  |                           |      +---------------+---------+              |
  |                           +--> opA mux (rs1/pc/0)    opB mux (rs2/imm) <--+
  |                                     \                 /
  |                                   alu (64 b) | alu32 (W ops)
  |                                      |  result, result_eq_zero
  |                  control_transfer_singlecycle ----> pc_sel
  |   adder_pc_plus_immediate: (pc or rs1) + imm = target
  +--- next-pc mux: pc+4 | target | target & ~1
                                         |
                       mem_control <-----+ address ----> data memory
                       (load extend) <------------------ fetched bytes
                                         |
                       write-back mux: ALU result | load data | pc+4  --> regfile
```

Within the clock period, data flows from left to right:

1. **Fetch.** `program_counter` holds the PC. The instruction memory returns
   `inst` for it combinationally. `adder_pc_plus_4` forms PC+4.
2. **Decode.** `control_singlecycle` is purely combinational. It turns the
   instruction into one bundle of control signals (`riscv_pkg::ctrl_t`).
   `alu_control` refines the ALU request into a 4-bit function code using
   `funct3` and instruction bit 30. `imm_generator` rebuilds and
   sign-extends the immediate.
3. **Register read.** `regfile` reads `rs1` and `rs2` combinationally.
4. **Execute.** Operand A is `rs1`, the PC (for AUIPC) or zero (for LUI).
   Operand B is `rs2` or the immediate. `alu` computes the 64-bit result.
   `alu32` computes the same operation on the low 32 bits and sign-extends
   it, for the RV64I `*W` instructions. `word_op` selects between the two.
5. **Next PC.** A second dedicated adder, `adder_pc_plus_immediate`, forms
   the branch/JAL target (PC + immediate). For JALR it forms rs1 +
   immediate, and bit 0 is then cleared. So no jump target ever passes
   through the ALU.
6. **Memory.** For a load or store, the ALU result is the byte address.
7. **Write-back.** At the rising edge, the register file stores the ALU
   result, the loaded value or PC+4 (the link address of JAL/JALR). At the
   same edge, the PC takes its next value and the data memory performs a
   store.

### Branches: the ALU decides, its zero flag is the only flag

The ALU has exactly two outputs: `result` and `result_eq_zero`. Branches
need no separate comparator. `alu_control` makes the ALU compute one of
three operations:

| branch      | ALU operation | taken when `result_eq_zero` is |
|-------------|---------------|--------------------------------|
| BEQ / BNE   | SUB           | 1 / 0                          |
| BLT / BGE   | SLT           | 0 / 1                          |
| BLTU / BGEU | SLTU          | 0 / 1                          |

Because of the `funct3` encoding, the decision in
`control_transfer_singlecycle` reduces to one expression:
`taken = result_eq_zero ^ funct3[0] ^ funct3[2]`. A taken branch or JAL
selects the target adder's output. JALR selects the same output with bit 0
cleared. Any other instruction selects PC+4.

### Immediates

RISC-V scatters the immediate bits across the instruction word. The sign bit
is always `inst[31]`, and most bits keep one position in every format.
`imm_generator` reassembles the five formats:

| format | bits used (MSB first)                                 | used by                      |
|--------|-------------------------------------------------------|------------------------------|
| I      | inst[31:20]                                           | OP-IMM, loads, JALR          |
| S      | inst[31:25], inst[11:7]                               | stores                       |
| B      | inst[31], inst[7], inst[30:25], inst[11:8], 0         | branches                     |
| U      | inst[31:12], twelve zeros                             | LUI, AUIPC                   |
| J      | inst[31], inst[19:12], inst[20], inst[30:21], 0       | JAL                          |

Each one is sign-extended to 64 bits. That includes U, as RV64I requires, so
`lui x1, 0x80000` gives `0xffffffff_80000000`.

### 64-bit registers, 32-bit arithmetic

RV64I keeps 32-bit values sign-extended in the 64-bit registers. This makes
casts between C's `int`, `unsigned` and `long` free. The word instructions
(ADDIW, SLLIW, SRLIW, SRAIW, ADDW, SUBW, SLLW, SRLW, SRAW) therefore go to
`alu32`. It ignores the upper halves of its operands, shifts by a 5-bit
amount, and copies bit 31 of its 32-bit result into bits 63:32. The 64-bit
shifts in `alu` use a 6-bit shift amount. For the same reason, the decoder
allows `shamt[5]` in SLLI/SRLI/SRAI and rejects it in the `*IW` forms.

## The memory interface and misaligned accesses

The core keeps both memories outside its ports, exactly as the synthesized
top level of the original design does:

| port                         | dir | width | meaning                                          |
|------------------------------|-----|-------|--------------------------------------------------|
| `clkin`, `rst`, `sleep`      | in  | 1     | clock, synchronous reset, freeze                 |
| `inst`                       | in  | 32    | instruction at `pc`                              |
| `pc`                         | out | 32    | low 32 bits of the PC                            |
| `data_mem_read_en`           | out | 1     | a load is executing                              |
| `data_mem_write_en`          | out | 1     | a store is executing                             |
| `data_mem_addr`              | out | 32    | byte address (low 32 bits)                       |
| `data_mem_width`             | out | 3     | `funct3` of the load/store (size and signedness) |
| `data_mem_write_data`        | out | 64    | rs2; the memory writes the low 2**width[1:0] bytes |
| `data_mem_data_fetched`      | in  | 64    | the 8 bytes from `data_mem_addr` upward          |
| `exception`                  | out | 1     | illegal instruction, ECALL or EBREAK (added)     |

Without `exception` these are 232 signal bits. That matches the 232 bonded
IOBs reported for the FPGA prototype.

Loads and stores may use any byte address, aligned or not. This is split
between two blocks:

* `data_mem` is byte-addressed. A read returns the eight bytes that start
  at the address, right-aligned, so byte `addr` is in bits 7:0. A write
  stores 1, 2, 4 or 8 bytes starting at the address. An access that crosses
  an 8-byte boundary is no special case. Byte order is little-endian.
* `mem_control` in the core drives the request. It takes the low 1, 2, 4 or
  8 bytes of the fetched data and either sign-extends them (LB, LH, LW) or
  zero-extends them (LBU, LHU, LWU). LD uses all 8 bytes.

`width` encoding: 0 byte, 1 half, 2 word, 3 double, 4/5/6 the unsigned
byte/half/word loads.

Both memories read combinationally, because a single-cycle core has to load
its instruction and its data within the same period. On an FPGA they map to
distributed RAM, or to block RAM clocked on the opposite edge.

## Sleep, reset and exceptions

* **`rst`** is synchronous. It sets the PC to 0 and clears every register.
* **`sleep`** freezes the core while it is high. The PC holds, and neither a
  register write nor a memory request is issued. When `sleep` falls, the
  instruction at the PC executes normally, exactly once.
* **Exceptions.** The decoder checks each word against the RV64I base
  encoding: the opcode, and the `funct3`/`funct7` combinations allowed for
  that opcode. An illegal word raises `exception` for its cycle and has no
  effect other than advancing the PC. ECALL and EBREAK raise the same
  output. FENCE is a no-op, because this core has no buffers to order. The
  design has no trap vector and no CSRs. The surrounding system decides
  what to do with the flag.

## The system top

`riscv_singlecycle_top` connects the core to `instr_mem` (`IMEM_WORDS`
32-bit words, default 1024) and `data_mem` (`DMEM_BYTES` bytes, default
4096). Both sizes must be powers of two, and addresses wrap modulo the size.
To load a program, hold `rst` high and write words through `prog_we`,
`prog_addr` (a word index) and `prog_data`. After `rst` falls, execution
starts at address 0.

## Departures and choices

What comes from the paper: the RV64I instruction set; the single-cycle
organisation; a 64-bit PC and 64-bit registers; the split into a
combinational control unit, a register bank with ALU, an immediate
"sign extension, shift and shuffle" block and a memory-control block; two
dedicated adders for PC+4 and for jump/branch targets; branch decisions from
the ALU result; misaligned data accesses; the core's port list; the ALU
ports; and the sub-block names.

What is this design's own choice:

* The control-signal set, the ALU function codes and the `alu_control`
  mapping.
* The behaviour of `sleep`, which the paper names without describing.
* Reset to address 0 with cleared registers.
* The `exception` output. The paper mentions dedicated exception signals but
  not how they work. External exception inputs are not provided.
* The JALR target is formed by the target adder fed with rs1, so that the
  ALU is never used for targets.
* `data_mem_width` carries `funct3`. The data memory returns right-aligned
  bytes, and the core does the extension.
* Memory sizes and the program-load port.
* **Register count.** One passage of the paper speaks of 63 general-purpose
  registers. This design has the 32 registers (x0 to x31, with x0 reading
  zero) that RV64I defines and that the paper's own architectural-state
  figure shows.
* **Pipelined variant not built.** The paper also has a section describing a
  5-stage pipelined organisation. It has a branch target buffer and branch
  predictor, a floating-point register file and FPU, a three-read-port
  register file, an in-order commit FIFO and operand forwarding. That
  section contradicts the single-cycle design the rest of the paper
  presents, synthesizes and measures. It gives no sizes or algorithms for
  these parts, and RV64I has no floating point. So none of them is built,
  and neither are multiply and divide.
* Misaligned jump targets (JALR to an address with bit 1 set) are not
  trapped.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* Unit benches compare every block with an independent reference. For
  example, the ALU's shifts are checked bit by bit, immediates are encoded
  and then decoded, and the memories are checked against array models.
* `tb/rv_asm_pkg.sv` encodes RV64I instructions, so programs are written
  directly in SystemVerilog. `tb/rv_iss_pkg.sv` is an instruction-level
  RV64I reference model written straight from the ISA definitions.
* `tb_datapath_singlecycle` runs random programs on the core, with
  testbench memories, and checks every memory request on the core's ports
  against the model. It also checks that an instruction held through
  several sleep cycles executes exactly once.
* `tb_riscv_singlecycle_top` runs the complete system at its default sizes.
  It uses a directed program that covers every instruction class: a counted
  loop, a call and return, misaligned LD/LW/LH/SH/SD, word operations, all
  six branch kinds taken and not taken, FENCE, ECALL, EBREAK and an illegal
  word. It then runs 100 random programs. Before every clock edge it
  compares the PC and `exception` with the model, with `sleep` asserted at
  random. At the end it compares all registers and the whole data memory.
  It checks that one instruction retires in every awake cycle. It also
  counts taken and untaken branches, jumps, loads, stores, misaligned
  accesses, word operations, exceptions and sleep cycles, and fails if any
  of them never occurred.

No timing or FPGA resource figures are reproduced here. The RTL was
simulated, not synthesized for a Spartan-6.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
# lint the whole design (unused-bit warnings are expected: e.g. memories use only
# the address bits they need)
verilator --lint-only -Wall -Wno-fatal -y rtl rtl/riscv_pkg.sv rtl/riscv_singlecycle_top.sv

# run the end-to-end test
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/riscv_pkg.sv tb/rv_asm_pkg.sv tb/rv_iss_pkg.sv \
  tb/tb_riscv_singlecycle_top.sv --top-module tb_riscv_singlecycle_top
./obj_dir/Vtb_riscv_singlecycle_top
```

Any other testbench runs the same way; replace the last file and the top
module name. The packages must be listed before the files that import them.
To run your own program, build it with the `rv_asm_pkg` functions (or
write the machine words yourself), load it through the `prog_*` port, and
read the results from `u_core.regfile.regs` and `u_dmem.mem`.

## Files

| file | contents |
|------|----------|
| `rtl/riscv_pkg.sv` | opcodes, ALU codes, control bundle type |
| `rtl/riscv_singlecycle_top.sv` | core + instruction and data memories |
| `rtl/datapath_singlecycle.sv` | the single-cycle core |
| `rtl/program_counter.sv`, `rtl/adder.sv` | PC register, PC/target adders |
| `rtl/control_singlecycle.sv`, `rtl/alu_control.sv` | main decoder, ALU function decoder |
| `rtl/imm_generator.sv` | immediate reassembly and sign extension |
| `rtl/regfile.sv` | 32 x 64-bit register bank |
| `rtl/alu.sv`, `rtl/alu32.sv` | 64-bit ALU, 32-bit ALU for W instructions |
| `rtl/control_transfer_singlecycle.sv` | branch/jump next-PC selection |
| `rtl/mem_control.sv` | load/store request, load extension |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | memories |
| `tb/rv_asm_pkg.sv`, `tb/rv_iss_pkg.sv` | instruction encoders, reference model |
| `tb/tb_*.sv` | one testbench per module |
