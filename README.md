# A single-cycle MIPS processor in SystemVerilog

This is a 32-bit MIPS processor that completes one instruction every clock
cycle. There is no pipeline. In a single cycle the PC fetches an instruction
from program memory, the decoder and register file turn it into operands and
control signals, and the ALU computes. The data memory is then read or
written, the result goes back to the register file, and the next PC is chosen.
The structure follows the classic teaching datapath from the lecture "The MIPS
Processor" (Cornell CS 3410): program memory, PC with a +4 adder, register
file, ALU, data memory, and a control unit steering the multiplexers between
them. The RTL adds what that datapath leaves open: reset, memory sizes, how a
program is loaded, and what happens on overflow or on an unknown opcode.

## The datapath

```
            +------+  inst   +---------+  ctrl word
  +-->[PC]->| prog |-------->| control |-----------------------------+
  |    |    | mem  |         +---------+<--eq/ltz/gtz--+              |
  |    |    +------+              |                    |              |
  |    |                     rs,rt,rd (5 bits each)    |              |
  |    |                          v                    |              v
  |    |                    +-----------+ R[rs] ---+-->[branch_cmp] [ALU]--+--> addr  +------+
  |    |                    | reg_file  | R[rt] ---+-------------------^   |          | data |
  |    |                    +-----------+     imm16 -> [extend] -> mux-B   |  R[rt]-->| mem  |
  |    |                          ^                                        |          +------+
  |    |                          +--- write-back mux: ALU | load | PC+8 <-+------------+
  |    +--> pc_unit: PC+4, PC+4+(offset<<2), {(PC+4)[31:28],target,00}, R[rs]
  +--------------------------------------------------------+
```

| Module       | Role |
|--------------|------|
| `mips_cpu`   | Top level. Wires the blocks below and holds the small multiplexers: ALU B input (R[rt] or the immediate), shift amount (`shamt` field or the constant 16), destination register (rd, rt or r31) and write-back source (ALU, load data or link address). |
| `pc_unit`    | PC register, the +4 and branch adders, jump-target concatenation, the next-PC multiplexer, and the delay-slot register. |
| `prog_mem`   | Word-organised instruction memory. It is read asynchronously at the PC and has a load port. |
| `control`    | Decodes opcode, function field and REGIMM sub-opcode into one control-word struct. It also decides whether a conditional branch is taken. |
| `reg_file`   | 32 x 32 bits: two asynchronous read ports and one write port that writes at the clock edge. r0 is always zero. |
| `alu`        | Add, subtract, AND, OR, XOR, NOR, SLT, SLTU and the three shifts of input B. Flags signed overflow. |
| `extend`     | Widens the 16-bit immediate to 32 bits, by sign or zero extension. |
| `branch_cmp` | The two branch comparators: R[rs] == R[rt], and the sign of R[rs] (less than zero, greater than zero). |
| `data_mem`   | Byte-addressed data memory. Handles byte, half-word and word access with sign or zero extension, in either byte order. |
| `mips_pkg`   | Opcode and function-code enums, ALU operations, access sizes, and the `ctrl_t` control word. |

Two details of the datapath are easy to miss:

- **The ALU shifts its B input, not A.** `SLL rd, rt, shamt` shifts R[rt].
  The instruction's `shamt` field reaches the ALU on its own input.
- **LUI has no dedicated hardware.** The zero-extended immediate goes into B
  and a multiplexer replaces `shamt` with the constant 16. The ALU then
  performs an ordinary left shift, so `LUI r5, 5` produces `0x00050000`.

Load and store addresses are R[rs] + sign-extended offset, computed in the
ALU. The ALU result drives the data-memory address, and R[rt] drives the
store data.

## Instruction set

I-type instructions write the register in bits 20:16. In the assembler
syntax used here (`ADDIU rd, rs, imm`), that register is written `rd`.

| Group | Instructions (opcode / function) |
|-------|----------------------------------|
| R-type ALU | ADD 0x20, ADDU 0x21, SUB 0x22, SUBU 0x23, AND 0x24, OR 0x25, XOR 0x26, NOR 0x27, SLT 0x2a, SLTU 0x2b |
| Shifts | SLL 0x00, SRL 0x02 (zero fill), SRA 0x03 (sign fill) |
| Immediates | ADDI 0x08, ADDIU 0x09 (sign-extended), ANDI 0x0c, ORI 0x0d (zero-extended), LUI 0x0f |
| Loads | LB 0x20, LH 0x21, LW 0x23, LBU 0x24, LHU 0x25 |
| Stores | SB 0x28, SH 0x29, SW 0x2b |
| Jumps | J 0x02, JAL 0x03 (links r31), JR (function 0x08) |
| Branches | BEQ 0x04, BNE 0x05, BLEZ 0x06, BGTZ 0x07, BLTZ / BGEZ (opcode 0x01, bits 20:16 = 0 / 1) |

- **Overflow.** ADD, SUB and ADDI check for signed overflow. When it occurs,
  the register write is suppressed and `arith_ovf` is raised for that cycle.
  The unsigned forms never check. There is no exception vector.
- **Unknown encodings.** Any other encoding, including unknown function codes
  and REGIMM sub-opcodes, changes nothing and raises `illegal_inst`.

## Where the next PC comes from, and the delay slot

`pc_unit` computes four candidates every cycle:

| `pc_sel`    | next PC | used by |
|-------------|---------|---------|
| `PC_SEQ`    | PC + 4 | everything else, and branches not taken |
| `PC_BRANCH` | PC + 4 + (sign_ext(offset) << 2) | taken BEQ, BNE, BLTZ, BGEZ, BLEZ, BGTZ |
| `PC_JUMP`   | {(PC + 4)[31:28], target[25:0], 2'b00} | J, JAL |
| `PC_REG`    | R[rs] | JR |

Both the branch and the jump target start from the *already incremented*
PC. So `BEQ r5, r1, 3` goes to PC + 4 + 12. `J 0x1000001` executed in the
lowest 256 MiB goes to `0x04000004`.

The branch comparators are separate from the ALU and feed the decoder.
`control` turns a conditional branch into `PC_BRANCH` or `PC_SEQ` within the
same cycle. BLEZ and BGEZ are the complements of BGTZ and BLTZ, so two sign
flags are enough.

**Delay slot (`DELAY_SLOT = 1`, default).** MIPS executes the instruction that
follows a jump or taken branch before the target. This is why JAL writes
r31 = PC + 8: the return skips the delay-slot instruction, which has already
run. `pc_unit` implements the slot with a one-entry pending register:

```
cycle n    : jump/branch at PC     -> next PC = PC + 4, pending <= 1, pending target <= target
cycle n+1  : delay-slot instruction -> next PC = pending target, pending <= 0
```

The `delay_slot` output is high while the delay-slot instruction executes.
MIPS leaves a jump or branch *inside* a delay slot undefined. Here it is
ignored: the earlier pending target wins. A JAL in a delay slot still writes
r31.

**No delay slot (`DELAY_SLOT = 0`).** The chosen target is loaded at the next
clock edge, like a plain next-PC multiplexer. JAL then links PC + 4, so that
`JR r31` returns to the instruction after the call.

## Memory

Program and data memories are separate (Harvard).

- **Program memory** is an array of 32-bit words indexed by `PC[AW-1:2]`.
  Programs are written through the `imem_*` load port.
- **Data memory** addresses every byte. A load reads 1, 2 or 4 consecutive
  bytes starting at the address, orders them by significance, and sign- or
  zero-extends the result. A store writes the low 1, 2 or 4 bytes of R[rt].

**Byte order.** The default is little endian: the least significant byte
sits at the lowest address. With `BIG_ENDIAN = 1` the order is reversed. For
example, with r5 = 5, `SW r5, 8(r0)` puts `0x05` at byte 8 in little-endian
order and at byte 11 in big-endian order. `LB r7, 8(r0)` therefore returns
5 in one order and 0 in the other.

**Alignment.** Accesses are not checked. An unaligned half-word or word is
simply read or written byte by byte.

**Size.** The architecture has a 32-bit byte address space. The RTL bounds
each memory by `IMEM_AW` / `DMEM_AW` address bits, 27 by default (128 MiB
each). This holds the jump target `0x04000004` of the examples. Higher
address bits wrap. The PC register and all address arithmetic remain 32 bits
wide. A full 2^32-byte array cannot be declared in the tools used: the array
range overflows a 32-bit integer. Synthesising a memory as flip-flops also
needs host memory that grows about fourfold per two address bits (about
1.3 GB at 24 bits, 5.3 GB at 26 bits, out of memory at 30 bits). Two 28-bit
memories would need roughly 40 GB, so 27 bits is the largest default that
still builds on a 32 GB machine.

**Timing.** Both memories read asynchronously and write at the rising edge.
A load's data is therefore written back in the same cycle. Memory contents
are not reset.

## Interface of `mips_cpu`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one instruction per rising edge |
| `rst` | in | 1 | synchronous, active high: PC <= `RESET_PC`, all registers <= 0 |
| `run` | in | 1 | 1: execute. 0: freeze (no PC update, no register or memory write). |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 32, 32 | program load port (byte address, word aligned) |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 5 / 32 | register read while `run` is 0 (borrows read port 2) |
| `pc`, `inst` | out | 32 | current PC and instruction |
| `delay_slot` | out | 1 | current instruction is in a delay slot |
| `dmem_store`, `dmem_addr` | out | 1, 32 | a store is written this cycle, and its address |
| `arith_ovf` | out | 1 | ADD/SUB/ADDI overflowed; result dropped |
| `illegal_inst` | out | 1 | unimplemented instruction; nothing written |

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `IMEM_AW` | 27 | program memory byte-address bits |
| `DMEM_AW` | 27 | data memory byte-address bits |
| `BIG_ENDIAN` | 0 | data memory byte order |
| `DELAY_SLOT` | 1 | branch delay slot on/off |
| `RESET_PC` | 0 | PC after reset |

To run a program:

1. Hold `rst` high with `run` low.
2. Write the program words through `imem_*`.
3. Release `rst` and raise `run`.

To inspect the result, lower `run` and read registers through `dbg_reg_*`.

## How far it follows the source, and what is this design's own

Taken from the lecture material:

- the block structure and the multiplexers of the datapath;
- the opcode and function numbers in the table above, except those named
  below;
- the extension rules;
- LUI through the shifter with the constant 16;
- base + offset addressing;
- the branch and jump target formulas, including "PC + 4" as the base;
- JAL linking PC + 8 because of the delay slot;
- both byte orders and their worked example. Little endian is the order the
  course uses.

This design's own choices:

- **Delay slot.** The delay-slot mechanism itself, meaning the pending
  register and the handling of a redirect inside a slot. The source states
  only the PC + 8 rule.
- **Extra instructions.** ADD, ADDU, SUB, SUBU, AND, OR, NOR and SLTU were
  added with their standard MIPS-I codes. The source shows the R-type
  arithmetic group only through XOR and SLT examples.
- **Errors.** Overflow suppressing the write, and the `illegal_inst`
  behaviour. The source only says that the unsigned forms do not detect
  overflow.
- **Reset, r0, memories.** Reset values, r0 hard-wired to zero, asynchronous
  memory reads, memory sizes, the program load port, the `run` input, and
  the debug and status ports.
- **Alignment.** Unaligned accesses are performed byte by byte instead of
  raising an address error.

Not implemented: exceptions and interrupts, coprocessors, multiply and
divide, the variable shifts (SLLV, SRLV, SRAV), SLTI/SLTIU/XORI, and JALR.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends through a cycle-count watchdog if
it hangs.

- **Unit tests.** `tb_alu`, `tb_extend`, `tb_branch_cmp`, `tb_reg_file`,
  `tb_pc_unit` (with and without delay slot), `tb_prog_mem`, `tb_data_mem`
  (both byte orders against a byte-array model) and `tb_control` (every
  instruction's control word, and branches taken and not taken).
- **`tb_mips_cpu` (end to end).** Runs three processors side by side with
  4 KiB memories: the default, a big-endian one, and one without a delay
  slot.
  - Each is compared every cycle against an instruction-level reference
    model, `mips_iss_pkg`, which shares no code with the RTL. The PC and the
    instruction must match every cycle. After each program, all registers
    and every written memory byte must match too.
  - Programs: arithmetic and immediate examples (including building
    `0xdeadbeef` with LUI/ORI, an overflow and an illegal opcode); the
    store/load byte-order example; a counting loop with every branch type,
    J, JAL/JR and delay-slot instructions; and twelve random 300-instruction
    programs.
  - The test counts how often each mechanism occurred, and fails if one never
    did. The mechanisms are: branch taken and not taken, jump, link, register
    jump, delay slot, each access size, sign extension, LUI, shift, overflow,
    illegal instruction, r0 write and stall.
- **`tb_mips_cpu_full`.** The default configuration with 128 MiB memories.
  It runs the counting loop, the byte-order example and `J 0x1000001` (which
  must reach PC `0x04000004`, where the program halts), checked against the
  same model.

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/mips_iss_pkg.sv tb/tb_mips_cpu.sv \
  --top-module tb_mips_cpu -o sim && ./obj_dir/sim
```

A unit test needs only the package, its module and its testbench, for example
`verilator --binary --timing rtl/mips_pkg.sv rtl/alu.sv tb/tb_alu.sv --top-module tb_alu`.
`tb/mips_asm_pkg.sv` provides functions that encode each instruction (for
example `ADDIU(5, 5, 5)` or `BEQ(5, 1, 3)`). Use them to write further test
programs.
