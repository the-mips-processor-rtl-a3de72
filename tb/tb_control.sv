// tb_control -- self-checking test of the instruction decoder.
// For every implemented instruction it checks the fields of the control word
// that define the instruction's behaviour (register write and destination,
// write-back source, ALU operation and B input, extension, LUI shift, memory
// access, next-PC choice), with the branch flags set so that each conditional
// branch is seen both taken and not taken.  Expected values come from a table
// written in this testbench.  Unknown opcodes, function codes and REGIMM
// sub-opcodes must raise illegal and write nothing.
module tb_control;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] inst;
  logic        eq, ltz, gtz;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control dut (.inst, .eq, .ltz, .gtz, .ctrl);

  // expected: we, dst, wb, alu, b_imm, sh16, sext(-1 = don't care), mem_we, mem_re, size, uns, pc
  task automatic expect_ctrl(input string nm, input logic [31:0] w,
                             input logic e_eq, input logic e_ltz, input logic e_gtz,
                             input logic we, input dst_sel_e dst, input wb_sel_e wb,
                             input alu_op_e aop, input logic bimm, input logic sh16,
                             input int sext, input logic mwe, input logic mre,
                             input mem_size_e sz, input logic uns, input pc_sel_e pcs,
                             input logic trap = 1'b0);
    bit bad;
    inst = w; eq = e_eq; ltz = e_ltz; gtz = e_gtz;
    #1;
    bad = (ctrl.reg_we !== we) || (ctrl.pc_sel !== pcs) || (ctrl.mem_we !== mwe) || ctrl.illegal;
    if (we)  bad |= (ctrl.dst_sel !== dst) || (ctrl.wb_sel !== wb);
    if (we && wb == WB_ALU || mwe || mre) bad |= (ctrl.alu_op !== aop) || (ctrl.alu_b_imm !== bimm) || (ctrl.shamt_16 !== sh16);
    if (sext >= 0) bad |= (ctrl.ext_signed !== 1'(sext));
    if (mwe || mre) bad |= (ctrl.mem_size !== sz) || (ctrl.mem_re !== mre);
    if (mre) bad |= (ctrl.mem_unsigned !== uns);
    if (we && wb == WB_ALU) bad |= (ctrl.ovf_trap !== trap);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s inst=%h ctrl=%p", nm, w, ctrl);
    end
  endtask

  task automatic expect_illegal(input logic [31:0] w);
    inst = w; eq = 0; ltz = 0; gtz = 0; #1;
    checks++;
    if (!ctrl.illegal || ctrl.reg_we || ctrl.mem_we || ctrl.pc_sel != PC_SEQ) begin
      failures++;
      $display("FAIL illegal inst=%h ctrl=%p", w, ctrl);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // R-type arithmetic and logic
    expect_ctrl("XOR",  XOR_(4, 8, 6), 0,0,0, 1, DST_RD, WB_ALU, ALU_XOR, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("ADDU", ADDU(1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("ADD",  ADD (1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ, 1);
    expect_ctrl("SUBU", SUBU(1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_SUB, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SUB",  SUB (1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_SUB, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ, 1);
    expect_ctrl("AND",  AND_(1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_AND, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("OR",   OR_ (1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_OR,  0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("NOR",  NOR_(1, 2, 3), 0,0,0, 1, DST_RD, WB_ALU, ALU_NOR, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SLT",  SLT (3, 1, 2), 0,0,0, 1, DST_RD, WB_ALU, ALU_SLT, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SLTU", SLTU(3, 1, 2), 0,0,0, 1, DST_RD, WB_ALU, ALU_SLTU,0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SLL",  SLL (8, 4, 6), 0,0,0, 1, DST_RD, WB_ALU, ALU_SLL, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SRL",  SRL (8, 4, 6), 0,0,0, 1, DST_RD, WB_ALU, ALU_SRL, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SRA",  SRA (8, 4, 6), 0,0,0, 1, DST_RD, WB_ALU, ALU_SRA, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    // immediates
    expect_ctrl("ADDIU", ADDIU(5, 5, 5), 0,0,0, 1, DST_RT, WB_ALU, ALU_ADD, 1, 0, 1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("ADDI",  ADDI(2, 0, 10), 0,0,0, 1, DST_RT, WB_ALU, ALU_ADD, 1, 0, 1, 0, 0, SIZE_WORD, 0, PC_SEQ, 1);
    expect_ctrl("ANDI",  ANDI(5, 5, 'hff), 0,0,0, 1, DST_RT, WB_ALU, ALU_AND, 1, 0, 0, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("ORI",   ORI(5, 5, 'hbeef), 0,0,0, 1, DST_RT, WB_ALU, ALU_OR, 1, 0, 0, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("LUI",   LUI(5, 5), 0,0,0, 1, DST_RT, WB_ALU, ALU_SLL, 1, 1, 0, 0, 0, SIZE_WORD, 0, PC_SEQ);
    // memory
    expect_ctrl("LW",  LW (1, 4, 5), 0,0,0, 1, DST_RT, WB_MEM, ALU_ADD, 1, 0, 1, 0, 1, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("LH",  LH (1, 4, 5), 0,0,0, 1, DST_RT, WB_MEM, ALU_ADD, 1, 0, 1, 0, 1, SIZE_HALF, 0, PC_SEQ);
    expect_ctrl("LHU", LHU(1, 4, 5), 0,0,0, 1, DST_RT, WB_MEM, ALU_ADD, 1, 0, 1, 0, 1, SIZE_HALF, 1, PC_SEQ);
    expect_ctrl("LB",  LB (6, 2, 0), 0,0,0, 1, DST_RT, WB_MEM, ALU_ADD, 1, 0, 1, 0, 1, SIZE_BYTE, 0, PC_SEQ);
    expect_ctrl("LBU", LBU(6, 2, 0), 0,0,0, 1, DST_RT, WB_MEM, ALU_ADD, 1, 0, 1, 0, 1, SIZE_BYTE, 1, PC_SEQ);
    expect_ctrl("SW",  SW (1, 4, 5), 0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 1, 0, 1, 1, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("SH",  SH (1, 4, 5), 0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 1, 0, 1, 1, 0, SIZE_HALF, 0, PC_SEQ);
    expect_ctrl("SB",  SB (5, 2, 0), 0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 1, 0, 1, 1, 0, SIZE_BYTE, 0, PC_SEQ);
    // jumps
    expect_ctrl("J",   J('h100_0001),   0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_JUMP);
    expect_ctrl("JAL", JAL('h100_0001), 0,0,0, 1, DST_R31, WB_PC8, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_JUMP);
    expect_ctrl("JR",  JR(3),           0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_REG);
    // branches, taken and not taken
    expect_ctrl("BEQ t",  BEQ(5, 1, 3), 1,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BEQ n",  BEQ(5, 1, 3), 0,0,1, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("BNE t",  BNE(5, 1, 3), 0,1,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BNE n",  BNE(5, 1, 3), 1,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("BLTZ t", BLTZ(5, 2), 0,1,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BLTZ n", BLTZ(5, 2), 1,0,1, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("BGEZ t", BGEZ(5, 2), 0,0,1, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BGEZ 0", BGEZ(5, 2), 1,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BGEZ n", BGEZ(5, 2), 0,1,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("BLEZ t", BLEZ(5, 2), 0,1,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BLEZ 0", BLEZ(5, 2), 0,0,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BLEZ n", BLEZ(5, 2), 0,0,1, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    expect_ctrl("BGTZ t", BGTZ(5, 2), 0,0,1, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_BRANCH);
    expect_ctrl("BGTZ n", BGTZ(5, 2), 0,1,0, 0, DST_RT, WB_ALU, ALU_ADD, 0, 0, -1, 0, 0, SIZE_WORD, 0, PC_SEQ);
    // not implemented
    expect_illegal(32'hfc00_0000);                 // opcode 0x3f
    expect_illegal(32'h0000_0001);                 // R-type function 0x01
    expect_illegal(i_type('h01, 5, 3, 2));         // REGIMM sub-opcode 3
    expect_illegal(i_type('h0a, 1, 2, 3));         // opcode 0x0a
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
