// mips_pkg -- shared encodings and control types of the single-cycle MIPS core.
//
// Holds the opcode and function-field numbers of the instruction subset the
// core executes, the ALU operation codes, the memory access sizes and the
// control-word struct that the decoder hands to the datapath.  Opcode and
// function numbers of SLL/SRL/SRA, ADDIU/ANDI/ORI/LUI, the loads and stores,
// J/JAL/JR and the branches are the standard MIPS-I values listed in the
// instruction tables the core is built from; ADDI and SLT appear there only in
// an example program, and the remaining R-type arithmetic codes (ADD, ADDU,
// SUB, SUBU, AND, OR, NOR, SLTU) are the standard MIPS-I values added by this
// design.  The enum encodings of the internal control signals are this
// design's own choice.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data path and register width
  localparam int unsigned NREG = 32;  // architectural registers r0..r31
  localparam int unsigned RAW  = 5;   // register address width

  // Primary opcodes, instruction bits 31:26
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_REGIMM = 6'h01,  // BLTZ / BGEZ, selected by bits 20:16
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_BLEZ  = 6'h06,
    OP_BGTZ  = 6'h07,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_LUI   = 6'h0f,
    OP_LB    = 6'h20,
    OP_LH    = 6'h21,
    OP_LW    = 6'h23,
    OP_LBU   = 6'h24,
    OP_LHU   = 6'h25,
    OP_SB    = 6'h28,
    OP_SH    = 6'h29,
    OP_SW    = 6'h2b
  } opcode_e;

  // R-type function codes, instruction bits 5:0
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_SRA  = 6'h03,
    FN_JR   = 6'h08,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2a,
    FN_SLTU = 6'h2b
  } funct_e;

  // REGIMM sub-opcodes, instruction bits 20:16
  localparam logic [4:0] SUB_BLTZ = 5'h00;
  localparam logic [4:0] SUB_BGEZ = 5'h01;

  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOR,
    ALU_SLT,
    ALU_SLTU,
    ALU_SLL,   // b << shamt
    ALU_SRL,   // b >> shamt, zero fill
    ALU_SRA    // b >> shamt, sign fill
  } alu_op_e;

  typedef enum logic [1:0] {
    SIZE_BYTE = 2'd0,
    SIZE_HALF = 2'd1,
    SIZE_WORD = 2'd2
  } mem_size_e;

  // Where the next PC comes from
  typedef enum logic [1:0] {
    PC_SEQ    = 2'd0,  // PC + 4
    PC_BRANCH = 2'd1,  // PC + 4 + (sign_ext(offset) << 2)
    PC_JUMP   = 2'd2,  // (PC + 4)[31:28] . target . 00
    PC_REG    = 2'd3   // R[rs]
  } pc_sel_e;

  // Destination register field
  typedef enum logic [1:0] {
    DST_RD  = 2'd0,  // bits 15:11 (R-type)
    DST_RT  = 2'd1,  // bits 20:16 (I-type "rd" field)
    DST_R31 = 2'd2   // link register of JAL
  } dst_sel_e;

  // Register write-back source
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC8 = 2'd2
  } wb_sel_e;

  // Control word produced by the decoder for one instruction
  typedef struct packed {
    logic      reg_we;      // write the register file
    dst_sel_e  dst_sel;
    wb_sel_e   wb_sel;
    alu_op_e   alu_op;
    logic      alu_b_imm;   // ALU B input: 1 = extended immediate, 0 = R[rt]
    logic      shamt_16;    // shift amount: 1 = constant 16 (LUI), 0 = shamt field
    logic      ext_signed;  // immediate extension: 1 = sign, 0 = zero
    logic      ovf_trap;    // signed overflow suppresses the write (ADD, SUB, ADDI)
    logic      mem_we;
    logic      mem_re;
    mem_size_e mem_size;
    logic      mem_unsigned;  // LBU / LHU
    pc_sel_e   pc_sel;
    logic      illegal;     // opcode/function not implemented
  } ctrl_t;

endpackage
