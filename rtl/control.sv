// control -- instruction decoder and branch resolver of the single-cycle core.
//
// Looks at the opcode (bits 31:26), the function field (5:0) and, for the
// REGIMM group, bits 20:16, and produces the control word (mips_pkg::ctrl_t)
// that steers the register file, the immediate extender, the ALU and its input
// multiplexers, the data memory, the write-back multiplexer and the next-PC
// multiplexer.  The branch comparators' flags (eq, ltz, gtz) come back into the
// decoder, which turns a taken conditional branch into PC_BRANCH and a
// not-taken one into PC_SEQ.  Purely combinational.
//
// What each instruction does -- which extension ANDI/ORI/ADDIU and the memory
// offsets use, LUI as "zero-extended immediate shifted left by 16", base +
// offset addressing, the I-type destination in bits 20:16, JAL linking r31
// with PC+8 -- follows the instruction tables.  ADD, SUB and ADDI suppress
// their register write on signed overflow and the core reports it; the
// document only says the unsigned forms do no overflow detection.  An opcode
// or function code outside the implemented set writes nothing, does not
// branch and raises illegal.
module control
  import mips_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        eq,    // R[rs] == R[rt]
  input  logic        ltz,   // R[rs] <  0
  input  logic        gtz,   // R[rs] >  0
  output ctrl_t       ctrl
);
  logic [5:0] op, fn;
  logic [4:0] sub;

  always_comb begin
    op  = inst[31:26];
    fn  = inst[5:0];
    sub = inst[20:16];

    // Default: a no-op
    ctrl              = '0;
    ctrl.dst_sel      = DST_RT;
    ctrl.wb_sel       = WB_ALU;
    ctrl.alu_op       = ALU_ADD;
    ctrl.mem_size     = SIZE_WORD;
    ctrl.pc_sel       = PC_SEQ;
    ctrl.ext_signed   = 1'b1;

    unique case (op)
      OP_RTYPE: begin
        ctrl.dst_sel = DST_RD;
        ctrl.reg_we  = 1'b1;
        unique case (fn)
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_ADD:  begin ctrl.alu_op = ALU_ADD; ctrl.ovf_trap = 1'b1; end
          FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB:  begin ctrl.alu_op = ALU_SUB; ctrl.ovf_trap = 1'b1; end
          FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_JR: begin
            ctrl.reg_we = 1'b0;
            ctrl.pc_sel = PC_REG;
          end
          default: begin
            ctrl.reg_we  = 1'b0;
            ctrl.illegal = 1'b1;
          end
        endcase
      end

      OP_ADDI, OP_ADDIU: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.alu_op    = ALU_ADD;
        ctrl.ovf_trap  = (op == OP_ADDI);
      end
      OP_ANDI, OP_ORI: begin
        ctrl.reg_we     = 1'b1;
        ctrl.alu_b_imm  = 1'b1;
        ctrl.ext_signed = 1'b0;
        ctrl.alu_op     = (op == OP_ANDI) ? ALU_AND : ALU_OR;
      end
      OP_LUI: begin
        ctrl.reg_we     = 1'b1;
        ctrl.alu_b_imm  = 1'b1;
        ctrl.ext_signed = 1'b0;
        ctrl.shamt_16   = 1'b1;
        ctrl.alu_op     = ALU_SLL;
      end

      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.reg_we       = 1'b1;
        ctrl.alu_b_imm    = 1'b1;
        ctrl.mem_re       = 1'b1;
        ctrl.wb_sel       = WB_MEM;
        ctrl.mem_unsigned = (op == OP_LBU) || (op == OP_LHU);
        ctrl.mem_size     = (op == OP_LW) ? SIZE_WORD :
                            (op == OP_LH || op == OP_LHU) ? SIZE_HALF : SIZE_BYTE;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.alu_b_imm = 1'b1;
        ctrl.mem_we    = 1'b1;
        ctrl.mem_size  = (op == OP_SW) ? SIZE_WORD :
                         (op == OP_SH) ? SIZE_HALF : SIZE_BYTE;
      end

      OP_J:   ctrl.pc_sel = PC_JUMP;
      OP_JAL: begin
        ctrl.pc_sel  = PC_JUMP;
        ctrl.reg_we  = 1'b1;
        ctrl.dst_sel = DST_R31;
        ctrl.wb_sel  = WB_PC8;
      end

      OP_BEQ:  ctrl.pc_sel = eq  ? PC_BRANCH : PC_SEQ;
      OP_BNE:  ctrl.pc_sel = !eq ? PC_BRANCH : PC_SEQ;
      OP_BLEZ: ctrl.pc_sel = !gtz ? PC_BRANCH : PC_SEQ;
      OP_BGTZ: ctrl.pc_sel = gtz  ? PC_BRANCH : PC_SEQ;
      OP_REGIMM: begin
        if (sub == SUB_BLTZ)      ctrl.pc_sel = ltz  ? PC_BRANCH : PC_SEQ;
        else if (sub == SUB_BGEZ) ctrl.pc_sel = !ltz ? PC_BRANCH : PC_SEQ;
        else                      ctrl.illegal = 1'b1;
      end

      default: ctrl.illegal = 1'b1;
    endcase
  end
endmodule
