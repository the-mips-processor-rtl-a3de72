// pc_unit -- program counter and next-PC logic.
//
// Holds the 32-bit PC and forms the four candidates for the next one:
//   PC_SEQ    pc + 4
//   PC_BRANCH pc + 4 + (sign_ext(offset) << 2)      (BEQ ... BGTZ, when taken)
//   PC_JUMP   {(pc + 4)[31:28], target, 2'b00}       (J, JAL)
//   PC_REG    R[rs]                                  (JR)
// The jump and branch targets use the already incremented PC, and pc + 8 is
// produced for the link register of JAL; all of this follows the document.
//
// DELAY_SLOT selects how a redirect takes effect.  With 1 (the default, MIPS
// branch-delay-slot behaviour, which is what makes JAL's link value pc + 8
// return to the right place) the instruction after a jump or taken branch is
// still executed and the target is loaded one cycle later; the target is held
// in a one-entry pending register.  With 0 the target is loaded at the next
// clock edge, exactly as the single-cycle next-PC multiplexer is drawn.  A
// redirect made by the instruction in a delay slot is not supported (MIPS
// leaves it undefined): the pending target wins and the new one is dropped.
// Reset loads RESET_PC.  One PC update per rising clock edge when en is high.
module pc_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter bit          DELAY_SLOT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,        // advance the PC this cycle
  input  pc_sel_e     pc_sel,    // decoder's choice for this instruction
  input  logic [15:0] offset,    // branch offset, in words
  input  logic [25:0] target,    // jump target, in words
  input  logic [31:0] rs_val,    // JR target
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_plus8,
  output logic        in_delay_slot  // the current instruction sits in a delay slot
);
  logic [31:0] branch_tgt, jump_tgt, redirect_tgt, next_pc;
  logic        pending_q;
  logic [31:0] pending_tgt_q;

  always_comb begin
    pc_plus4   = pc + 32'd4;
    pc_plus8   = pc_plus4 + 32'd4;
    branch_tgt = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};
    jump_tgt   = {pc_plus4[31:28], target, 2'b00};
    unique case (pc_sel)
      PC_BRANCH: redirect_tgt = branch_tgt;
      PC_JUMP:   redirect_tgt = jump_tgt;
      PC_REG:    redirect_tgt = rs_val;
      default:   redirect_tgt = pc_plus4;
    endcase
    if (DELAY_SLOT) next_pc = pending_q ? pending_tgt_q : pc_plus4;
    else            next_pc = redirect_tgt;
  end

  assign in_delay_slot = pending_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc            <= RESET_PC;
      pending_q     <= 1'b0;
      pending_tgt_q <= '0;
    end else if (en) begin
      pc <= next_pc;
      if (DELAY_SLOT) begin
        pending_q     <= !pending_q && (pc_sel != PC_SEQ);
        pending_tgt_q <= redirect_tgt;
      end
    end
  end
endmodule
