// mips_cpu -- single-cycle MIPS processor.
//
// Each rising clock edge completes one instruction.  Within the cycle the PC
// addresses the program memory (fetch), the decoder turns the instruction into
// a control word and the register file delivers R[rs] and R[rt] (decode), the
// ALU combines R[rs] with either R[rt] or the extended 16-bit immediate, while
// the branch comparators test R[rs]/R[rt] (execute), the data memory is read or
// written at the ALU result (memory), and the write-back multiplexer picks
// the ALU result, the loaded value or PC+8 for the destination register (WB).
// The next-PC multiplexer picks PC+4, the branch target, the jump target or
// R[rs].  This block structure and its multiplexers follow the document's
// datapath drawings.
//
// Instructions: SLL SRL SRA ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU JR, ADDI
// ADDIU ANDI ORI LUI, LB LBU LH LHU LW SB SH SW, BEQ BNE BLTZ BGEZ BLEZ BGTZ,
// J JAL.  Branches and jumps have one delay slot when DELAY_SLOT = 1 (see
// pc_unit).  Memory is little endian unless BIG_ENDIAN = 1.
//
// Ports beyond the processor itself (this design's own additions): a program
// load port into the program memory; a run input that, when low, freezes the
// processor (no PC update, no register or memory write) and hands the
// register file's second read port to a debug read port; and status outputs
// (current PC and instruction, delay-slot flag, a store strobe,
// signed-overflow and illegal-instruction flags).  Reset clears the registers
// and loads RESET_PC; the program is loaded while run is low.  Overflow and illegal instructions only suppress the write and are
// reported; there is no exception mechanism.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW    = 27,  // program memory byte address bits
  parameter int unsigned DMEM_AW    = 27,  // data memory byte address bits
  parameter bit          BIG_ENDIAN = 1'b0,
  parameter bit          DELAY_SLOT = 1'b1,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,            // 1: execute; 0: hold the PC, write nothing
  // program load port
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  // register debug read port
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  // status
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        delay_slot,     // current instruction sits in a delay slot
  output logic        dmem_store,     // a store is written this cycle
  output logic [31:0] dmem_addr,
  output logic        arith_ovf,      // ADD/SUB/ADDI overflowed, result dropped
  output logic        illegal_inst
);
  ctrl_t       ctrl;
  logic [31:0] pc_plus4, pc_plus8;
  logic        active;
  logic [4:0]  rs, rt, rd, shamt, wa, dbg_ra;
  logic [31:0] rs_val, rt_val, imm_ext, alu_b, alu_y, mem_rdata, wb_data;
  logic [4:0]  alu_shamt;
  logic        alu_ovf, eq, ltz, gtz, reg_we;

  assign rs    = inst[25:21];
  assign rt    = inst[20:16];
  assign rd    = inst[15:11];
  assign shamt = inst[10:6];

  pc_unit #(.RESET_PC(RESET_PC), .DELAY_SLOT(DELAY_SLOT)) u_pc (
    .clk, .rst,
    .en            (run),
    .pc_sel        (ctrl.pc_sel),
    .offset        (inst[15:0]),
    .target        (inst[25:0]),
    .rs_val,
    .pc,
    .pc_plus4,
    .pc_plus8,
    .in_delay_slot (delay_slot)
  );

  prog_mem #(.AW(IMEM_AW)) u_imem (
    .clk,
    .pc,
    .inst,
    .load_we   (imem_we),
    .load_addr (imem_addr),
    .load_data (imem_wdata)
  );

  control u_ctrl (.inst, .eq, .ltz, .gtz, .ctrl);

  // Destination register multiplexer
  always_comb begin
    unique case (ctrl.dst_sel)
      DST_RD:  wa = rd;
      DST_R31: wa = 5'd31;
      default: wa = rt;
    endcase
  end

  // Register file: port 1 reads rs, port 2 reads rt.  While the processor is
  // frozen port 2 serves the debug read port.
  assign active = run && !rst;
  assign dbg_ra = active ? rt : dbg_reg_addr;
  assign reg_we = active && ctrl.reg_we && !(ctrl.ovf_trap && alu_ovf);

  reg_file #(.NREGS(NREG), .WIDTH(XLEN)) u_rf (
    .clk, .rst,
    .ra1 (rs),  .rd1 (rs_val),
    .ra2 (dbg_ra), .rd2 (rt_val),
    .we  (reg_we), .wa, .wd (wb_data)
  );

  extend u_ext (.imm (inst[15:0]), .sign_ext (ctrl.ext_signed), .ext (imm_ext));

  branch_cmp u_cmp (.rs_val, .rt_val, .eq, .ltz, .gtz);

  assign alu_b     = ctrl.alu_b_imm ? imm_ext : rt_val;
  assign alu_shamt = ctrl.shamt_16 ? 5'd16 : shamt;

  alu u_alu (.a (rs_val), .b (alu_b), .shamt (alu_shamt), .op (ctrl.alu_op),
             .y (alu_y), .ovf (alu_ovf));

  data_mem #(.AW(DMEM_AW), .BIG_ENDIAN(BIG_ENDIAN)) u_dmem (
    .clk,
    .addr          (alu_y),
    .size          (ctrl.mem_size),
    .load_unsigned (ctrl.mem_unsigned),
    .we            (ctrl.mem_we && active),
    .wdata         (rt_val),
    .rdata         (mem_rdata)
  );

  // Write-back multiplexer
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = mem_rdata;
      WB_PC8:  wb_data = DELAY_SLOT ? pc_plus8 : pc_plus4;
      default: wb_data = alu_y;
    endcase
  end

  assign dbg_reg_data = rt_val;
  assign dmem_store   = ctrl.mem_we && active;
  assign dmem_addr    = alu_y;
  assign arith_ovf    = ctrl.ovf_trap && alu_ovf && active;
  assign illegal_inst = ctrl.illegal && active;

endmodule
