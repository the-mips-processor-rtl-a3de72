// tb_pc_unit -- self-checking test of the PC and next-PC logic.
// Two instances share the stimulus: one with the branch delay slot (default)
// and one without.  Each is compared every cycle with a reference model: the
// targets are PC+4 + (offset << 2), {(PC+4)[31:28], target, 00} and R[rs];
// with the delay slot the target arrives one instruction later.  Uses the
// document's examples J 0x1000001, BEQ offset 3 and BGEZ offset 2.
module tb_pc_unit;
  import mips_pkg::*;
  logic        clk = 1'b0, rst, en;
  pc_sel_e     pc_sel;
  logic [15:0] offset;
  logic [25:0] target;
  logic [31:0] rs_val;
  logic [31:0] pc_d, p4_d, p8_d, pc_n, p4_n, p8_n;
  logic        ds_d, ds_n;
  logic [31:0] m_pc_d, m_pc_n, m_pend_tgt;
  logic        m_pend;
  int checks = 0, failures = 0, redirects = 0, slots = 0;

  pc_unit #(.DELAY_SLOT(1'b1)) dut_d (.clk, .rst, .en, .pc_sel, .offset, .target, .rs_val,
    .pc(pc_d), .pc_plus4(p4_d), .pc_plus8(p8_d), .in_delay_slot(ds_d));
  pc_unit #(.DELAY_SLOT(1'b0)) dut_n (.clk, .rst, .en, .pc_sel, .offset, .target, .rs_val,
    .pc(pc_n), .pc_plus4(p4_n), .pc_plus8(p8_n), .in_delay_slot(ds_n));

  always #5 clk = ~clk;

  function automatic logic [31:0] tgt_of(input logic [31:0] p, input pc_sel_e s,
                                         input logic [15:0] o, input logic [25:0] t,
                                         input logic [31:0] r);
    logic [31:0] p4;
    p4 = p + 4;
    case (s)
      PC_BRANCH: return p4 + 32'(int'($signed(o)) * 4);
      PC_JUMP:   return {p4[31:28], t, 2'b00};
      PC_REG:    return r;
      default:   return p4;
    endcase
  endfunction

  task automatic compare();
    checks++;
    if (pc_d !== m_pc_d || pc_n !== m_pc_n || p4_d !== m_pc_d + 4 || p8_d !== m_pc_d + 8
        || ds_d !== m_pend || ds_n !== 1'b0) begin
      failures++;
      $display("FAIL pc_d=%h exp %h pc_n=%h exp %h ds=%0d exp %0d", pc_d, m_pc_d, pc_n, m_pc_n, ds_d, m_pend);
    end
  endtask

  // apply one cycle with the given selection and update the reference models
  task automatic step(input pc_sel_e s, input logic [15:0] o, input logic [25:0] t,
                      input logic [31:0] r, input logic e = 1'b1);
    logic [31:0] nd, nn;
    pc_sel = s; offset = o; target = t; rs_val = r; en = e;
    #1 compare();
    @(posedge clk);
    if (e) begin
      nn = tgt_of(m_pc_n, s, o, t, r);
      if (m_pend) begin nd = m_pend_tgt; slots++; end
      else nd = m_pc_d + 4;
      m_pend_tgt = tgt_of(m_pc_d, s, o, t, r);
      m_pend = !m_pend && (s != PC_SEQ);
      if (s != PC_SEQ) redirects++;
      m_pc_d = nd; m_pc_n = nn;
    end
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1; pc_sel = PC_SEQ; offset = '0; target = '0; rs_val = '0;
    @(posedge clk); #1 rst = 1'b0;
    m_pc_d = 0; m_pc_n = 0; m_pend = 0; m_pend_tgt = 0;
    compare();
    step(PC_SEQ, 0, 0, 0);
    step(PC_BRANCH, 16'd3, 0, 0);          // BEQ ..., 3: PC+4+12
    step(PC_SEQ, 0, 0, 0);
    step(PC_SEQ, 0, 0, 0);
    step(PC_REG, 0, 0, 32'ha000_0000);     // JR to 0xa0000000
    step(PC_SEQ, 0, 0, 0);
    step(PC_JUMP, 0, 26'h100_0001, 0);     // J 0x1000001 keeps the top nibble
    step(PC_SEQ, 0, 0, 0);
    step(PC_BRANCH, 16'd2, 0, 0);          // BGEZ ..., 2: PC+4+8
    step(PC_SEQ, 0, 0, 0);
    step(PC_BRANCH, 16'hfffe, 0, 0);       // backwards
    step(PC_SEQ, 0, 0, 0, 1'b0);           // hold
    step(PC_SEQ, 0, 0, 0);
    step(PC_SEQ, 0, 0, 0);
    for (int k = 0; k < 2000; k++) begin
      pc_sel_e s;
      s = pc_sel_e'($urandom % 4);
      // no redirect from a delay slot (unsupported); keep both models comparable
      if (m_pend) s = PC_SEQ;
      step(s, 16'($urandom), 26'($urandom), $urandom & 32'hffff_fffc, 1'($urandom % 8 != 0));
    end
    checks++;
    if (redirects < 100 || slots < 100) failures++;
    $display("redirects=%0d delay_slots=%0d", redirects, slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
