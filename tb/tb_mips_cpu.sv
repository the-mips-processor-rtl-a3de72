// tb_mips_cpu -- end-to-end test of the single-cycle MIPS processor.
//
// Three processors run the same programs side by side: the default
// configuration (little endian, branch delay slot), a big-endian one and one
// without the delay slot, all with 4 KiB memories to keep the simulation
// short.  Each is checked every cycle against an instruction-level reference
// model (mips_iss_pkg): the PC and the fetched instruction must agree, and at
// the end of each program all 32 registers (read through the debug port) and
// every data-memory byte the model wrote must agree too.  On top of that the
// document's own examples are checked against hand-computed values.
//
// Programs: (1) arithmetic, logic, shifts, immediates, LUI/ORI building
// 0xdeadbeef, a signed overflow, an r0 write and an illegal opcode; (2) the
// byte/half/word store-and-load example, whose results differ between the
// byte orders; (3) the counting loop, every conditional branch taken and not
// taken, J, JAL and JR, with a delay-slot instruction; (4) random programs.
// Each mechanism (taken/not-taken branch, jump, link, register jump, delay
// slot, each access size, sign extension, LUI, shift, overflow, illegal
// instruction, r0 write, stall via run = 0) is counted; one that never happens
// counts as a failure.
module tb_mips_cpu;
  import mips_asm_pkg::*;
  import mips_iss_pkg::*;

  localparam int unsigned AW = 12;
  localparam int NDUT = 3;
  localparam bit BE [NDUT] = '{1'b0, 1'b1, 1'b0};
  localparam bit DS [NDUT] = '{1'b1, 1'b1, 1'b0};

  logic        clk = 1'b0, rst, run, imem_we;
  logic [31:0] imem_addr, imem_wdata;
  logic [4:0]  dbg_reg_addr;
  logic [31:0] dbg_reg_data [NDUT];
  logic [31:0] pc [NDUT], inst [NDUT], dmem_addr [NDUT];
  logic        delay_slot [NDUT], dmem_store [NDUT], arith_ovf [NDUT], illegal_inst [NDUT];

  int checks = 0, failures = 0;
  int n_stall = 0, n_ovf_flag = 0, n_illegal_flag = 0, n_slot_flag = 0;
  logic [31:0] prog [$];
  mips_iss iss [NDUT];
  int mech [16];   // mechanism counts summed over all programs and processors

  mips_cpu #(.IMEM_AW(AW), .DMEM_AW(AW), .BIG_ENDIAN(1'b0), .DELAY_SLOT(1'b1)) dut0 (
    .clk, .rst, .run, .imem_we, .imem_addr, .imem_wdata, .dbg_reg_addr,
    .dbg_reg_data(dbg_reg_data[0]), .pc(pc[0]), .inst(inst[0]), .delay_slot(delay_slot[0]),
    .dmem_store(dmem_store[0]), .dmem_addr(dmem_addr[0]), .arith_ovf(arith_ovf[0]),
    .illegal_inst(illegal_inst[0]));
  mips_cpu #(.IMEM_AW(AW), .DMEM_AW(AW), .BIG_ENDIAN(1'b1), .DELAY_SLOT(1'b1)) dut1 (
    .clk, .rst, .run, .imem_we, .imem_addr, .imem_wdata, .dbg_reg_addr,
    .dbg_reg_data(dbg_reg_data[1]), .pc(pc[1]), .inst(inst[1]), .delay_slot(delay_slot[1]),
    .dmem_store(dmem_store[1]), .dmem_addr(dmem_addr[1]), .arith_ovf(arith_ovf[1]),
    .illegal_inst(illegal_inst[1]));
  mips_cpu #(.IMEM_AW(AW), .DMEM_AW(AW), .BIG_ENDIAN(1'b0), .DELAY_SLOT(1'b0)) dut2 (
    .clk, .rst, .run, .imem_we, .imem_addr, .imem_wdata, .dbg_reg_addr,
    .dbg_reg_data(dbg_reg_data[2]), .pc(pc[2]), .inst(inst[2]), .delay_slot(delay_slot[2]),
    .dmem_store(dmem_store[2]), .dmem_addr(dmem_addr[2]), .arith_ovf(arith_ovf[2]),
    .illegal_inst(illegal_inst[2]));

  always #5 clk = ~clk;

  function automatic logic [7:0] dut_byte(input int d, input logic [31:0] a);
    case (d)
      0:       return dut0.u_dmem.mem[a[AW-1:0]];
      1:       return dut1.u_dmem.mem[a[AW-1:0]];
      default: return dut2.u_dmem.mem[a[AW-1:0]];
    endcase
  endfunction

  function automatic logic [31:0] word_at(input logic [31:0] a);
    int idx = int'(a[AW-1:2]);
    return (idx < prog.size()) ? prog[idx] : 32'h0;
  endfunction

  // Load prog into all processors (fill the rest with NOPs), reset them and
  // the models, run until every model sits at halt_pc, then compare state.
  task automatic run_program(input string name, input logic [31:0] halt_pc, input int max_cycles);
    int cyc;
    bit all_halted;
    run = 1'b0; rst = 1'b1;
    for (int a = 0; a < (1 << (AW - 2)); a++) begin
      imem_we = 1'b1; imem_addr = 32'(a * 4); imem_wdata = word_at(32'(a * 4));
      @(posedge clk); #1;
    end
    imem_we = 1'b0;
    for (int d = 0; d < NDUT; d++) iss[d] = new(BE[d], DS[d], AW);
    @(posedge clk); #1 rst = 1'b0; run = 1'b1;
    cyc = 0;
    do begin
      // stall now and then: nothing may change while run is low
      if (cyc % 37 == 20) begin
        logic [31:0] held [NDUT];
        run = 1'b0;
        for (int d = 0; d < NDUT; d++) held[d] = pc[d];
        @(posedge clk); #1;
        for (int d = 0; d < NDUT; d++) begin
          checks++;
          if (pc[d] !== held[d]) begin failures++; $display("FAIL %s: PC moved while stalled", name); end
        end
        n_stall++;
        run = 1'b1; #1;
      end
      all_halted = 1'b1;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (pc[d] !== iss[d].pc || inst[d] !== word_at(iss[d].pc)) begin
          failures++;
          $display("FAIL %s cycle %0d dut%0d: pc=%h inst=%h, model pc=%h inst=%h",
                   name, cyc, d, pc[d], inst[d], iss[d].pc, word_at(iss[d].pc));
        end
        if (arith_ovf[d]) n_ovf_flag++;
        if (illegal_inst[d]) n_illegal_flag++;
        if (delay_slot[d]) n_slot_flag++;
        if (iss[d].pc != halt_pc) all_halted = 1'b0;
        iss[d].step(word_at(iss[d].pc));
      end
      @(posedge clk); #1;
      cyc++;
    end while (!all_halted && cyc < max_cycles);
    checks++;
    if (!all_halted) begin failures++; $display("FAIL %s did not reach halt", name); end
    // compare architectural state
    run = 1'b0; #1;
    for (int d = 0; d < NDUT; d++) begin
      mech[0] += iss[d].n_taken;   mech[1] += iss[d].n_not_taken; mech[2] += iss[d].n_jump;
      mech[3] += iss[d].n_jal;     mech[4] += iss[d].n_jr;        mech[5] += iss[d].n_slot;
      mech[6] += iss[d].n_load;    mech[7] += iss[d].n_store;     mech[8] += iss[d].n_byte;
      mech[9] += iss[d].n_half;    mech[10] += iss[d].n_signext;  mech[11] += iss[d].n_lui;
      mech[12] += iss[d].n_shift;  mech[13] += iss[d].n_ovf;      mech[14] += iss[d].n_illegal;
      mech[15] += iss[d].n_r0;
      for (int r = 0; r < 32; r++) begin
        dbg_reg_addr = 5'(r); #1;
        checks++;
        if (dbg_reg_data[d] !== iss[d].r[r]) begin
          failures++;
          $display("FAIL %s dut%0d r%0d=%h model %h", name, d, r, dbg_reg_data[d], iss[d].r[r]);
        end
      end
      foreach (iss[d].mem[a]) begin
        checks++;
        if (dut_byte(d, a) !== iss[d].mem[a]) begin
          failures++;
          $display("FAIL %s dut%0d mem[%h]=%h model %h", name, d, a, dut_byte(d, a), iss[d].mem[a]);
        end
      end
    end
  endtask

  // append "halt: J halt" and its delay-slot NOP
  task automatic add_halt();
    prog.push_back(J(prog.size()));
    prog.push_back(NOP());
  endtask

  task automatic expect_reg(input string what, input int d, input int r, input logic [31:0] v);
    dbg_reg_addr = 5'(r); #1;
    checks++;
    if (dbg_reg_data[d] !== v) begin
      failures++;
      $display("FAIL %s: dut%0d r%0d=%h expected %h", what, d, r, dbg_reg_data[d], v);
    end
  endtask

  // random straight-line code with short forward branches and jumps
  task automatic random_program(input int len);
    prog.delete();
    // clear the data window 0..259 so loads see known values
    for (int a = 0; a < 260; a += 4) prog.push_back(SW(0, a, 0));
    for (int i = 0; i < len; i++) begin
      int k = int'($urandom % 100);
      int rd = int'($urandom % 32), rs = int'($urandom % 32), rt = int'($urandom % 32);
      bit prev_cf;
      logic [5:0] pop;
      pop = (prog.size() > 0) ? prog[prog.size() - 1][31:26] : 6'h0;
      prev_cf = (pop inside {6'h01, 6'h02, 6'h03, [6'h04:6'h07]});
      if (prev_cf && k >= 80) k = k % 80;    // no control flow in a delay slot
      if (k < 30) begin
        int fns [14] = '{'h20, 'h21, 'h22, 'h23, 'h24, 'h25, 'h26, 'h27, 'h2a, 'h2b, 0, 2, 3, 'h20};
        int fn = fns[$urandom % 14];
        prog.push_back(r_type(rs, rt, rd, (fn < 4) ? int'($urandom % 32) : 0, fn));
      end else if (k < 50) begin
        int ops [5] = '{'h08, 'h09, 'h0c, 'h0d, 'h0f};
        prog.push_back(i_type(ops[$urandom % 5], rs, rd, int'($urandom)));
      end else if (k < 65) begin
        int ops [5] = '{'h20, 'h21, 'h23, 'h24, 'h25};
        prog.push_back(i_type(ops[$urandom % 5], 0, rd, int'($urandom % 256)));
      end else if (k < 80) begin
        int ops [3] = '{'h28, 'h29, 'h2b};
        prog.push_back(i_type(ops[$urandom % 3], 0, rt, int'($urandom % 256)));
      end else if (k < 95) begin
        int off = 1 + int'($urandom % 4);
        case ($urandom % 6)
          0: prog.push_back(BEQ(rs, rt, off));
          1: prog.push_back(BNE(rs, rt, off));
          2: prog.push_back(BLEZ(rs, off));
          3: prog.push_back(BGTZ(rs, off));
          4: prog.push_back(BLTZ(rs, off));
          default: prog.push_back(BGEZ(rs, off));
        endcase
      end else begin
        int tgt = prog.size() + 2 + int'($urandom % 4);
        prog.push_back(($urandom % 2) ? J(tgt) : JAL(tgt));
      end
    end
    for (int i = 0; i < 6; i++) prog.push_back(NOP());
    add_halt();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; run = 1'b0; imem_we = 1'b0; imem_addr = '0; imem_wdata = '0; dbg_reg_addr = '0;

    // ---- (1) arithmetic, logic, immediates
    prog = '{
      ADDIU(8, 0, 'h00f0), ADDIU(6, 0, 'h0f0f),
      XOR_(4, 8, 6),                     // r4 = r8 xor r6
      SLL(9, 4, 6),                      // r9 = r4 * 64
      ADDIU(5, 0, 5), ADDIU(5, 5, 5),    // r5 += 5
      ADDIU(10, 5, 'hffff),              // r10 = r5 + (-1)
      LUI(11, 'hdead), ORI(11, 11, 'hbeef),
      ANDI(12, 11, 'hff00), LUI(13, 5),  // r13 = 0x50000
      SRA(14, 11, 4), SRL(15, 11, 4),
      SUBU(16, 5, 4), NOR_(17, 0, 0), SLT(18, 17, 5), SLTU(19, 17, 5),
      AND_(20, 11, 4), OR_(21, 8, 6),
      LUI(22, 'h7fff), ORI(22, 22, 'hffff),
      ADDI(23, 22, 1),                   // overflows: r23 keeps 0
      ADDIU(24, 22, 1),                  // no overflow detection
      ADD(25, 22, 22), SUB(26, 5, 4), ADD(27, 5, 4),
      ADDIU(0, 0, 77),                   // r0 stays 0
      32'hfc00_0000                      // illegal opcode
    };
    add_halt();
    run_program("arith", 32'(4 * (prog.size() - 2)), 200);
    expect_reg("XOR r4, r8, r6", 0, 4, 32'h0000_0fff);
    expect_reg("SLL r9, r4, 6", 0, 9, 32'h0003_ffc0);
    expect_reg("ADDIU r5, r5, 5", 0, 5, 32'd10);
    expect_reg("r5 += -1", 0, 10, 32'd9);
    expect_reg("LUI/ORI 0xdeadbeef", 0, 11, 32'hdead_beef);
    expect_reg("LUI r13, 5", 0, 13, 32'h0005_0000);
    expect_reg("SRA", 0, 14, 32'hfdea_dbee);
    expect_reg("SRL", 0, 15, 32'h0dea_dbee);
    expect_reg("ADDI overflow drops result", 0, 23, 32'h0);
    expect_reg("ADDIU wraps", 0, 24, 32'h8000_0000);
    expect_reg("r0", 0, 0, 32'h0);

    // ---- (2) the store/load example, r5 = 5
    prog = '{
      ADDIU(5, 0, 5),
      SW(0, 0, 0), SW(0, 4, 0), SW(0, 8, 0), SW(0, 12, 0),
      SB(5, 0, 0), SB(5, 2, 0), SW(5, 8, 0),
      LB(6, 2, 0), LB(7, 8, 0), LB(8, 11, 0),
      LUI(1, 'hdead), ORI(1, 1, 'hbeef),
      SW(1, 4, 5),                       // Mem[4 + r5] = r1
      LW(9, 9, 0), LB(10, 9, 0), LBU(11, 9, 0), LH(12, 10, 0), LHU(13, 10, 0),
      ADDIU(2, 0, 'h1234), SH(2, 14, 0), LHU(14, 14, 0), LH(15, 9, 0)
    };
    add_halt();
    run_program("memory", 32'(4 * (prog.size() - 2)), 200);
    expect_reg("LE LB r6, 2(r0)", 0, 6, 32'd5);
    expect_reg("LE LB r7, 8(r0)", 0, 7, 32'd5);
    expect_reg("LE LB r8, 11(r0)", 0, 8, 32'd0);
    expect_reg("BE LB r6, 2(r0)", 1, 6, 32'd5);
    expect_reg("BE LB r7, 8(r0)", 1, 7, 32'd0);
    expect_reg("BE LB r8, 11(r0)", 1, 8, 32'd5);
    expect_reg("LE LW of SW r1, 4(r5)", 0, 9, 32'hdead_beef);
    expect_reg("BE LW of SW r1, 4(r5)", 1, 9, 32'hdead_beef);
    expect_reg("LE LB sign", 0, 10, 32'hffff_ffef);
    expect_reg("LE LBU", 0, 11, 32'h0000_00ef);
    expect_reg("BE LB sign", 1, 10, 32'hffff_ffde);
    expect_reg("LE LH sign", 0, 12, 32'hffff_adbe);
    expect_reg("LE LHU", 0, 13, 32'h0000_adbe);
    expect_reg("BE LHU", 1, 13, 32'h0000_adbe);
    expect_reg("LE LH at 9", 0, 15, 32'hffff_beef);
    expect_reg("BE LH at 9", 1, 15, 32'hffff_dead);
    expect_reg("SH/LHU", 0, 14, 32'h0000_1234);

    // ---- (3) control flow: the counting loop and every branch type
    prog = '{
      ADDI(2, 0, 10),          // 0  main: addi r2, r0, 10
      ADDI(1, 0, 0),           // 1        addi r1, r0, 0
      SLT(3, 1, 2),            // 2  loop: slt r3, r1, r2
      BEQ(3, 0, 4),            // 3        beq r3, r0, done
      NOP(),                   // 4
      ADDIU(1, 1, 1),          // 5
      J(2),                    // 6        j loop
      ADDIU(4, 4, 1),          // 7        delay slot of the jump
      BGEZ(1, 1),              // 8  done: taken
      NOP(),                   // 9
      BLTZ(1, 1),              // 10 not taken
      NOP(),                   // 11
      BLEZ(0, 1),              // 12 taken
      NOP(),                   // 13
      BGTZ(1, 1),              // 14 taken
      NOP(),                   // 15
      BNE(1, 2, 1),            // 16 not taken
      NOP(),                   // 17
      JAL(24),                 // 18
      ADDIU(5, 0, 7),          // 19 delay slot
      ADDIU(6, 0, 9),          // 20 return point (PC+8)
      J(30),                   // 21
      NOP(), NOP(), // 22, 23
      ADDIU(7, 0, 'h55),       // 24 func
      JR(31),                  // 25
      NOP(), NOP(), NOP(), NOP(), // 26..29
      J(30), NOP()             // 30 halt
    };
    run_program("control", 32'd120, 400);
    expect_reg("loop count", 0, 1, 32'd10);
    expect_reg("delay slot of J ran each pass", 0, 4, 32'd10);
    expect_reg("no delay slot", 2, 4, 32'd0);
    expect_reg("JAL r31 = PC+8", 0, 31, 32'd80);
    expect_reg("JAL delay slot", 0, 5, 32'd7);
    expect_reg("returned", 0, 6, 32'd9);
    expect_reg("called", 0, 7, 32'h55);

    // ---- (4) random programs
    for (int p = 0; p < 12; p++) begin
      random_program(300);
      run_program($sformatf("random%0d", p), 32'(4 * (prog.size() - 2)), 2000);
    end

    // ---- mechanisms
    $display("mechanisms: branch_taken=%0d branch_not_taken=%0d jump=%0d jal=%0d jr=%0d delay_slot=%0d load=%0d store=%0d byte=%0d half=%0d sign_ext=%0d lui=%0d shift=%0d overflow=%0d illegal=%0d r0_write=%0d",
      mech[0], mech[1], mech[2], mech[3], mech[4], mech[5], mech[6], mech[7],
      mech[8], mech[9], mech[10], mech[11], mech[12], mech[13], mech[14], mech[15]);
    $display("flags seen: stall=%0d ovf_flag=%0d illegal_flag=%0d slot_flag=%0d",
      n_stall, n_ovf_flag, n_illegal_flag, n_slot_flag);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    checks++;
    if (n_stall == 0 || n_ovf_flag == 0 || n_illegal_flag == 0 || n_slot_flag == 0) begin
      failures++; $display("FAIL a status flag never rose");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
