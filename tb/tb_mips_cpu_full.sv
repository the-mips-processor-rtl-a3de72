// tb_mips_cpu_full -- the processor at its default configuration (128 MiB
// program and data memories, little endian, branch delay slot) running one
// complete program taken from the examples the design is built from:
//   * the counting loop "addi r2,r0,10; addi r1,r0,0; loop: slt r3,r1,r2 ..."
//   * the byte/word store-and-load example with r5 = 5
//   * J 0x1000001, which must land at (PC+4)[31:28] . 0x1000001 . 00 =
//     0x04000004.  The same instruction is stored there, where it jumps to
//     itself: the halt loop.
// The run is checked cycle by cycle against the reference model, then the
// registers and written memory bytes are compared, plus hand-computed values.
module tb_mips_cpu_full;
  import mips_asm_pkg::*;
  import mips_iss_pkg::*;

  localparam int unsigned AW = 27;   // the processor's default memory size

  logic        clk = 1'b0, rst, run, imem_we;
  logic [31:0] imem_addr, imem_wdata, dbg_reg_data, pc, inst, dmem_addr;
  logic [4:0]  dbg_reg_addr;
  logic        delay_slot, dmem_store, arith_ovf, illegal_inst;
  logic [31:0] prog [$];
  logic [31:0] far [2];   // code at byte address 0x04000004
  mips_iss     iss;
  int checks = 0, failures = 0, cyc = 0;
  localparam logic [31:0] FAR = 32'h0400_0004;
  bit saw_far_pc = 1'b0;

  mips_cpu dut (.clk, .rst, .run, .imem_we, .imem_addr, .imem_wdata, .dbg_reg_addr,
                .dbg_reg_data, .pc, .inst, .delay_slot, .dmem_store, .dmem_addr,
                .arith_ovf, .illegal_inst);

  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(input logic [31:0] a);
    int idx = int'(a[AW-1:2]);
    if (idx < prog.size()) return prog[idx];
    if (a[AW-1:2] == FAR[AW-1:2])     return far[0];
    if (a[AW-1:2] == FAR[AW-1:2] + 1) return far[1];
    return 32'h0;
  endfunction

  task automatic expect_reg(input string what, input int r, input logic [31:0] v);
    dbg_reg_addr = 5'(r); #1;
    checks++;
    if (dbg_reg_data !== v) begin
      failures++;
      $display("FAIL %s: r%0d=%h expected %h", what, r, dbg_reg_data, v);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; run = 1'b0; imem_we = 1'b0; imem_addr = '0; imem_wdata = '0; dbg_reg_addr = '0;
    prog = '{
      ADDIU(20, 20, 1),            // 0  counts how often word 0 runs
      NOP(),                       // 1
      NOP(),                       // 2
      ADDI(2, 0, 10),              // 3  main: addi r2, r0, 10
      ADDI(1, 0, 0),               // 4        addi r1, r0, 0
      SLT(3, 1, 2),                // 5  loop: slt r3, r1, r2
      BEQ(3, 0, 4),                // 6        beq r3, r0, done (11)
      NOP(),                       // 7
      ADDIU(1, 1, 1),              // 8
      J(5),                        // 9        j loop
      NOP(),                       // 10
      ADDIU(5, 0, 5),              // 11 done: r5 = 5
      SB(5, 0, 0),                 // 12
      SB(5, 2, 0),                 // 13
      SW(5, 8, 0),                 // 14
      LB(6, 2, 0),                 // 15
      LB(7, 8, 0),                 // 16
      LB(8, 11, 0),                // 17
      LUI(9, 'hdead),              // 18
      ORI(9, 9, 'hbeef),           // 19
      ADDIU(21, 0, 1),             // 20
      J('h100_0001),               // 21 J 0x1000001
      NOP()                        // 22
    };
    far = '{J('h100_0001), NOP()}; // at 0x04000004: jumps to itself
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_addr = 32'(i * 4); imem_wdata = prog[i];
      @(posedge clk); #1;
    end
    foreach (far[i]) begin
      imem_we = 1'b1; imem_addr = FAR + 32'(i * 4); imem_wdata = far[i];
      @(posedge clk); #1;
    end
    imem_we = 1'b0;
    iss = new(1'b0, 1'b1, AW);
    @(posedge clk); #1 rst = 1'b0; run = 1'b1;
    while (!(iss.pc == FAR && cyc > 10) && cyc < 1000) begin
      checks++;
      if (pc !== iss.pc || inst !== word_at(iss.pc)) begin
        failures++;
        $display("FAIL cycle %0d: pc=%h inst=%h, model pc=%h inst=%h", cyc, pc, inst, iss.pc, word_at(iss.pc));
      end
      if (pc == FAR) saw_far_pc = 1'b1;
      iss.step(word_at(iss.pc));
      @(posedge clk); #1;
      cyc++;
    end
    if (pc == FAR) saw_far_pc = 1'b1;
    run = 1'b0; #1;
    checks++;
    if (!saw_far_pc) begin failures++; $display("FAIL J 0x1000001 never reached 0x04000004"); end
    checks++;
    if (iss.pc != FAR) begin failures++; $display("FAIL did not halt"); end
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1;
      checks++;
      if (dbg_reg_data !== iss.r[r]) begin
        failures++;
        $display("FAIL r%0d=%h model %h", r, dbg_reg_data, iss.r[r]);
      end
    end
    foreach (iss.mem[a]) begin
      checks++;
      if (dut.u_dmem.mem[a[AW-1:0]] !== iss.mem[a]) begin
        failures++;
        $display("FAIL mem[%h]=%h model %h", a, dut.u_dmem.mem[a[AW-1:0]], iss.mem[a]);
      end
    end
    expect_reg("loop ran 10 times", 1, 32'd10);
    expect_reg("slt result at exit", 3, 32'd0);
    expect_reg("LB r6, 2(r0)", 6, 32'd5);
    expect_reg("LB r7, 8(r0) little endian", 7, 32'd5);
    expect_reg("LB r8, 11(r0) little endian", 8, 32'd0);
    expect_reg("LUI/ORI", 9, 32'hdead_beef);
    expect_reg("word 0 ran once", 20, 32'd1);
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
