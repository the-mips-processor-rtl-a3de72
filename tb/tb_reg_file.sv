// tb_reg_file -- self-checking test of the register file.
// Checks reset to zero, that r0 stays zero, that a write shows on both read
// ports after the clock edge and not before, and random traffic against a
// reference array.
module tb_reg_file;
  logic        clk = 1'b0, rst;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  task automatic expect_read(input logic [4:0] r1, input logic [4:0] r2);
    ra1 = r1; ra2 = r2; #1;
    checks++;
    if (rd1 !== ref_regs[r1] || rd2 !== ref_regs[r2]) begin
      failures++;
      $display("FAIL r%0d=%h (exp %h) r%0d=%h (exp %h)", r1, rd1, ref_regs[r1], r2, rd2, ref_regs[r2]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_regs[i]) ref_regs[i] = '0;
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 32; i++) expect_read(5'(i), 5'(31 - i));
    // write then read: not visible before the edge
    we = 1'b1; wa = 5'd5; wd = 32'h0000_0005;
    ra1 = 5'd5; #1; checks++; if (rd1 !== 32'd0) failures++;
    @(posedge clk); #1 we = 1'b0; ref_regs[5] = 32'd5;
    expect_read(5'd5, 5'd5);
    // r0 ignores writes
    we = 1'b1; wa = 5'd0; wd = 32'hdead_beef;
    @(posedge clk); #1 we = 1'b0;
    expect_read(5'd0, 5'd5);
    for (int k = 0; k < 1000; k++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (we && wa != 0) ref_regs[wa] = wd;
      we = 1'b0;
      expect_read(5'($urandom), 5'($urandom));
    end
    // reset clears
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    for (int i = 0; i < 32; i++) expect_read(5'(i), 5'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
