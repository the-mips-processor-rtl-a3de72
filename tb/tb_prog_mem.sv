// tb_prog_mem -- self-checking test of the program memory.
// Loads the opening example program (addi r2,r0,10; addi r1,r0,0; slt
// r3,r1,r2) and random words through the load port, then reads them back at
// their PCs, including an address that wraps above the memory size.
module tb_prog_mem;
  localparam int unsigned AW = 12;
  logic        clk = 1'b0, load_we;
  logic [31:0] pc, inst, load_addr, load_data;
  logic [31:0] ref_mem [1 << (AW - 2)];
  int checks = 0, failures = 0;

  prog_mem #(.AW(AW)) dut (.clk, .pc, .inst, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  task automatic load(input logic [31:0] a, input logic [31:0] d);
    load_we = 1'b1; load_addr = a; load_data = d;
    @(posedge clk); #1 load_we = 1'b0;
    ref_mem[a[AW-1:2]] = d;
  endtask

  task automatic expect_at(input logic [31:0] a);
    pc = a; #1;
    checks++;
    if (inst !== ref_mem[a[AW-1:2]]) begin
      failures++;
      $display("FAIL pc=%h inst=%h exp %h", a, inst, ref_mem[a[AW-1:2]]);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 1'b0; pc = '0; load_addr = '0; load_data = '0;
    for (int a = 0; a < (1 << (AW - 2)); a++) load(32'(a * 4), $urandom);
    load(32'h0, 32'h2002_000a);   // addi r2, r0, 10
    load(32'h4, 32'h2001_0000);   // addi r1, r0, 0
    load(32'h8, 32'h0022_182a);   // slt r3, r1, r2
    expect_at(32'h0); expect_at(32'h4); expect_at(32'h8);
    checks++; pc = 32'h8; #1; if (inst !== 32'h0022_182a) failures++;
    pc = 32'h0000_1004; #1;       // wraps to word 1
    checks++; if (inst !== 32'h2001_0000) failures++;
    for (int k = 0; k < 200; k++) load(($urandom % (1 << AW)) & ~32'h3, $urandom);
    for (int k = 0; k < 200; k++) expect_at(($urandom % (1 << AW)) & ~32'h3);
    // every loaded address
    for (int a = 0; a < 3; a++) expect_at(32'(a * 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
