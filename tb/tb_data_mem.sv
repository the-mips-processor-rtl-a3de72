// tb_data_mem -- self-checking test of the data memory.
// Runs the document's memory examples on a little-endian and a big-endian
// instance: SB r5,0 / SB r5,2 / SW r5,8 with r5 = 5, then LB r6,2 / LB r7,8 /
// LB r8,11, whose big-endian results are r6 = 5, r7 = 0, r8 = 5 and whose
// little-endian results put the 0x05 of the word at byte 8.  Then random
// byte/half/word stores and loads, signed and unsigned, against a byte-array
// reference model of each ordering.
module tb_data_mem;
  import mips_pkg::*;
  localparam int unsigned AW = 10;
  logic        clk = 1'b0;
  logic [31:0] addr, wdata, rd_le, rd_be;
  mem_size_e   size;
  logic        load_unsigned, we;
  logic [7:0]  ref_le [1 << AW];
  logic [7:0]  ref_be [1 << AW];
  int checks = 0, failures = 0;

  data_mem #(.AW(AW), .BIG_ENDIAN(1'b0)) dut_le (.clk, .addr, .size, .load_unsigned, .we, .wdata, .rdata(rd_le));
  data_mem #(.AW(AW), .BIG_ENDIAN(1'b1)) dut_be (.clk, .addr, .size, .load_unsigned, .we, .wdata, .rdata(rd_be));

  always #5 clk = ~clk;

  function automatic int nbytes(input mem_size_e s);
    return (s == SIZE_BYTE) ? 1 : (s == SIZE_HALF) ? 2 : 4;
  endfunction

  task automatic store(input logic [31:0] a, input mem_size_e s, input logic [31:0] d);
    int n;
    addr = a; size = s; wdata = d; we = 1'b1;
    @(posedge clk); #1 we = 1'b0;
    n = nbytes(s);
    for (int i = 0; i < n; i++) begin
      ref_le[(a + i) % (1 << AW)] = d[8*i +: 8];
      ref_be[(a + i) % (1 << AW)] = d[8*(n-1-i) +: 8];
    end
  endtask

  task automatic load(input logic [31:0] a, input mem_size_e s, input logic u);
    int n;
    logic [31:0] vle, vbe;
    addr = a; size = s; load_unsigned = u; #1;
    n = nbytes(s);
    vle = '0; vbe = '0;
    for (int i = 0; i < n; i++) begin
      vle[8*i +: 8]       = ref_le[(a + i) % (1 << AW)];
      vbe[8*(n-1-i) +: 8] = ref_be[(a + i) % (1 << AW)];
    end
    if (!u && n < 4) begin
      if (vle[8*n-1]) for (int b = 8*n; b < 32; b++) vle[b] = 1'b1;
      if (vbe[8*n-1]) for (int b = 8*n; b < 32; b++) vbe[b] = 1'b1;
    end
    checks++;
    if (rd_le !== vle || rd_be !== vbe) begin
      failures++;
      $display("FAIL addr=%h size=%0d u=%0d le=%h exp %h be=%h exp %h", a, n, u, rd_le, vle, rd_be, vbe);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0; size = SIZE_WORD; load_unsigned = 1'b0;
    // clear both memories and the models
    for (int a = 0; a < (1 << AW); a += 4) store(32'(a), SIZE_WORD, 32'd0);
    // the document's example, r5 = 5
    store(32'd0, SIZE_BYTE, 32'd5);
    store(32'd2, SIZE_BYTE, 32'd5);
    store(32'd8, SIZE_WORD, 32'd5);
    addr = 32'd2; size = SIZE_BYTE; load_unsigned = 1'b0; #1;
    checks++; if (rd_be !== 32'd5 || rd_le !== 32'd5) failures++;     // LB r6, 2(r0)
    addr = 32'd8; #1;
    checks++; if (rd_be !== 32'd0 || rd_le !== 32'd5) failures++;     // LB r7, 8(r0)
    addr = 32'd11; #1;
    checks++; if (rd_be !== 32'd5 || rd_le !== 32'd0) failures++;     // LB r8, 11(r0)
    addr = 32'd8; size = SIZE_WORD; #1;
    checks++; if (rd_be !== 32'd5 || rd_le !== 32'd5) failures++;
    // sign and zero extension
    store(32'd16, SIZE_WORD, 32'h8081_f0ff);
    load(32'd16, SIZE_BYTE, 1'b0); load(32'd16, SIZE_BYTE, 1'b1);
    load(32'd16, SIZE_HALF, 1'b0); load(32'd16, SIZE_HALF, 1'b1);
    load(32'd18, SIZE_HALF, 1'b0); load(32'd16, SIZE_WORD, 1'b0);
    for (int k = 0; k < 3000; k++) begin
      mem_size_e s;
      logic [31:0] a;
      s = mem_size_e'($urandom % 3);
      a = $urandom % (1 << AW);
      if ($urandom % 2) store(a, s, $urandom);
      else load(a, s, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
