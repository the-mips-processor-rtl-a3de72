// tb_extend -- self-checking test of the immediate extender.
// Applies the document's example immediates (5, 0xffff = -1, 0xbeef) and
// random ones in both modes and compares with an independently computed value.
module tb_extend;
  logic [15:0] imm;
  logic        sign_ext;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  extend dut (.imm, .sign_ext, .ext);

  task automatic check(input logic [15:0] i, input logic s);
    int signed expv;
    imm = i; sign_ext = s;
    #1;
    expv = s ? int'($signed(i)) : int'({16'd0, i});
    checks++;
    if (ext !== 32'(expv)) begin
      failures++;
      $display("FAIL imm=%h sign=%0d ext=%h exp=%h", i, s, ext, expv);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd5, 1'b1);
    check(16'hffff, 1'b1);   // r5 += -1
    check(16'hffff, 1'b0);   // zero extended: 65535
    check(16'hbeef, 1'b0);
    check(16'h8000, 1'b1);
    check(16'h7fff, 1'b1);
    for (int k = 0; k < 500; k++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
