// tb_alu -- self-checking test of the ALU.
// Covers the document's examples (r8 xor r6, r4 << 6, r5 + 5, LUI 5 as
// 5 << 16 = 0x50000) and random operands for every operation.  Expected values
// are computed with 64-bit arithmetic, independently of the ALU's code.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  alu_op_e     op;
  logic        ovf;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .shamt, .op, .y, .ovf);

  function automatic logic [32:0] model(input alu_op_e o, input logic [31:0] x,
                                        input logic [31:0] z, input int s);
    longint sx, sz, r;
    logic v;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    v = 1'b0;
    case (o)
      ALU_ADD:  begin r = sx + sz; v = (r > 64'sh7fffffff) || (r < -64'sh80000000); end
      ALU_SUB:  begin r = sx - sz; v = (r > 64'sh7fffffff) || (r < -64'sh80000000); end
      ALU_AND:  r = longint'(x & z);
      ALU_OR:   r = longint'(x | z);
      ALU_XOR:  r = longint'(x ^ z);
      ALU_NOR:  r = longint'(~(x | z));
      ALU_SLT:  r = (sx < sz) ? 1 : 0;
      ALU_SLTU: r = ({32'd0, x} < {32'd0, z}) ? 1 : 0;
      ALU_SLL:  r = longint'({32'd0, z}) * (64'd1 << s);
      ALU_SRL:  r = longint'({32'd0, z}) / (64'd1 << s);
      ALU_SRA:  r = (sz >= 0) ? sz / (64'sd1 << s) : -((-sz + (64'sd1 << s) - 1) / (64'sd1 << s));
      default:  r = 0;
    endcase
    return {v, r[31:0]};
  endfunction

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] z,
                       input int s);
    logic [32:0] e;
    op = o; a = x; b = z; shamt = 5'(s);
    #1;
    e = model(o, x, z, s);
    checks++;
    if (y !== e[31:0] || ovf !== e[32]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h sh=%0d y=%h ovf=%0d exp=%h/%0d",
               o.name(), x, z, s, y, ovf, e[31:0], e[32]);
    end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [11] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                          ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA};
    check(ALU_XOR, 32'h0000_00f0, 32'h0000_0f0f, 0);
    op = ALU_XOR; a = 32'h0000_00f0; b = 32'h0000_0f0f; shamt = 0; #1;
    checks++; if (y !== 32'h0000_0fff) failures++;
    op = ALU_SLL; a = 0; b = 32'd3; shamt = 5'd6; #1;      // r4 * 64
    checks++; if (y !== 32'd192) failures++;
    op = ALU_ADD; a = 32'd7; b = 32'd5; shamt = 0; #1;     // r5 + 5
    checks++; if (y !== 32'd12 || ovf) failures++;
    op = ALU_SLL; a = 0; b = 32'd5; shamt = 5'd16; #1;     // LUI r5, 5
    checks++; if (y !== 32'h0005_0000) failures++;
    op = ALU_OR; a = 32'hdead_0000; b = 32'h0000_beef; #1;  // ORI after LUI
    checks++; if (y !== 32'hdead_beef) failures++;
    op = ALU_SRA; a = 0; b = 32'h8000_0000; shamt = 5'd4; #1;
    checks++; if (y !== 32'hf800_0000) failures++;
    op = ALU_SRL; #1;
    checks++; if (y !== 32'h0800_0000) failures++;
    check(ALU_ADD, 32'h7fff_ffff, 32'd1, 0);   // overflow
    check(ALU_SUB, 32'h8000_0000, 32'd1, 0);   // overflow
    check(ALU_SLT, 32'hffff_ffff, 32'd1, 0);
    check(ALU_SLTU, 32'hffff_ffff, 32'd1, 0);
    for (int k = 0; k < 3000; k++)
      check(ops[k % 11], $urandom, ($urandom % 4 == 0) ? 32'($urandom % 8) : $urandom,
            int'($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
