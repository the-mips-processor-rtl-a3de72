// alu -- 32-bit arithmetic/logic unit of the single-cycle MIPS core.
//
// Computes y = a op b for add, subtract, AND, OR, XOR, NOR and the signed and
// unsigned set-less-than, and shifts b left or right (logical or arithmetic) by
// the 5-bit shamt input.  LUI runs through the same shifter: the datapath feeds
// the zero-extended immediate into b and the constant 16 into shamt.  ovf flags
// signed overflow of ADD/SUB; the unsigned forms simply ignore it.
// Combinational, no clock.  Which operations exist, the shifter taking b and a
// separate shamt input, and the LUI path through it follow the document's
// instruction tables and datapath drawings; the op encoding is this design's.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alu_op_e     op,
  output logic [31:0] y,
  output logic        ovf
);
  logic [31:0] sum, diff;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    ovf  = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y   = sum;
        ovf = (a[31] == b[31]) && (sum[31] != a[31]);
      end
      ALU_SUB: begin
        y   = diff;
        ovf = (a[31] != b[31]) && (diff[31] != a[31]);
      end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      default:  y = 32'd0;
    endcase
  end
endmodule
