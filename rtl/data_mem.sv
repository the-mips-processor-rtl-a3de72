// data_mem -- byte-addressed data memory with byte, half-word and word access.
//
// Every address names one byte.  A load reads 1, 2 or 4 consecutive bytes
// starting at addr, assembles them according to BIG_ENDIAN and widens the
// result to 32 bits: sign-extended for LB/LH, zero-extended for LBU/LHU.  A
// store writes the low 1, 2 or 4 bytes of wdata at the rising clock edge when
// we is high.  Reads are asynchronous, so a load completes in the cycle that
// issues it, as the single-cycle datapath requires.
//
// Little endian (least significant byte at the lowest address) is the
// default, since that is the ordering the document says it uses; BIG_ENDIAN=1
// gives the other ordering, which its worked memory example uses.  The
// document's address space is 32 bits; AW (byte address bits, default 27 =
// 128 MiB) bounds the array and higher address bits wrap.  Accesses that are
// not naturally aligned are carried out byte by byte and raise no error: the
// document does not say how they behave.  Memory contents are not reset.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned AW         = 27,
  parameter bit          BIG_ENDIAN = 1'b0
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  mem_size_e   size,
  input  logic        load_unsigned,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned BYTES = 1 << AW;

  logic [7:0]    mem [BYTES];
  logic [AW-1:0] a [4];        // addresses of the four bytes of the access
  logic [7:0]    rb [4];       // bytes read at a[0..3]
  logic [7:0]    wb [4];       // byte to write at a[i]
  logic [3:0]    wmask;
  logic [15:0]   half;        // loaded half-word before extension

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i]  = addr[AW-1:0] + AW'(i);
      rb[i] = mem[a[i]];
    end

    // Load: gather bytes in significance order, then extend.
    half = BIG_ENDIAN ? {rb[0], rb[1]} : {rb[1], rb[0]};
    unique case (size)
      SIZE_BYTE: rdata = {{24{!load_unsigned & rb[0][7]}}, rb[0]};
      SIZE_HALF: rdata = {{16{!load_unsigned & half[15]}}, half};
      default:   rdata = BIG_ENDIAN ? {rb[0], rb[1], rb[2], rb[3]}
                                    : {rb[3], rb[2], rb[1], rb[0]};
    endcase

    // Store: byte i of the access is the i-th byte in memory order.
    unique case (size)
      SIZE_BYTE: begin
        wmask = 4'b0001;
        wb[0] = wdata[7:0];
        wb[1] = 8'h00;
        wb[2] = 8'h00;
        wb[3] = 8'h00;
      end
      SIZE_HALF: begin
        wmask = 4'b0011;
        wb[0] = BIG_ENDIAN ? wdata[15:8] : wdata[7:0];
        wb[1] = BIG_ENDIAN ? wdata[7:0]  : wdata[15:8];
        wb[2] = 8'h00;
        wb[3] = 8'h00;
      end
      default: begin
        wmask = 4'b1111;
        wb[0] = BIG_ENDIAN ? wdata[31:24] : wdata[7:0];
        wb[1] = BIG_ENDIAN ? wdata[23:16] : wdata[15:8];
        wb[2] = BIG_ENDIAN ? wdata[15:8]  : wdata[23:16];
        wb[3] = BIG_ENDIAN ? wdata[7:0]   : wdata[31:24];
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (wmask[i]) mem[a[i]] <= wb[i];
    end
  end
endmodule
