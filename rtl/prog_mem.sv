// prog_mem -- instruction memory of the single-cycle MIPS core.
//
// A word array read asynchronously at the PC: inst = mem[pc[AW-1:2]], so the
// instruction is available in the same cycle as the PC that fetches it.  The
// low two PC bits are ignored (instructions are word aligned) and addresses
// above AW bits wrap.  A separate write port, synchronous to clk, lets the
// environment load a program before reset is released; the core never writes
// it.  The document gives a 32-bit byte address space but no memory size; AW
// (byte address bits) defaults to 27, i.e. 128 MiB, and the load port is this
// design's own addition.
module prog_mem #(
  parameter int unsigned AW = 27   // byte address bits
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] inst,
  // program load port
  input  logic        load_we,
  input  logic [31:0] load_addr,   // byte address, word aligned
  input  logic [31:0] load_data
);
  localparam int unsigned WORDS = 1 << (AW - 2);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:2]] <= load_data;
  end

  assign inst = mem[pc[AW-1:2]];
endmodule
