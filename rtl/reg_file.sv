// reg_file -- the 32 x 32-bit general-purpose register file.
//
// Two asynchronous read ports (rs, rt) and one write port (rd) whose write
// takes effect at the rising clock edge when we is high, as a single-cycle core
// needs: an instruction reads its operands and writes its result in the same
// cycle.  Register r0 always reads zero and ignores writes (the example
// programs use r0 as the constant 0).  Three 5-bit register addresses come from
// the datapath drawings; the zero register and the synchronous reset that
// clears every register are this design's choices.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : regs[ra2];
  end
endmodule
