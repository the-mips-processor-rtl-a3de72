// extend -- widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// With sign_ext high the upper half repeats bit 15 (ADDIU, branch offsets,
// load/store offsets); with it low the upper half is zero (ANDI, ORI, LUI).
// Purely combinational.  The 16-in/32-out widths and the control input follow
// the datapath drawings of the core; the single select bit is this design's
// choice.
module extend (
  input  logic [15:0] imm,
  input  logic        sign_ext,
  output logic [31:0] ext
);
  always_comb ext = {{16{sign_ext & imm[15]}}, imm};
endmodule
