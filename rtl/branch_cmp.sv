// branch_cmp -- the two branch comparators of the datapath.
//
// The "=?" comparator tells whether R[rs] equals R[rt] (BEQ, BNE); the "cmp"
// unit tests the sign of R[rs] against zero (BLTZ, BGEZ, BLEZ, BGTZ).  Both are
// combinational and feed the decoder, which chooses the next PC.  That there are
// two separate comparators outside the ALU follows the datapath drawings; the
// three flag outputs (the other conditions are their complements) are this
// design's choice.
module branch_cmp (
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        eq,    // R[rs] == R[rt]
  output logic        ltz,   // R[rs] <  0 (signed)
  output logic        gtz    // R[rs] >  0 (signed)
);
  always_comb begin
    eq  = (rs_val == rt_val);
    ltz = rs_val[31];
    gtz = !rs_val[31] && (rs_val != 32'd0);
  end
endmodule
