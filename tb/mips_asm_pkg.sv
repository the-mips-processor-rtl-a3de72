// mips_asm_pkg -- instruction encoders for the processor testbenches.
//
// Each function returns the 32-bit machine word of one MIPS instruction, built
// from the field layouts (R: op rs rt rd shamt funct; I: op rs rt imm16;
// J: op target26) and the standard opcode numbers, written out here as plain
// numbers so that the encodings do not depend on the design's own package.
// Register arguments follow the assembler order used in the instruction
// tables: "ADDIU rd, rs, imm" puts rd in bits 20:16.
package mips_asm_pkg;

  function automatic logic [31:0] r_type(input int rs, input int rt, input int rd,
                                          input int sh, input int fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction

  function automatic logic [31:0] i_type(input int op, input int rs, input int rt,
                                          input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // R-type: rd = rs op rt
  function automatic logic [31:0] ADD (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h20); endfunction
  function automatic logic [31:0] ADDU(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h21); endfunction
  function automatic logic [31:0] SUB (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h22); endfunction
  function automatic logic [31:0] SUBU(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h23); endfunction
  function automatic logic [31:0] AND_(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h24); endfunction
  function automatic logic [31:0] OR_ (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h25); endfunction
  function automatic logic [31:0] XOR_(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h26); endfunction
  function automatic logic [31:0] NOR_(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h27); endfunction
  function automatic logic [31:0] SLT (input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h2a); endfunction
  function automatic logic [31:0] SLTU(input int rd, rs, rt); return r_type(rs, rt, rd, 0, 'h2b); endfunction
  // shifts: rd = rt shift sh
  function automatic logic [31:0] SLL (input int rd, rt, sh); return r_type(0, rt, rd, sh, 'h00); endfunction
  function automatic logic [31:0] SRL (input int rd, rt, sh); return r_type(0, rt, rd, sh, 'h02); endfunction
  function automatic logic [31:0] SRA (input int rd, rt, sh); return r_type(0, rt, rd, sh, 'h03); endfunction
  function automatic logic [31:0] JR  (input int rs);         return r_type(rs, 0, 0, 0, 'h08); endfunction
  function automatic logic [31:0] NOP ();                     return 32'h0000_0000; endfunction

  // I-type arithmetic: rd = rs op imm
  function automatic logic [31:0] ADDI (input int rd, rs, imm); return i_type('h08, rs, rd, imm); endfunction
  function automatic logic [31:0] ADDIU(input int rd, rs, imm); return i_type('h09, rs, rd, imm); endfunction
  function automatic logic [31:0] ANDI (input int rd, rs, imm); return i_type('h0c, rs, rd, imm); endfunction
  function automatic logic [31:0] ORI  (input int rd, rs, imm); return i_type('h0d, rs, rd, imm); endfunction
  function automatic logic [31:0] LUI  (input int rd, imm);     return i_type('h0f, 0, rd, imm); endfunction

  // memory: rd <-> Mem[off + rs]
  function automatic logic [31:0] LB (input int rd, off, rs); return i_type('h20, rs, rd, off); endfunction
  function automatic logic [31:0] LH (input int rd, off, rs); return i_type('h21, rs, rd, off); endfunction
  function automatic logic [31:0] LW (input int rd, off, rs); return i_type('h23, rs, rd, off); endfunction
  function automatic logic [31:0] LBU(input int rd, off, rs); return i_type('h24, rs, rd, off); endfunction
  function automatic logic [31:0] LHU(input int rd, off, rs); return i_type('h25, rs, rd, off); endfunction
  function automatic logic [31:0] SB (input int rd, off, rs); return i_type('h28, rs, rd, off); endfunction
  function automatic logic [31:0] SH (input int rd, off, rs); return i_type('h29, rs, rd, off); endfunction
  function automatic logic [31:0] SW (input int rd, off, rs); return i_type('h2b, rs, rd, off); endfunction

  // control flow; offsets in words, relative to PC+4
  function automatic logic [31:0] BEQ (input int rs, rt, off); return i_type('h04, rs, rt, off); endfunction
  function automatic logic [31:0] BNE (input int rs, rt, off); return i_type('h05, rs, rt, off); endfunction
  function automatic logic [31:0] BLEZ(input int rs, off);     return i_type('h06, rs, 0, off); endfunction
  function automatic logic [31:0] BGTZ(input int rs, off);     return i_type('h07, rs, 0, off); endfunction
  function automatic logic [31:0] BLTZ(input int rs, off);     return i_type('h01, rs, 0, off); endfunction
  function automatic logic [31:0] BGEZ(input int rs, off);     return i_type('h01, rs, 1, off); endfunction
  function automatic logic [31:0] J   (input int tgt);         return {6'h02, 26'(tgt)}; endfunction
  function automatic logic [31:0] JAL (input int tgt);         return {6'h03, 26'(tgt)}; endfunction

endpackage
