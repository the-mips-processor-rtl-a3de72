// mips_iss_pkg -- instruction-level reference model for the processor tests.
//
// mips_iss executes one instruction per call of step() on its own register
// array and a sparse byte memory, following the instruction tables directly
// (no shared code with the RTL).  It models the same configuration knobs as
// the core: byte order, the branch delay slot (a taken branch or jump takes
// effect after the next instruction; JAL links PC+8, or PC+4 without a delay
// slot), ADD/SUB/ADDI dropping the result on signed overflow and unknown
// instructions doing nothing.  Counters record which mechanisms a program
// exercised.
package mips_iss_pkg;

  class mips_iss;
    bit [31:0] r [32];
    bit [31:0] pc;
    bit        pending;
    bit [31:0] pending_tgt;
    bit [7:0]  mem [bit [31:0]];
    bit        big_endian;
    bit        delay_slot;
    int unsigned mem_mask;
    // mechanism counters
    int n_taken, n_not_taken, n_jump, n_jal, n_jr, n_slot, n_load, n_store,
        n_byte, n_half, n_signext, n_lui, n_shift, n_ovf, n_illegal, n_r0;

    function new(bit be, bit ds, int unsigned aw);
      big_endian = be; delay_slot = ds; mem_mask = (aw >= 32) ? 32'hffff_ffff : ((1 << aw) - 1);
      foreach (r[i]) r[i] = 0;
      pc = 0; pending = 0; pending_tgt = 0;
    endfunction

    function bit [7:0] rd8(bit [31:0] a);
      a &= mem_mask;
      return mem.exists(a) ? mem[a] : 8'h00;
    endfunction

    function void wr8(bit [31:0] a, bit [7:0] d);
      mem[a & mem_mask] = d;
    endfunction

    function bit [31:0] load(bit [31:0] a, int n);
      bit [31:0] v = 0;
      for (int i = 0; i < n; i++)
        if (big_endian) v = (v << 8) | 32'(rd8(a + i));
        else            v = v | (32'(rd8(a + i)) << (8 * i));
      return v;
    endfunction

    function void store(bit [31:0] a, int n, bit [31:0] d);
      for (int i = 0; i < n; i++)
        if (big_endian) wr8(a + i, d[8*(n-1-i) +: 8]);
        else            wr8(a + i, d[8*i +: 8]);
    endfunction

    function void setr(int idx, bit [31:0] v);
      if (idx == 0) n_r0++;
      else r[idx] = v;
    endfunction

    // Execute the instruction w at pc; returns nothing, updates state.
    function void step(bit [31:0] w);
      int op = w[31:26], rs = w[25:21], rt = w[20:16], rd = w[15:11], sh = w[10:6], fn = w[5:0];
      bit [31:0] a = r[rs], b = r[rt];
      bit [31:0] sx = {{16{w[15]}}, w[15:0]};
      bit [31:0] zx = {16'd0, w[15:0]};
      bit [31:0] p4 = pc + 4;
      bit        redirect = 0;
      bit [31:0] tgt = 0;
      longint    s64;
      bit [31:0] ea = a + sx;

      case (op)
        0: case (fn)
          'h00: begin setr(rd, b << sh); n_shift++; end
          'h02: begin setr(rd, b >> sh); n_shift++; end
          'h03: begin setr(rd, 32'($signed(b) >>> sh)); n_shift++; end
          'h08: begin redirect = 1; tgt = a; n_jr++; end
          'h20: begin s64 = longint'($signed(a)) + longint'($signed(b));
                  if (s64 > 64'sh7fffffff || s64 < -64'sh80000000) n_ovf++; else setr(rd, 32'(s64)); end
          'h21: setr(rd, a + b);
          'h22: begin s64 = longint'($signed(a)) - longint'($signed(b));
                  if (s64 > 64'sh7fffffff || s64 < -64'sh80000000) n_ovf++; else setr(rd, 32'(s64)); end
          'h23: setr(rd, a - b);
          'h24: setr(rd, a & b);
          'h25: setr(rd, a | b);
          'h26: setr(rd, a ^ b);
          'h27: setr(rd, ~(a | b));
          'h2a: setr(rd, ($signed(a) < $signed(b)) ? 1 : 0);
          'h2b: setr(rd, (a < b) ? 1 : 0);
          default: n_illegal++;
        endcase
        'h08: begin s64 = longint'($signed(a)) + longint'($signed(sx));
                if (s64 > 64'sh7fffffff || s64 < -64'sh80000000) n_ovf++; else setr(rt, 32'(s64)); end
        'h09: setr(rt, a + sx);
        'h0c: setr(rt, a & zx);
        'h0d: setr(rt, a | zx);
        'h0f: begin setr(rt, zx << 16); n_lui++; end
        'h20: begin setr(rt, {{24{load(ea,1)[7]}}, load(ea,1)[7:0]}); n_load++; n_byte++; n_signext += load(ea,1)[7]; end
        'h24: begin setr(rt, load(ea, 1)); n_load++; n_byte++; end
        'h21: begin setr(rt, {{16{load(ea,2)[15]}}, load(ea,2)[15:0]}); n_load++; n_half++; n_signext += load(ea,2)[15]; end
        'h25: begin setr(rt, load(ea, 2)); n_load++; n_half++; end
        'h23: begin setr(rt, load(ea, 4)); n_load++; end
        'h28: begin store(ea, 1, b); n_store++; n_byte++; end
        'h29: begin store(ea, 2, b); n_store++; n_half++; end
        'h2b: begin store(ea, 4, b); n_store++; end
        'h02: begin redirect = 1; tgt = {p4[31:28], w[25:0], 2'b00}; n_jump++; end
        'h03: begin redirect = 1; tgt = {p4[31:28], w[25:0], 2'b00}; n_jal++;
                setr(31, delay_slot ? pc + 8 : pc + 4); end
        'h04, 'h05, 'h06, 'h07, 'h01: begin
          bit take, known;
          known = 1;
          case (op)
            'h04: take = (a == b);
            'h05: take = (a != b);
            'h06: take = ($signed(a) <= 0);
            'h07: take = ($signed(a) > 0);
            default: begin
              if (rt == 0) take = ($signed(a) < 0);
              else if (rt == 1) take = ($signed(a) >= 0);
              else begin take = 0; known = 0; n_illegal++; end
            end
          endcase
          if (take) begin redirect = 1; tgt = p4 + (sx << 2); n_taken++; end
          else if (known) n_not_taken++;
        end
        default: n_illegal++;
      endcase

      if (!delay_slot) pc = redirect ? tgt : p4;
      else if (pending) begin pc = pending_tgt; pending = 0; n_slot++; end
      else begin pc = p4; pending = redirect; pending_tgt = tgt; end
    endfunction
  endclass

endpackage
