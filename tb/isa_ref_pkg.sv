// isa_ref_pkg: instruction-set reference for the testbenches.
//
// * A tiny assembler: one function per instruction returning its 16-bit
//   encoding (R format OP RS RT RD FUNCT, I format OP RS RT IMM).
// * isa_model: an instruction-by-instruction interpreter of the 16-bit
//   instruction set, written from the instruction definitions alone (it
//   shares no code with the RTL). One call of step() executes the
//   instruction at pc and records what it wrote, so a testbench can compare
//   architectural state or the stream of register and memory writes.
package isa_ref_pkg;

  typedef logic [15:0] u16;

  // ---------------- assembler ----------------
  function automatic u16 rr(int rd, int rs, int rt, int funct);
    return {4'b1111, 3'(rs), 3'(rt), 3'(rd), 3'(funct)};
  endfunction
  function automatic u16 ii(int op, int rs, int rt, int imm);
    return {4'(op), 3'(rs), 3'(rt), 6'(imm)};
  endfunction

  function automatic u16 a_add (int rd, int rs, int rt); return rr(rd, rs, rt, 0); endfunction
  function automatic u16 a_sub (int rd, int rs, int rt); return rr(rd, rs, rt, 1); endfunction
  function automatic u16 a_sra (int rd, int rs);         return rr(rd, rs, 0, 2);  endfunction
  function automatic u16 a_srl (int rd, int rs);         return rr(rd, rs, 0, 3);  endfunction
  function automatic u16 a_sll (int rd, int rs);         return rr(rd, rs, 0, 4);  endfunction
  function automatic u16 a_and (int rd, int rs, int rt); return rr(rd, rs, rt, 5); endfunction
  function automatic u16 a_or  (int rd, int rs, int rt); return rr(rd, rs, rt, 6); endfunction
  function automatic u16 a_nop ();                       return 16'h0000;          endfunction
  function automatic u16 a_halt();                       return 16'h0001;          endfunction
  function automatic u16 a_lw  (int rt, int off, int rs); return ii(1, rs, rt, off); endfunction
  function automatic u16 a_lb  (int rt, int off, int rs); return ii(2, rs, rt, off); endfunction
  function automatic u16 a_sw  (int rt, int off, int rs); return ii(3, rs, rt, off); endfunction
  function automatic u16 a_sb  (int rt, int off, int rs); return ii(4, rs, rt, off); endfunction
  function automatic u16 a_addi(int rt, int rs, int imm); return ii(5, rs, rt, imm); endfunction
  function automatic u16 a_andi(int rt, int rs, int imm); return ii(6, rs, rt, imm); endfunction
  function automatic u16 a_ori (int rt, int rs, int imm); return ii(7, rs, rt, imm); endfunction
  // branch offsets count instructions from the branch itself
  function automatic u16 a_beq (int rt, int rs, int off); return ii(8, rs, rt, off); endfunction
  function automatic u16 a_bne (int rt, int rs, int off); return ii(9, rs, rt, off); endfunction
  function automatic u16 a_bgez(int rs, int off);         return ii(10, rs, 0, off); endfunction
  function automatic u16 a_bltz(int rs, int off);         return ii(11, rs, 0, off); endfunction

  // ---------------- interpreter ----------------
  class isa_model;
    u16         r [8];
    u16         pc;
    logic [7:0] imem [65536];
    logic [7:0] dmem [65536];
    bit         halted;
    // what the last step wrote
    bit         wrote_reg;
    int         wr_idx;
    u16         wr_val;
    bit         wrote_mem;
    bit         wr_byte;
    u16         wr_addr;
    u16         wr_data;
    bit         branch_taken, is_branch, is_load, is_store;

    function new();
      foreach (r[i]) r[i] = 0;
      pc = 0;
      halted = 0;
    endfunction

    function automatic u16 fetch(u16 a);
      return {imem[16'(a + 1)], imem[a]};
    endfunction

    function automatic void step();
      u16 ins, a, b, res, addr, simm, zimm, tgt;
      int op, rs, rt, rd, fn;
      wrote_reg = 0; wrote_mem = 0; branch_taken = 0;
      is_branch = 0; is_load = 0; is_store = 0;
      if (halted) return;
      ins  = fetch(pc);
      op   = int'(ins[15:12]);
      rs   = int'(ins[11:9]);
      rt   = int'(ins[8:6]);
      rd   = int'(ins[5:3]);
      fn   = int'(ins[2:0]);
      simm = {{10{ins[5]}}, ins[5:0]};
      zimm = {10'd0, ins[5:0]};
      a    = r[rs];
      b    = r[rt];
      addr = a + simm;
      tgt  = pc + {simm[14:0], 1'b0};
      pc   = pc + 2;
      case (op)
        15: begin
          wrote_reg = 1; wr_idx = rd;
          case (fn)
            0: res = a + b;
            1: res = a - b;
            2: res = {a[15], a[15:1]};
            3: res = {1'b0, a[15:1]};
            4: res = {a[14:0], 1'b0};
            5: res = a & b;
            6: res = a | b;
            default: wrote_reg = 0;
          endcase
          wr_val = res;
        end
        0: if (fn == 1) begin halted = 1; pc = pc - 2; end
        1: begin is_load = 1; wrote_reg = 1; wr_idx = rt; wr_val = {dmem[16'(addr + 1)], dmem[addr]}; end
        2: begin is_load = 1; wrote_reg = 1; wr_idx = rt; wr_val = {{8{dmem[addr][7]}}, dmem[addr]}; end
        3: begin is_store = 1; wrote_mem = 1; wr_byte = 0; wr_addr = addr; wr_data = b;
                 dmem[addr] = b[7:0]; dmem[16'(addr + 1)] = b[15:8]; end
        4: begin is_store = 1; wrote_mem = 1; wr_byte = 1; wr_addr = addr; wr_data = b;
                 dmem[addr] = b[7:0]; end
        5: begin wrote_reg = 1; wr_idx = rt; wr_val = a + simm; end
        6: begin wrote_reg = 1; wr_idx = rt; wr_val = a & zimm; end
        7: begin wrote_reg = 1; wr_idx = rt; wr_val = a | zimm; end
        8:  begin is_branch = 1; branch_taken = (a == b); end
        9:  begin is_branch = 1; branch_taken = (a != b); end
        10: begin is_branch = 1; branch_taken = !a[15]; end
        11: begin is_branch = 1; branch_taken = a[15]; end
        default: ;
      endcase
      if (branch_taken) pc = tgt;
      if (wrote_reg) r[wr_idx] = wr_val;
    endfunction
  endclass

endpackage
