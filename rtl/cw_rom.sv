// cw_rom: program ROM of the control-word processor, holding the
// shift-and-add multiplication program.
//
// Each location is one complete control word (DR SA SB IMM MB FS MD LD MW
// BS OFF). Locations 0..10 hold the published multiplication program:
//   0: R0 <- R0 - R0          6: R3 <- R3 + R1
//   1: R1 <- M[R0]            7: R1 <- SLL(R1)
//   2: R2 <- M[R0+1]          8: R2 <- SRL(R2)
//   3: R3 <- R3 - R3          9: if (R2 != 0) goto 4   (R2 - 0, BS=Z', OFF=-5)
//   4: R4 <- R2 & 1          10: M[R0+2] <- R3
//   5: if (R4 == 0) goto 7   (R4 - 0, BS=Z, OFF=+2)
// so M[2] receives M[0] * M[1] (modulo 2**16). Fields the program marks
// as don't-care are 0 here. Every location from 11 up holds "branch always
// by 0", which parks the PC at 11 once the program is done; that closing
// word is this design's own choice. Combinational read.
module cw_rom
  import isa_pkg::*;
#(
  parameter int unsigned PCW = 4   // address bits: 2**PCW control words
) (
  input  logic [PCW-1:0] addr,
  output cw_t            cw
);

  // build one control word
  function automatic cw_t w(reg_idx_t dr, reg_idx_t sa, reg_idx_t sb, logic [3:0] imm,
                            logic mb, fs_e fs, logic md, logic ld, logic mw,
                            bs_e bs, logic [3:0] off);
    return '{dr: dr, sa: sa, sb: sb, imm: imm, mb: mb, fs: fs, md: md,
             ld: ld, mw: mw, bs: bs, off: off};
  endfunction

  always_comb begin
    unique case (32'(addr))
      //             DR    SA    SB    IMM    MB    FS      MD    LD    MW    BS         OFF
      0:  cw = w(3'd0, 3'd0, 3'd0, 4'd0,  1'b0, FS_SUB, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      1:  cw = w(3'd1, 3'd0, 3'd0, 4'd0,  1'b1, FS_ADD, 1'b1, 1'b1, 1'b0, BS_NEVER,  4'd0);
      2:  cw = w(3'd2, 3'd0, 3'd0, 4'd1,  1'b1, FS_ADD, 1'b1, 1'b1, 1'b0, BS_NEVER,  4'd0);
      3:  cw = w(3'd3, 3'd3, 3'd3, 4'd0,  1'b0, FS_SUB, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      4:  cw = w(3'd4, 3'd2, 3'd0, 4'd1,  1'b1, FS_AND, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      5:  cw = w(3'd0, 3'd4, 3'd0, 4'd0,  1'b1, FS_SUB, 1'b0, 1'b0, 1'b0, BS_Z,      4'd2);
      6:  cw = w(3'd3, 3'd3, 3'd1, 4'd0,  1'b0, FS_ADD, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      7:  cw = w(3'd1, 3'd1, 3'd0, 4'd0,  1'b0, FS_SLL, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      8:  cw = w(3'd2, 3'd2, 3'd0, 4'd0,  1'b0, FS_SRL, 1'b0, 1'b1, 1'b0, BS_NEVER,  4'd0);
      9:  cw = w(3'd0, 3'd2, 3'd0, 4'd0,  1'b1, FS_SUB, 1'b0, 1'b0, 1'b0, BS_NZ,     4'(-5));
      10: cw = w(3'd0, 3'd0, 3'd3, 4'd2,  1'b1, FS_ADD, 1'b0, 1'b0, 1'b1, BS_NEVER,  4'd0);
      default:
          cw = w(3'd0, 3'd0, 3'd0, 4'd0,  1'b0, FS_ADD, 1'b0, 1'b0, 1'b0, BS_ALWAYS, 4'd0);
    endcase
  end

endmodule
