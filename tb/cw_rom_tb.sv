// cw_rom_tb: self-checking test of the control-word ROM. Compares every
// specified field of locations 0..10 with the multiplication program's
// control-word table (don't-care fields skipped) and checks that the
// remaining locations hold "branch always by 0".
module cw_rom_tb;
  import isa_pkg::*;

  logic [3:0] addr;
  cw_t        cw;
  int checks = 0, failures = 0;

  cw_rom #(.PCW(4)) dut (.addr, .cw);

  task automatic cmp(string name, int got, int exp);
    if (exp < 0) return;
    checks++;
    if (got != exp) begin failures++; $display("FAIL word %0d %s got %0d exp %0d", addr, name, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // DR SA SB IMM MB FS MD LD MW BS OFF ; -1 = don't care.
    // FS: ADD 0, SUB 1, SLL 4, SRL 3, AND 5. OFF as a 4-bit field.
    automatic int t [11][11] = '{
      '{ 0,  0,  0, -1,  0, 1,  0, 1, 0, 0, -1},
      '{ 1,  0, -1,  0,  1, 0,  1, 1, 0, 0, -1},
      '{ 2,  0, -1,  1,  1, 0,  1, 1, 0, 0, -1},
      '{ 3,  3,  3, -1,  0, 1,  0, 1, 0, 0, -1},
      '{ 4,  2, -1,  1,  1, 5,  0, 1, 0, 0, -1},
      '{-1,  4, -1,  0,  1, 1, -1, 0, 0, 2,  2},
      '{ 3,  3,  1, -1,  0, 0,  0, 1, 0, 0, -1},
      '{ 1,  1, -1, -1, -1, 4,  0, 1, 0, 0, -1},
      '{ 2,  2, -1, -1, -1, 3,  0, 1, 0, 0, -1},
      '{-1,  2, -1,  0,  1, 1, -1, 0, 0, 3, 11},   // -5
      '{-1,  0,  3,  2,  1, 0, -1, 0, 1, 0, -1}
    };
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      if (i <= 10) begin
        cmp("DR", int'(cw.dr), t[i][0]);  cmp("SA", int'(cw.sa), t[i][1]);
        cmp("SB", int'(cw.sb), t[i][2]);  cmp("IMM", int'(cw.imm), t[i][3]);
        cmp("MB", int'(cw.mb), t[i][4]);  cmp("FS", int'(cw.fs), t[i][5]);
        cmp("MD", int'(cw.md), t[i][6]);  cmp("LD", int'(cw.ld), t[i][7]);
        cmp("MW", int'(cw.mw), t[i][8]);  cmp("BS", int'(cw.bs), t[i][9]);
        cmp("OFF", int'(cw.off), t[i][10]);
      end else begin
        cmp("LD", int'(cw.ld), 0); cmp("MW", int'(cw.mw), 0);
        cmp("BS", int'(cw.bs), 1); cmp("OFF", int'(cw.off), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
