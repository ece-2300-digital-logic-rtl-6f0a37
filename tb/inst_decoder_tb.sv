// inst_decoder_tb: self-checking test of the instruction decoder.
// For every opcode (and every FUNCT of the R format) with random register
// fields and immediates, compares the control word with the row of the
// instruction-to-control-word table written out here. Fields the table
// marks as don't-care are not compared.
module inst_decoder_tb;
  import isa_pkg::*;

  logic [15:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  inst_decoder dut (.instr, .ctrl);

  // compare one field; -1 means don't care
  task automatic cmp(string name, int got, int exp);
    if (exp < 0) return;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL instr=%b field %s got %0d exp %0d", instr, name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs, rt, rd, fn, imm, sext, zext;
    // expected fields: dr sa sb imm mb fs md ld mw bs off mbyte halt
    int e [13];
    for (int n = 0; n < 4000; n++) begin
      instr = 16'($urandom);
      if (n < 16 * 8) instr[15:12] = 4'(n / 8);
      if (n < 16 * 8) instr[2:0] = 3'(n % 8);
      rs = int'(instr[11:9]); rt = int'(instr[8:6]); rd = int'(instr[5:3]);
      fn = int'(instr[2:0]);  imm = int'(instr[5:0]);
      zext = imm;
      sext = (imm >= 32) ? (imm - 64) & 32'hffff : imm;
      //         dr  sa  sb  imm  mb  fs  md  ld  mw  bs  off mbyte halt
      case (instr[15:12])
        4'b1111: e = '{rd, rs, (fn == 2 || fn == 3 || fn == 4) ? -1 : rt, -1,
                       (fn == 2 || fn == 3 || fn == 4) ? -1 : 0, fn == 7 ? -1 : fn, 0,
                       fn == 7 ? 0 : 1, 0, 0, -1, -1, 0};
        4'b0000: e = '{-1, -1, -1, -1, -1, -1, -1, 0, 0, 0, -1, -1, fn == 1 ? 1 : 0};
        4'b0001: e = '{rt, rs, -1, sext, 1, 0, 1, 1, 0, 0, -1, 0, 0};   // LW
        4'b0010: e = '{rt, rs, -1, sext, 1, 0, 1, 1, 0, 0, -1, 1, 0};   // LB
        4'b0011: e = '{-1, rs, rt, sext, 1, 0, -1, 0, 1, 0, -1, 0, 0};  // SW
        4'b0100: e = '{-1, rs, rt, sext, 1, 0, -1, 0, 1, 0, -1, 1, 0};  // SB
        4'b0101: e = '{rt, rs, -1, sext, 1, 0, 0, 1, 0, 0, -1, -1, 0};  // ADDI
        4'b0110: e = '{rt, rs, -1, zext, 1, 5, 0, 1, 0, 0, -1, -1, 0};  // ANDI
        4'b0111: e = '{rt, rs, -1, zext, 1, 6, 0, 1, 0, 0, -1, -1, 0};  // ORI
        4'b1000: e = '{-1, rs, rt, -1, 0, 1, -1, 0, 0, 2, imm, -1, 0};  // BEQ
        4'b1001: e = '{-1, rs, rt, -1, 0, 1, -1, 0, 0, 3, imm, -1, 0};  // BNE
        4'b1010: e = '{-1, rs, -1, 0, 1, 1, -1, 0, 0, 5, imm, -1, 0};   // BGEZ
        4'b1011: e = '{-1, rs, -1, 0, 1, 1, -1, 0, 0, 4, imm, -1, 0};   // BLTZ
        default: e = '{-1, -1, -1, -1, -1, -1, -1, 0, 0, 0, -1, -1, 0}; // unused
      endcase
      #1;
      cmp("dr", int'(ctrl.dr), e[0]);
      cmp("sa", int'(ctrl.sa), e[1]);
      cmp("sb", int'(ctrl.sb), e[2]);
      cmp("imm", int'(ctrl.imm), e[3]);
      cmp("mb", int'(ctrl.mb), e[4]);
      cmp("fs", int'(ctrl.fs), e[5]);
      cmp("md", int'(ctrl.md), e[6]);
      cmp("ld", int'(ctrl.ld), e[7]);
      cmp("mw", int'(ctrl.mw), e[8]);
      cmp("bs", int'(ctrl.bs), e[9]);
      cmp("off", int'(ctrl.off), e[10]);
      cmp("mbyte", int'(ctrl.mbyte), e[11]);
      cmp("halt", int'(ctrl.halt), e[12]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
