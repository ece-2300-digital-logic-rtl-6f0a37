// alu_tb: self-checking test of the ALU.
// Drives every function with corner values and random operands and
// compares the result and the four flags with a reference computed here
// with integer arithmetic: C is the carry out of the 17-bit sum
// (A + ~B + 1 for SUB), V is set when the exact signed result leaves the
// 16-bit range.
module alu_tb;
  import isa_pkg::*;

  word_t  a, b, f;
  fs_e    fs;
  flags_t flags;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .fs, .f, .flags);

  task automatic check_one(word_t ta, word_t tb_, fs_e tfs);
    word_t  exp_f;
    flags_t exp;
    int     sa, sb, sres;
    logic [16:0] wide;
    word_t       nb;
    a = ta; b = tb_; fs = tfs;
    #1;
    sa = int'($signed(ta)); sb = int'($signed(tb_));
    exp = '0;
    case (tfs)
      FS_ADD: begin wide = 17'(ta) + 17'(tb_); exp_f = wide[15:0]; exp.c = wide[16];
                    sres = sa + sb; exp.v = (sres > 32767) || (sres < -32768); end
      FS_SUB: begin nb = ~tb_; wide = 17'(ta) + 17'(nb) + 17'd1; exp_f = wide[15:0]; exp.c = wide[16];
                    sres = sa - sb; exp.v = (sres > 32767) || (sres < -32768); end
      FS_SRA: exp_f = word_t'(sa / 2 - ((sa < 0 && (sa % 2) != 0) ? 1 : 0));
      FS_SRL: exp_f = ta / 2;
      FS_SLL: exp_f = word_t'(ta * 2);
      FS_AND: exp_f = ta & tb_;
      FS_OR:  exp_f = ta | tb_;
      default: exp_f = ta;
    endcase
    exp.z = (exp_f == 0);
    exp.n = exp_f[15];
    checks++;
    if (f !== exp_f || flags !== exp) begin
      failures++;
      $display("FAIL fs=%s a=%h b=%h f=%h exp=%h flags=%b exp=%b", tfs.name(), ta, tb_, f, exp_f, flags, exp);
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
    automatic word_t corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    for (int k = 0; k < 8; k++)
      foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j], fs_e'(k));
    for (int n = 0; n < 2000; n++) check_one(word_t'($urandom), word_t'($urandom), fs_e'($urandom_range(0, 7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
