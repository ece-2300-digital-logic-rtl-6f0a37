// branch_mux_tb: exhaustive self-checking test of the branch condition
// multiplexer: every BS code against all sixteen flag combinations,
// expected MP taken from the branch-select table (0, 1, Z, Z', N, N', C, V).
module branch_mux_tb;
  import isa_pkg::*;

  bs_e    bs;
  flags_t flags;
  logic   mp, exp;
  int checks = 0, failures = 0;

  branch_mux dut (.bs, .flags, .mp);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int fl = 0; fl < 16; fl++) begin
        bs = bs_e'(s);
        flags = flags_t'(fl);   // {v, c, z, n}
        #1;
        case (s)
          0: exp = 0;
          1: exp = 1;
          2: exp = fl[1];
          3: exp = !fl[1];
          4: exp = fl[0];
          5: exp = !fl[0];
          6: exp = fl[2];
          default: exp = fl[3];
        endcase
        checks++;
        if (mp !== exp) begin failures++; $display("FAIL bs=%0d flags=%b mp=%b", s, fl[3:0], mp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
