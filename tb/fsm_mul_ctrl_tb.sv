// fsm_mul_ctrl_tb: self-checking test of the multiplier's state machine.
// Recognises the state from the control word it drives (each of S1..S9
// is distinct; the idle word writes nothing) and checks, over many random
// start and zero-flag sequences, that it waits in idle without start,
// follows 1..9 in order, goes 5 -> 7 when Z = 1 and 5 -> 6 otherwise,
// 8 -> 5 when Z = 0 and 8 -> 9 otherwise, and returns from 9 to idle.
// The control words are compared with the multiplier's S1..S9 table.
module fsm_mul_ctrl_tb;
  import isa_pkg::*;

  logic clk = 0, rst = 1, start = 0, z = 0;
  cw_t  cw;
  logic busy;
  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0, n_loop = 0, n_exit = 0, n_wait = 0;

  fsm_mul_ctrl dut (.clk, .rst, .start, .z, .cw, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word of state s: {DR, SA, SB, IMM, MB, FS, MD, LD, MW}, -1 = don't care
  function automatic bit word_is(int s);
    int t [10][9] = '{
      '{-1, -1, -1, -1, -1, -1, -1, 0, 0},
      '{ 0,  0,  0, -1,  0,  1,  0, 1, 0},
      '{ 1,  0, -1,  0,  1,  0,  1, 1, 0},
      '{ 2,  0, -1,  1,  1,  0,  1, 1, 0},
      '{ 3,  3,  3, -1,  0,  1,  0, 1, 0},
      '{ 4,  2, -1,  1,  1,  5,  0, 1, 0},
      '{ 3,  3,  1, -1,  0,  0,  0, 1, 0},
      '{ 1,  1, -1, -1, -1,  4,  0, 1, 0},
      '{ 2,  2, -1, -1, -1,  3,  0, 1, 0},
      '{-1,  0,  3,  2,  1,  0, -1, 0, 1}
    };
    int g [9];
    g = '{int'(cw.dr), int'(cw.sa), int'(cw.sb), int'(cw.imm), int'(cw.mb), int'(cw.fs),
          int'(cw.md), int'(cw.ld), int'(cw.mw)};
    for (int i = 0; i < 9; i++) if (t[s][i] >= 0 && t[s][i] != g[i]) return 0;
    return 1;
  endfunction

  task automatic expect_state(int s, string why);
    checks++;
    if (!word_is(s) || busy != (s != 0)) begin
      failures++; $display("FAIL expected state %0d (%s), busy=%b", s, why, busy);
    end
  endtask

  initial begin
    int s;
    @(negedge clk); rst = 0;
    s = 0;
    for (int n = 0; n < 4000; n++) begin
      start = ($urandom_range(0, 3) == 0);
      z     = ($urandom_range(0, 1) == 1);
      #1 expect_state(s, "current");
      case (s)
        0: begin if (start) s = 1; else n_wait++; end
        5: begin if (z) begin s = 7; n_skip++; end else begin s = 6; n_noskip++; end end
        8: begin if (z) begin s = 9; n_exit++; end else begin s = 5; n_loop++; end end
        9: s = 0;
        default: s = s + 1;
      endcase
      @(negedge clk);
    end
    checks++;
    if (n_skip == 0 || n_noskip == 0 || n_loop == 0 || n_exit == 0 || n_wait == 0) begin
      failures++; $display("FAIL not every transition taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
