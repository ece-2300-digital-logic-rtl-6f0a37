// cw_cpu_tb: runs the multiplication program of the control-word
// processor. For each pair of operands (corner cases and random words) it
// writes A to M[0] and B to M[1], resets the processor, waits until the PC
// parks at 11, and checks M[2] = A * B mod 2**16. It also checks the
// number of cycles the program takes, worked out from B: 3 setup words,
// then per bit of B (at least one pass) 5 control words plus one more when
// the bit is 1, then the two closing words (step 4's first pass counted in
// the loop), i.e. 5 + sum over the passes of (5 + bit).
// Counts taken and not-taken branches at both branch words.
module cw_cpu_tb;
  import isa_pkg::*;

  logic        clk = 0, rst = 1, ext_we = 0;
  logic [3:0]  pc;
  logic [7:0]  ext_addr = 0;
  word_t       ext_rdata, ext_wdata = 0;
  int checks = 0, failures = 0;
  int taken5 = 0, fall5 = 0, taken9 = 0, fall9 = 0;

  cw_cpu #(.PCW(4), .DAW(8)) dut (.clk, .rst, .pc, .ext_addr, .ext_rdata, .ext_we, .ext_wdata);

  always #5 clk = ~clk;

  // branch statistics from the PC sequence
  logic [3:0] pc_prev;
  always @(posedge clk) begin
    pc_prev <= pc;
    if (!rst && pc_prev == 5) begin if (pc == 7) taken5++; else fall5++; end
    if (!rst && pc_prev == 9) begin if (pc == 4) taken9++; else fall9++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(word_t a, word_t b);
    int cycles, exp_cycles, passes;
    word_t bb, exp_p;
    @(negedge clk);
    rst = 1;
    ext_we = 1; ext_addr = 0; ext_wdata = a;
    @(negedge clk);
    ext_addr = 1; ext_wdata = b;
    @(negedge clk);
    ext_we = 0; ext_addr = 2;
    rst = 0;
    cycles = 0;
    while (pc != 4'd11 && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    exp_p = word_t'(32'(a) * 32'(b));
    bb = b; passes = 0; exp_cycles = 5;
    do begin exp_cycles += 5 + int'(bb[0]); bb = bb >> 1; passes++; end while (bb != 0);
    checks += 2;
    if (ext_rdata !== exp_p) begin
      failures++; $display("FAIL %0d * %0d gave %0d exp %0d", a, b, ext_rdata, exp_p);
    end
    if (cycles != exp_cycles) begin
      failures++; $display("FAIL %0d * %0d took %0d cycles exp %0d", a, b, cycles, exp_cycles);
    end
    // operands left in place
    ext_addr = 0; #1;
    checks++;
    if (ext_rdata !== a) begin failures++; $display("FAIL M[0] changed"); end
  endtask

  initial begin
    run(16'd3, 16'd5);
    run(16'd0, 16'd0);
    run(16'd1, 16'hffff);
    run(16'd255, 16'd255);
    run(16'h8000, 16'd2);
    for (int n = 0; n < 40; n++) run(word_t'($urandom), word_t'($urandom_range(0, 65535) >> $urandom_range(0, 15)));
    checks++;
    if (taken5 == 0 || fall5 == 0 || taken9 == 0 || fall9 == 0) begin
      failures++; $display("FAIL branch cases not all seen");
    end
    $display("branches: word5 taken %0d / not %0d, word9 taken %0d / not %0d", taken5, fall5, taken9, fall9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
