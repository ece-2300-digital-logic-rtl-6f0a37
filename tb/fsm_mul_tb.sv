// fsm_mul_tb: runs the state-machine multiplier on corner and random
// 16-bit operands. Checks M[2] = M[0] * M[1] mod 2**16, that the operands
// are left in place, and that busy lasts 5 + sum(3 + bit) cycles over the
// bits of the multiplier (at least one pass).
module fsm_mul_tb;
  import isa_pkg::*;

  logic       clk = 0, rst = 1, start = 0, busy, ext_we = 0;
  logic [7:0] ext_addr = 0;
  word_t      ext_rdata, ext_wdata = 0;
  int checks = 0, failures = 0;

  fsm_mul #(.DAW(8)) dut (.clk, .rst, .start, .busy, .ext_addr, .ext_rdata, .ext_we, .ext_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(word_t a, word_t b);
    int cycles, expc;
    word_t bb;
    @(negedge clk);
    ext_we = 1; ext_addr = 0; ext_wdata = a;
    @(negedge clk);
    ext_addr = 1; ext_wdata = b;
    @(negedge clk);
    ext_we = 0; ext_addr = 2;
    repeat ($urandom_range(0, 3)) @(negedge clk);   // idle while start is low
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (busy && cycles < 1000) begin @(negedge clk); cycles++; end
    bb = b; expc = 5;
    do begin expc += 3 + int'(bb[0]); bb = bb >> 1; end while (bb != 0);
    checks += 3;
    if (ext_rdata !== word_t'(32'(a) * 32'(b))) begin
      failures++; $display("FAIL %0d * %0d = %0d", a, b, ext_rdata);
    end
    if (cycles != expc) begin failures++; $display("FAIL %0d * %0d took %0d cycles exp %0d", a, b, cycles, expc); end
    ext_addr = 1; #1;
    if (ext_rdata !== b) begin failures++; $display("FAIL M[1] changed"); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    run(16'd3, 16'd5);
    run(16'd0, 16'd0);
    run(16'd7, 16'd1);
    run(16'hffff, 16'hffff);
    run(16'd1234, 16'd0);
    for (int n = 0; n < 40; n++) run(word_t'($urandom), word_t'($urandom_range(0, 65535) >> $urandom_range(0, 15)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
