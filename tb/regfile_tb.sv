// regfile_tb: self-checking test of the register file.
// Resets it, then applies random writes while reading both ports at random
// addresses, comparing with a shadow copy kept here. Also checks that a
// read in the cycle of a write to the same register still shows the old
// value, and that LD = 0 leaves the registers alone.
module regfile_tb;
  import isa_pkg::*;

  logic     clk = 0, rst = 1, ld = 0;
  reg_idx_t sa = 0, sb = 0, dr = 0;
  word_t    data_a, data_b, d_in = 0;
  word_t    shadow [8];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .sa, .sb, .data_a, .data_b, .ld, .dr, .d_in);

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks += 2;
    if (data_a !== shadow[sa]) begin failures++; $display("FAIL %s A R%0d=%h exp %h", what, sa, data_a, shadow[sa]); end
    if (data_b !== shadow[sb]) begin failures++; $display("FAIL %s B R%0d=%h exp %h", what, sb, data_b, shadow[sb]); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 8; i++) begin sa = reg_idx_t'(i); sb = reg_idx_t'(7 - i); #1 compare("after reset"); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ld   = ($urandom_range(0, 3) != 0);
      dr   = reg_idx_t'($urandom);
      d_in = word_t'($urandom);
      sa   = reg_idx_t'($urandom);
      sb   = (n % 4 == 0) ? dr : reg_idx_t'($urandom);
      #1 compare("same cycle");        // old value before the edge
      @(posedge clk);
      if (ld) shadow[dr] = d_in;
      #1 compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
