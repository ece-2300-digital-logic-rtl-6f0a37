// cw_ram_tb: self-checking test of the word-addressed RAM of the
// control-word processor. Random writes on both ports, both read ports
// compared with a shadow copy each cycle.
module cw_ram_tb;
  localparam int AW = 8;

  logic          clk = 0, we = 0, ext_we = 0;
  logic [AW-1:0] addr = 0, ext_addr = 0;
  logic [15:0]   rdata, wdata = 0, ext_rdata, ext_wdata = 0;
  logic [15:0]   shadow [2**AW];
  int checks = 0, failures = 0;

  cw_ram #(.AW(AW)) dut (.clk, .addr, .rdata, .we, .wdata,
                         .ext_addr, .ext_rdata, .ext_we, .ext_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = AW'(i); ext_wdata = 16'($urandom); shadow[i] = ext_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ext_we = ($urandom_range(0, 3) == 0); ext_addr = AW'($urandom); ext_wdata = 16'($urandom);
      we = ($urandom_range(0, 1) == 1); addr = AW'($urandom); wdata = 16'($urandom);
      #1;
      checks += 2;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL read %h", addr); end
      if (ext_rdata !== shadow[ext_addr]) begin failures++; $display("FAIL ext read %h", ext_addr); end
      @(posedge clk);
      if (ext_we) shadow[ext_addr] = ext_wdata;
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
