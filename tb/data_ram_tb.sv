// data_ram_tb: self-checking test of the byte-addressed data RAM (reduced
// to 2**8 bytes). Random byte and word writes on the processor port and
// word writes on the external port, at any address (odd ones included);
// both read ports are compared with a byte-wide shadow copy every cycle.
// A word occupies the byte at its address (low half) and the next one.
module data_ram_tb;
  localparam int AW = 8;

  logic          clk = 0, we = 0, wbyte = 0, ext_we = 0;
  logic [AW-1:0] addr = 0, ext_addr = 0;
  logic [15:0]   rdata, wdata = 0, ext_rdata, ext_wdata = 0;
  logic [7:0]    shadow [2**AW];
  int checks = 0, failures = 0, byte_writes = 0;

  data_ram #(.AW(AW)) dut (.clk, .addr, .rdata, .we, .wbyte, .wdata,
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
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      ext_we = 1; ext_addr = AW'(i); ext_wdata = 16'($urandom);
      shadow[i] = ext_wdata[7:0]; shadow[i+1] = ext_wdata[15:8];
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ext_we    = ($urandom_range(0, 3) == 0);
      ext_addr  = AW'($urandom);
      ext_wdata = 16'($urandom);
      we        = ($urandom_range(0, 1) == 1);
      wbyte     = ($urandom_range(0, 1) == 1);
      addr      = AW'($urandom);
      wdata     = 16'($urandom);
      #1;
      checks += 2;
      if (rdata !== {shadow[AW'(addr + 1)], shadow[addr]}) begin
        failures++; $display("FAIL read %h got %h", addr, rdata);
      end
      if (ext_rdata !== {shadow[AW'(ext_addr + 1)], shadow[ext_addr]}) begin
        failures++; $display("FAIL ext read %h got %h", ext_addr, ext_rdata);
      end
      @(posedge clk);
      if (ext_we) begin
        shadow[ext_addr] = ext_wdata[7:0];
        shadow[AW'(ext_addr + 1)] = ext_wdata[15:8];
      end
      if (we) begin
        shadow[addr] = wdata[7:0];
        if (!wbyte) shadow[AW'(addr + 1)] = wdata[15:8];
        else byte_writes++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
