// inst_ram_tb: self-checking test of the instruction RAM (reduced to 2**8
// bytes to keep the shadow copy small). Loads random words at random
// addresses through the load port and checks fetches against a byte-wide
// shadow copy: low byte at the address, high byte at the next one.
module inst_ram_tb;
  localparam int AW = 8;

  logic          clk = 0, load_we = 0;
  logic [AW-1:0] pc = 0, load_addr = 0;
  logic [15:0]   instr, load_data = 0;
  logic [7:0]    shadow [2**AW];
  int checks = 0, failures = 0;

  inst_ram #(.AW(AW)) dut (.clk, .pc, .instr, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every byte first
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = 16'($urandom);
      shadow[i] = load_data[7:0]; shadow[i+1] = load_data[15:8];
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load_we   = ($urandom_range(0, 1) == 1);
      load_addr = AW'($urandom);
      load_data = 16'($urandom);
      pc        = AW'($urandom);
      #1;
      checks++;
      if (instr !== {shadow[AW'(pc + 1)], shadow[pc]}) begin
        failures++; $display("FAIL pc=%h got %h", pc, instr);
      end
      @(posedge clk);
      if (load_we) begin
        shadow[load_addr] = load_data[7:0];
        shadow[AW'(load_addr + 1)] = load_data[15:8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
