// sc_cpu_tb: self-checking test of the single-cycle processor.
//
// Part 1 runs the shift-and-add multiplication program (bytes at M[0] and
// M[1], 16-bit product stored at M[2..3], HALT appended) for a set of
// operand pairs. It checks the product of the sign-extended bytes and that
// HALT is reached after exactly one cycle per instruction executed:
// 4 setup instructions, then per loop pass 5 (6 when the multiplier bit is
// 1), then the store.
// Part 2 fills the whole instruction RAM with random instructions (mostly
// real operations, some HALTs) and the whole data RAM with random bytes,
// then runs the processor in lockstep with the instruction-set
// interpreter, comparing PC and all eight registers every cycle and the
// whole data memory at the end. Taken and not-taken branches, loads,
// stores, byte accesses and HALT are counted and must all occur.
module sc_cpu_tb;
  import isa_pkg::*;
  import isa_ref_pkg::*;

  localparam int AW = 16;

  logic          clk = 0, rst = 1;
  word_t         pc;
  logic          halted;
  logic          imem_we = 0, dmem_ext_we = 0;
  logic [AW-1:0] imem_addr = 0, dmem_ext_addr = 0;
  word_t         imem_wdata = 0, dmem_ext_rdata, dmem_ext_wdata = 0;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_load = 0, n_store = 0, n_halt = 0;

  sc_cpu #(.IAW(AW), .DAW(AW)) dut (
    .clk, .rst, .pc, .halted, .imem_we, .imem_addr, .imem_wdata,
    .dmem_ext_addr, .dmem_ext_rdata, .dmem_ext_we, .dmem_ext_wdata
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write_imem(int a, u16 w);
    @(negedge clk); imem_we = 1; imem_addr = AW'(a); imem_wdata = w;
    @(negedge clk); imem_we = 0;
  endtask

  task automatic write_dmem(int a, u16 w);
    @(negedge clk); dmem_ext_we = 1; dmem_ext_addr = AW'(a); dmem_ext_wdata = w;
    @(negedge clk); dmem_ext_we = 0;
  endtask

  // ---------------- part 1: multiplication ----------------
  u16 mul_prog [12];
  initial begin
    // encodings as listed for the program (OP RS RT RD FUNCT / OP RS RT IMM),
    // don't-care bits as 0; the store is SW R3,2(R0), so RT = 011
    mul_prog = '{
      16'b1111_000_000_000_001,   // 0: SUB R0,R0,R0
      16'b0010_000_001_000000,    // 1: LB  R1,0(R0)
      16'b0010_000_010_000001,    // 2: LB  R2,1(R0)
      16'b1111_011_011_011_001,   // 3: SUB R3,R3,R3
      16'b0110_010_100_000001,    // 4: ANDI R4,R2,1
      16'b1000_000_100_000010,    // 5: BEQ R4,R0,7
      16'b1111_011_001_011_000,   // 6: ADD R3,R3,R1
      16'b1111_001_000_001_100,   // 7: SLL R1,R1
      16'b1111_010_000_010_011,   // 8: SRL R2,R2
      16'b1001_000_010_111011,    // 9: BNE R2,R0,4
      16'b0011_000_011_000010,    // 10: SW R3,2(R0)
      a_halt()                    // 11: HALT
    };
  end

  task automatic run_mul(logic [7:0] x, logic [7:0] y);
    int cycles, expc;
    u16 sx, sy, r2, exp_p;
    rst = 1;
    foreach (mul_prog[i]) write_imem(2 * i, mul_prog[i]);
    write_dmem(0, {y, x});
    write_dmem(2, 16'hdead);
    @(negedge clk); rst = 0;
    cycles = 0;
    #1;
    while (!halted && cycles < 500) begin @(negedge clk); #1; cycles++; end
    sx = {{8{x[7]}}, x}; sy = {{8{y[7]}}, y};
    exp_p = u16'(sx * sy);
    r2 = sy; expc = 5;
    do begin expc += 5 + int'(r2[0]); r2 = r2 >> 1; end while (r2 != 0);
    dmem_ext_addr = 2; #1;
    check(dmem_ext_rdata == exp_p, $sformatf("mul %0d*%0d = %h exp %h", $signed(x), $signed(y), dmem_ext_rdata, exp_p));
    check(cycles == expc, $sformatf("mul %0d*%0d took %0d cycles exp %0d", x, y, cycles, expc));
    check(pc == 16'd22, "halted at the HALT instruction");
  endtask

  // ---------------- part 2: random lockstep ----------------
  function automatic u16 rand_instr();
    int k = $urandom_range(0, 199);
    int rs = $urandom_range(0, 7), rt = $urandom_range(0, 7), rd = $urandom_range(0, 7);
    int imm = $urandom_range(0, 63);
    if (k < 60)  return rr(rd, rs, rt, $urandom_range(0, 7));
    if (k < 90)  return ii($urandom_range(5, 7), rs, rt, imm);
    if (k < 115) return ii($urandom_range(1, 2), rs, rt, imm);
    if (k < 140) return ii($urandom_range(3, 4), rs, rt, imm);
    if (k < 185) return ii($urandom_range(8, 11), rs, rt, ($urandom_range(0, 1) == 1) ? imm : $urandom_range(0, 3));
    if (k < 190) return a_halt();
    if (k < 195) return a_nop();
    return u16'($urandom_range(12, 14)) << 12;  // unused opcodes
  endfunction

  task automatic run_random(int ncycles);
    isa_model m = new();
    u16 w;
    rst = 1;
    for (int a = 0; a < 65536; a += 2) begin
      w = (a < 4096) ? rand_instr() : a_halt();
      m.imem[a] = w[7:0]; m.imem[a + 1] = w[15:8];
      @(negedge clk); imem_we = 1; imem_addr = AW'(a); imem_wdata = w;
      w = u16'($urandom);
      m.dmem[a] = w[7:0]; m.dmem[a + 1] = w[15:8];
      dmem_ext_we = 1; dmem_ext_addr = AW'(a); dmem_ext_wdata = w;
    end
    @(negedge clk); imem_we = 0; dmem_ext_we = 0;
    @(negedge clk); rst = 0;
    for (int c = 0; c < ncycles && !m.halted; c++) begin
      // state before the edge must match the interpreter
      checks++;
      if (pc != m.pc) begin failures++; $display("FAIL cycle %0d pc %h exp %h", c, pc, m.pc); break; end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (dut.u_rf.regs[i] != m.r[i]) begin
          failures++; $display("FAIL cycle %0d R%0d %h exp %h", c, i, dut.u_rf.regs[i], m.r[i]);
        end
      end
      m.step();
      if (m.is_branch) begin if (m.branch_taken) n_taken++; else n_not_taken++; end
      if (m.is_load) n_load++;
      if (m.is_store) n_store++;
      @(negedge clk);
    end
    if (m.halted) begin
      n_halt++;
      #1 check(halted == 1'b1, "halted raised on HALT");
      @(negedge clk);
      check(pc == m.pc, "PC stays on HALT");
    end
    for (int a = 0; a < 65536; a += 2) begin
      dmem_ext_addr = AW'(a); #1;
      checks++;
      if (dmem_ext_rdata != {m.dmem[a + 1], m.dmem[a]}) begin
        failures++; $display("FAIL mem %h = %h exp %h", a, dmem_ext_rdata, {m.dmem[a + 1], m.dmem[a]});
      end
    end
  endtask

  initial begin
    run_mul(8'd3, 8'd5);
    run_mul(8'd0, 8'd7);
    run_mul(8'd13, 8'd0);
    run_mul(8'd127, 8'd127);
    run_mul(8'hff, 8'd9);      // -1 * 9
    run_mul(8'd9, 8'hfe);      // 9 * -2
    run_mul(8'h80, 8'h80);
    for (int n = 0; n < 10; n++) run_mul(8'($urandom), 8'($urandom));
    for (int n = 0; n < 6; n++) run_random(3000);
    $display("coverage: taken %0d not-taken %0d loads %0d stores %0d halts %0d",
             n_taken, n_not_taken, n_load, n_store, n_halt);
    check(n_taken > 0 && n_not_taken > 0 && n_load > 0 && n_store > 0 && n_halt > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
