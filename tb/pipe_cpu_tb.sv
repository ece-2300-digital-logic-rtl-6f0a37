// pipe_cpu_tb: self-checking test of the five-stage pipelined processor.
//
// Part 1 (throughput): a straight-line program of N independent
// instructions ending in HALT must retire N instructions and raise
// `halted` in cycle N + 4 after reset, i.e. (N + 4) / N cycles per
// instruction; all five stages must be busy at once.
// Part 2 (multiplication): the shift-and-add program rewritten for the
// pipeline (three NOPs between dependent instructions, NOPs in the two
// delay slots after each branch). Checks the product and the cycle count:
// 9 setup instructions, 15 per loop pass plus 1 when the multiplier bit is
// 1, the store and HALT, plus 4 cycles to drain.
// Part 3 (random): random instructions, each followed by three NOPs, so
// that no hazard can occur; the stream of register writes in WB and of
// stores in MEM is compared, in order, with the one the instruction-set
// interpreter produces.
// Counted mechanisms, each of which must occur: taken and not-taken
// branches, instructions executed in a delay slot, loads, stores, HALT
// draining the pipeline, five instructions in flight.
module pipe_cpu_tb;
  import isa_pkg::*;
  import isa_ref_pkg::*;

  localparam int AW = 16;

  logic          clk = 0, rst = 1;
  word_t         pc;
  logic          halted, retire;
  logic          imem_we = 0, dmem_ext_we = 0;
  logic [AW-1:0] imem_addr = 0, dmem_ext_addr = 0;
  word_t         imem_wdata = 0, dmem_ext_rdata, dmem_ext_wdata = 0;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_delay = 0, n_load = 0, n_store = 0;
  int n_halt = 0, n_full = 0;

  pipe_cpu #(.IAW(AW), .DAW(AW)) dut (
    .clk, .rst, .pc, .halted, .retire, .imem_we, .imem_addr, .imem_wdata,
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

  // mechanism monitors
  always @(posedge clk) if (!rst) begin
    if (dut.if_id.valid && dut.id_ex.valid && dut.ex_mem.valid && dut.mem_wb.valid && !halted) n_full++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.bs != BS_NEVER) begin
      if (dut.pcj) begin
        n_taken++;
        if (dut.if_id.valid) n_delay++;
      end else n_not_taken++;
    end
    if (dut.ex_mem.valid && dut.ex_mem.md) n_load++;
    if (dut.ex_mem.valid && dut.ex_mem.mw) n_store++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load_prog(u16 prog [$]);
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = AW'(2 * i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
  endtask

  // run from reset until halted; returns cycles and retired instructions
  task automatic run_to_halt(output int cycles, output int retired, input int limit);
    @(negedge clk); rst = 0;
    cycles = 0; retired = 0;
    // cycles counts clock cycles up to and including the one in which
    // HALT is in WB; retire is sampled just after each edge, so it counts
    // the instruction in WB during the following cycle
    while (!halted && cycles < limit) begin
      @(posedge clk); #1;
      cycles++;
      if (retire) retired++;
    end
    cycles++;
    if (halted) n_halt++;
  endtask

  // ---------------- part 1 ----------------
  task automatic run_straight(int n);
    u16 prog [$];
    int cycles, retired;
    for (int i = 0; i < n - 1; i++) prog.push_back(a_addi(1 + i % 7, 0, i % 32));
    prog.push_back(a_halt());
    load_prog(prog);
    run_to_halt(cycles, retired, 10 * n + 20);
    check(cycles == n + 4, $sformatf("%0d instructions took %0d cycles exp %0d", n, cycles, n + 4));
    check(retired == n, $sformatf("retired %0d exp %0d", retired, n));
    for (int r = 1; r < 8 && r < n; r++) begin
      int last = -1;
      for (int i = 0; i < n - 1; i++) if (1 + i % 7 == r) last = i;
      check(dut.u_rf.regs[r] == u16'(last % 32), $sformatf("R%0d = %0d exp %0d", r, dut.u_rf.regs[r], last));
    end
    // the PC stays put after HALT
    begin
      word_t p0 = pc;
      repeat (3) @(posedge clk);
      #1 check(pc == p0 && halted, "PC held after HALT");
    end
  endtask

  // ---------------- part 2 ----------------
  u16 mul_prog [$];
  initial begin
    mul_prog = '{
      a_sub(0, 0, 0), a_nop(), a_nop(), a_nop(),       // 0-3
      a_lb(1, 0, 0),                                   // 4
      a_lb(2, 1, 0),                                   // 5
      a_sub(3, 3, 3),                                  // 6
      a_nop(), a_nop(),                                // 7-8
      a_andi(4, 2, 1), a_nop(), a_nop(), a_nop(),      // 9-12  loop
      a_beq(4, 0, 4), a_nop(), a_nop(),                // 13-15 to 17
      a_add(3, 3, 1),                                  // 16
      a_sll(1, 1),                                     // 17
      a_srl(2, 2), a_nop(), a_nop(), a_nop(),          // 18-21
      a_bne(2, 0, -13), a_nop(), a_nop(),              // 22-24 to 9
      a_sw(3, 2, 0),                                   // 25
      a_halt()                                         // 26
    };
  end

  task automatic run_mul(logic [7:0] x, logic [7:0] y);
    int cycles, retired, n;
    u16 sx, sy, r2, exp_p;
    load_prog(mul_prog);
    @(negedge clk); dmem_ext_we = 1; dmem_ext_addr = 0; dmem_ext_wdata = {y, x};
    @(negedge clk); dmem_ext_addr = 2; dmem_ext_wdata = 16'hbeef;
    @(negedge clk); dmem_ext_we = 0;
    run_to_halt(cycles, retired, 2000);
    sx = {{8{x[7]}}, x}; sy = {{8{y[7]}}, y};
    exp_p = u16'(sx * sy);
    r2 = sy; n = 9 + 2;
    do begin n += 15 + int'(r2[0]); r2 = r2 >> 1; end while (r2 != 0);
    dmem_ext_addr = 2; #1;
    check(dmem_ext_rdata == exp_p, $sformatf("mul %0d*%0d = %h exp %h", $signed(x), $signed(y), dmem_ext_rdata, exp_p));
    check(cycles == n + 4, $sformatf("mul took %0d cycles exp %0d", cycles, n + 4));
    check(retired == n, $sformatf("mul retired %0d exp %0d", retired, n));
  endtask

  // ---------------- part 3 ----------------
  function automatic u16 rand_instr();
    int k = $urandom_range(0, 199);
    int rs = $urandom_range(0, 7), rt = $urandom_range(0, 7), rd = $urandom_range(0, 7);
    int imm = $urandom_range(0, 63);
    if (k < 60)  return rr(rd, rs, rt, $urandom_range(0, 7));
    if (k < 90)  return ii($urandom_range(5, 7), rs, rt, imm);
    if (k < 115) return ii($urandom_range(1, 2), rs, rt, imm);
    if (k < 140) return ii($urandom_range(3, 4), rs, rt, imm);
    if (k < 190) return ii($urandom_range(8, 11), rs, rt, imm);
    if (k < 191) return a_halt();
    return a_nop();
  endfunction

  task automatic run_random(int ncycles);
    isa_model m = new();
    u16 w;
    logic [18:0] reg_q [$];     // model register writes {dr, value}
    logic [32:0] store_q [$];   // model stores {byte, address, data}
    int steps;
    rst = 1;
    for (int a = 0; a < 65536; a += 2) begin
      if (a >= 8192)     w = a_halt();
      else if (a % 8 == 0) w = rand_instr();
      else               w = a_nop();
      m.imem[a] = w[7:0]; m.imem[a + 1] = w[15:8];
      @(negedge clk); imem_we = 1; imem_addr = AW'(a); imem_wdata = w;
      w = u16'($urandom);
      m.dmem[a] = w[7:0]; m.dmem[a + 1] = w[15:8];
      dmem_ext_we = 1; dmem_ext_addr = AW'(a); dmem_ext_wdata = w;
    end
    @(negedge clk); imem_we = 0; dmem_ext_we = 0;
    @(negedge clk); rst = 0;
    for (int c = 0; c < ncycles && !halted; c++) begin
      @(negedge clk);
      // register write in WB this cycle
      if (dut.mem_wb.valid && dut.mem_wb.ld) begin
        steps = 0;
        while (reg_q.size() == 0 && !m.halted && steps < 100000) begin
          m.step(); steps++;
          if (m.wrote_reg) reg_q.push_back({m.wr_idx[2:0], m.wr_val});
          if (m.wrote_mem) store_q.push_back({m.wr_byte, m.wr_addr, m.wr_byte ? {8'd0, m.wr_data[7:0]} : m.wr_data});
        end
        checks++;
        if (reg_q.size() == 0) begin failures++; $display("FAIL unexpected register write"); break; end
        if (reg_q.pop_front() != {dut.mem_wb.dr, dut.mem_wb.wdata}) begin
          failures++; $display("FAIL cycle %0d register write R%0d=%h differs", c, dut.mem_wb.dr, dut.mem_wb.wdata);
        end
      end
      // store in MEM this cycle
      if (dut.ex_mem.valid && dut.ex_mem.mw) begin
        steps = 0;
        while (store_q.size() == 0 && !m.halted && steps < 100000) begin
          m.step(); steps++;
          if (m.wrote_reg) reg_q.push_back({m.wr_idx[2:0], m.wr_val});
          if (m.wrote_mem) store_q.push_back({m.wr_byte, m.wr_addr, m.wr_byte ? {8'd0, m.wr_data[7:0]} : m.wr_data});
        end
        checks++;
        if (store_q.size() == 0) begin failures++; $display("FAIL unexpected store"); break; end
        if (store_q.pop_front() != {dut.ex_mem.mbyte, dut.ex_mem.f,
                                    dut.ex_mem.mbyte ? {8'd0, dut.ex_mem.b[7:0]} : dut.ex_mem.b}) begin
          failures++; $display("FAIL cycle %0d store differs", c);
        end
      end
    end
    if (halted) begin
      n_halt++;
      // the interpreter must also halt, with no writes left over
      steps = 0;
      while (!m.halted && steps < 100000) begin
        m.step(); steps++;
        if (m.wrote_reg || m.wrote_mem) break;
      end
      check(m.halted && reg_q.size() == 0 && store_q.size() == 0, "interpreter halts with the pipeline");
    end
  endtask

  initial begin
    run_straight(5);
    run_straight(20);
    run_straight(100);
    run_mul(8'd3, 8'd5);
    run_mul(8'd0, 8'd9);
    run_mul(8'd11, 8'd0);
    run_mul(8'hff, 8'd7);
    run_mul(8'd100, 8'h9c);
    for (int n = 0; n < 6; n++) run_mul(8'($urandom), 8'($urandom));
    for (int n = 0; n < 6; n++) run_random(6000);
    $display("mechanisms: taken %0d not-taken %0d delay-slot %0d loads %0d stores %0d halts %0d full-pipe %0d",
             n_taken, n_not_taken, n_delay, n_load, n_store, n_halt, n_full);
    check(n_taken > 0, "taken branch seen");
    check(n_not_taken > 0, "not-taken branch seen");
    check(n_delay > 0, "delay slot executed");
    check(n_load > 0, "load seen");
    check(n_store > 0, "store seen");
    check(n_halt > 0, "halt seen");
    check(n_full > 0, "five instructions in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
