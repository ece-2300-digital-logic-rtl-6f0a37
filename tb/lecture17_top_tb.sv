// lecture17_top_tb: end-to-end test of the whole design at its default
// sizes. The same multiplication runs on all four machines at once:
//  * the state-machine multiplier gets the sign-extended bytes as 16-bit
//    words at M[0] and M[1] and a start pulse;
//  * the control-word processor runs its ROM program on 16-bit words
//    placed at M[0] and M[1] (given the sign-extended bytes);
//  * the single-cycle processor runs the instruction-set version of the
//    program (LB operands from bytes 0 and 1, SW result to bytes 2..3);
//  * the pipelined processor runs the same program with NOPs spacing
//    dependent instructions and filling the two branch delay slots.
// All four products must equal the product computed here, and each
// machine must take the number of cycles worked out from the multiplier:
// state machine 5 + sum(3 + bit) busy cycles, control-word machine
// 5 + sum(5 + bit) to reach PC 11, single-cycle 5 + sum(5 + bit) to reach
// HALT, pipeline 11 + sum(15 + bit) instructions
// plus 4 cycles to drain.
// Mechanisms counted, each of which must occur: both outcomes of the state
// machine's two conditional transitions, taken and not-taken branches on
// every processor, delay-slot instructions and five instructions in flight in the pipeline, loads and stores, HALT.
module lecture17_top_tb;
  import isa_pkg::*;
  import isa_ref_pkg::*;

  logic        clk = 0;
  logic        fm_rst = 1, fm_start = 0, fm_busy, fm_ext_we = 0;
  logic [7:0]  fm_ext_addr = 0;
  word_t       fm_ext_rdata, fm_ext_wdata = 0;
  int          fm_skip = 0, fm_noskip = 0, fm_loop = 0, fm_exit = 0;
  logic        cw_rst = 1, sc_rst = 1, pp_rst = 1;
  logic [3:0]  cw_pc;
  logic [7:0]  cw_ext_addr = 0;
  word_t       cw_ext_rdata, cw_ext_wdata = 0;
  logic        cw_ext_we = 0;
  word_t       sc_pc, pp_pc;
  logic        sc_halted, pp_halted, pp_retire;
  logic        sc_imem_we = 0, pp_imem_we = 0, sc_dmem_we = 0, pp_dmem_we = 0;
  logic [15:0] sc_imem_addr = 0, pp_imem_addr = 0, sc_dmem_addr = 0, pp_dmem_addr = 0;
  word_t       sc_imem_wdata = 0, pp_imem_wdata = 0, sc_dmem_wdata = 0, pp_dmem_wdata = 0;
  word_t       sc_dmem_rdata, pp_dmem_rdata;
  int checks = 0, failures = 0;
  int cw_taken = 0, cw_fall = 0, sc_taken = 0, sc_fall = 0, pp_taken = 0, pp_fall = 0;
  int pp_delay = 0, pp_full = 0, n_load = 0, n_store = 0, n_halt = 0;

  lecture17_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (!fm_rst && dut.u_fm.u_ctrl.state == 4'd5) begin
      if (dut.u_fm.u_ctrl.next == 4'd7) fm_skip++; else fm_noskip++;
    end
    if (!fm_rst && dut.u_fm.u_ctrl.state == 4'd8) begin
      if (dut.u_fm.u_ctrl.next == 4'd5) fm_loop++; else fm_exit++;
    end
    if (!cw_rst && dut.u_cw.cw.bs inside {BS_Z, BS_NZ}) begin
      if (dut.u_cw.mp) cw_taken++; else cw_fall++;
    end
    if (!sc_rst && dut.u_sc.ctrl.bs != BS_NEVER) begin
      if (dut.u_sc.mp) sc_taken++; else sc_fall++;
    end
    if (!sc_rst && dut.u_sc.ctrl.md) n_load++;
    if (!sc_rst && dut.u_sc.ctrl.mw) n_store++;
    if (!pp_rst) begin
      if (dut.u_pp.id_ex.valid && dut.u_pp.id_ex.ctrl.bs != BS_NEVER) begin
        if (dut.u_pp.pcj) begin pp_taken++; if (dut.u_pp.if_id.valid) pp_delay++; end
        else pp_fall++;
      end
      if (dut.u_pp.if_id.valid && dut.u_pp.id_ex.valid && dut.u_pp.ex_mem.valid && dut.u_pp.mem_wb.valid) pp_full++;
      if (dut.u_pp.ex_mem.valid && dut.u_pp.ex_mem.md) n_load++;
      if (dut.u_pp.ex_mem.valid && dut.u_pp.ex_mem.mw) n_store++;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  u16 sc_prog [$], pp_prog [$];
  initial begin
    sc_prog = '{
      a_sub(0, 0, 0), a_lb(1, 0, 0), a_lb(2, 1, 0), a_sub(3, 3, 3),
      a_andi(4, 2, 1), a_beq(4, 0, 2), a_add(3, 3, 1), a_sll(1, 1),
      a_srl(2, 2), a_bne(2, 0, -5), a_sw(3, 2, 0), a_halt()
    };
    pp_prog = '{
      a_sub(0, 0, 0), a_nop(), a_nop(), a_nop(),
      a_lb(1, 0, 0), a_lb(2, 1, 0), a_sub(3, 3, 3), a_nop(), a_nop(),
      a_andi(4, 2, 1), a_nop(), a_nop(), a_nop(),
      a_beq(4, 0, 4), a_nop(), a_nop(),
      a_add(3, 3, 1), a_sll(1, 1),
      a_srl(2, 2), a_nop(), a_nop(), a_nop(),
      a_bne(2, 0, -13), a_nop(), a_nop(),
      a_sw(3, 2, 0), a_halt()
    };
  end

  task automatic run(logic [7:0] x, logic [7:0] y);
    u16 sx = {{8{x[7]}}, x}, sy = {{8{y[7]}}, y}, r2, exp_p;
    int cw_cyc = -1, sc_cyc = -1, pp_cyc = -1, fm_cyc = 0, exp_sc, exp_pp, exp_fm, c;
    cw_rst = 1; sc_rst = 1; pp_rst = 1; fm_rst = 1;
    // programs and operands
    for (int i = 0; i < pp_prog.size(); i++) begin
      @(negedge clk);
      pp_imem_we = 1; pp_imem_addr = 16'(2 * i); pp_imem_wdata = pp_prog[i];
      sc_imem_we = (i < sc_prog.size()); sc_imem_addr = 16'(2 * i);
      sc_imem_wdata = (i < sc_prog.size()) ? sc_prog[i] : 16'h0000;
    end
    @(negedge clk);
    pp_imem_we = 0; sc_imem_we = 0;
    sc_dmem_we = 1; sc_dmem_addr = 0; sc_dmem_wdata = {y, x};
    pp_dmem_we = 1; pp_dmem_addr = 0; pp_dmem_wdata = {y, x};
    cw_ext_we = 1; cw_ext_addr = 0; cw_ext_wdata = sx;
    fm_ext_we = 1; fm_ext_addr = 0; fm_ext_wdata = sx;
    @(negedge clk);
    sc_dmem_addr = 2; sc_dmem_wdata = 16'h1111;
    pp_dmem_addr = 2; pp_dmem_wdata = 16'h2222;
    cw_ext_addr = 1; cw_ext_wdata = sy;
    fm_ext_addr = 1; fm_ext_wdata = sy;
    @(negedge clk);
    sc_dmem_we = 0; pp_dmem_we = 0; cw_ext_we = 0; cw_ext_addr = 2;
    fm_ext_we = 0; fm_ext_addr = 2;
    cw_rst = 0; sc_rst = 0; pp_rst = 0; fm_rst = 0;
    fm_start = 1;
    // cycle c + 1 is the cycle being observed
    for (c = 0; c < 2000 && (cw_cyc < 0 || sc_cyc < 0 || pp_cyc < 0); c++) begin
      #1;
      if (cw_cyc < 0 && cw_pc == 4'd11) cw_cyc = c;
      if (sc_cyc < 0 && sc_halted) sc_cyc = c;
      if (pp_cyc < 0 && pp_halted) pp_cyc = c + 1;
      if (fm_busy) fm_cyc++;
      @(negedge clk);
      fm_start = 0;
    end
    if (sc_halted && pp_halted) n_halt++;
    exp_p = u16'(sx * sy);
    r2 = sy; exp_sc = 5; exp_pp = 11; exp_fm = 5;
    do begin
      exp_sc += 5 + int'(r2[0]); exp_pp += 15 + int'(r2[0]); exp_fm += 3 + int'(r2[0]);
      r2 = r2 >> 1;
    end while (r2 != 0);
    exp_pp += 4;
    #1;
    check(!fm_busy && fm_ext_rdata == exp_p, $sformatf("fsm product %h exp %h", fm_ext_rdata, exp_p));
    check(fm_cyc == exp_fm, $sformatf("fsm busy cycles %0d exp %0d", fm_cyc, exp_fm));
    check(cw_ext_rdata == exp_p, $sformatf("cw product %h exp %h", cw_ext_rdata, exp_p));
    check(sc_dmem_rdata == exp_p, $sformatf("sc product %h exp %h", sc_dmem_rdata, exp_p));
    check(pp_dmem_rdata == exp_p, $sformatf("pp product %h exp %h", pp_dmem_rdata, exp_p));
    check(cw_cyc == exp_sc, $sformatf("cw cycles %0d exp %0d", cw_cyc, exp_sc));
    check(sc_cyc == exp_sc, $sformatf("sc cycles %0d exp %0d", sc_cyc, exp_sc));
    check(pp_cyc == exp_pp, $sformatf("pp cycles %0d exp %0d", pp_cyc, exp_pp));
  endtask

  initial begin
    run(8'd3, 8'd5);
    run(8'd25, 8'd0);
    run(8'hf6, 8'd13);
    run(8'd7, 8'hfd);
    for (int n = 0; n < 8; n++) run(8'($urandom), 8'($urandom));
    $display("state machine: 5->7 %0d, 5->6 %0d, 8->5 %0d, 8->9 %0d", fm_skip, fm_noskip, fm_loop, fm_exit);
    check(fm_skip > 0 && fm_noskip > 0 && fm_loop > 0 && fm_exit > 0, "state-machine transitions both ways");
    $display("mechanisms: cw taken %0d/not %0d, sc taken %0d/not %0d, pp taken %0d/not %0d, delay slots %0d, full pipe %0d, loads %0d, stores %0d, halts %0d",
             cw_taken, cw_fall, sc_taken, sc_fall, pp_taken, pp_fall, pp_delay, pp_full, n_load, n_store, n_halt);
    check(cw_taken > 0 && cw_fall > 0, "control-word branches both ways");
    check(sc_taken > 0 && sc_fall > 0, "single-cycle branches both ways");
    check(pp_taken > 0 && pp_fall > 0, "pipeline branches both ways");
    check(pp_delay > 0, "delay slot executed");
    check(pp_full > 0, "five instructions in flight");
    check(n_load > 0 && n_store > 0, "loads and stores");
    check(n_halt > 0, "halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
