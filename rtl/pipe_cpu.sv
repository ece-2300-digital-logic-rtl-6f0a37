// pipe_cpu: five-stage pipelined processor for the 16-bit instruction set.
//
// The single-cycle datapath is cut by the pipeline registers IF/ID, ID/EX,
// EX/MEM and MEM/WB into five steps, each taking one clock cycle:
//   IF  - the PC addresses the instruction RAM; the +2 adder forms the next
//         sequential PC.
//   ID  - the decoder forms the control word; the register file reads
//         R[SA] and R[SB]; the immediate is extended; the branch adder forms
//         the target PC + sext({OFF, 0}) from the PC of this instruction.
//   EX  - the MB mux and the ALU; the control unit (CU) takes the flags
//         V C Z N and, through the branch-select multiplexer, decides PCJ:
//         load the PC with the target carried in ID/EX.
//   MEM - the data RAM at the ALU result; the MD mux picks ALU result or
//         loaded data (LB sign-extends).
//   WB  - the register file writes the result into DR when LD is 1.
// DR and the other control bits travel with their instruction through the
// pipeline registers. Up to five instructions are in flight, so a
// straight-line program of N instructions finishes in N + 4 cycles.
//
// Hazards are not detected; software must space instructions:
//  * a register written by one instruction can be read by an instruction
//    at least four places later (the register file writes at the end of WB
//    and has no write-through), so three instructions must separate them;
//  * a branch is resolved in EX, so the two instructions after a branch are
//    already in the pipeline and always execute (two delay slots).
// HALT decoded in ID stops the PC (PCL = 0) and empties IF/ID from then on;
// the instructions ahead of it complete, and `halted` rises in the cycle
// HALT reaches WB and stays high until reset. `retire` is 1 in each cycle
// an instruction (NOPs and HALT included) is in WB.
// Taking the branch offset from the branch's own PC keeps the branch
// arithmetic of the single-cycle machine, so both run the same encodings.
// The stage split, the pipeline registers, PCJ/PCL and the position of the
// branch adder and CU follow the published pipelined datapath; hazard
// rules, delay slots and HALT behaviour are this design's choices.
module pipe_cpu
  import isa_pkg::*;
#(
  parameter int unsigned IAW = 16,  // instruction RAM address bits (bytes)
  parameter int unsigned DAW = 16   // data RAM address bits (bytes)
) (
  input  logic           clk,
  input  logic           rst,
  output word_t          pc,
  output logic           halted,
  output logic           retire,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  word_t          imem_wdata,
  input  logic [DAW-1:0] dmem_ext_addr,
  output word_t          dmem_ext_rdata,
  input  logic           dmem_ext_we,
  input  word_t          dmem_ext_wdata
);

  typedef struct packed {
    logic        valid;
    word_t       pc;
    logic [15:0] instr;
  } if_id_t;

  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    word_t a;
    word_t b;
    word_t target;
  } id_ex_t;

  typedef struct packed {
    logic     valid;
    logic     halt;
    word_t    f;
    word_t    b;
    reg_idx_t dr;
    logic     ld;
    logic     mw;
    logic     md;
    logic     mbyte;
  } ex_mem_t;

  typedef struct packed {
    logic     valid;
    logic     halt;
    reg_idx_t dr;
    logic     ld;
    word_t    wdata;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---------------- IF ----------------
  logic [15:0] if_instr;
  logic        halt_seen;   // a HALT has been decoded: fetching has stopped
  logic        pcl;         // PC load enable
  logic        pcj;         // PC jump: take the branch target

  inst_ram #(.AW(IAW)) u_imem (
    .clk, .pc(pc[IAW-1:0]), .instr(if_instr),
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_wdata)
  );

  // ---------------- ID ----------------
  ctrl_t id_ctrl;
  word_t id_a, id_b, id_target;
  logic  id_halt;

  inst_decoder u_dec (.instr(if_id.instr), .ctrl(id_ctrl));

  regfile u_rf (
    .clk, .rst,
    .sa(id_ctrl.sa), .sb(id_ctrl.sb), .data_a(id_a), .data_b(id_b),
    .ld(mem_wb.valid & mem_wb.ld), .dr(mem_wb.dr), .d_in(mem_wb.wdata)
  );

  assign id_target = if_id.pc + {{(XLEN-7){id_ctrl.off[5]}}, id_ctrl.off, 1'b0};
  assign id_halt   = if_id.valid & id_ctrl.halt;
  assign pcl       = ~halt_seen & ~id_halt;

  // ---------------- EX ----------------
  word_t  ex_b_in, ex_f;
  flags_t ex_flags;
  logic   ex_mp;

  assign ex_b_in = id_ex.ctrl.mb ? id_ex.ctrl.imm : id_ex.b;

  alu u_alu (.a(id_ex.a), .b(ex_b_in), .fs(id_ex.ctrl.fs), .f(ex_f), .flags(ex_flags));

  // CU: branch condition from the flags of the instruction in EX
  branch_mux u_cu (.bs(id_ex.ctrl.bs), .flags(ex_flags), .mp(ex_mp));
  assign pcj = id_ex.valid & ex_mp;

  // ---------------- MEM ----------------
  word_t mem_word, mem_data, mem_result;

  data_ram #(.AW(DAW)) u_dmem (
    .clk,
    .addr(ex_mem.f[DAW-1:0]), .rdata(mem_word),
    .we(ex_mem.valid & ex_mem.mw), .wbyte(ex_mem.mbyte), .wdata(ex_mem.b),
    .ext_addr(dmem_ext_addr), .ext_rdata(dmem_ext_rdata),
    .ext_we(dmem_ext_we), .ext_wdata(dmem_ext_wdata)
  );

  assign mem_data   = ex_mem.mbyte ? {{8{mem_word[7]}}, mem_word[7:0]} : mem_word;
  assign mem_result = ex_mem.md ? mem_data : ex_mem.f;

  // ---------------- WB ----------------
  logic halted_q;
  assign retire = mem_wb.valid;
  assign halted = halted_q | (mem_wb.valid & mem_wb.halt);

  // ---------------- pipeline registers and PC ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc        <= '0;
      halt_seen <= 1'b0;
      halted_q  <= 1'b0;
      if_id     <= '0;
      id_ex     <= '0;
      ex_mem    <= '0;
      mem_wb    <= '0;
    end else begin
      // PC mux: PCJ selects the target, otherwise PC + 2 when PCL allows
      if (pcj)      pc <= id_ex.target;
      else if (pcl) pc <= pc + 16'd2;

      halt_seen <= halt_seen | id_halt;
      halted_q  <= halted;

      // IF/ID
      if_id.valid <= pcl;
      if_id.pc    <= pc;
      if_id.instr <= if_instr;

      // ID/EX
      id_ex.valid  <= if_id.valid;
      id_ex.ctrl   <= id_ctrl;
      id_ex.a      <= id_a;
      id_ex.b      <= id_b;
      id_ex.target <= id_target;

      // EX/MEM
      ex_mem.valid <= id_ex.valid;
      ex_mem.halt  <= id_ex.ctrl.halt;
      ex_mem.f     <= ex_f;
      ex_mem.b     <= id_ex.b;
      ex_mem.dr    <= id_ex.ctrl.dr;
      ex_mem.ld    <= id_ex.ctrl.ld;
      ex_mem.mw    <= id_ex.ctrl.mw;
      ex_mem.md    <= id_ex.ctrl.md;
      ex_mem.mbyte <= id_ex.ctrl.mbyte;

      // MEM/WB
      mem_wb.valid <= ex_mem.valid;
      mem_wb.halt  <= ex_mem.halt;
      mem_wb.dr    <= ex_mem.dr;
      mem_wb.ld    <= ex_mem.ld;
      mem_wb.wdata <= mem_result;
    end
  end

endmodule
