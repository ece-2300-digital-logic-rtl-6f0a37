// sc_cpu: single-cycle processor for the 16-bit instruction set.
//
// The program sits in an instruction RAM instead of a ROM, and an
// instruction decoder turns each 16-bit instruction into the control word
// (DR SA SB IMM MB FS MD LD MW BS OFF) that drives the same datapath as
// the control-word machine: register file, MB mux, ALU with flags V C Z N,
// byte-addressed data RAM, MD mux. Every instruction completes in one
// clock cycle. Instructions are two bytes, so the PC normally advances by
// 2; when the branch condition selected by BS holds, the PC becomes
// PC + sext({OFF, 0}), the offset counting instructions from the branch
// itself. LB sign-extends the byte it reads; SB writes the low byte of
// R[RT].
//
// HALT stops the PC on the HALT instruction and raises `halted` for as
// long as it stays there (this design's reading of "halt the processor").
// The `imem_*` port loads the program; `dmem_ext_*` is the data RAM's
// second port. Synchronous reset sets the PC and all registers to 0;
// hold reset while loading a program.
module sc_cpu
  import isa_pkg::*;
#(
  parameter int unsigned IAW = 16,  // instruction RAM address bits (bytes)
  parameter int unsigned DAW = 16   // data RAM address bits (bytes)
) (
  input  logic           clk,
  input  logic           rst,
  output word_t          pc,
  output logic           halted,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  word_t          imem_wdata,
  input  logic [DAW-1:0] dmem_ext_addr,
  output word_t          dmem_ext_rdata,
  input  logic           dmem_ext_we,
  input  word_t          dmem_ext_wdata
);

  logic [15:0] instr;
  ctrl_t       ctrl;
  word_t       data_a, data_b, b_in, f, mem_word, mem_data, d_in;
  word_t       target;
  flags_t      flags;
  logic        mp;

  inst_ram #(.AW(IAW)) u_imem (
    .clk, .pc(pc[IAW-1:0]), .instr,
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_wdata)
  );

  inst_decoder u_dec (.instr, .ctrl);

  regfile u_rf (
    .clk, .rst,
    .sa(ctrl.sa), .sb(ctrl.sb), .data_a, .data_b,
    .ld(ctrl.ld), .dr(ctrl.dr), .d_in
  );

  assign b_in = ctrl.mb ? ctrl.imm : data_b;

  alu u_alu (.a(data_a), .b(b_in), .fs(ctrl.fs), .f, .flags);

  data_ram #(.AW(DAW)) u_dmem (
    .clk,
    .addr(f[DAW-1:0]), .rdata(mem_word), .we(ctrl.mw), .wbyte(ctrl.mbyte), .wdata(data_b),
    .ext_addr(dmem_ext_addr), .ext_rdata(dmem_ext_rdata),
    .ext_we(dmem_ext_we), .ext_wdata(dmem_ext_wdata)
  );

  // LB sign-extends the byte, LW takes the whole word
  assign mem_data = ctrl.mbyte ? {{8{mem_word[7]}}, mem_word[7:0]} : mem_word;
  assign d_in     = ctrl.md ? mem_data : f;

  branch_mux u_bmux (.bs(ctrl.bs), .flags, .mp);

  // branch target: PC + sext({OFF, 0})
  assign target = pc + {{(XLEN-7){ctrl.off[5]}}, ctrl.off, 1'b0};
  assign halted = ctrl.halt;

  always_ff @(posedge clk) begin
    if (rst)            pc <= '0;
    else if (ctrl.halt) pc <= pc;
    else if (mp)        pc <= target;
    else                pc <= pc + 16'd2;
  end

endmodule
