// fsm_mul: shift-and-add multiplier made of the shared datapath and the
// hard-wired controller fsm_mul_ctrl.
//
// On `start` it multiplies the 16-bit words M[0] and M[1] of its RAM and
// writes the product, modulo 2**16, to M[2]. The datapath is the one the
// programmable machines use: register file, MB mux with the sign-extended
// IMM field, ALU, word-addressed RAM at the ALU result with DataB as store
// data, MD mux. Only the zero flag of the ALU goes back to the controller.
// `busy` is high from the cycle after `start` until the store is done;
// the run takes 5 + sum over the multiplier's bits of (3 + bit) cycles
// (S1-S4, then S5 [S6] S7 S8 per bit, then S9).
// The RAM's second port (`ext_*`) places operands and reads the result.
// Data width and RAM size are this design's choices (16 bits, 2**DAW
// words), matching the control-word machine.
// The control word's BS and OFF fields (always 0 here: a state machine
// needs no PC branches) and the N, C and V flags are left unread.
module fsm_mul
  import isa_pkg::*;
#(
  parameter int unsigned DAW = 8   // RAM address bits (words)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  input  logic [DAW-1:0] ext_addr,
  output word_t          ext_rdata,
  input  logic           ext_we,
  input  word_t          ext_wdata
);

  cw_t    cw;
  word_t  data_a, data_b, b_in, f, mem_rdata, d_in;
  flags_t flags;

  fsm_mul_ctrl u_ctrl (.clk, .rst, .start, .z(flags.z), .cw, .busy);

  regfile u_rf (
    .clk, .rst,
    .sa(cw.sa), .sb(cw.sb), .data_a, .data_b,
    .ld(cw.ld), .dr(cw.dr), .d_in
  );

  assign b_in = cw.mb ? {{(XLEN-4){cw.imm[3]}}, cw.imm} : data_b;

  alu u_alu (.a(data_a), .b(b_in), .fs(cw.fs), .f, .flags);

  cw_ram #(.AW(DAW)) u_ram (
    .clk,
    .addr(f[DAW-1:0]), .rdata(mem_rdata), .we(cw.mw), .wdata(data_b),
    .ext_addr, .ext_rdata, .ext_we, .ext_wdata
  );

  assign d_in = cw.md ? mem_rdata : f;

endmodule
