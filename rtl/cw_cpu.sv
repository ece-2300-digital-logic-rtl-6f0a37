// cw_cpu: programmable processor whose program is a sequence of control
// words in ROM, stepped through by a program counter with conditional
// branches.
//
// Every clock cycle executes one control word: the register file reads
// R[SA] and R[SB]; the B operand is R[SB] or the sign-extended IMM field
// (MB); the ALU computes F and the flags V C Z N; F is also the data-memory
// address and R[SB] the data written when MW is 1; the register written
// when LD is 1 receives F or the memory word (MD). The branch select BS
// picks one of 0, 1, Z, Z', N, N', C, V; when the pick (MP) is 1 the next
// PC is PC + sext(OFF), otherwise PC + 1. The flags used are those of the
// ALU operation in the same control word. This structure follows the
// published PC-based control unit. Widths the published design leaves
// open are this design's: 16-bit data, a 4-bit PC, 4-bit IMM and OFF
// fields, and a word-addressed RAM of 2**DAW words (low DAW bits of F).
//
// Ports: `pc` shows the control word being executed; `ext_*` is the RAM's
// second port. Synchronous reset sets the PC and all registers to 0.
module cw_cpu
  import isa_pkg::*;
#(
  parameter int unsigned PCW = 4,  // program counter bits
  parameter int unsigned DAW = 8   // data RAM address bits (words)
) (
  input  logic           clk,
  input  logic           rst,
  output logic [PCW-1:0] pc,
  input  logic [DAW-1:0] ext_addr,
  output word_t          ext_rdata,
  input  logic           ext_we,
  input  word_t          ext_wdata
);

  cw_t    cw;
  word_t  data_a, data_b, b_in, f, mem_rdata, d_in;
  flags_t flags;
  logic   mp;

  cw_rom #(.PCW(PCW)) u_rom (.addr(pc), .cw(cw));

  regfile u_rf (
    .clk, .rst,
    .sa(cw.sa), .sb(cw.sb), .data_a, .data_b,
    .ld(cw.ld), .dr(cw.dr), .d_in
  );

  // MB mux: register B or sign-extended IMM
  assign b_in = cw.mb ? {{(XLEN-4){cw.imm[3]}}, cw.imm} : data_b;

  alu u_alu (.a(data_a), .b(b_in), .fs(cw.fs), .f, .flags);

  cw_ram #(.AW(DAW)) u_ram (
    .clk,
    .addr(f[DAW-1:0]), .rdata(mem_rdata), .we(cw.mw), .wdata(data_b),
    .ext_addr, .ext_rdata, .ext_we, .ext_wdata
  );

  // MD mux
  assign d_in = cw.md ? mem_rdata : f;

  branch_mux u_bmux (.bs(cw.bs), .flags, .mp);

  // next PC: +1, or + sext(OFF) on a taken branch
  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (mp) pc <= pc + PCW'({{(PCW > 4 ? PCW-4 : 0){cw.off[3]}}, cw.off});
    else         pc <= pc + 1'b1;
  end

endmodule
