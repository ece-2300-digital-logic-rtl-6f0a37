// regfile: the register file RF, eight 16-bit registers R0..R7.
//
// Two read ports (SA -> DataA, SB -> DataB) read combinationally, so an
// operand is available in the cycle its address is presented. One write
// port writes D_in into register DR at the rising clock edge when LD is 1.
// A read of the register being written in the same cycle returns the old
// value: there is no write-through path. R0 is an ordinary register (the
// example programs clear it with R0 <- R0 - R0). Synchronous reset clears
// every register; reset and the missing write-through are this design's
// choices.
module regfile
  import isa_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t sa,
  input  reg_idx_t sb,
  output word_t    data_a,
  output word_t    data_b,
  input  logic     ld,
  input  reg_idx_t dr,
  input  word_t    d_in
);

  word_t regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (ld) begin
      regs[dr] <= d_in;
    end
  end

  assign data_a = regs[sa];
  assign data_b = regs[sb];

endmodule
