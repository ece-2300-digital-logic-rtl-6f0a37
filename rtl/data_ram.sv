// data_ram: byte-addressed data memory of the instruction-set processors.
//
// 2**AW bytes; the smallest addressable unit is a byte. A word access at
// address A covers the byte at A (low half) and the byte at A+1 (high
// half); any address is allowed. The read port is combinational and
// always returns the 16-bit word at `addr`; a byte load uses its low 8
// bits. A write happens at the rising clock edge when `we` is 1: one byte
// when `wbyte` is 1 (SB), otherwise two (SW).
// A second port (`ext_*`) lets the surroundings read a word and write a
// word, to place operands before a program runs and collect results
// after. When both ports write the same byte in one cycle the processor
// port wins. Byte order (little-endian) and the second port are choices
// of this design.
module data_ram #(
  parameter int unsigned AW = 16   // address bits: 2**AW bytes
) (
  input  logic          clk,
  // processor port
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic          wbyte,
  input  logic [15:0]   wdata,
  // external port
  input  logic [AW-1:0] ext_addr,
  output logic [15:0]   ext_rdata,
  input  logic          ext_we,
  input  logic [15:0]   ext_wdata
);

  logic [7:0]    mem [2**AW];
  logic [AW-1:0] addr_hi, ext_addr_hi;

  assign addr_hi     = AW'(addr + 1'b1);
  assign ext_addr_hi = AW'(ext_addr + 1'b1);

  always_ff @(posedge clk) begin
    if (ext_we) begin
      mem[ext_addr]    <= ext_wdata[7:0];
      mem[ext_addr_hi] <= ext_wdata[15:8];
    end
    if (we) begin
      mem[addr] <= wdata[7:0];
      if (!wbyte) mem[addr_hi] <= wdata[15:8];
    end
  end

  assign rdata     = {mem[addr_hi], mem[addr]};
  assign ext_rdata = {mem[ext_addr_hi], mem[ext_addr]};

endmodule
