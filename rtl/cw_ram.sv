// cw_ram: data memory of the control-word processor.
//
// 2**AW words of 16 bits, addressed by word (the multiplication program
// uses M[R0], M[R0+1], M[R0+2] as three consecutive operands). The
// processor port reads combinationally at M_address and writes Data_in at
// the rising clock edge when MW is 1. A second port (`ext_*`) reads and
// writes a word for the surroundings, to place operands and collect
// results; on a clash the processor port wins. Word addressing, the size
// and the second port are this design's choices.
module cw_ram #(
  parameter int unsigned AW = 8    // address bits: 2**AW words
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] ext_addr,
  output logic [15:0]   ext_rdata,
  input  logic          ext_we,
  input  logic [15:0]   ext_wdata
);

  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ext_we) mem[ext_addr] <= ext_wdata;
    if (we)     mem[addr]     <= wdata;
  end

  assign rdata     = mem[addr];
  assign ext_rdata = mem[ext_addr];

endmodule
