// inst_ram: byte-addressed instruction memory of the instruction-set
// processors.
//
// 2**AW bytes. The fetch port returns the 16-bit instruction made of the
// byte at `pc` (low half) and the byte at `pc`+1 (high half), read
// combinationally so that fetch and execute fit in one cycle. Programs sit
// at even addresses, two bytes per instruction. A load port writes one
// 16-bit word at a time at the rising clock edge, so a program can be
// placed in memory before the processor leaves reset. Byte order
// (little-endian) and the load port are choices of this design.
module inst_ram #(
  parameter int unsigned AW = 16   // address bits: 2**AW bytes
) (
  input  logic          clk,
  input  logic [AW-1:0] pc,
  output logic [15:0]   instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [15:0]   load_data
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) begin
      mem[load_addr]                <= load_data[7:0];
      mem[AW'(load_addr + 1'b1)]    <= load_data[15:8];
    end
  end

  assign instr = {mem[AW'(pc + 1'b1)], mem[pc]};

endmodule
