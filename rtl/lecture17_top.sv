// lecture17_top: the machines of this design, side by side.
//
//  * fsm_mul  - shift-and-add multiplier sequenced by a hard-wired state
//               machine (the starting point the programmable machines
//               replace).
//  * cw_cpu   - control words in ROM, PC with conditional branches; runs
//               the shift-and-add multiplication program built into its ROM.
//  * sc_cpu   - single-cycle processor for the 16-bit instruction set,
//               program in an instruction RAM, decoder in front of the
//               datapath.
//  * pipe_cpu - the same instruction set on a five-stage pipeline
//               (IF ID EX MEM WB).
// They share nothing but the clock. Each has its own synchronous reset and
// its own memory ports, brought out with the prefixes fm_, cw_, sc_ and pp_:
// a program-load port for the instruction RAMs and a second data-memory
// port for placing operands and reading results.
module lecture17_top
  import isa_pkg::*;
#(
  parameter int unsigned CW_PCW = 4,   // control-word processor PC bits
  parameter int unsigned CW_DAW = 8,   // word-address bits of the fsm_mul and cw_cpu RAMs
  parameter int unsigned IAW    = 16,  // instruction RAM address bits (bytes)
  parameter int unsigned DAW    = 16   // data RAM address bits (bytes)
) (
  input  logic              clk,
  // state-machine multiplier
  input  logic              fm_rst,
  input  logic              fm_start,
  output logic              fm_busy,
  input  logic [CW_DAW-1:0] fm_ext_addr,
  output word_t             fm_ext_rdata,
  input  logic              fm_ext_we,
  input  word_t             fm_ext_wdata,
  // control-word processor
  input  logic              cw_rst,
  output logic [CW_PCW-1:0] cw_pc,
  input  logic [CW_DAW-1:0] cw_ext_addr,
  output word_t             cw_ext_rdata,
  input  logic              cw_ext_we,
  input  word_t             cw_ext_wdata,
  // single-cycle processor
  input  logic              sc_rst,
  output word_t             sc_pc,
  output logic              sc_halted,
  input  logic              sc_imem_we,
  input  logic [IAW-1:0]    sc_imem_addr,
  input  word_t             sc_imem_wdata,
  input  logic [DAW-1:0]    sc_dmem_addr,
  output word_t             sc_dmem_rdata,
  input  logic              sc_dmem_we,
  input  word_t             sc_dmem_wdata,
  // pipelined processor
  input  logic              pp_rst,
  output word_t             pp_pc,
  output logic              pp_halted,
  output logic              pp_retire,
  input  logic              pp_imem_we,
  input  logic [IAW-1:0]    pp_imem_addr,
  input  word_t             pp_imem_wdata,
  input  logic [DAW-1:0]    pp_dmem_addr,
  output word_t             pp_dmem_rdata,
  input  logic              pp_dmem_we,
  input  word_t             pp_dmem_wdata
);

  fsm_mul #(.DAW(CW_DAW)) u_fm (
    .clk, .rst(fm_rst), .start(fm_start), .busy(fm_busy),
    .ext_addr(fm_ext_addr), .ext_rdata(fm_ext_rdata),
    .ext_we(fm_ext_we), .ext_wdata(fm_ext_wdata)
  );

  cw_cpu #(.PCW(CW_PCW), .DAW(CW_DAW)) u_cw (
    .clk, .rst(cw_rst), .pc(cw_pc),
    .ext_addr(cw_ext_addr), .ext_rdata(cw_ext_rdata),
    .ext_we(cw_ext_we), .ext_wdata(cw_ext_wdata)
  );

  sc_cpu #(.IAW(IAW), .DAW(DAW)) u_sc (
    .clk, .rst(sc_rst), .pc(sc_pc), .halted(sc_halted),
    .imem_we(sc_imem_we), .imem_addr(sc_imem_addr), .imem_wdata(sc_imem_wdata),
    .dmem_ext_addr(sc_dmem_addr), .dmem_ext_rdata(sc_dmem_rdata),
    .dmem_ext_we(sc_dmem_we), .dmem_ext_wdata(sc_dmem_wdata)
  );

  pipe_cpu #(.IAW(IAW), .DAW(DAW)) u_pp (
    .clk, .rst(pp_rst), .pc(pp_pc), .halted(pp_halted), .retire(pp_retire),
    .imem_we(pp_imem_we), .imem_addr(pp_imem_addr), .imem_wdata(pp_imem_wdata),
    .dmem_ext_addr(pp_dmem_addr), .dmem_ext_rdata(pp_dmem_rdata),
    .dmem_ext_we(pp_dmem_we), .dmem_ext_wdata(pp_dmem_wdata)
  );

endmodule
