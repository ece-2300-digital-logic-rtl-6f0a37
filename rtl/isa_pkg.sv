// isa_pkg: types and constants shared by the three processors.
//
// The machines are 16-bit, with eight registers named by 3-bit fields.
// Instructions are 16 bits wide and come in two formats:
//   R format: OP[15:12] RS[11:9] RT[8:6] RD[5:3] FUNCT[2:0]
//   I format: OP[15:12] RS[11:9] RT[8:6] IMM[5:0]
// The opcode and function numbers, the branch-select (BS) numbering of the
// condition multiplexer and the names of the control-word fields
// (DR SA SB IMM MB FS MD LD MW BS OFF) follow the instruction set as
// published for this processor family. The binary encoding of the ALU
// function select (FS) is this design's own choice: it reuses the FUNCT
// numbers of the register-to-register instructions so that the decoder
// can pass FUNCT straight through.
package isa_pkg;

  localparam int unsigned XLEN = 16;   // data and address width
  localparam int unsigned NREG = 8;    // registers R0..R7

  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0]      reg_idx_t;

  // ALU function select
  typedef enum logic [2:0] {
    FS_ADD = 3'b000,
    FS_SUB = 3'b001,
    FS_SRA = 3'b010,
    FS_SRL = 3'b011,
    FS_SLL = 3'b100,
    FS_AND = 3'b101,
    FS_OR  = 3'b110,
    FS_NOP = 3'b111    // unused code: result is A unchanged
  } fs_e;

  // Branch select: input number of the condition multiplexer
  typedef enum logic [2:0] {
    BS_NEVER  = 3'b000,  // 0
    BS_ALWAYS = 3'b001,  // 1
    BS_Z      = 3'b010,  // Z
    BS_NZ     = 3'b011,  // Z'
    BS_N      = 3'b100,  // N
    BS_NN     = 3'b101,  // N'
    BS_C      = 3'b110,  // C
    BS_V      = 3'b111   // V
  } bs_e;

  // Opcodes, instruction bits [15:12]
  typedef enum logic [3:0] {
    OP_SYS  = 4'b0000,   // NOP (FUNCT 000), HALT (FUNCT 001)
    OP_LW   = 4'b0001,
    OP_LB   = 4'b0010,
    OP_SW   = 4'b0011,
    OP_SB   = 4'b0100,
    OP_ADDI = 4'b0101,
    OP_ANDI = 4'b0110,
    OP_ORI  = 4'b0111,
    OP_BEQ  = 4'b1000,
    OP_BNE  = 4'b1001,
    OP_BGEZ = 4'b1010,
    OP_BLTZ = 4'b1011,
    OP_RR   = 4'b1111    // register to register, FUNCT selects the ALU op
  } opcode_e;

  localparam logic [2:0] FUNCT_HALT = 3'b001;

  // ALU condition flags
  typedef struct packed {
    logic v;  // signed overflow
    logic c;  // carry out
    logic z;  // result is zero
    logic n;  // result is negative
  } flags_t;

  // Control word produced by the instruction decoder
  typedef struct packed {
    reg_idx_t dr;     // destination register
    reg_idx_t sa;     // register read on port A
    reg_idx_t sb;     // register read on port B
    word_t    imm;    // immediate, already extended to 16 bits
    logic     mb;     // 1: ALU B input is IMM, 0: register B
    fs_e      fs;     // ALU function
    logic     md;     // 1: write back memory data, 0: ALU result
    logic     ld;     // register file write enable
    logic     mw;     // data memory write enable
    bs_e      bs;     // branch condition select
    logic [5:0] off;  // branch offset in instructions
    logic     mbyte;  // memory access is one byte (LB/SB), else a word
    logic     halt;   // HALT instruction
  } ctrl_t;

  // Control word held in the ROM of the control-word processor
  typedef struct packed {
    reg_idx_t   dr;
    reg_idx_t   sa;
    reg_idx_t   sb;
    logic [3:0] imm;  // sign-extended before the MB mux
    logic       mb;
    fs_e        fs;
    logic       md;
    logic       ld;
    logic       mw;
    bs_e        bs;
    logic [3:0] off;  // signed offset added to the PC on a taken branch
  } cw_t;

  // Instruction encoders, used by testbenches to build programs
  function automatic logic [15:0] enc_r(opcode_e op, reg_idx_t rs, reg_idx_t rt,
                                        reg_idx_t rd, logic [2:0] funct);
    return {op, rs, rt, rd, funct};
  endfunction

  function automatic logic [15:0] enc_i(opcode_e op, reg_idx_t rs, reg_idx_t rt,
                                        logic [5:0] imm);
    return {op, rs, rt, imm};
  endfunction

endpackage
