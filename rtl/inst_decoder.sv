// inst_decoder: turns a 16-bit instruction into the control word that
// steers the datapath.
//
// Purely combinational. Field use per instruction follows the published
// instruction-to-control-word table:
//   R format (OP 1111): DR=RD, SA=RS, SB=RT, MB=0, FS from FUNCT, LD=1.
//   NOP / HALT (OP 0000): no register or memory write; HALT also raises
//     `halt`, which the processor uses to stop fetching.
//   Loads LW/LB: DR=RT, address R[RS]+sext(IMM), MD=1, LD=1.
//   Stores SW/SB: address R[RS]+sext(IMM), data R[RT] (SB), MW=1.
//   ADDI: sext(IMM); ANDI, ORI: zext(IMM); result to RT.
//   BEQ/BNE: R[RS]-R[RT] with BS = Z / Z'; BGEZ/BLTZ: R[RS]-0 with
//     BS = N' / N; OFF = IMM in all four.
// Choices of this design where the table is silent: the immediate leaves
// the decoder already extended (zero extension for ANDI and ORI, sign
// extension for the rest), the size of a memory access travels as the
// extra bit `mbyte`, LW/SW decode like LB/SB with mbyte = 0, and the
// unused R-format function 111 and unused opcodes 1100-1110 decode as NOP.
module inst_decoder
  import isa_pkg::*;
(
  input  logic [15:0] instr,
  output ctrl_t       ctrl
);

  opcode_e    op;
  reg_idx_t   rs, rt, rd;
  logic [2:0] funct;
  logic [5:0] imm6;
  word_t      sext_imm, zext_imm;

  always_comb begin
    op       = opcode_e'(instr[15:12]);
    rs       = instr[11:9];
    rt       = instr[8:6];
    rd       = instr[5:3];
    funct    = instr[2:0];
    imm6     = instr[5:0];
    sext_imm = {{(XLEN-6){imm6[5]}}, imm6};
    zext_imm = {{(XLEN-6){1'b0}}, imm6};

    // defaults: an instruction that changes nothing
    ctrl       = '0;
    ctrl.fs    = FS_ADD;
    ctrl.bs    = BS_NEVER;
    ctrl.sa    = rs;
    ctrl.sb    = rt;
    ctrl.off   = imm6;

    unique case (op)
      OP_RR: begin
        ctrl.dr = rd;
        ctrl.fs = fs_e'(funct);
        ctrl.ld = (funct != 3'b111);
      end
      OP_SYS: begin
        ctrl.halt = (funct == FUNCT_HALT);
      end
      OP_LW, OP_LB: begin
        ctrl.dr    = rt;
        ctrl.imm   = sext_imm;
        ctrl.mb    = 1'b1;
        ctrl.md    = 1'b1;
        ctrl.ld    = 1'b1;
        ctrl.mbyte = (op == OP_LB);
      end
      OP_SW, OP_SB: begin
        ctrl.imm   = sext_imm;
        ctrl.mb    = 1'b1;
        ctrl.mw    = 1'b1;
        ctrl.mbyte = (op == OP_SB);
      end
      OP_ADDI: begin
        ctrl.dr  = rt;
        ctrl.imm = sext_imm;
        ctrl.mb  = 1'b1;
        ctrl.ld  = 1'b1;
      end
      OP_ANDI, OP_ORI: begin
        ctrl.dr  = rt;
        ctrl.imm = zext_imm;
        ctrl.mb  = 1'b1;
        ctrl.fs  = (op == OP_ANDI) ? FS_AND : FS_OR;
        ctrl.ld  = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.fs = FS_SUB;
        ctrl.bs = (op == OP_BEQ) ? BS_Z : BS_NZ;
      end
      OP_BGEZ, OP_BLTZ: begin
        ctrl.imm = '0;
        ctrl.mb  = 1'b1;
        ctrl.fs  = FS_SUB;
        ctrl.bs  = (op == OP_BGEZ) ? BS_NN : BS_N;
      end
      default: ;  // unused opcodes: no operation
    endcase
  end

endmodule
