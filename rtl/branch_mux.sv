// branch_mux: the condition multiplexer that decides whether a branch is
// taken.
//
// An 8-to-1 multiplexer. BS selects one of the constants 0 and 1, or one of
// the ALU flags Z, Z', N, N', C, V, in that input order (0..7); the
// selected bit is MP, which steers the PC multiplexer to the branch target
// when it is 1. The numbering is the one given for the branch-select code.
// Combinational.
module branch_mux
  import isa_pkg::*;
(
  input  bs_e    bs,
  input  flags_t flags,
  output logic   mp
);

  always_comb begin
    unique case (bs)
      BS_NEVER:  mp = 1'b0;
      BS_ALWAYS: mp = 1'b1;
      BS_Z:      mp = flags.z;
      BS_NZ:     mp = ~flags.z;
      BS_N:      mp = flags.n;
      BS_NN:     mp = ~flags.n;
      BS_C:      mp = flags.c;
      BS_V:      mp = flags.v;
      default:   mp = 1'b0;
    endcase
  end

endmodule
