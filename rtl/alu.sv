// alu: the 16-bit arithmetic and logic unit of the three processors.
//
// Operations selected by FS: ADD, SUB, SRA, SRL, SLL, AND, OR, each as the
// instruction set defines it. The shifts move operand A by one place:
// logical shifts bring in a 0, the arithmetic right shift repeats the sign
// bit. Operand B is ignored by the shifts.
// The four condition flags V, C, Z, N feed the branch condition
// multiplexer. Z and N describe the result of every operation. C and V
// come from the adder: SUB is A + ~B + 1, so C is the carry out of that
// sum (1 when there is no borrow) and V is signed overflow; for the
// logical operations and shifts C and V are 0. How C and V behave outside
// addition and subtraction is this design's own choice.
// Purely combinational: results and flags are valid in the same cycle.
module alu
  import isa_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  fs_e    fs,
  output word_t  f,
  output flags_t flags
);

  logic [XLEN:0] sum;     // one extra bit for the carry out
  word_t         b_add;   // B or its complement for subtraction
  logic          is_arith;

  always_comb begin
    is_arith = (fs == FS_ADD) || (fs == FS_SUB);
    b_add    = (fs == FS_SUB) ? ~b : b;
    sum      = {1'b0, a} + {1'b0, b_add} + {{XLEN{1'b0}}, fs == FS_SUB};

    unique case (fs)
      FS_ADD,
      FS_SUB:  f = sum[XLEN-1:0];
      FS_SRA:  f = {a[XLEN-1], a[XLEN-1:1]};
      FS_SRL:  f = {1'b0, a[XLEN-1:1]};
      FS_SLL:  f = {a[XLEN-2:0], 1'b0};
      FS_AND:  f = a & b;
      FS_OR:   f = a | b;
      default: f = a;
    endcase

    flags.z = (f == '0);
    flags.n = f[XLEN-1];
    flags.c = is_arith & sum[XLEN];
    // overflow: operands of equal sign give a result of the other sign
    flags.v = is_arith & (a[XLEN-1] == b_add[XLEN-1]) & (f[XLEN-1] != a[XLEN-1]);
  end

endmodule
