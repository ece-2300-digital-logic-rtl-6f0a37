// fsm_mul_ctrl: hard-wired state machine that sequences the shift-and-add
// multiplication on the shared datapath.
//
// Ten states. State 0 waits for `start`; states 1..9 each drive one
// control word, S1..S9:
//   S1 R0 <- R0 - R0      S4 R3 <- R3 - R3     S7 R1 <- SLL(R1)
//   S2 R1 <- M[R0]        S5 R4 <- R2 & 1      S8 R2 <- SRL(R2)
//   S3 R2 <- M[R0+1]      S6 R3 <- R3 + R1     S9 M[R0+2] <- R3
// Transitions: 0 -> 1 when start (stays in 0 otherwise), then 1..9 in
// order, except that 5 goes to 7 when R4 = 0 and 8 goes back to 5 when
// R2 != 0; 9 returns to 0. The conditions use the zero flag of the ALU
// result computed in that same state (R2 & 1 in state 5, SRL(R2) in state
// 8). The control words and transitions are those of the published
// multiplier; evaluating the conditions on the ALU flag of the current
// state and the idle control word (no writes) are this design's reading.
// The control word is a Moore output of the state; `busy` is 1 outside
// state 0.
module fsm_mul_ctrl
  import isa_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic z,        // ALU zero flag of the current state's result
  output cw_t  cw,
  output logic busy
);

  typedef enum logic [3:0] {
    S0 = 4'd0, S1 = 4'd1, S2 = 4'd2, S3 = 4'd3, S4 = 4'd4,
    S5 = 4'd5, S6 = 4'd6, S7 = 4'd7, S8 = 4'd8, S9 = 4'd9
  } state_e;

  state_e state, next;

  function automatic cw_t w(reg_idx_t dr, reg_idx_t sa, reg_idx_t sb, logic [3:0] imm,
                            logic mb, fs_e fs, logic md, logic ld, logic mw);
    return '{dr: dr, sa: sa, sb: sb, imm: imm, mb: mb, fs: fs, md: md,
             ld: ld, mw: mw, bs: BS_NEVER, off: 4'd0};
  endfunction

  // control word of each state
  always_comb begin
    unique case (state)
      //            DR    SA    SB    IMM   MB    FS      MD    LD    MW
      S1: cw = w(3'd0, 3'd0, 3'd0, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);
      S2: cw = w(3'd1, 3'd0, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);
      S3: cw = w(3'd2, 3'd0, 3'd0, 4'd1, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);
      S4: cw = w(3'd3, 3'd3, 3'd3, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);
      S5: cw = w(3'd4, 3'd2, 3'd0, 4'd1, 1'b1, FS_AND, 1'b0, 1'b1, 1'b0);
      S6: cw = w(3'd3, 3'd3, 3'd1, 4'd0, 1'b0, FS_ADD, 1'b0, 1'b1, 1'b0);
      S7: cw = w(3'd1, 3'd1, 3'd0, 4'd0, 1'b0, FS_SLL, 1'b0, 1'b1, 1'b0);
      S8: cw = w(3'd2, 3'd2, 3'd0, 4'd0, 1'b0, FS_SRL, 1'b0, 1'b1, 1'b0);
      S9: cw = w(3'd0, 3'd0, 3'd3, 4'd2, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b1);
      default:
          cw = w(3'd0, 3'd0, 3'd0, 4'd0, 1'b0, FS_ADD, 1'b0, 1'b0, 1'b0);
    endcase
  end

  // next state
  always_comb begin
    unique case (state)
      S0:      next = start ? S1 : S0;
      S5:      next = z ? S7 : S6;
      S8:      next = z ? S9 : S5;
      S9:      next = S0;
      default: next = state_e'(state + 4'd1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= next;
  end

  assign busy = (state != S0);

endmodule
