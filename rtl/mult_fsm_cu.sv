// mult_fsm_cu: hardwired control unit for shift-and-add multiplication.
//
// A ten-state machine whose states S1..S9 each issue one control word, so
// that the datapath computes M[2] = M[0] * M[1] (modulo 2^DATA_W):
//   S1 R0 <= R0 - R0      S4 R3 <= R3 - R3      S7 R1 <= SLL(R1)
//   S2 R1 <= M[R0]        S5 R4 <= R2 & 1       S8 R2 <= SRL(R2)
//   S3 R2 <= M[R0+1]      S6 R3 <= R3 + R1      S9 M[R0+2] <= R3
// State 0 is idle: it issues a word that changes nothing and waits for
// START. Transitions: 0 -> S1 when START is high; S5 -> S7 (skipping the
// add) when R4 = 0; S8 -> S5 (loop) when R2 != 0; S9 -> 0; otherwise to the
// next state.
//
// Timing: the two tests look at the value being written in that same cycle.
// The ALU Z flag of S5 says whether R2 & 1 (the new R4) is zero, and the Z
// flag of S8 says whether SRL(R2) (the new R2) is zero, so the branch is
// decided without waiting a cycle.
//
// Latency: START is sampled in idle; then S1..S4 take 4 cycles, each pass of
// the loop takes 3 cycles (S5, S7, S8) plus 1 (S6) when the multiplier bit is
// 1, and S9 takes 1. The loop runs once per bit of B up to its highest 1 bit,
// and once when B = 0. BUSY is high from the cycle after START until S9.
//
// This unit never branches, so the BS and OFF fields of CW are constant 0.
//
// The state list, control words and transitions are the lecture's; the idle
// word, the BUSY output and the use of Z in the state that writes R4 / R2
// are this design's reading of them.
module mult_fsm_cu
  import sc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // synchronous, to idle
  input  logic       start,   // leave idle and multiply
  input  flags_t     flags,   // ALU condition codes of the current word
  output ctrl_word_t cw,
  output logic       busy     // not in the idle state
);

  typedef enum logic [3:0] {
    ST_IDLE = 4'd0,
    ST_S1 = 4'd1, ST_S2 = 4'd2, ST_S3 = 4'd3, ST_S4 = 4'd4, ST_S5 = 4'd5,
    ST_S6 = 4'd6, ST_S7 = 4'd7, ST_S8 = 4'd8, ST_S9 = 4'd9
  } state_e;

  state_e state, state_next;

  always_ff @(posedge clk) begin
    if (rst) state <= ST_IDLE;
    else     state <= state_next;
  end

  always_comb begin
    state_next = state;
    unique case (state)
      ST_IDLE: state_next = start ? ST_S1 : ST_IDLE;
      ST_S1:   state_next = ST_S2;
      ST_S2:   state_next = ST_S3;
      ST_S3:   state_next = ST_S4;
      ST_S4:   state_next = ST_S5;
      ST_S5:   state_next = flags.z ? ST_S7 : ST_S6;   // R4 = 0: skip the add
      ST_S6:   state_next = ST_S7;
      ST_S7:   state_next = ST_S8;
      ST_S8:   state_next = flags.z ? ST_S9 : ST_S5;   // R2 != 0: loop
      ST_S9:   state_next = ST_IDLE;
      default: state_next = ST_IDLE;
    endcase
  end

  always_comb begin
    unique case (state)
      //                 DR    SA    SB    IMM   MB    FS      MD    LD    MW
      ST_S1:   cw = make_cw(3'd0, 3'd0, 3'd0, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);
      ST_S2:   cw = make_cw(3'd1, 3'd0, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);
      ST_S3:   cw = make_cw(3'd2, 3'd0, 3'd0, 4'd1, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);
      ST_S4:   cw = make_cw(3'd3, 3'd3, 3'd3, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);
      ST_S5:   cw = make_cw(3'd4, 3'd2, 3'd0, 4'd1, 1'b1, FS_AND, 1'b0, 1'b1, 1'b0);
      ST_S6:   cw = make_cw(3'd3, 3'd3, 3'd1, 4'd0, 1'b0, FS_ADD, 1'b0, 1'b1, 1'b0);
      ST_S7:   cw = make_cw(3'd1, 3'd1, 3'd0, 4'd0, 1'b0, FS_SLL, 1'b0, 1'b1, 1'b0);
      ST_S8:   cw = make_cw(3'd2, 3'd2, 3'd0, 4'd0, 1'b0, FS_SRL, 1'b0, 1'b1, 1'b0);
      ST_S9:   cw = make_cw(3'd0, 3'd0, 3'd3, 4'd2, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b1);
      default: cw = CW_NOP;
    endcase
  end

  assign busy = (state != ST_IDLE);

  // Only the ten encodings 0..9 are ever reached out of reset.
  a_state_legal: assert property (@(posedge clk) disable iff (rst) state inside {[ST_IDLE:ST_S9]});

endmodule
