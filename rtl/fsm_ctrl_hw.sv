// fsm_ctrl_hw: hardwired control unit of the multicycle PARCv1 processor.
//
// A state register (fsm_state_t, 68 states), control signal logic that maps
// the state to the 24 control signals of the bus-based datapath
// (fsm_state_cs, the control signal output table) and state transition logic
// that uses one status signal, eq. Fetch is F0-F2; F2 dispatches on the
// decoded opcode to the first state of the instruction's sequence; the last
// state of each sequence returns to F0; B2 (bne) returns to F0 when A == B
// (branch not taken) and otherwise continues to B3/B4, which add the branch
// offset to the PC. Every state lasts one cycle, so an instruction takes
// 3 + (length of its sequence) cycles: addu/addiu 6, mul 38, lw/sw 7, j 5,
// jal 6, jr 4, bne 6 (not taken) or 8 (taken), lw.ai 8.
// The state names and sequence lengths follow the lecture's state diagram;
// the contents of states it does not spell out, the lw.ai sequence and the
// dispatch of undefined opcodes back to F0 are this design's.
module fsm_ctrl_hw
  import parc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  word_t      ir,
  input  logic       eq,
  output fsm_cs_t    cs,
  output fsm_state_t state
);

  fsm_state_t state_next;

  always_ff @(posedge clk) begin
    if (reset) state <= F0;
    else       state <= state_next;
  end

  // state transition logic
  always_comb begin
    if (state == F2)
      state_next = fsm_dispatch(decode(ir));
    else if (state inside {A2, AI2, M34, L3, S3, J1, JA2, JR0, B4, LA4})
      state_next = F0;
    else if (state == B2 && eq)
      state_next = F0;
    else
      state_next = fsm_state_t'(state + 7'd1);
  end

  // control signal logic
  assign cs = fsm_state_cs(state);

endmodule
