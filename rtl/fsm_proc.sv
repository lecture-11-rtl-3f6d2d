// fsm_proc: multicycle (FSM) PARCv1 processor.
//
// The bus-based datapath fsm_dpath under one of three control units, chosen
// by the CTRL parameter: FSM_HARDWIRED selects the hardwired FSM
// (fsm_ctrl_hw), FSM_VERTICAL the vertically microcoded one (fsm_ctrl_uc),
// FSM_HORIZONTAL the horizontally microcoded one (fsm_ctrl_hz). All three
// produce identical control sequences. A single memory port carries instruction fetches (state F0) and
// data accesses; the memory must answer within the cycle, and the response
// is captured in the datapath's RD register. CPI is above 1: every
// instruction spends three cycles in fetch and one cycle per state of its own
// sequence (see fsm_ctrl_hw). `state` exposes the current state (the uPC for
// the microcoded unit) for observation.
module fsm_proc
  import parc_pkg::*;
#(
  parameter fsm_ctrl_kind_t CTRL = FSM_HARDWIRED,
  parameter word_t RESET_PC      = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       reset,
  output mem_req_t   memreq,
  input  mem_resp_t  memresp,
  output fsm_state_t state
);

  fsm_cs_t cs;
  word_t   ir;
  logic    eq;

  if (CTRL == FSM_VERTICAL) begin : g_uc
    fsm_ctrl_uc u_ctrl (.clk, .reset, .ir, .eq, .cs, .upc(state));
  end else if (CTRL == FSM_HORIZONTAL) begin : g_hz
    fsm_ctrl_hz u_ctrl (.clk, .reset, .ir, .eq, .cs, .upc(state));
  end else begin : g_hw
    fsm_ctrl_hw u_ctrl (.clk, .reset, .ir, .eq, .cs, .state);
  end

  fsm_dpath #(.RESET_PC(RESET_PC)) u_dpath (
    .clk, .reset, .cs, .ir, .eq, .memreq, .memresp);

endmodule
