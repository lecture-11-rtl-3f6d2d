// parc_top: the five PARCv1 processor implementations side by side.
//
//   u_sc     single-cycle processor (CPI 1, long cycle)
//   u_fsm_hw multicycle bus-based processor, hardwired FSM control
//   u_fsm_uc the same processor under vertically microcoded control
//   u_fsm_hz the same processor under horizontally microcoded control
//   u_pipe   five-stage pipelined processor with stalling and squashing
//
// They run independently from one clock and reset; each brings out its own
// memory ports (the single-cycle and pipelined processors have separate
// instruction and data ports, the FSM processors one shared port). The
// memories themselves are outside this design and must answer
// combinationally within the cycle. The FSM processors also bring out their
// current control state.
module parc_top
  import parc_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       reset,
  // single-cycle
  output mem_req_t   sc_imemreq,
  input  mem_resp_t  sc_imemresp,
  output mem_req_t   sc_dmemreq,
  input  mem_resp_t  sc_dmemresp,
  // FSM, hardwired control
  output mem_req_t   fsm_hw_memreq,
  input  mem_resp_t  fsm_hw_memresp,
  output fsm_state_t fsm_hw_state,
  // FSM, vertically microcoded control
  output mem_req_t   fsm_uc_memreq,
  input  mem_resp_t  fsm_uc_memresp,
  output fsm_state_t fsm_uc_state,
  // FSM, horizontally microcoded control
  output mem_req_t   fsm_hz_memreq,
  input  mem_resp_t  fsm_hz_memresp,
  output fsm_state_t fsm_hz_state,
  // pipelined
  output mem_req_t   pipe_imemreq,
  input  mem_resp_t  pipe_imemresp,
  output mem_req_t   pipe_dmemreq,
  input  mem_resp_t  pipe_dmemresp
);

  sc_proc #(.RESET_PC(RESET_PC)) u_sc (
    .clk, .reset,
    .imemreq(sc_imemreq), .imemresp(sc_imemresp),
    .dmemreq(sc_dmemreq), .dmemresp(sc_dmemresp));

  fsm_proc #(.CTRL(FSM_HARDWIRED), .RESET_PC(RESET_PC)) u_fsm_hw (
    .clk, .reset, .memreq(fsm_hw_memreq), .memresp(fsm_hw_memresp),
    .state(fsm_hw_state));

  fsm_proc #(.CTRL(FSM_VERTICAL), .RESET_PC(RESET_PC)) u_fsm_uc (
    .clk, .reset, .memreq(fsm_uc_memreq), .memresp(fsm_uc_memresp),
    .state(fsm_uc_state));

  fsm_proc #(.CTRL(FSM_HORIZONTAL), .RESET_PC(RESET_PC)) u_fsm_hz (
    .clk, .reset, .memreq(fsm_hz_memreq), .memresp(fsm_hz_memresp),
    .state(fsm_hz_state));

  pipe_proc #(.RESET_PC(RESET_PC)) u_pipe (
    .clk, .reset,
    .imemreq(pipe_imemreq), .imemresp(pipe_imemresp),
    .dmemreq(pipe_dmemreq), .dmemresp(pipe_dmemresp));

endmodule
