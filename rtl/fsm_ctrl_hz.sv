// fsm_ctrl_hz: horizontally microcoded control unit of the multicycle PARCv1
// processor, a drop-in replacement for fsm_ctrl_hw and fsm_ctrl_uc.
//
// A microprogram counter (uPC) addresses a read-only control store of
// FSM_NSTATES microinstructions. Unlike the vertical unit, a horizontal
// microinstruction is not encoded: it holds every one of the 24 datapath
// control signals as its own bit (five bus enables, six register enables,
// two shift selects, iau and alu functions, register-file address select and
// write enable, memory request valid and op), so the word drives the
// datapath directly with no field decoders, at the price of a wider store
// (26 bits per word here against 23 for the vertical encoding). The last two
// bits are the same next-state field as in the vertical unit:
//   n  uPC <- uPC + 1
//   d  uPC <- dispatch address decoded from the instruction's opcode
//   f  uPC <- F0
//   b  uPC <- F0 if eq (A == B), else uPC + 1
// The store is filled at elaboration from the shared control signal table,
// one word per state, with addresses equal to the hardwired state numbers,
// so all three control units give identical sequences and timing. The
// lecture names horizontal microcoding and says it needs a large control
// store; the word layout and the reuse of the vertical sequencer are this
// design's.
module fsm_ctrl_hz
  import parc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  word_t      ir,
  input  logic       eq,
  output fsm_cs_t    cs,
  output fsm_state_t upc
);

  typedef struct packed {
    fsm_cs_t   cs;
    fsm_next_t next;
  } hinst_t;

  typedef logic [$bits(hinst_t)-1:0] hword_t;
  typedef hword_t hstore_t [FSM_NSTATES];

  function automatic hstore_t build_store();
    hstore_t s;
    hinst_t  h;
    for (int i = 0; i < FSM_NSTATES; i++) begin
      h.cs   = fsm_state_cs(fsm_state_t'(i));
      h.next = fsm_next_kind(fsm_state_t'(i));
      s[i]   = hword_t'(h);
    end
    return s;
  endfunction

  localparam hstore_t HSTORE = build_store();

  hinst_t     hi;
  fsm_state_t upc_next, upc_inc, dispatch;

  always_ff @(posedge clk) begin
    if (reset) upc <= F0;
    else       upc <= upc_next;
  end

  assign hi       = hinst_t'(HSTORE[upc]);
  assign upc_inc  = fsm_state_t'(upc + 7'd1);
  assign dispatch = fsm_dispatch(decode(ir));
  assign cs       = hi.cs;

  always_comb begin
    unique case (hi.next)
      NS_D:    upc_next = dispatch;
      NS_F:    upc_next = F0;
      NS_B:    upc_next = eq ? F0 : upc_inc;
      default: upc_next = upc_inc;
    endcase
  end

endmodule
