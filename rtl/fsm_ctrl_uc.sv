// fsm_ctrl_uc: vertically microcoded control unit of the multicycle PARCv1
// processor, a drop-in replacement for fsm_ctrl_hw.
//
// A microprogram counter (uPC) addresses a read-only control store of
// FSM_NSTATES 23-bit microinstructions. Each microinstruction holds encoded
// fields - a 3-bit bus-source number that a decoder turns into the five bus
// enables, a shift bit that a decoder turns into the B and C mux selects, the
// six register enables, the iau and alu functions, the register-file address
// select and write enable, the memory request valid and op - and a 2-bit
// next-state field:
//   n  uPC <- uPC + 1
//   d  uPC <- dispatch address decoded from the instruction's opcode
//   f  uPC <- F0
//   b  uPC <- F0 if eq (A == B), else uPC + 1
// The control store is computed at elaboration from the same control signal
// table as the hardwired unit, with microinstruction addresses equal to the
// hardwired state numbers, so both units step through the same sequence with
// the same timing. The uPC, +1, opcode decoder, the next-state mux and the
// n/d/f/b encoding are the lecture's; the field layout is this design's.
module fsm_ctrl_uc
  import parc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  word_t      ir,
  input  logic       eq,
  output fsm_cs_t    cs,
  output fsm_state_t upc
);

  typedef enum logic [2:0] {
    BUS_NONE, BUS_PC, BUS_IAU, BUS_ALU, BUS_RF, BUS_RD
  } bus_src_t;

  typedef struct packed {
    bus_src_t     bus_src;
    logic         pc_en, ir_en, a_en, b_en, c_en, wd_en;
    logic         shift;
    iau_fn_t      iau_fn;
    alu_fn_t      alu_fn;
    rf_addr_sel_t rf_addr_sel;
    logic         rf_wen;
    logic         mreq_val;
    mem_op_t      mreq_op;
    fsm_next_t    next;
  } uinst_t;

  typedef logic [$bits(uinst_t)-1:0] uword_t;
  typedef uword_t ustore_t [FSM_NSTATES];

  function automatic uinst_t encode(input fsm_state_t st);
    fsm_cs_t c;
    uinst_t  u;
    c = fsm_state_cs(st);
    u.bus_src     = c.pc_bus_en  ? BUS_PC  :
                    c.iau_bus_en ? BUS_IAU :
                    c.alu_bus_en ? BUS_ALU :
                    c.rf_bus_en  ? BUS_RF  :
                    c.rd_bus_en  ? BUS_RD  : BUS_NONE;
    u.pc_en       = c.pc_en;
    u.ir_en       = c.ir_en;
    u.a_en        = c.a_en;
    u.b_en        = c.b_en;
    u.c_en        = c.c_en;
    u.wd_en       = c.wd_en;
    u.shift       = c.b_sel | c.c_sel;
    u.iau_fn      = c.iau_fn;
    u.alu_fn      = c.alu_fn;
    u.rf_addr_sel = c.rf_addr_sel;
    u.rf_wen      = c.rf_wen;
    u.mreq_val    = c.mreq_val;
    u.mreq_op     = c.mreq_op;
    u.next        = fsm_next_kind(st);
    return u;
  endfunction

  function automatic ustore_t build_store();
    ustore_t s;
    for (int i = 0; i < FSM_NSTATES; i++) s[i] = uword_t'(encode(fsm_state_t'(i)));
    return s;
  endfunction

  localparam ustore_t USTORE = build_store();

  uinst_t     ui;
  fsm_state_t upc_next, upc_inc, dispatch;

  always_ff @(posedge clk) begin
    if (reset) upc <= F0;
    else       upc <= upc_next;
  end

  assign ui       = uinst_t'(USTORE[upc]);
  assign upc_inc  = fsm_state_t'(upc + 7'd1);
  assign dispatch = fsm_dispatch(decode(ir));

  always_comb begin
    unique case (ui.next)
      NS_D:    upc_next = dispatch;
      NS_F:    upc_next = F0;
      NS_B:    upc_next = eq ? F0 : upc_inc;
      default: upc_next = upc_inc;
    endcase
  end

  // field decoders
  always_comb begin
    cs             = '0;
    cs.pc_bus_en   = (ui.bus_src == BUS_PC);
    cs.iau_bus_en  = (ui.bus_src == BUS_IAU);
    cs.alu_bus_en  = (ui.bus_src == BUS_ALU);
    cs.rf_bus_en   = (ui.bus_src == BUS_RF);
    cs.rd_bus_en   = (ui.bus_src == BUS_RD);
    cs.pc_en       = ui.pc_en;
    cs.ir_en       = ui.ir_en;
    cs.a_en        = ui.a_en;
    cs.b_en        = ui.b_en;
    cs.c_en        = ui.c_en;
    cs.wd_en       = ui.wd_en;
    cs.b_sel       = ui.shift;
    cs.c_sel       = ui.shift;
    cs.iau_fn      = ui.iau_fn;
    cs.alu_fn      = ui.alu_fn;
    cs.rf_addr_sel = ui.rf_addr_sel;
    cs.rf_wen      = ui.rf_wen;
    cs.mreq_val    = ui.mreq_val;
    cs.mreq_op     = ui.mreq_op;
  end

endmodule
