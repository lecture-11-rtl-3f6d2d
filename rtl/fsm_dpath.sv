// fsm_dpath: bus-based datapath of the multicycle (FSM) PARCv1 processor.
//
// A single 32-bit datapath bus connects everything. Exactly one of five
// sources drives it in a cycle, chosen by the bus enables of the control word:
// PC, the iau (immediates from IR), the alu, the register file read port and
// the RD register (memory read data). Registers PC, IR, A and WD load from
// the bus when enabled; B loads the bus or B << 1 and C loads the bus or
// C >> 1 (b_sel/c_sel = 1 picks the shifted value). The register file is
// addressed through a mux of 31, 0, rs, rt and rd and is written from the
// bus. The bus is also the memory request address; WD is the store data;
// RD captures the memory response every cycle, so data requested in one cycle
// is read from RD in the next. The alu's c0 input is C[0], which lets the
// "+?" function perform one shift-and-add multiply step. Status back to the
// control unit: the instruction register (for dispatch) and eq (A == B).
// The structure, the register set and the function tables are the lecture's.
// The drawn tri-state bus is built here as an AND-OR multiplexer, and the
// shifts are by one bit per cycle; both are this design's choices.
module fsm_dpath
  import parc_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic      clk,
  input  logic      reset,
  input  fsm_cs_t   cs,
  output word_t     ir,
  output logic      eq,
  output mem_req_t  memreq,
  input  mem_resp_t memresp
);

  word_t pc, a, b, c, wd, rd;
  word_t bus, iau_y, alu_y, rf_rdata, unused_rdata1;
  reg_addr_t rf_addr;

  // bus: one driver at a time
  assign bus = ({XLEN{cs.pc_bus_en}}  & pc)
             | ({XLEN{cs.iau_bus_en}} & iau_y)
             | ({XLEN{cs.alu_bus_en}} & alu_y)
             | ({XLEN{cs.rf_bus_en}}  & rf_rdata)
             | ({XLEN{cs.rd_bus_en}}  & rd);

  always_ff @(posedge clk) begin
    if (reset) begin
      pc <= RESET_PC;
      ir <= '0;
      a  <= '0;
      b  <= '0;
      c  <= '0;
      wd <= '0;
      rd <= '0;
    end else begin
      if (cs.pc_en) pc <= bus;
      if (cs.ir_en) ir <= bus;
      if (cs.a_en)  a  <= bus;
      if (cs.b_en)  b  <= cs.b_sel ? (b << 1) : bus;
      if (cs.c_en)  c  <= cs.c_sel ? (c >> 1) : bus;
      if (cs.wd_en) wd <= bus;
      rd <= memresp.data;
    end
  end

  iau u_iau (.fn(cs.iau_fn), .ir, .y(iau_y));
  alu u_alu (.fn(cs.alu_fn), .a, .b, .c0(c[0]), .y(alu_y), .eq);

  always_comb begin
    unique case (cs.rf_addr_sel)
      RA_31:   rf_addr = 5'd31;
      RA_0:    rf_addr = 5'd0;
      RA_RS:   rf_addr = ir[25:21];
      RA_RT:   rf_addr = ir[20:16];
      default: rf_addr = ir[15:11];
    endcase
  end

  regfile u_rf (
    .clk, .reset,
    .raddr0(rf_addr), .rdata0(rf_rdata),
    .raddr1('0),      .rdata1(unused_rdata1),
    .wen0(cs.rf_wen), .waddr0(rf_addr), .wdata0(bus),
    .wen1(1'b0),      .waddr1('0),      .wdata1('0));

  assign memreq = '{val: cs.mreq_val, op: cs.mreq_op, addr: bus, data: wd};

  // the bus has a single driver
  assert property (@(posedge clk) disable iff (reset)
    $onehot0({cs.pc_bus_en, cs.iau_bus_en, cs.alu_bus_en, cs.rf_bus_en, cs.rd_bus_en}));

endmodule
