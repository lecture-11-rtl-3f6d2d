// sc_proc: single-cycle PARCv1 processor.
//
// Every instruction completes in one clock cycle (CPI = 1): the pc register
// drives the instruction-memory address, the instruction comes back
// combinationally, and in the same cycle the register file is read, the alu
// (or mul) computes, the data memory is accessed and the result is written
// back; pc loads pc+4, j_targ, jr (rs) or br_targ at the clock edge. The
// datapath is the lecture's: pc_sel mux, +4, br_tgen, j_tgen, regfile read,
// sext, op1 mux (rt, sext(imm), pc+4), alu with eq status, mul, wb_sel mux
// (alu, mul, load data) and regfile write. sc_ctrl supplies the control
// signals. For lw.ai the register file's second write port writes rs + 4
// from a separate adder; that path and the rf_waddr mux for r31 (jal) are
// this design's additions. The memories must answer within the cycle.
module sc_proc
  import parc_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic      clk,
  input  logic      reset,
  output mem_req_t  imemreq,
  input  mem_resp_t imemresp,
  output mem_req_t  dmemreq,
  input  mem_resp_t dmemresp
);

  pc_sel_t    pc_sel;
  op1_sel_t   op1_sel;
  alu_fn_t    alu_fn;
  wb_sel_t    wb_sel;
  waddr_sel_t rf_waddr_sel;
  logic       rf_wen, rf_wen1, imem_val, dmem_val, eq;
  mem_op_t    dmem_op;

  word_t pc, pc_plus4, pc_next, ir, j_targ, br_targ, sext_imm;
  word_t rs_data, rt_data, op1, alu_y, mul_y, wb_data;
  reg_addr_t rf_waddr;

  assign ir = imemresp.data;

  sc_ctrl u_ctrl (
    .ir, .eq, .pc_sel, .op1_sel, .alu_fn, .wb_sel, .rf_waddr_sel,
    .rf_wen, .rf_wen1, .imemreq_val(imem_val), .dmemreq_val(dmem_val),
    .dmemreq_op(dmem_op));

  // fetch and next pc
  always_ff @(posedge clk) begin
    if (reset) pc <= RESET_PC;
    else       pc <= pc_next;
  end

  assign pc_plus4 = pc + 32'd4;

  j_tgen  u_jtgen  (.pc_plus4, .target(ir[25:0]), .targ(j_targ));
  br_tgen u_brtgen (.pc_plus4, .imm(ir[15:0]),    .targ(br_targ));

  always_comb begin
    unique case (pc_sel)
      PC_JTARG:  pc_next = j_targ;
      PC_JR:     pc_next = rs_data;
      PC_BRTARG: pc_next = br_targ;
      default:   pc_next = pc_plus4;
    endcase
  end

  assign imemreq = '{val: imem_val && !reset, op: MEM_READ, addr: pc, data: '0};

  // register read, execute
  regfile u_rf (
    .clk, .reset,
    .raddr0(ir[25:21]), .rdata0(rs_data),
    .raddr1(ir[20:16]), .rdata1(rt_data),
    .wen0(rf_wen && !reset),  .waddr0(rf_waddr),  .wdata0(wb_data),
    .wen1(rf_wen1 && !reset), .waddr1(ir[25:21]), .wdata1(rs_data + 32'd4));

  assign sext_imm = {{16{ir[15]}}, ir[15:0]};

  always_comb begin
    unique case (op1_sel)
      OP1_SEXT: op1 = sext_imm;
      OP1_PC4:  op1 = pc_plus4;
      default:  op1 = rt_data;
    endcase
  end

  alu u_alu (.fn(alu_fn), .a(rs_data), .b(op1), .c0(1'b0), .y(alu_y), .eq);
  mul u_mul (.a(rs_data), .b(rt_data), .y(mul_y));

  // memory and write back
  assign dmemreq = '{val: dmem_val && !reset, op: dmem_op, addr: alu_y, data: rt_data};

  always_comb begin
    unique case (wb_sel)
      WB_MUL:  wb_data = mul_y;
      WB_MEM:  wb_data = dmemresp.data;
      default: wb_data = alu_y;
    endcase
  end

  always_comb begin
    unique case (rf_waddr_sel)
      WA_RT:   rf_waddr = ir[20:16];
      WA_R31:  rf_waddr = 5'd31;
      default: rf_waddr = ir[15:11];
    endcase
  end

endmodule
