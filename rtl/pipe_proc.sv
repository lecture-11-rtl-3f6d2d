// pipe_proc: five-stage pipelined PARCv1 processor (F, D, X, M, W).
//
// F  : pc_F drives the instruction-memory address; pc_F + 4 is formed here.
// D  : the control-signal table decodes ir_FD; the register file is read;
//      the jump targets (j_tgen, or rs for jr) and the branch target (br_tgen)
//      are formed; the op1 mux picks rt, sext(imm) or pc_plus4.
// X  : alu and mul work on op0_DX/op1_DX; result_sel_X picks one; bne is
//      resolved from eq_X; lw.ai forms rs + 4 in a separate adder.
// M  : result_XM is the data-memory address and sd_XM the store data;
//      wb_sel_M picks the ALU/mul result or the load data.
// W  : result_MW (and, for lw.ai, rs + 4) are written to the register file.
//
// Hazards. A RAW hazard is handled by stalling in D: an instruction whose
// source register is the destination of a valid instruction in X, M or W
// originates a stall (there is no bypassing, and a write in W is not visible
// to a read in D of the same cycle). j, jal and jr are resolved in D and
// originate a squash of F; a taken bne is resolved in X and originates a
// squash of F and D, and fetch restarts at the branch target. Each stage's
// valid/stall/squash logic is one pipe_stage_ctrl. The memories answer
// combinationally, so no stage waits for memory and X, M and W never stall.
//
// Timing: one instruction enters per cycle when nothing stalls or squashes;
// a RAW stall costs up to three cycles, a jump one, a taken branch two.
// Stage placement, the pipeline register names, the control-signal table in
// D and the stall/squash rules follow the lecture; the hazard detection
// details, the lw.ai datapath (separate +4 adder and second write port) and
// the handling of undefined opcodes (executed as no-ops) are this design's.
module pipe_proc
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

  // Control signals carried down the pipeline (cs_DX, cs_XM, cs_MW)
  typedef struct packed {
    inst_t      inst;
    op1_sel_t   op1_sel;
    alu_fn_t    alu_fn;
    logic       result_mul;   // result_sel_X: 1 = mul, 0 = alu
    logic       wb_mem;       // wb_sel_M:     1 = load data
    logic       dmem_val;
    mem_op_t    dmem_op;
    logic       rf_wen;
    reg_addr_t  rf_waddr;
    logic       rf_wen1;      // lw.ai: rs <- rs + 4
    reg_addr_t  rf_waddr1;
    logic       is_bne;
  } pcs_t;

  // ---------------------------------------------------------------- control
  logic val_F, reg_en_F, squash_F, ostall_F, stall_F, osquash_F, next_val_F;
  logic val_D, reg_en_D, squash_D, ostall_D, stall_D, osquash_D, next_val_D;
  logic val_X, reg_en_X, squash_X, ostall_X, stall_X, osquash_X, next_val_X;
  logic val_M, reg_en_M, squash_M, ostall_M, stall_M, osquash_M, next_val_M;
  logic val_W, reg_en_W, squash_W, ostall_W, stall_W, osquash_W, next_val_W;
  logic hz_stall_D, hz_squash_D, hz_squash_X;

  pipe_stage_ctrl #(.RESET_VAL(1'b1)) u_ctrl_F (
    .clk, .reset, .prev_next_val(1'b1),
    .hazard_stall(1'b0), .hazard_squash(1'b0),
    .later_ostall(ostall_D || ostall_X || ostall_M || ostall_W),
    .later_osquash(osquash_D || osquash_X || osquash_M || osquash_W),
    .val(val_F), .reg_en(reg_en_F), .squash(squash_F), .ostall(ostall_F),
    .stall(stall_F), .osquash(osquash_F), .next_val(next_val_F));

  pipe_stage_ctrl u_ctrl_D (
    .clk, .reset, .prev_next_val(next_val_F),
    .hazard_stall(hz_stall_D), .hazard_squash(hz_squash_D),
    .later_ostall(ostall_X || ostall_M || ostall_W),
    .later_osquash(osquash_X || osquash_M || osquash_W),
    .val(val_D), .reg_en(reg_en_D), .squash(squash_D), .ostall(ostall_D),
    .stall(stall_D), .osquash(osquash_D), .next_val(next_val_D));

  pipe_stage_ctrl u_ctrl_X (
    .clk, .reset, .prev_next_val(next_val_D),
    .hazard_stall(1'b0), .hazard_squash(hz_squash_X),
    .later_ostall(ostall_M || ostall_W),
    .later_osquash(osquash_M || osquash_W),
    .val(val_X), .reg_en(reg_en_X), .squash(squash_X), .ostall(ostall_X),
    .stall(stall_X), .osquash(osquash_X), .next_val(next_val_X));

  pipe_stage_ctrl u_ctrl_M (
    .clk, .reset, .prev_next_val(next_val_X),
    .hazard_stall(1'b0), .hazard_squash(1'b0),
    .later_ostall(ostall_W), .later_osquash(osquash_W),
    .val(val_M), .reg_en(reg_en_M), .squash(squash_M), .ostall(ostall_M),
    .stall(stall_M), .osquash(osquash_M), .next_val(next_val_M));

  pipe_stage_ctrl u_ctrl_W (
    .clk, .reset, .prev_next_val(next_val_M),
    .hazard_stall(1'b0), .hazard_squash(1'b0),
    .later_ostall(1'b0), .later_osquash(1'b0),
    .val(val_W), .reg_en(reg_en_W), .squash(squash_W), .ostall(ostall_W),
    .stall(stall_W), .osquash(osquash_W), .next_val(next_val_W));

  // ---------------------------------------------------------------- F stage
  word_t pc_F, pc_plus4_F, pc_next_F;
  word_t j_targ_D, jr_D, btarg_X;
  pcs_t  cs_D, cs_X, cs_M, cs_W;

  assign pc_plus4_F = pc_F + 32'd4;

  always_comb begin
    if (osquash_X)                    pc_next_F = btarg_X;
    else if (osquash_D)               pc_next_F = (cs_D.inst == I_JR) ? jr_D : j_targ_D;
    else                              pc_next_F = pc_plus4_F;
  end

  always_ff @(posedge clk) begin
    if (reset)         pc_F <= RESET_PC;
    else if (reg_en_F) pc_F <= pc_next_F;
  end

  assign imemreq = '{val: val_F, op: MEM_READ, addr: pc_F, data: '0};

  // ---------------------------------------------------------------- D stage
  word_t ir_D, pc_plus4_D;

  always_ff @(posedge clk) begin
    if (reg_en_D) begin
      ir_D       <= imemresp.data;
      pc_plus4_D <= pc_plus4_F;
    end
  end

  // Control signal table
  always_comb begin
    cs_D           = '0;
    cs_D.inst      = decode(ir_D);
    cs_D.op1_sel   = OP1_RF;
    cs_D.alu_fn    = ALU_ADD;
    cs_D.dmem_op   = MEM_READ;
    cs_D.rf_waddr  = ir_D[15:11];
    cs_D.rf_waddr1 = ir_D[25:21];
    unique case (cs_D.inst)
      I_ADDU:  begin cs_D.rf_wen = 1'b1; end
      I_ADDIU: begin cs_D.op1_sel = OP1_SEXT; cs_D.rf_wen = 1'b1;
                     cs_D.rf_waddr = ir_D[20:16]; end
      I_MUL:   begin cs_D.result_mul = 1'b1; cs_D.rf_wen = 1'b1; end
      I_LW:    begin cs_D.op1_sel = OP1_SEXT; cs_D.wb_mem = 1'b1;
                     cs_D.dmem_val = 1'b1; cs_D.rf_wen = 1'b1;
                     cs_D.rf_waddr = ir_D[20:16]; end
      I_LWAI:  begin cs_D.op1_sel = OP1_SEXT; cs_D.wb_mem = 1'b1;
                     cs_D.dmem_val = 1'b1; cs_D.rf_wen = 1'b1;
                     cs_D.rf_waddr = ir_D[20:16]; cs_D.rf_wen1 = 1'b1; end
      I_SW:    begin cs_D.op1_sel = OP1_SEXT; cs_D.dmem_val = 1'b1;
                     cs_D.dmem_op = MEM_WRITE; end
      I_JAL:   begin cs_D.op1_sel = OP1_PC4; cs_D.alu_fn = ALU_CP1;
                     cs_D.rf_wen = 1'b1; cs_D.rf_waddr = 5'd31; end
      I_BNE:   begin cs_D.alu_fn = ALU_CMP; cs_D.is_bne = 1'b1; end
      default: ;  // j, jr and undefined opcodes write nothing
    endcase
  end

  logic uses_rs_D, uses_rt_D;
  assign uses_rs_D = cs_D.inst inside {I_ADDU, I_ADDIU, I_MUL, I_LW, I_LWAI, I_SW, I_JR, I_BNE};
  assign uses_rt_D = cs_D.inst inside {I_ADDU, I_MUL, I_SW, I_BNE};

  function automatic logic writes(input logic v, input pcs_t cs, input reg_addr_t r);
    writes = v && r != '0 &&
             ((cs.rf_wen && cs.rf_waddr == r) || (cs.rf_wen1 && cs.rf_waddr1 == r));
  endfunction

  function automatic logic raw(input reg_addr_t r);
    raw = writes(val_X, cs_X, r) || writes(val_M, cs_M, r) || writes(val_W, cs_W, r);
  endfunction

  assign hz_stall_D  = (uses_rs_D && raw(ir_D[25:21])) || (uses_rt_D && raw(ir_D[20:16]));
  assign hz_squash_D = cs_D.inst inside {I_J, I_JAL, I_JR};

  word_t rf_rdata0, rf_rdata1, sext_D, br_targ_D, op1_D;
  logic  rf_wen0_W, rf_wen1_W;
  word_t result_W, ai_W;

  regfile u_rf (
    .clk, .reset,
    .raddr0(ir_D[25:21]), .rdata0(rf_rdata0),
    .raddr1(ir_D[20:16]), .rdata1(rf_rdata1),
    .wen0(rf_wen0_W), .waddr0(cs_W.rf_waddr),  .wdata0(result_W),
    .wen1(rf_wen1_W), .waddr1(cs_W.rf_waddr1), .wdata1(ai_W));

  assign sext_D = {{16{ir_D[15]}}, ir_D[15:0]};
  assign jr_D   = rf_rdata0;

  j_tgen  u_jtgen  (.pc_plus4(pc_plus4_D), .target(ir_D[25:0]), .targ(j_targ_D));
  br_tgen u_brtgen (.pc_plus4(pc_plus4_D), .imm(ir_D[15:0]),    .targ(br_targ_D));

  always_comb begin
    unique case (cs_D.op1_sel)
      OP1_SEXT: op1_D = sext_D;
      OP1_PC4:  op1_D = pc_plus4_D;
      default:  op1_D = rf_rdata1;
    endcase
  end

  // ---------------------------------------------------------------- X stage
  word_t op0_X, op1_X, sd_X, alu_y_X, mul_y_X, result_X, ai_X;
  logic  eq_X;

  always_ff @(posedge clk) begin
    if (reg_en_X) begin
      cs_X    <= cs_D;
      op0_X   <= rf_rdata0;
      op1_X   <= op1_D;
      sd_X    <= rf_rdata1;
      btarg_X <= br_targ_D;
    end
  end

  alu u_alu (.fn(cs_X.alu_fn), .a(op0_X), .b(op1_X), .c0(1'b0), .y(alu_y_X), .eq(eq_X));
  mul u_mul (.a(op0_X), .b(op1_X), .y(mul_y_X));

  assign result_X    = cs_X.result_mul ? mul_y_X : alu_y_X;
  assign ai_X        = op0_X + 32'd4;
  assign hz_squash_X = cs_X.is_bne && !eq_X;

  // ---------------------------------------------------------------- M stage
  word_t result_M, sd_M, ai_M, wb_M;

  always_ff @(posedge clk) begin
    if (reg_en_M) begin
      cs_M     <= cs_X;
      result_M <= result_X;
      sd_M     <= sd_X;
      ai_M     <= ai_X;
    end
  end

  assign dmemreq = '{val: val_M && cs_M.dmem_val, op: cs_M.dmem_op,
                     addr: result_M, data: sd_M};
  assign wb_M    = cs_M.wb_mem ? dmemresp.data : result_M;

  // ---------------------------------------------------------------- W stage
  always_ff @(posedge clk) begin
    if (reg_en_W) begin
      cs_W     <= cs_M;
      result_W <= wb_M;
      ai_W     <= ai_M;
    end
  end

  assign rf_wen0_W = val_W && cs_W.rf_wen;
  assign rf_wen1_W = val_W && cs_W.rf_wen1;

endmodule
