// parc_pkg: instruction encodings, memory request/response types and the
// control-field enumerations shared by the three PARCv1 processors
// (single-cycle, bus-based FSM and five-stage pipelined).
//
// The instruction subset is addu, addiu, mul, lw, sw, j, jal, jr, bne plus the
// auto-incrementing load lw.ai (rt <- M[rs + sext(imm)]; rs <- rs + 4).
// Field positions (rs = ir[25:21], rt = ir[20:16], imm = ir[15:0],
// target = ir[25:0]) follow the datapath drawings. The opcode and function
// numbers are this design's choice: they follow the MIPS32 encoding of the
// same instructions, and lw.ai takes the otherwise unused major opcode 0x3B.
package parc_pkg;

  localparam int XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_addr_t;

  // Major opcodes (ir[31:26])
  localparam logic [5:0] OP_SPECIAL  = 6'h00;  // addu, jr (by funct)
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_JAL      = 6'h03;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1C;  // mul (by funct)
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_SW       = 6'h2B;
  localparam logic [5:0] OP_LWAI     = 6'h3B;

  // Function codes (ir[5:0])
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_MUL  = 6'h02;

  // Decoded instruction class
  typedef enum logic [3:0] {
    I_ADDU, I_ADDIU, I_MUL, I_LW, I_SW, I_J, I_JAL, I_JR, I_BNE, I_LWAI, I_BAD
  } inst_t;

  function automatic inst_t decode(input word_t ir);
    unique case (ir[31:26])
      OP_SPECIAL:  decode = (ir[5:0] == FN_ADDU) ? I_ADDU :
                            (ir[5:0] == FN_JR)   ? I_JR   : I_BAD;
      OP_SPECIAL2: decode = (ir[5:0] == FN_MUL)  ? I_MUL  : I_BAD;
      OP_ADDIU:    decode = I_ADDIU;
      OP_LW:       decode = I_LW;
      OP_SW:       decode = I_SW;
      OP_J:        decode = I_J;
      OP_JAL:      decode = I_JAL;
      OP_BNE:      decode = I_BNE;
      OP_LWAI:     decode = I_LWAI;
      default:     decode = I_BAD;
    endcase
  endfunction

  // Memory request/response. The memory answers combinationally in the same
  // cycle, so there is no ready or response-valid signal.
  typedef enum logic { MEM_READ = 1'b0, MEM_WRITE = 1'b1 } mem_op_t;

  typedef struct packed {
    logic    val;
    mem_op_t op;
    word_t   addr;
    word_t   data;
  } mem_req_t;

  typedef struct packed {
    word_t data;
  } mem_resp_t;

  // ALU functions (union of the single-cycle/pipelined and FSM datapaths)
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,  // a + b
    ALU_ADD4 = 3'd1,  // a + 4
    ALU_CADD = 3'd2,  // c[0] ? a + b : a   (one shift-add multiply step)
    ALU_CMP  = 3'd3,  // eq = (a == b), result a + b
    ALU_JT   = 3'd4,  // {a[31:28], b[27:0]}
    ALU_CP1  = 3'd5   // b (copy second operand)
  } alu_fn_t;

  // Single-cycle / pipelined control fields
  typedef enum logic [1:0] { PC_PLUS4, PC_JTARG, PC_JR, PC_BRTARG } pc_sel_t;
  typedef enum logic [1:0] { OP1_RF, OP1_SEXT, OP1_PC4 } op1_sel_t;
  typedef enum logic [1:0] { WB_ALU, WB_MUL, WB_MEM } wb_sel_t;
  typedef enum logic [1:0] { WA_RD, WA_RT, WA_R31 } waddr_sel_t;

  // FSM datapath: immediate arithmetic unit functions
  typedef enum logic [1:0] { IAU_SI, IAU_TS, IAU_SIS } iau_fn_t;

  // FSM datapath: register-file address select (the five mux inputs)
  typedef enum logic [2:0] { RA_31, RA_0, RA_RS, RA_RT, RA_RD } rf_addr_sel_t;

  // FSM datapath control word: 24 control signals
  typedef struct packed {
    // bus enables
    logic         pc_bus_en;
    logic         iau_bus_en;
    logic         alu_bus_en;
    logic         rf_bus_en;
    logic         rd_bus_en;
    // register enables
    logic         pc_en;
    logic         ir_en;
    logic         a_en;
    logic         b_en;
    logic         c_en;
    logic         wd_en;
    // mux selects: 0 = bus, 1 = shifted register
    logic         b_sel;
    logic         c_sel;
    // functions
    iau_fn_t      iau_fn;
    alu_fn_t      alu_fn;
    // register file
    rf_addr_sel_t rf_addr_sel;
    logic         rf_wen;
    // memory request
    logic         mreq_val;
    mem_op_t      mreq_op;
  } fsm_cs_t;

  // ------------------------------------------------------------------
  // FSM control: the states of the multicycle processor. F0-F2 fetch; each
  // instruction then runs its own sequence and returns to F0. The numeric
  // value of a state is also its microcode address.
  typedef enum logic [6:0] {
    F0, F1, F2,
    A0, A1, A2,          // addu
    AI[0:2],             // addiu
    M[0:34],             // mul: 3 setup states, 32 shift-and-add steps
    L[0:3],              // lw
    S[0:3],              // sw
    J[0:1],              // j
    JA[0:2],             // jal
    JR0,                 // jr
    B[0:4],              // bne
    LA[0:4]              // lw.ai
  } fsm_state_t;

  localparam int FSM_NSTATES = 68;

  // Sequencing of each state: n = next state, d = dispatch on the opcode,
  // f = back to F0, b = back to F0 if A == B, else next state.
  typedef enum logic [1:0] { NS_N, NS_D, NS_F, NS_B } fsm_next_t;

  // The three ways the multicycle processor's control unit can be built.
  typedef enum logic [1:0] { FSM_HARDWIRED, FSM_VERTICAL, FSM_HORIZONTAL } fsm_ctrl_kind_t;

  // First state of each instruction's sequence (the dispatch decoder).
  // Undefined opcodes go straight back to fetch.
  function automatic fsm_state_t fsm_dispatch(input inst_t inst);
    unique case (inst)
      I_ADDU:  fsm_dispatch = A0;
      I_ADDIU: fsm_dispatch = AI0;
      I_MUL:   fsm_dispatch = M0;
      I_LW:    fsm_dispatch = L0;
      I_SW:    fsm_dispatch = S0;
      I_J:     fsm_dispatch = J0;
      I_JAL:   fsm_dispatch = JA0;
      I_JR:    fsm_dispatch = JR0;
      I_BNE:   fsm_dispatch = B0;
      I_LWAI:  fsm_dispatch = LA0;
      default: fsm_dispatch = F0;
    endcase
  endfunction

  function automatic fsm_next_t fsm_next_kind(input fsm_state_t st);
    unique case (st)
      F2:                                     fsm_next_kind = NS_D;
      B2:                                     fsm_next_kind = NS_B;
      A2, AI2, M34, L3, S3, J1, JA2, JR0,
      B4, LA4:                                fsm_next_kind = NS_F;
      default:                                fsm_next_kind = NS_N;
    endcase
  endfunction

  // Control signal output table: the 24 control signals of every state.
  function automatic fsm_cs_t fsm_state_cs(input fsm_state_t st);
    fsm_cs_t cs;
    cs             = '0;
    cs.iau_fn      = IAU_SI;
    cs.alu_fn      = ALU_ADD;
    cs.rf_addr_sel = RA_RS;
    cs.mreq_op     = MEM_READ;
    unique case (st)
      // fetch: memreq.addr <- PC, A <- PC; IR <- RD; PC <- A+4, A <- A+4
      F0:  begin cs.pc_bus_en = 1; cs.a_en = 1; cs.mreq_val = 1; end
      F1:  begin cs.rd_bus_en = 1; cs.ir_en = 1; end
      F2:  begin cs.alu_bus_en = 1; cs.alu_fn = ALU_ADD4; cs.pc_en = 1; cs.a_en = 1; end
      // addu: A <- RF[rs]; B <- RF[rt]; RF[rd] <- A + B
      A0:  begin cs.rf_bus_en = 1; cs.a_en = 1; end
      A1:  begin cs.rf_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.b_en = 1; end
      A2:  begin cs.alu_bus_en = 1; cs.rf_addr_sel = RA_RD; cs.rf_wen = 1; end
      // addiu: A <- RF[rs]; B <- si; RF[rt] <- A + B
      AI0: begin cs.rf_bus_en = 1; cs.a_en = 1; end
      AI1: begin cs.iau_bus_en = 1; cs.b_en = 1; end
      AI2: begin cs.alu_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.rf_wen = 1; end
      // mul: A <- RF[0]; B <- RF[rs]; C <- RF[rt];
      //      32 x { A <- A +? B; B <- B << 1; C <- C >> 1 }, last one to RF[rd]
      M0:  begin cs.rf_bus_en = 1; cs.rf_addr_sel = RA_0; cs.a_en = 1; end
      M1:  begin cs.rf_bus_en = 1; cs.b_en = 1; end
      M2:  begin cs.rf_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.c_en = 1; end
      M34: begin cs.alu_bus_en = 1; cs.alu_fn = ALU_CADD;
                 cs.rf_addr_sel = RA_RD; cs.rf_wen = 1; end
      // lw: A <- RF[rs]; B <- si; memreq.addr <- A + B; RF[rt] <- RD
      L0:  begin cs.rf_bus_en = 1; cs.a_en = 1; end
      L1:  begin cs.iau_bus_en = 1; cs.b_en = 1; end
      L2:  begin cs.alu_bus_en = 1; cs.mreq_val = 1; end
      L3:  begin cs.rd_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.rf_wen = 1; end
      // sw: WD <- RF[rt]; A <- RF[rs]; B <- si; memreq.addr <- A + B (write)
      S0:  begin cs.rf_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.wd_en = 1; end
      S1:  begin cs.rf_bus_en = 1; cs.a_en = 1; end
      S2:  begin cs.iau_bus_en = 1; cs.b_en = 1; end
      S3:  begin cs.alu_bus_en = 1; cs.mreq_val = 1; cs.mreq_op = MEM_WRITE; end
      // j: B <- ts; PC <- jt
      J0:  begin cs.iau_bus_en = 1; cs.iau_fn = IAU_TS; cs.b_en = 1; end
      J1:  begin cs.alu_bus_en = 1; cs.alu_fn = ALU_JT; cs.pc_en = 1; end
      // jal: B <- ts; RF[31] <- PC (= pc+4); PC <- jt
      JA0: begin cs.iau_bus_en = 1; cs.iau_fn = IAU_TS; cs.b_en = 1; end
      JA1: begin cs.pc_bus_en = 1; cs.rf_addr_sel = RA_31; cs.rf_wen = 1; end
      JA2: begin cs.alu_bus_en = 1; cs.alu_fn = ALU_JT; cs.pc_en = 1; end
      // jr: PC <- RF[rs]
      JR0: begin cs.rf_bus_en = 1; cs.pc_en = 1; end
      // bne: A <- RF[rs]; B <- RF[rt]; compare A == B and B <- sis;
      //      A <- PC; PC <- A + B
      B0:  begin cs.rf_bus_en = 1; cs.a_en = 1; end
      B1:  begin cs.rf_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.b_en = 1; end
      B2:  begin cs.alu_fn = ALU_CMP; cs.iau_bus_en = 1; cs.iau_fn = IAU_SIS; cs.b_en = 1; end
      B3:  begin cs.pc_bus_en = 1; cs.a_en = 1; end
      B4:  begin cs.alu_bus_en = 1; cs.pc_en = 1; end
      // lw.ai: A <- RF[rs]; B <- si; memreq.addr <- A + B; RF[rt] <- RD;
      //        RF[rs] <- A + 4
      LA0: begin cs.rf_bus_en = 1; cs.a_en = 1; end
      LA1: begin cs.iau_bus_en = 1; cs.b_en = 1; end
      LA2: begin cs.alu_bus_en = 1; cs.mreq_val = 1; end
      LA3: begin cs.rd_bus_en = 1; cs.rf_addr_sel = RA_RT; cs.rf_wen = 1; end
      LA4: begin cs.alu_bus_en = 1; cs.alu_fn = ALU_ADD4; cs.rf_wen = 1; end
      default: begin
        // M3 .. M33: one shift-and-add step
        if (st > M2 && st < M34) begin
          cs.alu_bus_en = 1; cs.alu_fn = ALU_CADD; cs.a_en = 1;
          cs.b_en = 1; cs.b_sel = 1; cs.c_en = 1; cs.c_sel = 1;
        end
      end
    endcase
    return cs;
  endfunction

endpackage
