// parc_top_tb: end-to-end test of parc_top at its default parameters.
//
// Each of the five processors gets its own test memory loaded with the same
// generated program (directed part plus a pseudo-random block). After all of
// them have reached the halt, every processor's result area (r1..r31) and
// data area must match the instruction-set simulator, and each must have
// taken the number of cycles its microarchitecture implies: n_inst for the
// single-cycle processor, the state-count sum for all three FSM processors, and
// the stage-timing model for the pipeline. Every mechanism of the design is
// counted and must have happened at least once: pipeline RAW stall, jump
// squash (D) and branch squash (X); FSM opcode dispatch, shift-and-add
// multiply step, the "b" early return of a not-taken bne and the taken-branch
// path; lw.ai double write-back; jal/jr.
module parc_top_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  mem_req_t   sc_ireq, sc_dreq, hw_req, uc_req, hz_req, p_ireq, p_dreq, idle;
  mem_resp_t  sc_iresp, sc_dresp, hw_resp, uc_resp, hz_resp, p_iresp, p_dresp, nc0, nc1, nc2;
  fsm_state_t hw_state, uc_state, hz_state;

  assign idle = '0;

  parc_top dut (
    .clk, .reset,
    .sc_imemreq(sc_ireq), .sc_imemresp(sc_iresp), .sc_dmemreq(sc_dreq), .sc_dmemresp(sc_dresp),
    .fsm_hw_memreq(hw_req), .fsm_hw_memresp(hw_resp), .fsm_hw_state(hw_state),
    .fsm_uc_memreq(uc_req), .fsm_uc_memresp(uc_resp), .fsm_uc_state(uc_state),
    .fsm_hz_memreq(hz_req), .fsm_hz_memresp(hz_resp), .fsm_hz_state(hz_state),
    .pipe_imemreq(p_ireq), .pipe_imemresp(p_iresp), .pipe_dmemreq(p_dreq), .pipe_dmemresp(p_dresp));

  test_mem #(.WORDS(MEMW)) m_sc (.clk, .req0(sc_ireq), .resp0(sc_iresp), .req1(sc_dreq), .resp1(sc_dresp));
  test_mem #(.WORDS(MEMW)) m_hw (.clk, .req0(hw_req), .resp0(hw_resp), .req1(idle), .resp1(nc0));
  test_mem #(.WORDS(MEMW)) m_uc (.clk, .req0(uc_req), .resp0(uc_resp), .req1(idle), .resp1(nc1));
  test_mem #(.WORDS(MEMW)) m_hz (.clk, .req0(hz_req), .resp0(hz_resp), .req1(idle), .resp1(nc2));
  test_mem #(.WORDS(MEMW)) m_p  (.clk, .req0(p_ireq), .resp0(p_iresp), .req1(p_dreq), .resp1(p_dresp));

  int checks = 0, failures = 0, cycle = 0;
  int h_sc = -1, h_hw = -1, h_uc = -1, h_hz = -1, h_p = -1;
  // mechanism counters
  int c_stall, c_jsquash, c_bsquash, c_dispatch, c_mulstep, c_bne_early, c_bne_taken;
  int c_lwai_sc, c_jal_sc, c_jr_sc, c_ucode_dispatch, c_hcode_dispatch;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (reset) cycle = 0; else begin
    if (h_sc < 0 && sc_ireq.addr == halt_word * 4) h_sc = cycle;
    if (h_hw < 0 && hw_state == F0 && hw_req.addr == halt_word * 4) h_hw = cycle;
    if (h_uc < 0 && uc_state == F0 && uc_req.addr == halt_word * 4) h_uc = cycle;
    if (h_hz < 0 && hz_state == F0 && hz_req.addr == halt_word * 4) h_hz = cycle;
    if (h_p  < 0 && p_ireq.val && p_ireq.addr == halt_word * 4) h_p = cycle;
    if (h_p < 0) begin
      c_stall   += int'(dut.u_pipe.ostall_D);
      c_jsquash += int'(dut.u_pipe.osquash_D);
      c_bsquash += int'(dut.u_pipe.osquash_X);
    end
    if (h_hw < 0) begin
      c_dispatch  += int'(hw_state == F2);
      c_mulstep   += int'(hw_state > M2 && hw_state <= M34);
      c_bne_early += int'(hw_state == B2 && dut.u_fsm_hw.eq);
      c_bne_taken += int'(hw_state == B4);
    end
    if (h_uc < 0) c_ucode_dispatch += int'(uc_state == F2);
    if (h_hz < 0) c_hcode_dispatch += int'(hz_state == F2);
    if (h_sc < 0) begin
      c_lwai_sc += int'(dut.u_sc.rf_wen1);
      c_jal_sc  += int'(dut.u_sc.rf_waddr_sel == WA_R31 && dut.u_sc.rf_wen);
      c_jr_sc   += int'(dut.u_sc.pc_sel == PC_JR);
    end
    cycle++;
  end

  task automatic check_mem(string who, ref word_t m [MEMW]);
    for (int r = 1; r < 32; r++)
      check(m[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("%s r%0d = %h, expected %h", who, r, m[RES_BASE/4 + r], iss_rf[r]));
    for (int i = 0; i < 256; i++)
      check(m[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("%s data word %0d", who, i));
  endtask

  initial begin
    c_stall = 0; c_jsquash = 0; c_bsquash = 0; c_dispatch = 0; c_mulstep = 0;
    c_bne_early = 0; c_bne_taken = 0; c_lwai_sc = 0; c_jal_sc = 0; c_jr_sc = 0;
    c_ucode_dispatch = 0; c_hcode_dispatch = 0;
    gen_program(120);
    run_iss();
    for (int i = 0; i < MEMW; i++) begin
      m_sc.mem[i] = prog[i]; m_hw.mem[i] = prog[i]; m_uc.mem[i] = prog[i]; m_hz.mem[i] = prog[i]; m_p.mem[i] = prog[i];
    end
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (h_sc >= 0 && h_hw >= 0 && h_uc >= 0 && h_hz >= 0 && h_p >= 0);
    repeat (8) @(posedge clk);
    check_mem("single-cycle", m_sc.mem);
    check_mem("fsm-hardwired", m_hw.mem);
    check_mem("fsm-vertical", m_uc.mem);
    check_mem("fsm-horizontal", m_hz.mem);
    check_mem("pipelined", m_p.mem);
    check(h_sc == n_inst,          $sformatf("single-cycle cycles %0d, expected %0d", h_sc, n_inst));
    check(h_hw == fsm_cycles,      $sformatf("hardwired cycles %0d, expected %0d", h_hw, fsm_cycles));
    check(h_uc == fsm_cycles,      $sformatf("vertical cycles %0d, expected %0d", h_uc, fsm_cycles));
    check(h_hz == fsm_cycles,      $sformatf("horizontal cycles %0d, expected %0d", h_hz, fsm_cycles));
    check(h_p  == pipe_halt_cycle, $sformatf("pipelined cycles %0d, expected %0d", h_p, pipe_halt_cycle));
    check(c_stall == pipe_stall_cycles, "pipeline stall cycles match the model");
    check(c_jsquash == pipe_jumps,      "pipeline jump squashes match the model");
    check(c_bsquash == pipe_taken,      "pipeline branch squashes match the model");
    check(c_mulstep == 32 * n_mul,      "32 shift-and-add steps per mul");
    check(c_bne_early == n_nottaken,    "one early return per not-taken bne");
    check(c_bne_taken == n_taken,       "one B4 per taken bne");
    check(c_dispatch == n_inst && c_ucode_dispatch == n_inst && c_hcode_dispatch == n_inst, "one dispatch per instruction");
    check(c_lwai_sc == n_lwai,          "single-cycle lw.ai second write");
    // every mechanism happened
    check(c_stall > 0,     "mechanism: pipeline RAW stall");
    check(c_jsquash > 0,   "mechanism: pipeline squash by a jump in D");
    check(c_bsquash > 0,   "mechanism: pipeline squash by a taken branch in X");
    check(c_dispatch > 0,  "mechanism: FSM opcode dispatch");
    check(c_mulstep > 0,   "mechanism: FSM shift-and-add multiply step");
    check(c_bne_early > 0, "mechanism: FSM early return of a not-taken bne");
    check(c_bne_taken > 0, "mechanism: FSM taken branch");
    check(c_lwai_sc > 0,   "mechanism: lw.ai");
    check(c_jal_sc > 0 && c_jr_sc > 0, "mechanism: jal and jr");
    $display("program: %0d instructions (%0d mul, %0d lw.ai, %0d taken / %0d not-taken bne)",
             n_inst, n_mul, n_lwai, n_taken, n_nottaken);
    $display("single-cycle %0d cycles, FSM %0d cycles (all three controls), pipelined %0d cycles",
             h_sc, h_hw, h_p);
    $display("pipeline: %0d stall cycles, %0d jump squashes, %0d branch squashes",
             c_stall, c_jsquash, c_bsquash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
