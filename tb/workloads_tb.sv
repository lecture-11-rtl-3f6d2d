// workloads_tb: the two short instruction sequences used to compare the
// microarchitectures, run on all five processors of parc_top:
//   (1) lw, addu, j  - one load, one register-register add, one jump;
//   (2) addiu r1,r2,1; addiu r3,r4,1; addiu r5,r6,1 - independent adds.
// For each sequence and processor the cycles until the halt instruction is
// fetched are compared with the expected count (instruction count for the
// single-cycle processor, the state-count sum for the FSM processors, the
// stage-timing model for the pipeline), and the destination registers are
// compared with the instruction-set simulator. It then checks the CPI
// ordering: single-cycle CPI 1, FSM CPI above 1, and the pipeline reaching
// one instruction per cycle on the independent sequence.
module workloads_tb;
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
  int h_sc, h_hw, h_uc, h_hz, h_p;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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
    cycle++;
  end

  task automatic run(input string name, input int regs [3]);
    run_iss();
    for (int i = 0; i < MEMW; i++) begin
      m_sc.mem[i] = prog[i]; m_hw.mem[i] = prog[i]; m_uc.mem[i] = prog[i]; m_hz.mem[i] = prog[i]; m_p.mem[i] = prog[i];
    end
    h_sc = -1; h_hw = -1; h_uc = -1; h_hz = -1; h_p = -1;
    reset <= 1;
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (h_sc >= 0 && h_hw >= 0 && h_uc >= 0 && h_hz >= 0 && h_p >= 0);
    repeat (6) @(posedge clk);
    check(h_sc == n_inst, $sformatf("%s single-cycle: %0d cycles, expected %0d", name, h_sc, n_inst));
    check(h_hw == fsm_cycles, $sformatf("%s FSM hardwired: %0d cycles, expected %0d", name, h_hw, fsm_cycles));
    check(h_uc == fsm_cycles, $sformatf("%s FSM vertical: %0d cycles, expected %0d", name, h_uc, fsm_cycles));
    check(h_hz == fsm_cycles, $sformatf("%s FSM horizontal: %0d cycles, expected %0d", name, h_hz, fsm_cycles));
    check(h_p == pipe_halt_cycle, $sformatf("%s pipelined: %0d cycles, expected %0d", name, h_p, pipe_halt_cycle));
    foreach (regs[k]) begin
      check(dut.u_sc.u_rf.regs[regs[k]] == iss_rf[regs[k]], $sformatf("%s single-cycle r%0d", name, regs[k]));
      check(dut.u_fsm_hw.u_dpath.u_rf.regs[regs[k]] == iss_rf[regs[k]], $sformatf("%s FSM hw r%0d", name, regs[k]));
      check(dut.u_fsm_uc.u_dpath.u_rf.regs[regs[k]] == iss_rf[regs[k]], $sformatf("%s FSM uc r%0d", name, regs[k]));
      check(dut.u_fsm_hz.u_dpath.u_rf.regs[regs[k]] == iss_rf[regs[k]], $sformatf("%s FSM hz r%0d", name, regs[k]));
      check(dut.u_pipe.u_rf.regs[regs[k]] == iss_rf[regs[k]], $sformatf("%s pipelined r%0d", name, regs[k]));
    end
    $display("%-10s %0d instructions: single-cycle %0d, FSM %0d, pipelined %0d cycles",
             name, n_inst, h_sc, h_hw, h_p);
  endtask

  initial begin
    int fsm1, fsm2;
    // (1) lw, addu, j
    for (int i = 0; i < MEMW; i++) prog[i] = '0;
    prog[DATA_BASE/4] = 32'd41;
    prog[0] = a_lw(1, DATA_BASE, 0);
    prog[1] = a_addu(3, 4, 5);
    prog[2] = a_j(8);
    halt_word = 8;
    prog[8] = a_j(8);
    run("lw/addu/j", '{1, 3, 31});
    fsm1 = h_hw;
    check(h_hw == 7 + 6 + 5, "FSM: lw 7 + addu 6 + j 5 cycles");
    // (2) three independent addiu
    for (int i = 0; i < MEMW; i++) prog[i] = '0;
    prog[0] = a_addiu(1, 2, 1);
    prog[1] = a_addiu(3, 4, 1);
    prog[2] = a_addiu(5, 6, 1);
    halt_word = 3;
    prog[3] = a_j(3);
    run("addiu x3", '{1, 3, 5});
    fsm2 = h_hw;
    check(h_sc == 3 && h_p == 3, "single-cycle and pipeline: one instruction per cycle");
    check(fsm1 > 3 && fsm2 > 3, "FSM CPI above 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
