// fsm_proc_tb: runs the generated test program on the multicycle processor,
// under each of the three control units (hardwired, vertically and
// horizontally microcoded), and compares the result and data areas with the
// instruction-set simulator. Timing: the halt must be fetched (state F0 with
// the halt's address on the memory port) after exactly the sum of the
// per-instruction cycle counts of the state diagram (3 fetch states plus
// addu/addiu 3, mul 35, lw/sw 4, j 2, jal 3, jr 1, bne 3 or 5, lw.ai 5).
// All three control units must also produce the same state sequence.
module fsm_proc_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  mem_req_t   req_hw, req_uc, req_hz, idle;
  mem_resp_t  resp_hw, resp_uc, resp_hz, unused0, unused1, unused2;
  fsm_state_t st_hw, st_uc, st_hz;

  assign idle = '0;

  fsm_proc #(.CTRL(FSM_HARDWIRED))  dut_hw (.clk, .reset, .memreq(req_hw), .memresp(resp_hw), .state(st_hw));
  fsm_proc #(.CTRL(FSM_VERTICAL))   dut_uc (.clk, .reset, .memreq(req_uc), .memresp(resp_uc), .state(st_uc));
  fsm_proc #(.CTRL(FSM_HORIZONTAL)) dut_hz (.clk, .reset, .memreq(req_hz), .memresp(resp_hz), .state(st_hz));
  test_mem #(.WORDS(MEMW)) mem_hw (.clk, .req0(req_hw), .resp0(resp_hw), .req1(idle), .resp1(unused0));
  test_mem #(.WORDS(MEMW)) mem_uc (.clk, .req0(req_uc), .resp0(resp_uc), .req1(idle), .resp1(unused1));
  test_mem #(.WORDS(MEMW)) mem_hz (.clk, .req0(req_hz), .resp0(resp_hz), .req1(idle), .resp1(unused2));

  int checks = 0, failures = 0, cycle = 0, halt_hw = -1, halt_uc = -1, halt_hz = -1;
  int mismatches = 0, mul_steps = 0, bne_taken = 0, dispatches = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) begin
    if (st_hw == F0 && req_hw.addr == halt_word * 4 && halt_hw < 0) halt_hw = cycle;
    if (st_uc == F0 && req_uc.addr == halt_word * 4 && halt_uc < 0) halt_uc = cycle;
    if (st_hz == F0 && req_hz.addr == halt_word * 4 && halt_hz < 0) halt_hz = cycle;
    if (halt_hw < 0) begin
      if (st_hw != st_uc || st_hw != st_hz) mismatches++;
      if (st_hw == M10) mul_steps++;
      if (st_hw == B3)  bne_taken++;
      if (st_hw == F2)  dispatches++;
    end
    cycle++;
  end

  initial begin
    gen_program(60);
    run_iss();
    for (int i = 0; i < MEMW; i++) begin mem_hw.mem[i] = prog[i]; mem_uc.mem[i] = prog[i]; mem_hz.mem[i] = prog[i]; end
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (halt_hw >= 0 && halt_uc >= 0 && halt_hz >= 0);
    repeat (5) @(posedge clk);
    check(halt_hw == fsm_cycles, $sformatf("hardwired: halt at cycle %0d, expected %0d", halt_hw, fsm_cycles));
    check(halt_uc == fsm_cycles, $sformatf("vertical: halt at cycle %0d, expected %0d", halt_uc, fsm_cycles));
    check(halt_hz == fsm_cycles, $sformatf("horizontal: halt at cycle %0d, expected %0d", halt_hz, fsm_cycles));
    check(mismatches == 0, $sformatf("%0d cycles where the control units differ", mismatches));
    check(mul_steps == n_mul, "one M10 visit per mul");
    check(bne_taken == n_taken, "B3 visited once per taken bne");
    check(dispatches == n_inst, "one dispatch per instruction");
    for (int r = 1; r < 32; r++) begin
      check(mem_hw.mem[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("hw r%0d = %h, expected %h", r, mem_hw.mem[RES_BASE/4 + r], iss_rf[r]));
      check(mem_uc.mem[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("uc r%0d = %h, expected %h", r, mem_uc.mem[RES_BASE/4 + r], iss_rf[r]));
      check(mem_hz.mem[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("hz r%0d = %h, expected %h", r, mem_hz.mem[RES_BASE/4 + r], iss_rf[r]));
    end
    for (int i = 0; i < 256; i++) begin
      check(mem_hw.mem[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("hw data word %0d", i));
      check(mem_uc.mem[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("uc data word %0d", i));
      check(mem_hz.mem[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("hz data word %0d", i));
    end
    $display("fsm_proc: %0d instructions in %0d cycles (CPI %0.2f), %0d mul, %0d taken bne",
             n_inst, halt_hw, real'(halt_hw) / n_inst, n_mul, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
