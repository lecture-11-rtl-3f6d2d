// pipe_proc_tb: runs the generated test program on the pipelined processor
// and compares the result and data areas with the instruction-set simulator.
// Timing is checked against a stage-timing model computed independently of
// the RTL: the cycle in which the halt is first fetched, the number of cycles
// in which D originates a RAW stall, and the number of squashes originated by
// jumps in D and by taken branches in X. A second, hazard-free run of
// independent addiu instructions must reach one instruction per cycle.
module pipe_proc_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  mem_req_t  imemreq, dmemreq;
  mem_resp_t imemresp, dmemresp;

  pipe_proc dut (.clk, .reset, .imemreq, .imemresp, .dmemreq, .dmemresp);
  test_mem #(.WORDS(MEMW)) u_mem (.clk, .req0(imemreq), .resp0(imemresp),
                                  .req1(dmemreq), .resp1(dmemresp));

  int checks = 0, failures = 0, cycle = 0, halt_at = -1;
  int n_ostall_d = 0, n_osquash_d = 0, n_osquash_x = 0, n_squash_d = 0;
  bit counting = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (reset) cycle = 0; else begin
    if (imemreq.val && imemreq.addr == halt_word * 4 && halt_at < 0) halt_at = cycle;
    if (halt_at < 0) begin
      n_ostall_d  += int'(dut.ostall_D);
      n_osquash_d += int'(dut.osquash_D);
      n_osquash_x += int'(dut.osquash_X);
      n_squash_d  += int'(dut.squash_D);
    end
    cycle++;
  end

  task automatic run_program();
    run_iss();
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = prog[i];
    reset <= 1; halt_at = -1;
    n_ostall_d = 0; n_osquash_d = 0; n_osquash_x = 0; n_squash_d = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (halt_at >= 0);
    repeat (8) @(posedge clk);
    for (int r = 1; r < 32; r++)
      check(u_mem.mem[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("r%0d = %h, expected %h", r, u_mem.mem[RES_BASE/4 + r], iss_rf[r]));
    for (int i = 0; i < 256; i++)
      check(u_mem.mem[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("data word %0d", i));
  endtask

  initial begin
    // directed + random program
    gen_program(300);
    run_program();
    check(halt_at == pipe_halt_cycle,
          $sformatf("halt fetched at cycle %0d, model %0d", halt_at, pipe_halt_cycle));
    check(n_ostall_d == pipe_stall_cycles,
          $sformatf("RAW stall cycles %0d, model %0d", n_ostall_d, pipe_stall_cycles));
    check(n_osquash_d == pipe_jumps, $sformatf("jump squashes %0d, model %0d", n_osquash_d, pipe_jumps));
    check(n_osquash_x == pipe_taken, $sformatf("branch squashes %0d, model %0d", n_osquash_x, pipe_taken));
    check(n_ostall_d > 0 && n_osquash_d > 0 && n_osquash_x > 0 && n_squash_d > 0,
          "stall, jump squash and branch squash all happened");
    $display("pipe_proc: %0d instructions, halt at cycle %0d, %0d stall cycles, %0d+%0d squashes",
             n_inst, halt_at, n_ostall_d, n_osquash_d, n_osquash_x);
    // independent instructions: CPI 1 after the fill
    for (int i = 0; i < MEMW; i++) prog[i] = '0;
    for (int i = 0; i < 40; i++) prog[i] = a_addiu(1 + (i % 7), 0, i);
    for (int r = 1; r < 32; r++) prog[40 + r - 1] = a_sw(r, RES_BASE + 4 * r, 0);
    halt_word = 40 + 31;
    prog[halt_word] = a_j(halt_word);
    run_program();
    check(halt_at == halt_word, $sformatf("CPI 1: halt at cycle %0d, expected %0d", halt_at, halt_word));
    check(n_ostall_d == 0 && n_osquash_d == 0 && n_osquash_x == 0, "no stalls or squashes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
