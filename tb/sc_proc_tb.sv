// sc_proc_tb: runs the generated test program on the single-cycle
// processor and compares the result area and the data area with the
// instruction-set simulator. Also checks CPI = 1: the halt instruction must be
// fetched exactly n_inst cycles after reset, and every cycle must fetch.
module sc_proc_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  mem_req_t  imemreq, dmemreq;
  mem_resp_t imemresp, dmemresp;

  sc_proc dut (.clk, .reset, .imemreq, .imemresp, .dmemreq, .dmemresp);
  test_mem #(.WORDS(MEMW)) u_mem (.clk, .req0(imemreq), .resp0(imemresp),
                                  .req1(dmemreq), .resp1(dmemresp));

  int checks = 0, failures = 0, cycle = 0, halt_at = -1;
  int n_loads = 0, n_stores = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) begin
    if (imemreq.addr == halt_word * 4 && halt_at < 0) halt_at = cycle;
    if (dmemreq.val && dmemreq.op == MEM_READ)  n_loads++;
    if (dmemreq.val && dmemreq.op == MEM_WRITE) n_stores++;
    cycle++;
  end

  initial begin
    gen_program(200);
    run_iss();
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = prog[i];
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (halt_at >= 0);
    repeat (5) @(posedge clk);
    check(halt_at == n_inst, $sformatf("CPI 1: halt fetched at cycle %0d, expected %0d", halt_at, n_inst));
    for (int r = 1; r < 32; r++)
      check(u_mem.mem[RES_BASE/4 + r] == iss_rf[r],
            $sformatf("r%0d = %h, expected %h", r, u_mem.mem[RES_BASE/4 + r], iss_rf[r]));
    for (int i = 0; i < 256; i++)
      check(u_mem.mem[DATA_BASE/4 + i] == iss_mem[DATA_BASE/4 + i], $sformatf("data word %0d", i));
    check(n_loads > 0 && n_stores > 0, "loads and stores happened");
    $display("sc_proc: %0d instructions in %0d cycles, %0d loads, %0d stores",
             n_inst, halt_at, n_loads, n_stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
