// fsm_ctrl_hw_tb: each instruction class through the hardwired control
// unit, from F0 back to F0. Checks the cycle count of each sequence against
// the state diagram (fetch 3 + addu 3, addiu 3, mul 35, lw 4, sw 4, j 2,
// jal 3, jr 1, bne 3 when A == B or 5 when not, lw.ai 5), that the fetch
// states do what the fetch micro-operations say, that mul makes 32 shift-add
// steps, and that no cycle enables two bus drivers.
module fsm_ctrl_hw_tb;
  import parc_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  word_t      ir;
  logic       eq;
  fsm_cs_t    cs;
  fsm_state_t st;
  int checks = 0, failures = 0;

  fsm_ctrl_hw dut (.clk, .reset, .ir, .eq, .cs, .state(st));

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

  task automatic run(input string name, input word_t i, input logic e, input int cycles);
    int n, steps, writes, drivers_bad;
    ir = i; eq = e;
    reset = 1; @(posedge clk); #1 reset = 0;
    n = 0; steps = 0; writes = 0; drivers_bad = 0;
    do begin
      if (n == 0) check(cs.pc_bus_en && cs.a_en && cs.mreq_val && cs.mreq_op == MEM_READ,
                        {name, ": F0 sends PC to memory and A"});
      if (n == 1) check(cs.rd_bus_en && cs.ir_en, {name, ": F1 loads IR from RD"});
      if (n == 2) check(cs.alu_bus_en && cs.alu_fn == ALU_ADD4 && cs.pc_en && cs.a_en,
                        {name, ": F2 increments PC and A"});
      if (cs.alu_bus_en && cs.alu_fn == ALU_CADD) steps++;
      if (cs.rf_wen) writes++;
      if (int'(cs.pc_bus_en) + int'(cs.iau_bus_en) + int'(cs.alu_bus_en) +
          int'(cs.rf_bus_en) + int'(cs.rd_bus_en) > 1) drivers_bad++;
      @(posedge clk); #1;
      n++;
    end while (st != F0 && n < 100);
    check(n == cycles, $sformatf("%s: %0d cycles, expected %0d", name, n, cycles));
    check(drivers_bad == 0, {name, ": one bus driver"});
    if (name == "mul") check(steps == 32, "mul: 32 shift-and-add steps");
    if (name == "lw.ai") check(writes == 2, "lw.ai: two register writes");
  endtask

  function automatic word_t enc(int op, int fn); return {op[5:0], 5'd1, 5'd2, 5'd3, 5'd0, fn[5:0]}; endfunction

  initial begin
    ir = '0; eq = 0;
    repeat (2) @(posedge clk);
    run("addu",  enc(0, 33), 0, 6);
    run("addiu", enc(9, 0),  0, 6);
    run("mul",   enc(28, 2), 0, 38);
    run("lw",    enc(35, 0), 0, 7);
    run("sw",    enc(43, 0), 0, 7);
    run("j",     enc(2, 0),  0, 5);
    run("jal",   enc(3, 0),  0, 6);
    run("jr",    enc(0, 8),  0, 4);
    run("bne not taken", enc(5, 0), 1, 6);
    run("bne taken",     enc(5, 0), 0, 8);
    run("lw.ai", enc(59, 0), 0, 8);
    run("undefined", enc(63, 0), 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
