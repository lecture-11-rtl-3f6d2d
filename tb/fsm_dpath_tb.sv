// fsm_dpath_tb: drives the bus-based datapath directly with control words,
// sequencing the states itself (fetch F0-F2, then the states of each
// instruction, with the bne branch decided from the datapath's eq output)
// over a small memory model. A short program loads two operands, multiplies
// them with the 32 shift-and-add steps, adds them, stores both results,
// exercises lw.ai, jal, jr and a taken and a not-taken bne, and stores the
// link register. Checks: the fetch address of every instruction, the IR
// contents after F1, and the stored results against values computed here.
module fsm_dpath_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  fsm_cs_t   cs;
  word_t     ir;
  logic      eq;
  mem_req_t  memreq, idle;
  mem_resp_t memresp, nc;

  assign idle = '0;

  fsm_dpath dut (.clk, .reset, .cs, .ir, .eq, .memreq, .memresp);
  test_mem #(.WORDS(MEMW)) u_mem (.clk, .req0(memreq), .resp0(memresp), .req1(idle), .resp1(nc));

  int checks = 0, failures = 0;

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

  task automatic do_state(input fsm_state_t s);
    cs = fsm_state_cs(s);
    @(posedge clk); #1;
  endtask

  // execute one instruction; its sequence is chosen here from the opcode
  task automatic exec(input word_t expect_pc);
    fsm_state_t s, last;
    cs = fsm_state_cs(F0); #1;
    check(memreq.addr == expect_pc && memreq.val, $sformatf("fetch address %h, expected %h", memreq.addr, expect_pc));
    do_state(F0);
    do_state(F1);
    check(ir == u_mem.mem[expect_pc[13:2]], "IR holds the fetched instruction");
    do_state(F2);
    unique case (ir[31:26])
      6'h00:   begin s = (ir[5:0] == 6'h21) ? A0 : JR0; last = (ir[5:0] == 6'h21) ? A2 : JR0; end
      6'h09:   begin s = AI0; last = AI2; end
      6'h1C:   begin s = M0;  last = M34; end
      6'h23:   begin s = L0;  last = L3;  end
      6'h2B:   begin s = S0;  last = S3;  end
      6'h02:   begin s = J0;  last = J1;  end
      6'h03:   begin s = JA0; last = JA2; end
      6'h05:   begin s = B0;  last = B4;  end
      default: begin s = LA0; last = LA4; end
    endcase
    forever begin
      cs = fsm_state_cs(s); #1;
      if (s == B2 && eq) begin do_state(s); break; end
      do_state(s);
      if (s == last) break;
      s = fsm_state_t'(s + 1);
    end
  endtask

  initial begin
    int p;
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = '0;
    u_mem.mem[DATA_BASE/4]     = 32'd123457;
    u_mem.mem[DATA_BASE/4 + 1] = -32'sd789;
    u_mem.mem[DATA_BASE/4 + 2] = 32'hCAFE_F00D;
    p = 0;
    u_mem.mem[p++] = a_lw   (1, DATA_BASE, 0);        // 0x00
    u_mem.mem[p++] = a_lw   (2, DATA_BASE + 4, 0);    // 0x04
    u_mem.mem[p++] = a_mul  (3, 1, 2);                // 0x08
    u_mem.mem[p++] = a_addu (4, 1, 2);                // 0x0c
    u_mem.mem[p++] = a_sw   (3, RES_BASE, 0);         // 0x10
    u_mem.mem[p++] = a_sw   (4, RES_BASE + 4, 0);     // 0x14
    u_mem.mem[p++] = a_addiu(5, 0, DATA_BASE + 4);    // 0x18
    u_mem.mem[p++] = a_lwai (6, 4, 5);                // 0x1c  r6 = M[0x2008], r5 += 4
    u_mem.mem[p++] = a_sw   (6, RES_BASE + 8, 0);     // 0x20
    u_mem.mem[p++] = a_sw   (5, RES_BASE + 12, 0);    // 0x24
    u_mem.mem[p++] = a_bne  (1, 1, 10, 0);            // 0x28  not taken
    u_mem.mem[p++] = a_bne  (1, 2, 11, 13);           // 0x2c  taken -> 0x34
    u_mem.mem[p++] = a_sw   (1, RES_BASE + 16, 0);    // 0x30  skipped
    u_mem.mem[p++] = a_jal  (20);                     // 0x34  -> 0x50
    u_mem.mem[p++] = a_sw   (31, RES_BASE + 20, 0);   // 0x38
    u_mem.mem[20]  = a_jr   (31);                     // 0x50
    cs = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    exec(32'h00); exec(32'h04); exec(32'h08); exec(32'h0c); exec(32'h10); exec(32'h14);
    exec(32'h18); exec(32'h1c); exec(32'h20); exec(32'h24); exec(32'h28); exec(32'h2c);
    exec(32'h34); exec(32'h50); exec(32'h38);
    check(u_mem.mem[RES_BASE/4]     == 32'd123457 * (-32'sd789), "mul by shift and add");
    check(u_mem.mem[RES_BASE/4 + 1] == 32'd123457 + (-32'sd789), "addu");
    check(u_mem.mem[RES_BASE/4 + 2] == 32'hCAFE_F00D, "lw.ai loaded word");
    check(u_mem.mem[RES_BASE/4 + 3] == DATA_BASE + 8, "lw.ai incremented base");
    check(u_mem.mem[RES_BASE/4 + 4] == 0, "taken bne skipped the store");
    check(u_mem.mem[RES_BASE/4 + 5] == 32'h38, "jal link value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
