// sc_ctrl_tb: every instruction (and an undefined opcode) through the
// single-cycle control unit, with the expected control-table row written
// out here; bne is checked with eq = 0 and eq = 1.
module sc_ctrl_tb;
  import parc_pkg::*;

  word_t      ir;
  logic       eq, rf_wen, rf_wen1, imem_val, dmem_val;
  pc_sel_t    pc_sel;
  op1_sel_t   op1_sel;
  alu_fn_t    alu_fn;
  wb_sel_t    wb_sel;
  waddr_sel_t wa;
  mem_op_t    dmem_op;
  int checks = 0, failures = 0;

  sc_ctrl dut (.ir, .eq, .pc_sel, .op1_sel, .alu_fn, .wb_sel, .rf_waddr_sel(wa),
               .rf_wen, .rf_wen1, .imemreq_val(imem_val), .dmemreq_val(dmem_val),
               .dmemreq_op(dmem_op));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: pc_sel op1_sel alu_fn wb_sel waddr wen wen1 dmem_val dmem_op ('x' = don't care)
  task automatic expect_row(input string name, input word_t i, input logic e,
                            input int pcs, input int o1, input int fn, input int wb,
                            input int wa_e, input bit wen, input bit wen1,
                            input bit dv, input int dop);
    ir = i; eq = e; #1;
    checks++;
    if (pc_sel != pc_sel_t'(pcs) || (o1 >= 0 && op1_sel != op1_sel_t'(o1)) ||
        (fn >= 0 && alu_fn != alu_fn_t'(fn)) || (wb >= 0 && wb_sel != wb_sel_t'(wb)) ||
        (wa_e >= 0 && wa != waddr_sel_t'(wa_e)) || rf_wen != wen || rf_wen1 != wen1 ||
        dmem_val != dv || (dop >= 0 && dmem_op != mem_op_t'(dop)) || imem_val != 1'b1) begin
      failures++;
      $display("FAIL: %s: pc_sel %0d op1 %0d fn %0d wb %0d wa %0d wen %0d/%0d dmem %0d/%0d",
               name, pc_sel, op1_sel, alu_fn, wb_sel, wa, rf_wen, rf_wen1, dmem_val, dmem_op);
    end
  endtask

  function automatic word_t enc(int op, int fn); return {op[5:0], 5'd1, 5'd2, 5'd3, 5'd0, fn[5:0]}; endfunction

  initial begin
    //                                 pc  op1 fn  wb  wa  wen w1  dv dop
    expect_row("addu",  enc(0, 33), 0, 0,  0,  0,  0,  0,  1,  0,  0, -1);
    expect_row("addiu", enc(9, 0),  0, 0,  1,  0,  0,  1,  1,  0,  0, -1);
    expect_row("mul",   enc(28, 2), 0, 0,  0, -1,  1,  0,  1,  0,  0, -1);
    expect_row("lw",    enc(35, 0), 0, 0,  1,  0,  2,  1,  1,  0,  1,  0);
    expect_row("sw",    enc(43, 0), 0, 0,  1,  0, -1, -1,  0,  0,  1,  1);
    expect_row("j",     enc(2, 0),  0, 1, -1, -1, -1, -1,  0,  0,  0, -1);
    expect_row("jal",   enc(3, 0),  0, 1,  2,  5,  0,  2,  1,  0,  0, -1);
    expect_row("jr",    enc(0, 8),  0, 2, -1, -1, -1, -1,  0,  0,  0, -1);
    expect_row("bne/ne",enc(5, 0),  0, 3,  0,  3, -1, -1,  0,  0,  0, -1);
    expect_row("bne/eq",enc(5, 0),  1, 0,  0,  3, -1, -1,  0,  0,  0, -1);
    expect_row("lw.ai", enc(59, 0), 0, 0,  1,  0,  2,  1,  1,  1,  1,  0);
    expect_row("undef", enc(63, 0), 0, 0, -1, -1, -1, -1,  0,  0,  0, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
