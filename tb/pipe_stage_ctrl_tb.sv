// pipe_stage_ctrl_tb: random stimulus on every input of one stage's control
// logic, checked each cycle against a priority-ordered reference written
// here: an invalid stage does nothing; a squash from a later stage kills the
// stage and overrides any stall; otherwise a stall from this stage or a later
// one holds it (reg_en low) and no squash originates; otherwise the stage may
// originate a squash and passes its transaction on. The valid register is
// modelled alongside.
module pipe_stage_ctrl_tb;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic pnv, hst, hsq, lst, lsq;
  logic val, reg_en, squash, ostall, stall, osquash, next_val;
  logic ref_val;
  int checks = 0, failures = 0, n_stall = 0, n_squash = 0, n_osquash = 0;

  pipe_stage_ctrl dut (.clk, .reset, .prev_next_val(pnv), .hazard_stall(hst),
                       .hazard_squash(hsq), .later_ostall(lst), .later_osquash(lsq),
                       .val, .reg_en, .squash, .ostall, .stall, .osquash, .next_val);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_sq, e_ost, e_st, e_osq, e_nv, e_en;
    pnv = 0; hst = 0; hsq = 0; lst = 0; lsq = 0; ref_val = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pnv = $urandom_range(1, 0); hst = ($urandom_range(3, 0) == 0);
      hsq = ($urandom_range(3, 0) == 0); lst = ($urandom_range(3, 0) == 0);
      lsq = ($urandom_range(4, 0) == 0);
      #1;
      {e_sq, e_ost, e_st, e_osq, e_nv, e_en} = 6'b000001;
      if (ref_val) begin
        if (lsq)             e_sq = 1;
        else if (hst || lst) begin e_st = 1; e_ost = hst; e_en = 0; end
        else                 begin e_osq = hsq; e_nv = 1; end
      end
      check(val == ref_val, "val");
      check(squash == e_sq, "squash");
      check(ostall == e_ost, "ostall");
      check(stall == e_st, "stall");
      check(osquash == e_osq, "osquash");
      check(next_val == e_nv, "next_val");
      check(reg_en == e_en, "reg_en");
      n_stall += int'(e_st); n_squash += int'(e_sq); n_osquash += int'(e_osq);
      @(posedge clk);
      if (e_en) ref_val = pnv;
    end
    check(n_stall > 0 && n_squash > 0 && n_osquash > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
