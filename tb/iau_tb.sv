// iau_tb: the three immediate functions (si, ts, sis) on random instruction
// words, against integer arithmetic done here.
module iau_tb;
  import parc_pkg::*;

  iau_fn_t fn;
  word_t   ir, y;
  int checks = 0, failures = 0;

  iau dut (.fn, .ir, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s ir=%h y=%h", what, ir, y); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int n = 0; n < 1000; n++) begin
      ir = $urandom;
      s  = int'(ir[15:0]) - (ir[15] ? 65536 : 0);
      fn = IAU_SI;  #1; check(y == 32'(s), "si");
      fn = IAU_TS;  #1; check(y == 32'(ir[25:0]) * 4, "ts");
      fn = IAU_SIS; #1; check(y == 32'(s * 4), "sis");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
