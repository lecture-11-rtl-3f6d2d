// regfile_tb: random writes on both ports and reads on both ports of the
// register file, checked against a reference array: r0 reads zero, a write
// is visible from the next cycle, port 1 wins when both ports write the same
// register in one cycle, reset clears every register.
module regfile_tb;
  import parc_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  reg_addr_t ra0, ra1, wa0, wa1;
  word_t     rd0, rd1, wd0, wd1;
  logic      we0, we1;
  word_t     ref_rf [32];
  int checks = 0, failures = 0, collisions = 0;

  regfile dut (.clk, .reset, .raddr0(ra0), .rdata0(rd0), .raddr1(ra1), .rdata1(rd1),
               .wen0(we0), .waddr0(wa0), .wdata0(wd0), .wen1(we1), .waddr1(wa1), .wdata1(wd1));

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

  initial begin
    we0 = 0; we1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; ra0 = 0; ra1 = 0;
    for (int i = 0; i < 32; i++) ref_rf[i] = '0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 32; i++) begin
      ra0 = i; #1; check(rd0 == 0, "register cleared by reset");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we0 = $urandom_range(1, 0); we1 = ($urandom_range(3, 0) == 0);
      wa0 = $urandom_range(31, 0); wa1 = (n % 10 == 0) ? wa0 : 5'($urandom_range(31, 0));
      wd0 = $urandom; wd1 = $urandom;
      ra0 = $urandom_range(31, 0); ra1 = $urandom_range(31, 0);
      #1;
      check(rd0 == ref_rf[ra0], $sformatf("port 0 read r%0d", ra0));
      check(rd1 == ref_rf[ra1], $sformatf("port 1 read r%0d", ra1));
      if (we0 && we1 && wa0 == wa1 && wa0 != 0) collisions++;
      if (we0 && wa0 != 0) ref_rf[wa0] = wd0;
      if (we1 && wa1 != 0) ref_rf[wa1] = wd1;
    end
    check(collisions > 0, "same-register writes on both ports were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
