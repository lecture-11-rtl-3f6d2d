// alu_tb: every ALU function on random and corner operands, against
// expected values written out here.
module alu_tb;
  import parc_pkg::*;

  alu_fn_t fn;
  word_t   a, b, y;
  logic    c0, eq;
  int checks = 0, failures = 0;

  alu dut (.fn, .a, .b, .c0, .y, .eq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      a = (n % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      b = (n % 5 == 0) ? a : $urandom;
      c0 = $urandom_range(1, 0);
      fn = ALU_ADD;  #1; check(y == a + b, "add");
      check(eq == (a == b), "eq");
      fn = ALU_ADD4; #1; check(y == a + 4, "add4");
      fn = ALU_CADD; #1; check(y == (c0 ? a + b : a), "conditional add");
      fn = ALU_CMP;  #1; check(eq == (a == b), "cmp");
      fn = ALU_JT;   #1; check(y[31:28] == a[31:28] && y[27:0] == b[27:0], "jt");
      fn = ALU_CP1;  #1; check(y == b, "copy op1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
