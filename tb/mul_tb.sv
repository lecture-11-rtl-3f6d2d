// mul_tb: low 32 bits of random, signed and corner-case products, checked
// with a 64-bit product computed here.
module mul_tb;
  import parc_pkg::*;

  word_t a, b, y;
  int checks = 0, failures = 0;

  mul dut (.a, .b, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    for (int n = 0; n < 1000; n++) begin
      a = (n < 4) ? 32'hFFFF_FFFF : $urandom;
      b = (n < 2) ? 32'd3 : $urandom;
      #1;
      p = longint'(a) * longint'(b);
      checks++;
      if (y != p[31:0]) begin failures++; $display("FAIL: %h * %h = %h", a, b, y); end
      checks++;
      if (int'(y) != int'(a) * int'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
