// j_tgen_tb: jump targets for random pc+4 and 26-bit targets: the top four
// bits come from pc+4, the rest is the word index times four.
module j_tgen_tb;
  import parc_pkg::*;

  word_t pc4, targ;
  logic [25:0] t;
  int checks = 0, failures = 0;

  j_tgen dut (.pc_plus4(pc4), .target(t), .targ);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      pc4 = $urandom; t = $urandom;
      #1;
      checks++;
      if (targ != (pc4 & 32'hF000_0000) + 32'(t) * 4) begin
        failures++; $display("FAIL: pc4 %h t %h -> %h", pc4, t, targ);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
