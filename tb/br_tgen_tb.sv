// br_tgen_tb: branch targets for random pc+4 and offsets, forward and
// backward, against pc+4 + 4*offset computed here with integers.
module br_tgen_tb;
  import parc_pkg::*;

  word_t pc4, targ;
  logic [15:0] imm;
  int checks = 0, failures = 0;

  br_tgen dut (.pc_plus4(pc4), .imm, .targ);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off;
    for (int n = 0; n < 1000; n++) begin
      pc4 = {$urandom_range(32'h3FFF_FFFF, 0), 2'b00};
      off = $urandom_range(65535, 0) - 32768;
      imm = off[15:0];
      #1;
      checks++;
      if (targ != pc4 + 32'(off * 4)) begin
        failures++; $display("FAIL: pc4 %h off %0d -> %h", pc4, off, targ);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
