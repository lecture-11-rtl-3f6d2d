// regfile: PARCv1 general-purpose register file.
//
// NREGS registers of XLEN bits. Two combinational read ports (the rs and rt
// reads of the datapath drawings) and two synchronous write ports. Register 0
// always reads as zero and ignores writes. Write port 1 exists for the
// auto-incrementing load, which writes rt and rs in the same instruction; if
// both ports name the same register in one cycle, port 1 (rs <- rs + 4, the
// later assignment of the instruction's definition) wins. A write becomes
// visible to the read ports on the cycle after the clock edge (no internal
// write-to-read bypass). The read/write split and the register count follow
// the drawings and the ISA; the second write port and its priority are this
// design's choices.
module regfile
  import parc_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic      clk,
  input  logic      reset,
  input  reg_addr_t raddr0,
  output word_t     rdata0,
  input  reg_addr_t raddr1,
  output word_t     rdata1,
  input  logic      wen0,
  input  reg_addr_t waddr0,
  input  word_t     wdata0,
  input  logic      wen1,
  input  reg_addr_t waddr1,
  input  word_t     wdata1
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (wen0 && waddr0 != '0) regs[waddr0] <= wdata0;
      if (wen1 && waddr1 != '0) regs[waddr1] <= wdata1;
    end
  end

  assign rdata0 = (raddr0 == '0) ? '0 : regs[raddr0];
  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];

endmodule
