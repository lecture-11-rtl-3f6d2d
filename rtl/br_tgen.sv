// br_tgen: branch target generator. Combinational:
// targ = pc_plus4 + (sext(imm) << 2), with imm = ir[15:0]. The unit and its
// inputs (pc_plus4 and ir[15:0]) are as drawn in the datapaths; the MIPS-style
// word offset relative to pc+4 is this design's reading of the ISA.
module br_tgen
  import parc_pkg::*;
(
  input  word_t       pc_plus4,
  input  logic [15:0] imm,
  output word_t       targ
);

  assign targ = pc_plus4 + {{14{imm[15]}}, imm, 2'b00};

endmodule
