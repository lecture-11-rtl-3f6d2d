// j_tgen: jump target generator. Combinational:
// targ = {pc_plus4[31:28], ir[25:0], 2'b00}, the same target the FSM
// datapath forms with its "jt" ALU function ({A[31:28], B[27:0]} with
// B = ir[25:0] << 2).
module j_tgen
  import parc_pkg::*;
(
  input  word_t       pc_plus4,
  input  logic [25:0] target,
  output word_t       targ
);

  assign targ = {pc_plus4[31:28], target, 2'b00};

endmodule
