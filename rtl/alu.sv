// alu: arithmetic unit shared by the three PARCv1 datapaths.
//
// Purely combinational. Functions (alu_fn_t): ADD a+b; ADD4 a+4 (the FSM's
// PC increment); CADD "a +? b", which adds b only when c0 is set and is one
// step of the FSM's shift-and-add multiply; CMP, which drives eq = (a == b)
// (eq is produced for every function); JT, the jump target {a[31:28],
// b[27:0]}; CP1, which passes b through (used to write pc+4 for jal in the
// single-cycle and pipelined datapaths). The first five functions are the
// FSM datapath's function table; CP1 and the use of c0 for the conditional
// add are this design's choices.
module alu
  import parc_pkg::*;
(
  input  alu_fn_t fn,
  input  word_t   a,
  input  word_t   b,
  input  logic    c0,
  output word_t   y,
  output logic    eq
);

  always_comb begin
    unique case (fn)
      ALU_ADD:  y = a + b;
      ALU_ADD4: y = a + 32'd4;
      ALU_CADD: y = c0 ? a + b : a;
      ALU_CMP:  y = a + b;
      ALU_JT:   y = {a[31:28], b[27:0]};
      ALU_CP1:  y = b;
      default:  y = a + b;
    endcase
  end

  assign eq = (a == b);

endmodule
