// mul: combinational 32x32 multiplier returning the low 32 bits of the
// product, as used by the single-cycle processor and the X stage of the
// pipelined processor (which both treat mul as a one-cycle operation).
// Signed and unsigned products agree in their low 32 bits, so no sign mode
// is needed. The lecture gives only the unit's place in the datapath; the
// single combinational operator is this design's choice.
module mul
  import parc_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  logic [2*XLEN-1:0] prod;
  assign prod = a * b;
  assign y    = prod[XLEN-1:0];

endmodule
