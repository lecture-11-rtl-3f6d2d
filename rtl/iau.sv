// iau: immediate arithmetic unit of the bus-based FSM datapath.
// Combinational, from the instruction register:
//   SI  : sext(ir[15:0])
//   TS  : ir[25:0] << 2
//   SIS : sext(ir[15:0]) << 2
// The three functions are the datapath's own iau table.
module iau
  import parc_pkg::*;
(
  input  iau_fn_t fn,
  input  word_t   ir,
  output word_t   y
);

  word_t si;
  assign si = {{16{ir[15]}}, ir[15:0]};

  always_comb begin
    unique case (fn)
      IAU_SI:  y = si;
      IAU_TS:  y = {4'b0000, ir[25:0], 2'b00};
      IAU_SIS: y = {si[29:0], 2'b00};
      default: y = si;
    endcase
  end

endmodule
