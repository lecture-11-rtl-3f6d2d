// pipe_stage_ctrl: valid/stall/squash control for one pipeline stage.
//
// Holds the stage's valid bit (the small control register at the stage's
// input) and derives, combinationally:
//   squash   - a later stage originated a squash, so this stage's transaction
//              is killed (a squash always wins over a stall);
//   ostall   - this stage originates a stall because of its own hazards;
//   stall    - this stage must hold, for its own hazard or one originated by
//              a later stage;
//   osquash  - this stage originates a squash of all earlier stages (only if
//              it is valid, not squashed and not stalled; it does not squash
//              itself);
//   next_val - a valid transaction leaves for the next stage this cycle;
//   reg_en   - enable of this stage's input registers (valid bit and the
//              datapath pipeline registers): low while the stage stalls.
// The valid bit loads prev_next_val when reg_en is high and takes RESET_VAL on
// reset (1 for a fetch stage, which holds a valid fetch of the reset PC).
// The priority rules and the register-enable scheme are those of the
// lecture's stall-and-squash control; the OR-ed inputs from later stages are
// gathered by the instantiating processor.
module pipe_stage_ctrl #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic reset,
  input  logic prev_next_val,   // next_val of the previous stage
  input  logic hazard_stall,    // OR of this stage's stall hazards
  input  logic hazard_squash,   // OR of this stage's squash hazards
  input  logic later_ostall,    // OR of ostall of all later stages
  input  logic later_osquash,   // OR of osquash of all later stages
  output logic val,
  output logic reg_en,
  output logic squash,
  output logic ostall,
  output logic stall,
  output logic osquash,
  output logic next_val
);

  always_ff @(posedge clk) begin
    if (reset)       val <= RESET_VAL;
    else if (reg_en) val <= prev_next_val;
  end

  always_comb begin
    squash   = val && later_osquash;
    ostall   = val && !squash && hazard_stall;
    stall    = val && !squash && (ostall || later_ostall);
    osquash  = val && !squash && !stall && hazard_squash;
    next_val = val && !stall && !squash;
    reg_en   = !stall;
  end

endmodule
