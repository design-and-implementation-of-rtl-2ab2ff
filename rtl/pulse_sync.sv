// pulse_sync: falling-edge pulse synchronizer.
//
// Registers the level input once on the clock and outputs a one-clock pulse
// in the cycle after the input has gone from 1 to 0. Used to turn the loss of
// frame sync lock into a single clear pulse for the automatic frame length
// programming logic. Reset (asynchronous, active low) clears the register, so
// no pulse follows reset.
module pulse_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic level_i,
  output logic fall_o
);

  logic level_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) level_q <= 1'b0;
    else        level_q <= level_i;
  end

  assign fall_o = level_q & ~level_i;

endmodule
