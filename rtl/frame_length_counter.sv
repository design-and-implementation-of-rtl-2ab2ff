// frame_length_counter: up/down frame counter with parallel load.
//
// One counter serves both phases of the automatic flywheel. In up mode
// (up_i = 1, before the frame length is known) each FS pulse loads
// load_val_i (zero, supplied by the programming logic) and the counter then
// counts bits up, so just before the next FS pulse it holds the frame length
// minus one. In down mode (up_i = 0) the counter is loaded with the latched
// frame length minus one and counts down once per bit. Reaching zero gives the
// terminal count tc_o; tc_o is ORed with the FS pulse and the OR drives the
// parallel load, so frame timing carries on when a sync pulse is missed
// (flywheeling), and an FS pulse that arrives a few bits early realigns it.
//
// Interface: count_o is the registered count, tc_o = down mode and count 0
// (combinational), frame_o = fs_i OR tc_o, the frame timing pulse. With
// load value L-1 the down counter gives one frame_o every L clocks.
// Timing: a load takes effect at the clock edge ending the cycle of the
// FS/TC pulse. The up count wraps at 2^W. Reset (asynchronous, active low)
// clears the count. The down count, parallel load and TC-OR-FS gate follow
// the document; the single W-bit counter in place of a chain of small
// counters and the wrap-around are this design's choices.
module frame_length_counter #(
  parameter int unsigned W = flywheel_pkg::FL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up_i,
  input  logic         fs_i,
  input  logic [W-1:0] load_val_i,
  output logic [W-1:0] count_o,
  output logic         tc_o,
  output logic         frame_o
);

  logic load;

  assign tc_o    = ~up_i && (count_o == '0);
  assign frame_o = fs_i | tc_o;
  assign load    = frame_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count_o <= '0;
    else if (load) count_o <= load_val_i;
    else if (up_i) count_o <= count_o + 1'b1;
    else           count_o <= count_o - 1'b1;
  end

endmodule
