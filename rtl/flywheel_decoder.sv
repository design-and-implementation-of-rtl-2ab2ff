// flywheel_decoder: window-opening decoder on the frame counter.
//
// The decoder watches the parallel outputs of the frame length counter and
// raises the decoder pulse in the one clock where the count equals MATCH.
// Counting down, the count equals MATCH exactly MATCH bits before the
// terminal count, i.e. before the expected FS pulse; with MATCH = 138 that
// is 10 bits before the 128-bit sync slot starts. The document builds this
// from NOR gates (bits that must be 0) and AND gates (bits that must be 1)
// feeding a final AND; the equality compare below is the same function and
// is written generically so MATCH stays a parameter. The decoder is enabled
// only once the frame length has been programmed (en_i).
//
// Interface: count_i from the frame counter, en_i enable, dec_o one-clock
// pulse, combinational from count_i.
module flywheel_decoder #(
  parameter int unsigned W     = flywheel_pkg::FL_W,
  parameter int unsigned MATCH = flywheel_pkg::DEC_LEAD
) (
  input  logic [W-1:0] count_i,
  input  logic         en_i,
  output logic         dec_o
);

  assign dec_o = en_i && (count_i == W'(MATCH));

endmodule
