// auto_frame_length_prog: automatic frame length programming.
//
// Learns the frame length from the received sync pulses, so one flywheel
// serves every satellite format. While unprogrammed the frame counter counts
// up and every FS pulse loads it with zero. A divide-by-3 counter counts the
// FS pulses. On the third one the current count (the interval from the
// second to the third FS, minus one) is captured in the latch. In the same
// clock the program flip-flop is set. Its output switches the frame counter
// to down count, with the latch as its load value. It also enables the
// decoder and opens the AND gate that passes FS to the rest of the flywheel.
// After that the divide-by-3 counter is stopped. When lock is lost, a pulse
// synchronizer turns the falling edge of the lock signal into one pulse. That
// pulse clears the flip-flop, the latch and the divide-by-3 counter, and
// learning starts again.
//
// Interface: fs_i raw FS pulse, lock_i FS lock level, count_i frame counter
// value. up_o = 1 selects up count; load_val_o is the value the frame
// counter loads on FS/TC. frame_len_o is the latch: frame length in bits
// minus one, 0 while unprogrammed. prog_o is the program flip-flop and also
// the decoder enable. fs_gated_o = fs_i AND prog_o. Timing: prog_o and
// frame_len_o change at the edge that ends the third FS cycle. The clear
// pulse comes one clock after lock_i falls. Reset is asynchronous, active
// low. The structure follows the document. The load values, the clear
// priority and the interval measured (second to third FS) are this design's
// reading of it.
module auto_frame_length_prog #(
  parameter int unsigned W = flywheel_pkg::FL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fs_i,
  input  logic         lock_i,
  input  logic [W-1:0] count_i,
  output logic         up_o,
  output logic [W-1:0] load_val_o,
  output logic [W-1:0] frame_len_o,
  output logic         prog_o,
  output logic         fs_gated_o
);

  logic [1:0] div3_q;
  logic       prog_set;
  logic       relearn;

  pulse_sync u_psync (
    .clk    (clk),
    .rst_n  (rst_n),
    .level_i(lock_i),
    .fall_o (relearn)
  );

  // divide-by-3 FS counter, stopped once programmed
  assign prog_set = fs_i && !prog_o && (div3_q == 2'd2) && !relearn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      div3_q <= '0;
    else if (relearn || prog_set)    div3_q <= '0;
    else if (fs_i && !prog_o)        div3_q <= div3_q + 1'b1;
  end

  // frame length latch and program flip-flop (clear wins)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_len_o <= '0;
      prog_o      <= 1'b0;
    end else if (relearn) begin
      frame_len_o <= '0;
      prog_o      <= 1'b0;
    end else if (prog_set) begin
      frame_len_o <= count_i;
      prog_o      <= 1'b1;
    end
  end

  assign up_o       = ~prog_o;
  assign fs_gated_o = fs_i & prog_o;

  always_comb begin
    if (prog_o)        load_val_o = frame_len_o;  // flywheel: reload frame length
    else if (prog_set) load_val_o = count_i;      // switch-over: keep measured phase
    else               load_val_o = '0;           // learning: FS loads 0
  end

endmodule
