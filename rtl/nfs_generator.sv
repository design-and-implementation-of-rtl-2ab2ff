// nfs_generator: No-Frame-Sync (NFS) pulse generation.
//
// The decoder pulse sets a window flip-flop. While that flip-flop is clear
// its inverted output holds the window counter loaded with WIN-1; once it is
// set the counter counts down one per bit. An FS pulse, or the NFS pulse
// itself, clears the flip-flop (through an OR gate), which folds the counter
// back to WIN-1. If no FS pulse arrives, the counter reaches zero WIN bits
// after the decoder pulse and its terminal count is the NFS pulse. With the
// decoder 138 bits ahead of the expected FS and WIN = 148 the NFS pulse falls
// 10 bits after the expected FS position.
//
// Interface: dec_i decoder pulse, fs_i frame sync pulse (gated), nfs_o
// one-clock NFS pulse, win_o the window flip-flop. Timing: nfs_o is high in
// the WIN-th cycle after the cycle of dec_i. An FS pulse in that same cycle
// counts as found and suppresses nfs_o. A decoder pulse in the cycle of a
// clearing pulse is ignored (clear wins). Reset is asynchronous, active low.
// The flip-flop, the OR gate and the 148-count follow the document; one
// 8-bit counter stands for the document's two cascaded counters.
module nfs_generator #(
  parameter int unsigned WIN = flywheel_pkg::WIN_BITS,
  parameter int unsigned CW  = $clog2(WIN)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dec_i,
  input  logic fs_i,
  output logic nfs_o,
  output logic win_o
);

  logic [CW-1:0] cnt_q;
  logic          clr;

  assign nfs_o = win_o && (cnt_q == '0) && ~fs_i;
  assign clr   = fs_i | nfs_o;

  // window SR flip-flop: set by the decoder pulse, reset by FS OR NFS
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     win_o <= 1'b0;
    else if (clr)   win_o <= 1'b0;
    else if (dec_i) win_o <= 1'b1;
  end

  // window counter: loaded while the flip-flop is clear, counts while set
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt_q <= CW'(WIN - 1);
    else if (!win_o || clr) cnt_q <= CW'(WIN - 1);
    else                   cnt_q <= cnt_q - 1'b1;
  end

endmodule
