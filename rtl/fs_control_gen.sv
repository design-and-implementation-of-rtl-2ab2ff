// fs_control_gen: frame sync control (flywheel window) generation.
//
// A 2:1 multiplexer chooses what sets the control flip-flop: before lock the
// FS pulse alone, after lock FS OR NFS. The flip-flop output is the frame
// sync control signal; when high it disables the frame synchronizer, so no
// sync can be found in the housekeeping, auxiliary and video data. The
// decoder pulse clears the flip-flop ahead of the next sync pattern and so
// re-enables detection. Under lock a missed sync still closes the window
// (the NFS pulse sets the flip-flop), so the window keeps its rhythm; before
// lock a missed sync leaves detection enabled until a sync is found.
//
// While no frame length is programmed (en_i = 0) the flip-flop is held
// clear, so the synchronizer searches continuously. Without this, the NFS
// pulse that ends lock would leave detection disabled with no decoder pulse
// to re-enable it.
//
// Interface: fs_i, nfs_i, dec_i one-clock pulses; lock_i selects the mux;
// en_i is the programmed flag; ctrl_o = 1 means frame sync detection
// disabled. Timing: ctrl_o changes at the clock edge ending the pulse cycle.
// If set and decoder pulse coincide, set wins. Reset (asynchronous, active
// low) leaves detection enabled. The mux, its inputs and the flip-flop follow
// the document. The polarity of ctrl_o, the set priority, the reset value
// and the hold-clear while unprogrammed are this design's choices.
module fs_control_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic lock_i,
  input  logic fs_i,
  input  logic nfs_i,
  input  logic dec_i,
  input  logic en_i,
  output logic ctrl_o
);

  logic set_src;

  always_comb begin
    unique case (lock_i)
      1'b1:    set_src = fs_i | nfs_i;  // mux input 2
      default: set_src = fs_i;          // mux input 1
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ctrl_o <= 1'b0;
    else if (!en_i)   ctrl_o <= 1'b0;
    else if (set_src) ctrl_o <= 1'b1;
    else if (dec_i)   ctrl_o <= 1'b0;
  end

endmodule
