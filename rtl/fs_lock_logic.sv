// fs_lock_logic: frame sync lock decision (successive-three FS / NFS).
//
// Two small run counters feed a set/reset lock flip-flop. The FS run counter
// counts FS pulses and is cleared by every NFS pulse; the NFS run counter
// counts NFS pulses and is cleared by every FS pulse. The pulse that
// completes a run of RUN FS pulses sets the lock flip-flop, and the pulse
// that completes a run of RUN NFS pulses clears it. Thus one missing sync
// between two good ones only restarts the count, as the document describes.
//
// Interface: fs_i and nfs_i are one-clock pulses. lock_o goes high at the
// clock edge that ends the cycle of the RUN-th successive FS pulse and low at
// the edge that ends the cycle of the RUN-th successive NFS pulse. If both
// pulses arrive in one cycle the FS pulse wins (the flywheel never produces
// that). The run counters saturate at RUN-1. Reset is asynchronous and active
// low and clears the counters and lock.
// The two counters and the flip-flop follow the document; saturation, FS
// priority and the reset style are this design's choices.
module fs_lock_logic #(
  parameter int unsigned RUN = flywheel_pkg::LOCK_RUN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fs_i,
  input  logic nfs_i,
  output logic lock_o
);

  localparam int unsigned CW = $clog2(RUN + 1);

  logic [CW-1:0] fs_run_q, nfs_run_q;
  logic          set_lock, clr_lock;
  logic          nfs_eff;

  assign nfs_eff  = nfs_i & ~fs_i;
  assign set_lock = fs_i    && (fs_run_q  == CW'(RUN - 1));
  assign clr_lock = nfs_eff && (nfs_run_q == CW'(RUN - 1));

  // successive FS counter: counts FS, reset by NFS
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             fs_run_q <= '0;
    else if (fs_i && fs_run_q != CW'(RUN - 1)) fs_run_q <= fs_run_q + 1'b1;
    else if (nfs_eff)                       fs_run_q <= '0;
  end

  // successive NFS counter: counts NFS, reset by FS
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  nfs_run_q <= '0;
    else if (fs_i)                               nfs_run_q <= '0;
    else if (nfs_eff && nfs_run_q != CW'(RUN - 1)) nfs_run_q <= nfs_run_q + 1'b1;
  end

  // lock SR flip-flop
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lock_o <= 1'b0;
    else if (set_lock) lock_o <= 1'b1;
    else if (clr_lock) lock_o <= 1'b0;
  end

endmodule
