// flywheel_top: automatic flywheel for PN-coded frame synchronization.
//
// Sits beside a frame synchronizer (a correlator for the 127-bit PN sync
// code) on the serial bit clock. It takes the synchronizer's FS pulse and
// returns the frame sync control signal, which disables the synchronizer
// except in a 148-bit window around each expected sync code. It also gives
// the lock status, NFS (missed sync) pulses and a frame timing pulse that
// keeps going through missed syncs.
//
// Operation: after reset (or after lock is lost) the frame length is
// unknown. The frame counter counts up between FS pulses. The third FS pulse
// in a row gives lock and, in the same clock, latches the measured length and
// switches the counter to down count. From then on the counter reloads on FS
// OR terminal count. The decoder opens the window 138 bits before the
// expected FS. An FS pulse closes the window (control set). If no FS comes,
// the NFS generator flags it 10 bits after the expected position. Three NFS
// in a row drop lock, which clears the learned length, and learning starts
// again.
//
// Interface: fs_i one-clock FS pulse (the bit after the last sync bit).
// fs_ctrl_o = 1 means frame sync detection disabled. fs_lock_o is the lock
// level. nfs_o is a one-clock NFS pulse. frame_o is the frame timing pulse
// (FS OR TC). tc_o is the terminal count alone, the frame boundary the
// flywheel predicts. frame_len_o is the learned frame length minus one, in
// bits.
// prog_o is high while a length is programmed. win_o is high while the NFS
// window counter runs. count_o is the frame counter. Reset is asynchronous,
// active low. Two assertions state invariants of the wiring: an NFS pulse
// never coincides with a found sync, and the window counter only runs while
// a length is programmed. The block structure follows the document. The lock
// signal reaches the frame counter through the programming logic, whose
// program flip-flop is set in the same clock as lock. The widths and timing
// conventions are described in the sub-blocks.
module flywheel_top #(
  parameter int unsigned FL_W     = flywheel_pkg::FL_W,
  parameter int unsigned DEC_LEAD = flywheel_pkg::DEC_LEAD,
  parameter int unsigned WIN_BITS = flywheel_pkg::WIN_BITS,
  parameter int unsigned LOCK_RUN = flywheel_pkg::LOCK_RUN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fs_i,
  output logic            fs_ctrl_o,
  output logic            fs_lock_o,
  output logic            nfs_o,
  output logic            frame_o,
  output logic            tc_o,
  output logic [FL_W-1:0] frame_len_o,
  output logic            prog_o,
  output logic            win_o,
  output logic [FL_W-1:0] count_o
);

  logic            up;
  logic [FL_W-1:0] load_val;
  logic            fs_gated;
  logic            dec;

  auto_frame_length_prog #(.W(FL_W)) u_prog (
    .clk        (clk),
    .rst_n      (rst_n),
    .fs_i       (fs_i),
    .lock_i     (fs_lock_o),
    .count_i    (count_o),
    .up_o       (up),
    .load_val_o (load_val),
    .frame_len_o(frame_len_o),
    .prog_o     (prog_o),
    .fs_gated_o (fs_gated)
  );

  frame_length_counter #(.W(FL_W)) u_frame_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .up_i      (up),
    .fs_i      (fs_i),
    .load_val_i(load_val),
    .count_o   (count_o),
    .tc_o      (tc_o),
    .frame_o   (frame_o)
  );

  flywheel_decoder #(.W(FL_W), .MATCH(DEC_LEAD)) u_dec (
    .count_i(count_o),
    .en_i   (prog_o),
    .dec_o  (dec)
  );

  nfs_generator #(.WIN(WIN_BITS), .CW($clog2(WIN_BITS))) u_nfs (
    .clk  (clk),
    .rst_n(rst_n),
    .dec_i(dec),
    .fs_i (fs_gated),
    .nfs_o(nfs_o),
    .win_o(win_o)
  );

  fs_lock_logic #(.RUN(LOCK_RUN)) u_lock (
    .clk   (clk),
    .rst_n (rst_n),
    .fs_i  (fs_i),
    .nfs_i (nfs_o),
    .lock_o(fs_lock_o)
  );

  fs_control_gen u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .lock_i(fs_lock_o),
    .fs_i  (fs_gated),
    .nfs_i (nfs_o),
    .dec_i (dec),
    .en_i  (prog_o),
    .ctrl_o(fs_ctrl_o)
  );

  // a missed-sync pulse and a found sync never coincide
  a_nfs_not_with_fs: assert property (@(posedge clk) disable iff (!rst_n)
    !(nfs_o && fs_gated));

  // the window counter only runs while a frame length is programmed
  a_win_needs_prog: assert property (@(posedge clk) disable iff (!rst_n)
    win_o |-> prog_o);

endmodule
