// flywheel_top_tb: end-to-end test of the automatic flywheel at its default
// parameters (20-bit frame counter, 148-bit window, three-in-a-row lock).
//
// A serial bit stream of frames is generated: each frame is the 127-bit PN
// sync code followed by random data, and the frame synchronizer model
// searches it while the flywheel's control signal allows. The stream covers:
// learning a 2400-byte (19200-bit) frame from three syncs and locking on the
// third; PN copies planted in the video data, which must be masked; single
// and double missed syncs, bridged by the flywheel (frame pulse on time, NFS
// 10 bits late, lock held); a sync 5 bits early, which realigns the frame
// timing; three missed syncs, which drop lock and clear the learned length;
// and relearning the longest format, 128 Kbytes (2^20 bits), then
// bridging two missed syncs at that length.
// Every cycle a monitor checks frame pulses, NFS pulses, window opening
// (138 bits ahead of the expected sync), window closing and masking against
// positions recorded by the stream generator. Each mechanism must be seen
// at least once.
module flywheel_top_tb;
  localparam int L1 = 19200;     // 2400-byte frame
  localparam int L2 = 1 << 20;   // 128-Kbyte frame
  localparam int FL_W = 20;

  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0;
  logic fs, match_raw;
  logic fs_ctrl, fs_lock, nfs, frame, tc, prog, win;
  logic [FL_W-1:0] frame_len, count;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // positions (cycle of the FS pulse) recorded by the generator
  bit exp_good[longint];   // a sync that must be found
  bit exp_miss[longint];   // a corrupted sync: the flywheel must bridge it
  bit exp_pred[longint];   // predicted sync position where the real one came early

  // mechanism counters
  int n_lock_rise = 0, n_lock_fall = 0, n_learn = 0, n_masked = 0, n_nfs = 0;
  int n_flywheel = 0, n_realign = 0, n_win_open = 0, n_win_close = 0, n_found = 0;
  longint lock_rise_cyc = -1, lock_fall_cyc = -1;
  longint win_open_at[$];

  logic [126:0] pn;

  fs_correlator_model u_sync (
    .clk(clk), .rst_n(rst_n), .bit_i(bit_in), .enable_i(~fs_ctrl),
    .match_o(match_raw), .fs_o(fs));

  flywheel_top dut (
    .clk(clk), .rst_n(rst_n), .fs_i(fs), .fs_ctrl_o(fs_ctrl), .fs_lock_o(fs_lock),
    .nfs_o(nfs), .frame_o(frame), .tc_o(tc), .frame_len_o(frame_len), .prog_o(prog),
    .win_o(win), .count_o(count));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL cyc=%0d %s", cyc, what); end
  endtask

  // ---------------------------------------------------------------- stream
  task automatic send_bit(input logic b);
    @(negedge clk);
    bit_in = b;
  endtask

  // one frame of len bits; miss: corrupt the sync; plant: offset in the frame
  // of a PN copy in the data (0 = none); pred_shift: the sync of this frame
  // arrives that many bits before the flywheel expects it
  task automatic send_frame(input int len, input bit miss, input int plant = 0,
                            input int pred_shift = 0);
    longint pos;
    for (int i = 0; i < 127; i++) begin
      logic b;
      b = pn[126 - i];
      if (miss && (i % 13 == 5)) b = ~b;
      send_bit(b);
    end
    pos = cyc + 1;                     // FS pulse is in the next clock
    if (miss) exp_miss[pos] = 1'b1;
    else      exp_good[pos] = 1'b1;
    if (pred_shift != 0) exp_pred[pos + longint'(pred_shift)] = 1'b1;
    for (int i = 127; i < len; i++) begin
      if (plant != 0 && i >= plant && i < plant + 127) send_bit(pn[126 - (i - plant)]);
      else                                           send_bit(1'($urandom));
    end
  endtask

  // ---------------------------------------------------------------- monitor
  logic ctrl_d = 1'b0, lock_d = 1'b0, prog_d = 1'b0;

  always @(negedge clk) if (rst_n) begin
    bit at_good, at_miss;
    at_good = exp_good.exists(cyc);
    at_miss = exp_miss.exists(cyc);
    // syncs while locked are found inside the window
    if (at_good && fs_lock) begin
      chk(fs == 1'b1, "sync not found while locked");
      if (fs) n_found++;
    end
    // frame timing: a frame pulse at every frame position, and only there
    if (prog && (at_good || at_miss)) chk(frame == 1'b1, "no frame pulse at frame position");
    if (prog && frame) chk(at_good || at_miss, "frame pulse away from a frame position");
    if (prog && at_miss) begin
      chk(tc == 1'b1 && fs == 1'b0, "missed sync not bridged by terminal count");
      if (tc) n_flywheel++;
    end
    if (prog && at_good && count != '0) n_realign++;
    // NFS exactly 10 bits after a missed sync, and never elsewhere
    if (nfs) begin
      chk(exp_miss.exists(cyc - 10), "NFS pulse not 10 bits after a missed sync");
      n_nfs++;
    end
    if (prog && exp_miss.exists(cyc - 10)) chk(nfs == 1'b1, "missing NFS pulse");
    // window opens 138 bits ahead of the expected sync position
    // (checked at the end, once the generator has recorded the position)
    if (ctrl_d && !fs_ctrl && prog) begin
      win_open_at.push_back(cyc - 1 + 138);
      n_win_open++;
    end
    // window closes right after a found sync once programmed
    if (prog_d && exp_good.exists(cyc - 1)) begin
      chk(fs_ctrl == 1'b1, "window not closed after sync");
      n_win_close++;
    end
    // PN copies in the data are masked while locked
    if (match_raw && !at_good && fs_lock && prog) begin
      chk(fs_ctrl == 1'b1 && fs == 1'b0, "false sync in data not masked");
      if (fs_ctrl) n_masked++;
    end
    if (fs_lock && !lock_d) begin n_lock_rise++; lock_rise_cyc = cyc; end
    if (!fs_lock && lock_d) begin n_lock_fall++; lock_fall_cyc = cyc; end
    if (prog && !prog_d) n_learn++;
    ctrl_d = fs_ctrl; lock_d = fs_lock; prog_d = prog;
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scenario
  task automatic mech(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    longint c3, cm;
    logic [6:0] lfsr;
    lfsr = 7'h7f;                       // PN code, x^7 + x^6 + 1, all-ones seed
    for (int i = 126; i >= 0; i--) begin
      pn[i] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (1000) send_bit(1'($urandom));

    // learn and lock on a 2400-byte frame
    send_frame(L1, 0);
    send_frame(L1, 0);
    chk(!fs_lock && !prog, "no lock after two syncs");
    send_frame(L1, 0);
    c3 = cyc - longint'(L1) + 128;          // FS pulse of the third sync
    chk(fs_lock && prog, "lock on the third sync");
    chk(lock_rise_cyc == c3 + 1, $sformatf("lock rose at %0d, want %0d", lock_rise_cyc, c3 + 1));
    chk(frame_len == FL_W'(L1 - 1), $sformatf("learned %0d, want %0d", frame_len, L1 - 1));

    // locked: planted PN copies, single miss, double miss, early sync
    send_frame(L1, 0, 5000);
    send_frame(L1, 0, 12345);
    send_frame(L1, 1, 700);
    chk(fs_lock, "lock held over one missed sync");
    send_frame(L1, 0);
    send_frame(L1, 1);
    send_frame(L1, 1);
    send_frame(L1, 0);
    chk(fs_lock, "lock held: two misses then a sync");
    send_frame(L1 - 5, 0);
    send_frame(L1, 0, 0, 5);
    send_frame(L1, 0);
    chk(fs_lock && frame_len == FL_W'(L1 - 1), "lock and length held after early sync");

    // three misses drop lock and clear the learned length
    send_frame(L1, 1);
    send_frame(L1, 1);
    send_frame(L1, 1);
    cm = cyc - longint'(L1) + 128;          // third missed sync position
    chk(!fs_lock && !prog && frame_len == '0, "lock lost and length cleared");
    chk(lock_fall_cyc == cm + 11, $sformatf("lock fell at %0d, want %0d", lock_fall_cyc, cm + 11));

    // relearn the longest format
    send_frame(L2, 0);
    send_frame(L2, 0);
    send_frame(L2, 0);
    chk(fs_lock && prog && frame_len == FL_W'(L2 - 1),
        $sformatf("relearned %0d, want %0d", frame_len, L2 - 1));
    send_frame(L2, 0, 400000);
    send_frame(L2, 1);
    send_frame(300, 1);
    chk(fs_lock, "lock held over two missed syncs at 128 Kbytes");

    foreach (win_open_at[i])
      chk(exp_good.exists(win_open_at[i]) || exp_miss.exists(win_open_at[i]) ||
          exp_pred.exists(win_open_at[i]),
          $sformatf("window opened with no sync expected 138 bits later (at %0d)", win_open_at[i]));

    $display("mechanisms:");
    mech(n_learn,     "frame length learned");
    mech(n_lock_rise, "lock acquired");
    mech(n_found,     "sync found in window");
    mech(n_win_open,  "window opened by decoder");
    mech(n_win_close, "window closed by sync");
    mech(n_masked,    "false sync masked");
    mech(n_flywheel,  "missed sync bridged");
    mech(n_nfs,       "NFS pulse");
    mech(n_realign,   "early sync realigned");
    mech(n_lock_fall, "lock lost");
    chk(n_learn == 2 && n_lock_rise == 2 && n_lock_fall == 1,
        $sformatf("learned %0d, locked %0d, lost %0d times", n_learn, n_lock_rise, n_lock_fall));
    chk(n_nfs == 8, $sformatf("%0d NFS pulses, want 8", n_nfs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
