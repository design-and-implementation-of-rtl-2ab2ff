// flywheel_false_lock_tb: recovery from a false lock, end to end.
//
// While the frame length is still unknown the correlator searches
// everywhere, so a copy of the sync code in the data is taken as a sync.
// Here the second of the three learning syncs is such a copy, 700 bits after
// the first real sync, in 2000-bit frames. The flywheel must lock with the
// wrong length (1300 bits, latched as 1299). It must then mask the real
// syncs, which fall outside its window, and give one NFS pulse per wrong
// frame. The third NFS must drop lock. It must then relearn the true length
// (1999) from the real syncs and hold lock on them. Default parameters.
module flywheel_false_lock_tb;
  localparam int L = 2000;
  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0;
  logic fs, match_raw;
  logic fs_ctrl, fs_lock, nfs, frame, tc, prog, win;
  logic [19:0] frame_len, count;
  logic [126:0] pn;
  int checks = 0, failures = 0;
  int n_nfs = 0, n_masked = 0, n_lock_fall = 0;
  logic lock_d = 1'b0;

  fs_correlator_model u_sync (
    .clk(clk), .rst_n(rst_n), .bit_i(bit_in), .enable_i(~fs_ctrl),
    .match_o(match_raw), .fs_o(fs));

  flywheel_top dut (
    .clk(clk), .rst_n(rst_n), .fs_i(fs), .fs_ctrl_o(fs_ctrl), .fs_lock_o(fs_lock),
    .nfs_o(nfs), .frame_o(frame), .tc_o(tc), .frame_len_o(frame_len), .prog_o(prog),
    .win_o(win), .count_o(count));

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (nfs) n_nfs++;
    if (match_raw && !fs) n_masked++;
    if (lock_d && !fs_lock) n_lock_fall++;
    lock_d = fs_lock;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_bit(input logic b);
    @(negedge clk);
    bit_in = b;
  endtask

  // a frame: sync code, then data, with an optional code copy at offset plant
  task automatic send_frame(input int plant = 0);
    for (int i = 0; i < 127; i++) send_bit(pn[126 - i]);
    for (int i = 127; i < L; i++) begin
      if (plant != 0 && i >= plant && i < plant + 127) send_bit(pn[126 - (i - plant)]);
      else                                           send_bit(1'($urandom));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] lfsr;
    int nfs_at_lock;
    lfsr = 7'h7f;
    for (int i = 126; i >= 0; i--) begin
      pn[i] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (500) send_bit(1'($urandom));
    send_frame(700);                  // real sync, then a code copy 700 bits on
    for (int i = 0; i < 127; i++) send_bit(pn[126 - i]);
    send_bit(1'($urandom));           // third FS pulse in this bit
    send_bit(1'($urandom));           // lock and length set at its end
    chk(fs_lock && prog, "locked on three syncs, one of them false");
    chk(frame_len == 20'd1299, $sformatf("false length %0d, want 1299", frame_len));
    nfs_at_lock = n_nfs;
    for (int i = 129; i < L; i++) send_bit(1'($urandom));
    repeat (3) send_frame();
    chk(n_lock_fall == 1, "false lock dropped");
    chk(n_nfs - nfs_at_lock >= 3, $sformatf("%0d NFS pulses after false lock", n_nfs - nfs_at_lock));
    chk(n_masked >= 1, "real syncs masked while falsely locked");
    repeat (4) send_frame();
    chk(fs_lock && prog && frame_len == 20'(L - 1),
        $sformatf("relearned %0d, want %0d", frame_len, L - 1));
    chk(n_lock_fall == 1, "true lock held");
    $display("NFS pulses %0d, masked syncs %0d", n_nfs, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
