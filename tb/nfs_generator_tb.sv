// nfs_generator_tb: self-checking test of the No-Frame-Sync generator.
//
// At the default window of 148 bits it (1) gives a decoder pulse and no FS:
// the NFS pulse must come in the 148th cycle after the decoder pulse, once;
// (2) gives an FS at every offset 1..148 after the decoder pulse: no NFS may
// follow and the window flip-flop must clear; (3) repeats windows back to
// back. The expected NFS cycle is computed from the decoder cycle, not read
// from the block.
module nfs_generator_tb;
  logic clk = 1'b0, rst_n = 1'b0, dec = 1'b0, fs = 1'b0, nfs, win;
  int checks = 0, failures = 0;
  int cyc = 0;

  nfs_generator dut (.clk(clk), .rst_n(rst_n), .dec_i(dec), .fs_i(fs), .nfs_o(nfs), .win_o(win));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // run one window: decoder pulse, then FS at offset fs_at (0 = none);
  // observe 170 cycles and count NFS pulses and their offset
  task automatic window(input int fs_at);
    int nfs_seen = 0, nfs_off = -1;
    @(negedge clk);
    dec = 1'b1;
    @(negedge clk);
    dec = 1'b0;
    for (int off = 1; off <= 170; off++) begin
      fs = (off == fs_at);
      #1;
      if (nfs) begin nfs_seen++; nfs_off = off; end
      if (off == 1) chk(win == 1'b1, "window flip-flop set by decoder pulse");
      @(negedge clk);
      fs = 1'b0;
    end
    if (fs_at == 0 || fs_at > 148)
      chk(nfs_seen == 1 && nfs_off == 148,
          $sformatf("no FS in window: %0d NFS pulses, at offset %0d (want 1 at 148)", nfs_seen, nfs_off));
    else
      chk(nfs_seen == 0, $sformatf("FS at %0d: %0d NFS pulses", fs_at, nfs_seen));
    chk(win == 1'b0, "window flip-flop clear after the window");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(nfs == 1'b0 && win == 1'b0, "idle after reset");
    window(0);
    for (int a = 1; a <= 148; a++) window(a);
    window(0);
    window(0);
    window(138);
    window(149);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
