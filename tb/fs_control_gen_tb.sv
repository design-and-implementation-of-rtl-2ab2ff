// fs_control_gen_tb: self-checking test of the frame sync control generator.
//
// Directed part: unlocked, FS disables detection and the decoder pulse
// re-enables it, while NFS is ignored; locked, NFS also disables detection.
// Unprogrammed (en_i low), detection stays enabled whatever the pulses.
// Random part: random enable, lock level and FS/NFS/decoder pulses compared every
// cycle with a reference set/reset model (set has priority).
module fs_control_gen_tb;
  logic en = 1'b1;
  logic clk = 1'b0, rst_n = 1'b0, lock = 1'b0, fs = 1'b0, nfs = 1'b0, dec = 1'b0, ctrl;
  int checks = 0, failures = 0;
  bit ref_q = 1'b0;

  fs_control_gen dut (.clk(clk), .rst_n(rst_n), .lock_i(lock), .fs_i(fs), .nfs_i(nfs),
                      .dec_i(dec), .en_i(en), .ctrl_o(ctrl));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic pulse(input bit l, input bit f, input bit n, input bit d, input bit e = 1'b1);
    @(negedge clk);
    lock = l; fs = f; nfs = n; dec = d; en = e;
    @(posedge clk);
    if (!e) ref_q = 1'b0;
    else if (f || (l && n)) ref_q = 1'b1;
    else if (d) ref_q = 1'b0;
    @(negedge clk);
    fs = 1'b0; nfs = 1'b0; dec = 1'b0;
    chk(ctrl == ref_q, $sformatf("l=%0b fs=%0b nfs=%0b dec=%0b ctrl=%0b ref=%0b",
                                 l, f, n, d, ctrl, ref_q));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(ctrl == 1'b0, "detection enabled after reset");
    pulse(0, 0, 1, 0); chk(ctrl == 1'b0, "unlocked: NFS leaves detection enabled");
    pulse(0, 1, 0, 0); chk(ctrl == 1'b1, "unlocked: FS disables detection");
    pulse(0, 0, 0, 1); chk(ctrl == 1'b0, "decoder pulse enables detection");
    pulse(1, 0, 1, 0); chk(ctrl == 1'b1, "locked: NFS disables detection");
    pulse(1, 0, 0, 1); chk(ctrl == 1'b0, "decoder pulse enables detection");
    pulse(1, 1, 0, 0); chk(ctrl == 1'b1, "locked: FS disables detection");
    pulse(1, 0, 1, 0); chk(ctrl == 1'b1, "locked: NFS disables detection");
    pulse(0, 0, 0, 0, 0); chk(ctrl == 1'b0, "unprogrammed: detection enabled");
    pulse(0, 1, 0, 0, 0); chk(ctrl == 1'b0, "unprogrammed: FS ignored");
    for (int i = 0; i < 5000; i++)
      pulse($urandom_range(0, 1) == 1, $urandom_range(0, 9) == 0,
            $urandom_range(0, 9) == 0, $urandom_range(0, 5) == 0,
            $urandom_range(0, 19) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
