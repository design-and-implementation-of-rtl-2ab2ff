// fs_lock_logic_tb: self-checking test of the successive-three lock logic.
//
// Drives directed sequences (three FS in a row, FS FS NFS FS, three NFS in a
// row, NFS NFS FS NFS) and then random FS/NFS pulse trains, and compares
// lock_o every cycle with a reference that keeps unbounded run lengths.
// Also checks that lock rises at the edge ending the third FS pulse.
module fs_lock_logic_tb;
  logic clk = 1'b0, rst_n = 1'b0, fs = 1'b0, nfs = 1'b0, lock;
  int checks = 0, failures = 0;
  int fs_run = 0, nfs_run = 0;
  bit lock_ref = 1'b0;

  fs_lock_logic dut (.clk(clk), .rst_n(rst_n), .fs_i(fs), .nfs_i(nfs), .lock_o(lock));

  always #5 clk = ~clk;

  // reference model
  always @(posedge clk) if (rst_n) begin
    if (fs) begin
      nfs_run = 0; fs_run++;
      if (fs_run >= 3) lock_ref = 1'b1;
    end else if (nfs) begin
      fs_run = 0; nfs_run++;
      if (nfs_run >= 3) lock_ref = 1'b0;
    end
  end

  task automatic step(input bit f, input bit n);
    @(negedge clk);
    fs = f; nfs = n;
    @(negedge clk);
    fs = 1'b0; nfs = 1'b0;
    checks++;
    if (lock !== lock_ref) begin
      failures++;
      $display("FAIL t=%0t fs=%0b nfs=%0b lock=%0b ref=%0b", $time, f, n, lock, lock_ref);
    end
  endtask

  task automatic expect_lock(input bit v, input string what);
    checks++;
    if (lock !== v) begin failures++; $display("FAIL %s: lock=%0b", what, lock); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    step(1, 0); step(1, 0); expect_lock(0, "after two FS");
    step(1, 0); expect_lock(1, "after third FS");
    step(0, 1); step(0, 1); step(1, 0); step(0, 1); step(0, 1);
    expect_lock(1, "NFS run broken by FS");
    step(0, 1); expect_lock(0, "after three NFS");
    step(1, 0); step(1, 0); step(0, 1); step(1, 0); step(1, 0);
    expect_lock(0, "FS run broken by NFS");
    step(1, 0); expect_lock(1, "third FS after break");
    for (int i = 0; i < 5000; i++) begin
      int r = $urandom_range(0, 9);
      step(r < 4, (r >= 4 && r < 8) || r == 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
