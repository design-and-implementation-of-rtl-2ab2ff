// auto_frame_length_prog_tb: self-checking test of automatic frame length
// programming.
//
// The test bench keeps its own up counter, cleared by each FS, and feeds it
// to the block as count_i while the block is in up mode. It sends FS pulses
// L bits apart and checks: no programming after two FS; at the third FS the
// latch holds L-1, the program flag rises and the mode turns to down count;
// load_val_o is 0 while learning and L-1 afterwards; FS is passed on only
// when programmed; further FS pulses do not change the latch. Then lock
// falls. At the end of the first clock with lock low the flag and latch
// must clear, and a new length must be learned from three fresh FS pulses. Runs at the default
// 20-bit width.
module auto_frame_length_prog_tb;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0, fs = 1'b0, lock = 1'b0;
  logic [W-1:0] count = '0, load_val, frame_len;
  logic up, prog, fs_g;
  int checks = 0, failures = 0;

  auto_frame_length_prog dut (
    .clk(clk), .rst_n(rst_n), .fs_i(fs), .lock_i(lock), .count_i(count),
    .up_o(up), .load_val_o(load_val), .frame_len_o(frame_len), .prog_o(prog),
    .fs_gated_o(fs_g));

  always #5 clk = ~clk;

  // stand-in for the frame counter in up mode
  always @(posedge clk) count <= fs ? '0 : count + 1'b1;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // wait len-1 clocks, then hold FS high for one clock and sample during it
  task automatic fs_after(input int len, output bit g, output logic [W-1:0] lv);
    repeat (len - 1) @(negedge clk);
    fs = 1'b1;
    #1;
    g = fs_g; lv = load_val;
    @(negedge clk);
    fs = 1'b0;
  endtask

  task automatic learn(input int len);
    bit g; logic [W-1:0] lv;
    fs_after(len, g, lv);
    chk(!prog && up && !g && lv == 0, "first FS: still learning, FS not passed on");
    fs_after(len, g, lv);
    chk(!prog && up && frame_len == 0 && lv == 0, "second FS: still learning");
    fs_after(len, g, lv);
    chk(lv == W'(len - 1), $sformatf("third FS: load value %0d, want %0d", lv, len - 1));
    chk(prog && !up, "third FS: programmed, down count");
    chk(frame_len == W'(len - 1), $sformatf("latched %0d, want %0d", frame_len, len - 1));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit g; logic [W-1:0] lv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    learn(400);
    lock = 1'b1;
    fs_after(173, g, lv);
    chk(g && lv == W'(399), "programmed: FS passed on, load value is latch");
    chk(frame_len == W'(399), "latch holds after further FS");
    fs_after(400, g, lv);
    fs_after(400, g, lv);
    chk(prog && frame_len == W'(399), "divide-by-3 stopped while programmed");
    // lose lock
    @(negedge clk);
    lock = 1'b0;
    #1;
    chk(prog, "flag still set in the first clock with lock low");
    @(negedge clk);
    chk(!prog && up && frame_len == 0, "lock loss clears flag and latch");
    learn(777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
