// frame_length_counter_tb: self-checking test of the up/down frame counter.
//
// Part 1 measures: in up mode, FS pulses L clocks apart must leave L-1 in the
// counter just before the next FS. Part 2 flywheels: in down mode with load
// value L-1 and no FS, frame_o must come exactly every L clocks. An FS that
// arrives early must realign the period. Part 3 drives random mode, FS and
// load values and compares count_o, tc_o and frame_o with a reference model
// every cycle. Runs at the default 20-bit width.
module frame_length_counter_tb;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0, up = 1'b1, fs = 1'b0;
  logic [W-1:0] load_val = '0, count;
  logic tc, frame;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  frame_length_counter dut (
    .clk(clk), .rst_n(rst_n), .up_i(up), .fs_i(fs), .load_val_i(load_val),
    .count_o(count), .tc_o(tc), .frame_o(frame));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_frame, period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- part 1: measure in up mode
    up = 1'b1; load_val = '0;
    fs = 1'b1; @(negedge clk); fs = 1'b0;
    repeat (299) @(negedge clk);
    chk(count == W'(299), $sformatf("measured %0d, want 299", count));
    chk(tc == 1'b0, "no TC in up mode");
    fs = 1'b1; @(negedge clk); fs = 1'b0;
    chk(count == 0, "FS loads zero in up mode");
    // ---- part 2: flywheel in down mode, L = 300
    up = 1'b0; load_val = W'(299);
    fs = 1'b1; @(negedge clk); fs = 1'b0;
    last_frame = 0;
    for (int c = 1; c <= 1200; c++) begin
      #1;
      if (frame) begin
        chk(c - last_frame == 300, $sformatf("frame period %0d", c - last_frame));
        last_frame = c;
      end
      @(negedge clk);
    end
    chk(last_frame == 1200, $sformatf("four frames, last at %0d", last_frame));
    // early FS realigns
    repeat (290) @(negedge clk);
    fs = 1'b1; @(negedge clk); fs = 1'b0;
    chk(count == W'(299), "early FS reloads");
    repeat (299) @(negedge clk);
    #1;
    chk(tc == 1'b1 && frame == 1'b1, "TC one period after realigning FS");
    // ---- part 3: random against a model
    @(negedge clk);
    ref_cnt = count;
    for (int i = 0; i < 20000; i++) begin
      bit r_up, r_fs, r_tc, r_frame;
      r_up = ($urandom_range(0, 99) < 10);
      r_fs = ($urandom_range(0, 99) < 3);
      up = r_up; fs = r_fs; load_val = W'($urandom_range(0, 40));
      #1;
      r_tc = !r_up && (ref_cnt == 0);
      r_frame = r_fs || r_tc;
      chk(tc == r_tc && frame == r_frame && count == W'(ref_cnt),
          $sformatf("random: cnt=%0d ref=%0d tc=%0b ref=%0b", count, ref_cnt, tc, r_tc));
      if (r_frame) ref_cnt = load_val;
      else if (r_up) ref_cnt = (ref_cnt + 1) % (1 << W);
      else ref_cnt = (ref_cnt + (1 << W) - 1) % (1 << W);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
