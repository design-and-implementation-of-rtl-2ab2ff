// flywheel_decoder_tb: self-checking test of the window-opening decoder.
//
// At the default width (20 bits) and match value (138) it sweeps the counts
// 0..4095 and 2000 random 20-bit counts with the enable on and off. The
// decoder pulse must appear only for count 138 with the enable on. A down
// count from 500 must give the pulse exactly 138 steps before zero.
module flywheel_decoder_tb;
  localparam int W = 20;
  logic [W-1:0] count = '0;
  logic en = 1'b0, dec;
  int checks = 0, failures = 0;

  flywheel_decoder dut (.count_i(count), .en_i(en), .dec_o(dec));

  task automatic probe(input logic [W-1:0] c, input bit e);
    count = c; en = e;
    #1;
    checks++;
    if (dec !== (e && c == W'(138))) begin
      failures++;
      $display("FAIL count=%0d en=%0b dec=%0b", c, e, dec);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits, where;
    for (int c = 0; c < 4096; c++) begin
      probe(W'(c), 1'b1);
      probe(W'(c), 1'b0);
    end
    for (int i = 0; i < 2000; i++) probe(W'($urandom), $urandom_range(0, 1) == 1);
    probe(W'(138) | W'(1 << 19), 1'b1);
    // down count: pulse 138 steps before terminal count
    hits = 0; where = -1;
    en = 1'b1;
    for (int c = 500; c >= 0; c--) begin
      count = W'(c);
      #1;
      if (dec) begin hits++; where = c; end
    end
    checks++;
    if (hits != 1 || where != 138) begin
      failures++;
      $display("FAIL down count: %0d pulses, at %0d", hits, where);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
