// fs_correlator_model: behavioural model of the frame synchronizer that the
// flywheel works with. Not synthesizable design content; test use only.
//
// It shifts the serial data in, one bit per clock, and compares the last 127
// bits with the 127-bit PN sync code. The code is generated by a 7-stage
// linear feedback shift register, x^7 + x^6 + 1, seeded with all ones. (The
// real code of a given satellite may use another polynomial or seed.)
// match_o is the raw comparison. fs_o = match_o AND enable_i is the FS pulse
// and comes in the clock after the last sync bit was shifted in. MAX_ERR
// bit errors are tolerated.
module fs_correlator_model #(
  parameter int MAX_ERR = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_i,
  input  logic enable_i,
  output logic match_o,
  output logic fs_o
);

  logic [126:0] code;
  logic [126:0] shreg;

  // code[126] is the first bit sent, code[0] the last
  initial begin
    logic [6:0] lfsr;
    lfsr = 7'h7f;
    for (int i = 126; i >= 0; i--) begin
      code[i] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shreg <= '0;
    else        shreg <= {shreg[125:0], bit_i};
  end

  assign match_o = ($countones(shreg ^ code) <= MAX_ERR);
  assign fs_o    = match_o & enable_i;

endmodule
