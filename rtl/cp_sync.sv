// cp_sync: input synchronisation and deserialisation of one 160 MHz lane.
//
// A lane carries one 12-bit frame per bunch crossing in four beats. Because
// lanes from the backplane and from different SRL chips arrive with different
// delays, each input keeps the last eight beats and picks the frame at one of
// four beat offsets (0..3 beats late). The offset is found by calibration:
// while `calib` is high the sender transmits cpm_pkg::CAL_FRAME, and on each
// crossing the offset at which the pattern is seen is stored and `locked` is
// set. Outside calibration the stored offset is used. The document states that
// a calibration pattern from the SRL is used to calibrate all CP chip inputs
// and names the synchronisation and deserialisation stage; the history depth
// and the search are this design's choices.
//
// Timing: the frame sent in crossing n is presented on `word` during crossing
// n+2, whatever the offset (the delay is equalised to the worst case).
module cp_sync
  import cpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  beat,
  input  logic        calib,
  input  lane_t       lane,
  output link_word_t  word,
  output logic        locked,
  output logic [1:0]  offset
);
  lane_t              hist [7];   // hist[i]: lane value i+1 clocks ago
  lane_t              x    [8];   // x[0]: this clock
  logic [FRAME_W-1:0] cand [4];
  logic               bc_en;

  assign bc_en = (beat == 2'd3);

  always_comb begin
    x[0] = lane;
    for (int i = 1; i < 8; i++) x[i] = hist[i-1];
    // offset d: beat b of the previous crossing's frame is at x[7-d-b]
    for (int d = 0; d < 4; d++)
      for (int b = 0; b < 4; b++)
        cand[d][b*LANE_W +: LANE_W] = x[7-d-b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 7; i++) hist[i] <= '0;
      word   <= '0;
      locked <= 1'b0;
      offset <= '0;
    end else begin
      hist[0] <= lane;
      for (int i = 1; i < 7; i++) hist[i] <= hist[i-1];
      if (bc_en) begin
        word <= link_word_t'(cand[offset][WORD_W-1:0]);
        if (calib) begin
          locked <= 1'b0;
          for (int d = 3; d >= 0; d--)
            if (cand[d] == CAL_FRAME) begin
              offset <= 2'(d);
              locked <= 1'b1;
            end
        end
      end
    end
  end

endmodule
