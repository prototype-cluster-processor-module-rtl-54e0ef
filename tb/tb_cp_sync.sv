// tb_cp_sync: four lane receivers, fed the same frames delayed by 0, 1, 2
// and 3 beats. During calibration each must lock to its own delay; afterwards
// the word sent in crossing m must be on every receiver's output during
// crossing m+2. A second calibration with the delays rotated checks that the
// offset is re-learned.
module tb_cp_sync;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, calib = 0;
  logic [1:0] beat = 0;
  lane_t src;                 // sender lane, aligned to beat
  lane_t dly [8];             // src delayed by i clocks
  lane_t lane [4];
  link_word_t word [4];
  logic locked [4];
  logic [1:0] offset [4];
  int shift = 0;              // extra delay rotation
  int checks = 0, failures = 0, n_lock = 0;

  for (genvar d = 0; d < 4; d++) begin : g
    assign lane[d] = dly[(d + shift) % 4];
    cp_sync dut (.clk, .rst_n, .beat, .calib, .lane(lane[d]), .word(word[d]),
                 .locked(locked[d]), .offset(offset[d]));
  end

  always #2 clk = ~clk;

  always_ff @(posedge clk) begin
    beat <= beat + 1'b1;
    for (int i = 1; i < 8; i++) dly[i] <= dly[i-1];
  end
  assign dly[0] = src;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_word_t sent [int];
  int m = 0;                  // crossing number

  task automatic crossing(input link_word_t w, input bit cal);
    sent[m] = cal ? link_word_t'(CAL_FRAME[WORD_W-1:0]) : w;
    for (int b = 0; b < 4; b++) begin
      src = cal ? CAL_FRAME[b*LANE_W +: LANE_W] : lane_beat(w, b);
      @(posedge clk);
      #0.5;
      if (b == 1 && !cal && sent.exists(m - 2) && m > 4) begin
        for (int d = 0; d < 4; d++) begin
          checks++;
          if (word[d] !== sent[m-2]) begin
            failures++;
            if (failures < 10) $display("crossing %0d rx %0d: %h expected %h", m, d, word[d], sent[m-2]);
          end
        end
      end
    end
    m++;
  endtask

  task automatic calibrate();
    calib = 1;
    repeat (4) crossing('0, 1);
    calib = 0;
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (!locked[d] || offset[d] !== 2'((d + shift) % 4)) begin
        failures++;
        $display("rx %0d: locked %b offset %0d expected %0d", d, locked[d], offset[d], (d + shift) % 4);
      end else n_lock++;
    end
  endtask

  initial begin
    src = '0;

    repeat (3) @(posedge clk);
    // start at beat 0
    #0.5 rst_n = 1;
    wait (beat == 2'd3);
    @(posedge clk);
    #0.5;
    calibrate();
    for (int i = 0; i < 300; i++) crossing(make_word(1'($urandom), tt_t'($urandom)), 0);
    shift = 1;
    calibrate();
    for (int i = 0; i < 300; i++) crossing(make_word(1'($urandom), tt_t'($urandom)), 0);
    $display("locks %0d", n_lock);
    if (n_lock != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
