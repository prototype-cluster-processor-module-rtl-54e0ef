// tb_srl_chip: one SRL chip with four links.
//  * normal mode: the link words of crossing n must be on the lanes, one
//    LANE_W beat per clock, during crossing n+1;
//  * L1A readout returns the four words of the crossing `latency` back;
//  * calibration mode sends CAL_FRAME on every lane;
//  * playback mode replays what the host loaded into the memory.
module tb_srl_chip;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] beat = 0;
  srl_mode_e mode = SRL_NORMAL;
  link_word_t link_in [NC];
  lane_t lane_out [NC];
  logic host_we = 0;
  logic [6:0] host_addr = 0, latency = 0;
  logic [NC*WORD_W-1:0] host_data = 0, ro_data;
  logic l1a = 0, ro_pop = 0, ro_valid, ro_overflow;
  int checks = 0, failures = 0;
  int n_norm = 0, n_cal = 0, n_pb = 0, n_ro = 0;

  srl_chip dut (.*);

  always #2 clk = ~clk;
  always_ff @(posedge clk) if (rst_n) beat <= beat + 1'b1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_word_t hist [int][NC];
  bit pop_req = 0;
  bit chk = 1;                 // compare lanes this crossing
  int n = 0;

  // expected lane content this crossing, set by the caller
  logic [FRAME_W-1:0] exp_f [NC];

  task automatic crossing(input bit do_l1a);
    for (int c = 0; c < NC; c++) begin
      link_in[c] = make_word(1'($urandom), tt_t'($urandom));
      hist[n][c] = link_in[c];
    end
    for (int b = 0; b < 4; b++) begin
      #0.5;
      if (n > 0 && chk)
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (lane_out[c] !== exp_f[c][b*LANE_W +: LANE_W]) begin
            failures++;
            if (failures < 10) $display("crossing %0d lane %0d beat %0d: %h expected %h", n, c, b, lane_out[c], exp_f[c][b*LANE_W +: LANE_W]);
          end
        end
      l1a = do_l1a && b == 3;
      ro_pop = pop_req && b == 0;
      @(posedge clk);
    end
    #0.1 l1a = 0;
    pop_req = 0;
    n++;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) link_in[c] = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;           // beat 0 starts now
    @(negedge clk);
    latency = 7'd20;
    for (int i = 0; i < 200; i++) begin
      if (n > 0) for (int c = 0; c < NC; c++) exp_f[c] = FRAME_W'(hist[n-1][c]);
      if (n > 0) n_norm++;
      crossing(n > 30 && (n % 17 == 0));
      if (ro_valid) begin
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (ro_data[c*WORD_W +: WORD_W] !== hist[n - 1 - 20][c]) begin
            failures++;
            $display("readout of crossing %0d ch %0d wrong", n - 21, c);
          end
        end
        n_ro++;
        pop_req = 1;
      end
    end
    // calibration
    mode = SRL_CALIB;
    for (int c = 0; c < NC; c++) exp_f[c] = FRAME_W'(hist[n-1][c]);
    crossing(0);
    for (int i = 0; i < 10; i++) begin
      for (int c = 0; c < NC; c++) exp_f[c] = CAL_FRAME;
      crossing(0);
      n_cal++;
    end
    // playback: load the memory, then replay
    mode = SRL_PLAYBACK;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      host_we = 1; host_addr = 7'(a);
      for (int c = 0; c < NC; c++) host_data[c*WORD_W +: WORD_W] = WORD_W'(a * 4 + c);
    end
    @(negedge clk) host_we = 0;
    while (beat != 2'd0) @(negedge clk);
    begin
      int p;
      chk = 0;
      crossing(0);
      chk = 1;
      for (int i = 0; i < 300; i++) begin
        p = (int'(dut.u_pipe.wr_ptr) + 127) % 128;   // entry sent this crossing
        for (int c = 0; c < NC; c++) exp_f[c] = FRAME_W'(p * 4 + c);
        crossing(0);
        n_pb++;
      end
    end
    $display("normal %0d, readouts %0d, calibration %0d, playback %0d crossings", n_norm, n_ro, n_cal, n_pb);
    if (n_ro == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
