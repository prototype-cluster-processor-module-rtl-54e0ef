// tb_cp_chip: one CP chip fed with BC-muxed random towers on its 42 lanes,
// each lane delayed by a random 0..3 beats. After calibration every lane must
// be locked at its own delay. Then the threshold results of the eight windows
// for the towers sent in crossing m must be on `hits` during crossing m+6
// (the chip latency), and L1A readouts must return the results of the chosen
// crossing. Counts BC-mux second slots, local maxima, parity errors.
module tb_cp_chip;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int ROWS = 6, LAT = 30;
  logic clk = 0, rst_n = 0, calib = 0;
  logic [1:0] beat = 0;
  lane_t src [CP_LANES];
  lane_t lanes [CP_LANES];
  lane_t dly [CP_LANES][4];
  int skew [CP_LANES];
  thr_set_t thr [N_THR];
  hits_t hits [N_WIN];
  logic locked, parity_err;
  logic [1:0] lane_offset [CP_LANES];
  logic win_lmax [N_WIN];
  logic l1a = 0, ro_pop = 0, ro_valid, ro_overflow;
  logic [6:0] latency = 7'(LAT);
  logic [N_WIN*N_THR-1:0] ro_data;
  int checks = 0, failures = 0;
  int n_lmax = 0, n_hits = 0, n_ro = 0;

  cp_chip dut (.*);

  always #2 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rst_n) beat <= beat + 1'b1;
    for (int l = 0; l < CP_LANES; l++) begin
      dly[l][1] <= src[l];
      dly[l][2] <= dly[l][1];
      dly[l][3] <= dly[l][2];
    end
  end
  always_comb
    for (int l = 0; l < CP_LANES; l++) begin
      dly[l][0] = src[l];
      lanes[l]  = dly[l][skew[l]];
    end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hits_t exp_h [int][N_WIN];
  int m = 0;
  BcMux mux;
  TowerGen gen;
  bit pop_req = 0;

  task automatic crossing(input bit cal, input bit do_l1a);
    link_word_t w [CP_LANES];
    tt_t em [N_ETA][ROWS], had [N_ETA][ROWS];
    for (int ly = 0; ly < 2; ly++)
      for (int c = 0; c < N_ETA; c++)
        for (int p = 0; p < CP_PAIRS; p++) begin
          int l;
          tt_t a, b;
          l = ly*N_ETA*CP_PAIRS + c*CP_PAIRS + p;
          if (cal) begin a = 0; b = 0; end
          else gen.next(l, a, b);
          w[l] = mux.enc(l, a, b);
          if ($urandom_range(0, 999) == 0 && !cal) w[l].parity = ~w[l].parity;
          if (ly == 0) begin em[c][2*p] = a; em[c][2*p+1] = b; end
          else begin had[c][2*p] = a; had[c][2*p+1] = b; end
        end
    for (int wi = 0; wi < N_WIN; wi++) begin
      tt_t e4 [4][4], h4 [4][4];
      bit lm;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          e4[i][j] = em[wi%4 + i][wi/4 + j];
          h4[i][j] = had[wi%4 + i][wi/4 + j];
        end
      exp_h[m][wi] = ref_window(e4, h4, thr, lm);
      if (lm && !cal) n_lmax++;
    end
    for (int b = 0; b < 4; b++) begin
      for (int l = 0; l < CP_LANES; l++)
        src[l] = cal ? CAL_FRAME[b*LANE_W +: LANE_W] : lane_beat(w[l], b);
      l1a = do_l1a && b == 3;
      ro_pop = pop_req && b == 0;
      #0.5;
      if (b == 1 && m >= 20 && !calib)
        for (int wi = 0; wi < N_WIN; wi++) begin
          checks++;
          if (hits[wi] !== exp_h[m-6][wi]) begin
            failures++;
            if (failures < 10) $display("crossing %0d window %0d: %h expected %h", m - 6, wi, hits[wi], exp_h[m-6][wi]);
          end
          if (hits[wi] != 0) n_hits++;
        end
      @(posedge clk);
      #0.1;
    end
    l1a = 0;
    pop_req = 0;
    m++;
  endtask

  initial begin
    mux = new(CP_LANES);
    gen = new(CP_LANES, 20);
    rand_thr(thr);
    for (int l = 0; l < CP_LANES; l++) begin
      skew[l] = $urandom_range(0, 3);
      src[l] = '0;
    end
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    #0.1;
    calib = 1;
    for (int i = 0; i < 4; i++) crossing(1, 0);
    calib = 0;
    checks++;
    if (!locked) begin failures++; $display("not locked"); end
    for (int l = 0; l < CP_LANES; l++) begin
      checks++;
      if (lane_offset[l] !== 2'(skew[l])) begin
        failures++;
        $display("lane %0d offset %0d expected %0d", l, lane_offset[l], skew[l]);
      end
    end
    for (int i = 0; i < 600; i++) begin
      int k;
      k = m;
      crossing(0, m > 60 && m % 23 == 0);
      if (ro_valid) begin
        // the accept at the end of crossing q selects the results on the
        // outputs in crossing q-LAT, i.e. of lane crossing q-LAT-6
        int q;
        q = k;
        for (int wi = 0; wi < N_WIN; wi++) begin
          checks++;
          if (ro_data[wi*N_THR +: N_THR] !== exp_h[q - LAT - 6][wi]) begin
            failures++;
            if (failures < 10) $display("readout window %0d: %h expected %h", wi, ro_data[wi*N_THR +: N_THR], exp_h[q-LAT-6][wi]);
          end
        end
        n_ro++;
        pop_req = 1;
      end
    end
    $display("local maxima %0d, windows with hits %0d, readouts %0d, B second slots %0d, lost %0d",
             n_lmax, n_hits, n_ro, mux.pairs_sent, mux.lost);
    if (n_hits == 0 || n_ro == 0 || mux.pairs_sent == 0 || mux.lost != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
