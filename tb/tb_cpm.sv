// tb_cpm: the whole Cluster Processor Module, at its full size, end to end.
//
// The testbench plays the Preprocessor (BC-muxed link words on the 80 links)
// and both neighbouring modules (fan-in lanes, each with its own random beat
// delay). It runs:
//   1. calibration: every SRL and both neighbours send the calibration
//      pattern; all CP chips must lock, fan-in lanes at their own delays;
//   2. live running with random towers: every crossing the 64 window results
//      are compared with the reference algorithm 7 crossings after the
//      towers were on the links, and the 16 multiplicities at the CMM
//      outputs in the same crossing; the fan-out lanes are checked too;
//   3. Level-1 accepts: the DAQ G-link stream (link words and
//      multiplicities of the accepted crossing) and the Level-2 G-link stream
//      (RoI coordinates and threshold bits) are compared word by word;
//   4. playback: the host loads all 20 SRL memories with a BC-muxed tower
//      sequence, the SRLs replay it and the results are checked again.
// It counts how often each mechanism happened (calibration lock, BC-mux
// second slot, local-maximum rejection, isolation veto, e/gamma and tau
// hits, multiplicity saturation, accepts read out on both paths, playback
// crossings, parity error) and fails if any never did.
module tb_cpm;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int LAT = 40;        // Level-1 latency used in this test, crossings
  localparam int ROWS = 2 * N_PAIRS;

  logic clk = 0, rst_n = 0;
  logic [1:0] beat;
  link_word_t link_in [N_LINKS];
  lane_t fanin_lo [2][N_PAIRS];
  lane_t fanin_hi [2][2][N_PAIRS];
  lane_t fanout_lo [2][2][N_PAIRS];
  lane_t fanout_hi [2][N_PAIRS];
  srl_mode_e srl_mode = SRL_NORMAL;
  thr_set_t thr [N_THR];
  logic host_we = 0;
  logic [4:0] host_srl = 0;
  logic [LAT_W-1:0] host_addr = 0;
  logic [LINKS_PER_SRL*WORD_W-1:0] host_data = 0;
  logic [MULT_W-1:0] cmm_mult [2][N_EM_ONLY];
  logic l1a = 0;
  logic [LAT_W-1:0] l1a_latency = LAT_W'(LAT);
  logic [GL_W-1:0] roi_gl_data, daq_gl_data;
  logic roi_gl_dav, roi_gl_cntl, daq_gl_dav, daq_gl_cntl;
  logic [N_CP-1:0] cp_locked;
  logic parity_err, ro_overflow;

  cpm dut (.*);

  logic [1:0] offs [N_CP][CP_LANES];          // chosen input offsets
  for (genvar k = 0; k < N_CP; k++) begin : g_offs
    assign offs[k] = dut.g_cp[k].lane_offset;
  end

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lock = 0, n_notmax = 0, n_isoveto = 0, n_em = 0, n_tau = 0, n_sat = 0;
  int n_daq_ev = 0, n_roi_ev = 0, n_pb = 0, n_perr = 0, n_live = 0;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- neighbour lanes: frame of crossing n-1 sent in crossing n, delayed --
  link_word_t fin_word [3][2][N_PAIRS];     // column 0, 5, 6; words sent this crossing
  link_word_t fin_next [3][2][N_PAIRS];     // words of this crossing, sent next crossing
  bit         fin_cal;
  lane_t      fin_src [3][2][N_PAIRS];
  lane_t      fin_dly [3][2][N_PAIRS][4];
  int         skew [3][2][N_PAIRS];

  always_comb
    for (int j = 0; j < 3; j++)
      for (int ly = 0; ly < 2; ly++)
        for (int p = 0; p < N_PAIRS; p++) begin
          fin_src[j][ly][p] = fin_cal ? CAL_FRAME[beat*LANE_W +: LANE_W]
                                      : lane_beat(fin_word[j][ly][p], int'(beat));
          fin_dly[j][ly][p][0] = fin_src[j][ly][p];
        end
  always_ff @(posedge clk)
    for (int j = 0; j < 3; j++)
      for (int ly = 0; ly < 2; ly++)
        for (int p = 0; p < N_PAIRS; p++)
          for (int d = 1; d < 4; d++) fin_dly[j][ly][p][d] <= fin_dly[j][ly][p][d-1];
  always_comb
    for (int ly = 0; ly < 2; ly++)
      for (int p = 0; p < N_PAIRS; p++) begin
        fanin_lo[ly][p]    = fin_dly[0][ly][p][skew[0][ly][p]];
        fanin_hi[ly][0][p] = fin_dly[1][ly][p][skew[1][ly][p]];
        fanin_hi[ly][1][p] = fin_dly[2][ly][p][skew[2][ly][p]];
      end

  // ---- per-crossing records ---------------------------------------------------
  typedef tt_t grid_t [2][N_ETA][ROWS];
  grid_t      T    [int];                    // towers of "link crossing" n
  hits_t      E    [int][N_CP][N_WIN];       // expected window results
  int         M    [int][N_THR];             // expected multiplicities
  link_word_t LW   [int][N_LINKS];           // link words of crossing n
  bit         chk  [int];                    // results of crossing n are checkable

  // loop bounds kept in variables: the reference loops stay loops in the
  // simulator instead of being expanded
  int nCP = N_CP, nWIN = N_WIN, nLINKS = N_LINKS, nPAIRS = N_PAIRS, nTHR = N_THR;
  int nCORE = N_CORE_ETA, nROWS = ROWS, n4 = 4, n2 = 2, n3 = 3;

  BcMux    mux_core, mux_fin;
  TowerGen gen_core, gen_fin;
  int n = 0;                                 // current crossing

  thr_set_t thr_noiso [N_THR];               // thr without isolation cuts

  function automatic void expect_results(int c);
    for (int k = 0; k < nCP; k++)
      for (int w = 0; w < nWIN; w++) begin
        tt_t e4 [4][4], h4 [4][4];
        bit lm;
        hits_t h;
        for (int i = 0; i < n4; i++)
          for (int j = 0; j < n4; j++) begin
            e4[i][j] = T[c][0][w%4 + i][2*k + w/4 + j];
            h4[i][j] = T[c][1][w%4 + i][2*k + w/4 + j];
          end
        h = ref_window(e4, h4, thr, lm);
        E[c][k][w] = h;
        if ((ref_window(e4, h4, thr_noiso, lm) & ~h) != 0) n_isoveto++;
        if (!lm) n_notmax++;
      end
    for (int t = 0; t < nTHR; t++) begin
      int cnt = 0;
      cnt = 0;
      for (int k = 0; k < nCP; k++)
        for (int w = 0; w < nWIN; w++) if (E[c][k][w][t]) cnt++;
      if (cnt > 7) n_sat++;
      if (cnt > 0) begin if (t >= 8 && thr[t].tau) n_tau++; else n_em++; end
      M[c][t] = cnt > 7 ? 7 : cnt;
    end
  endfunction

  // fan-in towers for crossing n (columns 0, 5, 6), encoded for crossing n+1
  function automatic void make_fanin(bit zero);
    fin_word = fin_next;
    for (int j = 0; j < n3; j++)
      for (int ly = 0; ly < n2; ly++)
        for (int p = 0; p < nPAIRS; p++) begin
          tt_t a, b;
          int col;
          col = (j == 0) ? 0 : j + 4;
          if (zero) begin a = 0; b = 0; end
          else gen_fin.next(j*20 + ly*10 + p, a, b);
          T[n][ly][col][2*p] = a;
          T[n][ly][col][2*p+1] = b;
          fin_next[j][ly][p] = mux_fin.enc(j*20 + ly*10 + p, a, b);
        end
  endfunction

  // live core towers of crossing n on the links
  function automatic void make_core(bit zero, bit bad_parity);
    for (int ly = 0; ly < n2; ly++)
      for (int p = 0; p < nPAIRS; p++)
        for (int c = 0; c < nCORE; c++) begin
          tt_t a, b;
          int l;
          l = ly*40 + p*4 + c;
          if (zero) begin a = 0; b = 0; end
          else gen_core.next(l, a, b);
          T[n][ly][c+1][2*p] = a;
          T[n][ly][c+1][2*p+1] = b;
          link_in[l] = mux_core.enc(l, a, b);
          LW[n][l] = link_in[l];
        end
    if (bad_parity) link_in[17].parity = ~link_in[17].parity;
  endfunction

  // ---- playback content -------------------------------------------------------
  tt_t        PBT [128][2][N_CORE_ETA][ROWS];
  link_word_t PBW [128][N_LINKS];

  task automatic load_playback();
    BcMux m;
    TowerGen g;
    m = new(N_LINKS);
    g = new(N_LINKS, 25);
    for (int e = 0; e < 128; e++)
      for (int ly = 0; ly < n2; ly++)
        for (int p = 0; p < nPAIRS; p++)
          for (int c = 0; c < nCORE; c++) begin
            tt_t a, b;
            int l;
            l = ly*40 + p*4 + c;
            g.next(l, a, b);
            if (e >= 126) begin a = 0; b = 0; end   // clean wrap-around
            PBT[e][ly][c][2*p] = a;
            PBT[e][ly][c][2*p+1] = b;
            PBW[e][l] = m.enc(l, a, b);
          end
    for (int s = 0; s < N_SRL; s++)
      for (int e = 0; e < 128; e++) begin
        @(negedge clk);
        host_we = 1; host_srl = 5'(s); host_addr = LAT_W'(e);
        for (int c = 0; c < n4; c++)
          host_data[c*WORD_W +: WORD_W] = PBW[e][s*LINKS_PER_SRL + c];
      end
    @(negedge clk) host_we = 0;
  endtask

  // ---- expected G-link streams --------------------------------------------------
  logic [15:0] daq_exp [$];  bit daq_c [$];
  logic [15:0] roi_exp [$];  bit roi_c [$];
  int daq_ev = 0, roi_ev = 0;

  function automatic void expect_readout(int c);
    logic [47:0] mm;
    int nr;
    daq_exp.push_back(16'(daq_ev)); daq_c.push_back(1); daq_ev++;
    for (int l = 0; l < nLINKS; l++) begin daq_exp.push_back(16'(LW[c][l])); daq_c.push_back(0); end
    for (int t = 0; t < nTHR; t++) mm[t*3 +: 3] = 3'(M[c][t]);
    for (int i = 0; i < n3; i++) begin daq_exp.push_back(mm[i*16 +: 16]); daq_c.push_back(0); end
    daq_exp.push_back(16'd83); daq_c.push_back(1);
    roi_exp.push_back(16'(roi_ev)); roi_c.push_back(1); roi_ev++;
    nr = 0;
    for (int k = 0; k < nCP; k++)
      for (int w = 0; w < nWIN; w++)
        if (E[c][k][w] != 0) begin
          roi_exp.push_back({8'h00, 4'(2*k + w/4), 2'b00, 2'(w%4)}); roi_c.push_back(0);
          roi_exp.push_back(E[c][k][w]); roi_c.push_back(0);
          nr++;
        end
    roi_exp.push_back(16'(nr)); roi_c.push_back(1);
  endfunction

  int daq_cntl_seen = 0, roi_cntl_seen = 0;
  always @(posedge clk)
    if (rst_n && beat == 2'd1) begin
      if (daq_gl_dav) begin
        checks++;
        if (daq_exp.size() == 0) begin failures++; $display("unexpected DAQ word"); end
        else begin
          logic [15:0] x; bit xc;
          x = daq_exp.pop_front(); xc = daq_c.pop_front();
          if (daq_gl_data !== x || daq_gl_cntl !== xc) begin
            failures++;
            if (failures < 20) $display("DAQ word %h/%b expected %h/%b", daq_gl_data, daq_gl_cntl, x, xc);
          end
          if (xc) begin daq_cntl_seen++; n_daq_ev = daq_cntl_seen / 2; end
        end
      end
      if (roi_gl_dav) begin
        checks++;
        if (roi_exp.size() == 0) begin failures++; $display("unexpected RoI word"); end
        else begin
          logic [15:0] x; bit xc;
          x = roi_exp.pop_front(); xc = roi_c.pop_front();
          if (roi_gl_data !== x || roi_gl_cntl !== xc) begin
            failures++;
            if (failures < 20) $display("RoI word %h/%b expected %h/%b", roi_gl_data, roi_gl_cntl, x, xc);
          end
          if (xc) begin roi_cntl_seen++; n_roi_ev = roi_cntl_seen / 2; end
        end
      end
    end

  task automatic check_lock();
    for (int k = 0; k < nCP; k++) begin
      checks++;
      if (cp_locked[k]) n_lock++;
      else begin failures++; $display("CP chip %0d not locked", k); end
    end
    for (int k = 0; k < nCP; k++)
      for (int p = 0; p < CP_PAIRS; p++)
        for (int ly = 0; ly < n2; ly++) begin
          checks++;
          if (offs[k][ly*21 + p] !== 2'(skew[0][ly][k+p]) ||
              offs[k][ly*21 + 18 + p] !== 2'(skew[2][ly][k+p])) begin
            failures++;
            $display("chip %0d pair %0d: fan-in offset wrong", k, p);
          end
        end
  endtask

  bit pb_load_go = 0, pb_valid = 0;
  initial begin
    wait (pb_load_go);
    load_playback();
  end

  // ---- one crossing ---------------------------------------------------------------
  // mode: 0 calibration, 1 live, 2 playback (core from the SRL memories)
  task automatic crossing(int mode, bit do_l1a, bit bad_parity);
    fin_cal = (mode == 0);
    make_fanin(mode == 0);
    if (mode == 2) begin
      for (int l = 0; l < nLINKS; l++) link_in[l] = '0;
    end else begin
      make_core(mode == 0, bad_parity);
    end
    chk[n] = (mode == 1) || (mode == 2 && pb_valid);
    for (int b = 0; b < n4; b++) begin
      #0.5;
      if (b == 1 && chk.exists(n - 7) && chk[n-7] && n > 12) begin
        for (int k = 0; k < nCP; k++)
          for (int w = 0; w < nWIN; w++) begin
            checks++;
            if (dut.cp_hits[k][w] !== E[n-7][k][w]) begin
              failures++;
              if (failures < 20) $display("crossing %0d chip %0d window %0d: %h expected %h",
                                          n - 7, k, w, dut.cp_hits[k][w], E[n-7][k][w]);
            end
          end
        if (mode == 1) n_live++;
        if (mode == 2) n_pb++;
      end
      if (b == 1 && mode == 1 && chk.exists(n - 1) && chk[n-1]) begin
        for (int ly = 0; ly < n2; ly++)
          for (int p = 0; p < nPAIRS; p++) begin
            checks++;
            if (fanout_lo[ly][1][p] !== lane_beat(LW[n-1][ly*40 + p*4 + 1], 1) ||
                fanout_hi[ly][p]    !== lane_beat(LW[n-1][ly*40 + p*4 + 3], 1)) begin
              failures++;
              if (failures < 20) $display("fan-out lane layer %0d pair %0d wrong", ly, p);
            end
          end
      end
      if (b == 3) begin
        if (chk.exists(n - 7) && chk[n-7] && n > 12)
          for (int t = 0; t < nTHR; t++) begin
            checks++;
            if (cmm_mult[t/8][t%8] !== 3'(M[n-7][t])) begin
              failures++;
              if (failures < 20) $display("crossing %0d set %0d: multiplicity %0d expected %0d",
                                          n - 7, t, cmm_mult[t/8][t%8], M[n-7][t]);
            end
          end
        if (mode == 2) begin
          // the entry the SRLs take at this edge is sent next crossing
          int e;
          e = int'(dut.g_srl[0].u_srl.u_pipe.wr_ptr);
          for (int ly = 0; ly < n2; ly++)
            for (int c = 0; c < nCORE; c++)
              for (int r = 0; r < nROWS; r++) T[n][ly][c+1][r] = PBT[e][ly][c][r];
        end
        expect_results(n);
        if (do_l1a) expect_readout(n - LAT);
        l1a = do_l1a;
        if (parity_err) n_perr++;
      end
      @(posedge clk);
    end
    #0.1 l1a = 0;
    n++;
  endtask

  initial begin
    mux_core = new(N_LINKS);
    mux_fin  = new(60);
    gen_core = new(N_LINKS, 20);
    gen_fin  = new(60, 20);
    rand_thr(thr);
    // set 0: low cluster threshold, no isolation cut, to reach saturation
    thr[0] = '{cluster: 12'd5, em_iso: 12'hfff, had_iso: 12'hfff, had_core: 12'hfff, tau: 1'b0};
    thr[8].tau = 1'b1;
    thr[9].tau = 1'b1;
    thr_noiso = thr;
    for (int t = 0; t < N_THR; t++) begin
      thr_noiso[t].em_iso = '1; thr_noiso[t].had_iso = '1; thr_noiso[t].had_core = '1;
    end
    for (int j = 0; j < 3; j++)
      for (int ly = 0; ly < 2; ly++)
        for (int p = 0; p < N_PAIRS; p++) begin
          skew[j][ly][p] = $urandom_range(0, 3);
          fin_word[j][ly][p] = '0;
          fin_next[j][ly][p] = '0;
        end
    fin_cal = 0;
    for (int l = 0; l < N_LINKS; l++) link_in[l] = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;          // beat is 0 from here
    #0.1;
    // one call site for crossing(): phases follow each other by iteration
    begin
      int phase, i, left;
      phase = 0; i = 0; left = 5;
      srl_mode = SRL_CALIB;
      while (phase < 5) begin
        int mode;
        bit acc, bad;
        mode = (phase == 0) ? 0 : (phase >= 3) ? 2 : 1;
        acc  = (phase == 1) && i > LAT + 10 && i % 90 == 0;
        bad  = (phase == 1) && i == 200;
        crossing(mode, acc, bad);
        i++;
        left--;
        if (phase == 2 && daq_exp.size() == 0 && roi_exp.size() == 0) left = 0;
        if (left == 0) begin
          phase++;
          i = 0;
          case (phase)
            1: begin
              srl_mode = SRL_NORMAL;
              check_lock();
              left = 400;
            end
            2: left = 400;                   // drain the readout streams
            3: begin
              checks++;
              if (daq_exp.size() != 0 || roi_exp.size() != 0) begin
                failures++; $display("readout incomplete: %0d DAQ and %0d RoI words left", daq_exp.size(), roi_exp.size());
              end
              srl_mode = SRL_PLAYBACK;
              chk[n-1] = 0;                  // its B towers are not sent
              pb_load_go = 1;
              left = 650;                    // memory being loaded
            end
            4: begin
              pb_valid = 1;                  // memory complete from here
              left = 150;
            end
            default: ;
          endcase
        end
      end
    end
    // only crossings after the memory was complete count as playback checks
    $display("locked chips %0d, live %0d, playback %0d crossings checked", n_lock, n_live, n_pb);
    $display("BC-mux second slots %0d (lost %0d), not a local maximum %0d, saturated multiplicities %0d",
             mux_core.pairs_sent + mux_fin.pairs_sent, mux_core.lost + mux_fin.lost, n_notmax, n_sat);
    $display("isolation vetoes %0d", n_isoveto);
    if (n_isoveto == 0) failures++;
    $display("e/gamma set hits %0d, tau set hits %0d, DAQ events %0d, RoI events %0d, parity errors %0d",
             n_em, n_tau, n_daq_ev, n_roi_ev, n_perr);
    if (n_lock != N_CP) failures++;
    if (mux_core.pairs_sent == 0 || mux_core.lost + mux_fin.lost != 0) failures++;
    if (n_notmax == 0 || n_sat == 0 || n_em == 0 || n_tau == 0) failures++;
    if (n_daq_ev == 0 || n_roi_ev == 0 || n_pb == 0 || n_perr == 0 || n_live == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
