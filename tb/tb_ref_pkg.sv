// tb_ref_pkg: reference models shared by the testbenches.
//
//  * ref_window: the cluster algorithm of one 4x4 window, written from the
//    algorithm description independently of the RTL (flat loops over the
//    tower list rather than the RTL's pair/ring structure).
//  * BcMux: behavioural model of the Preprocessor's BC-mux sender for a set
//    of tower pairs (tower A in its own crossing with the flag clear, tower B
//    one crossing later with the flag set when it is not zero).
//  * TowerGen: random tower energies that respect the rule BC-mux relies on:
//    after a crossing in which a pair had energy, both its towers are empty.
//  * lane_beat: the beat a lane carries for a link word.
//  * rand_thr: random threshold sets.
package tb_ref_pkg;
  import cpm_pkg::*;

  function automatic int roi_sum(tt_t em[4][4], tt_t had[4][4], int a, int b);
    int s = 0;
    for (int i = a; i < a + 2; i++)
      for (int j = b; j < b + 2; j++) s += int'(em[i][j]) + int'(had[i][j]);
    return s;
  endfunction

  function automatic hits_t ref_window(tt_t em[4][4], tt_t had[4][4], thr_set_t thr[N_THR],
                                       output bit lmax);
    int c, emi, hai, hcore, tot_em, tot_had;
    int pairs[4];
    hits_t h;
    c = roi_sum(em, had, 1, 1);
    lmax = 1;
    for (int a = 0; a <= 2; a++)
      for (int b = 0; b <= 2; b++) begin
        int n;
        n = roi_sum(em, had, a, b);
        if (a == 1 && b == 1) continue;
        if ((b == 2) || (b == 1 && a == 2)) begin
          if (c <= n) lmax = 0;
        end else begin
          if (c < n) lmax = 0;
        end
      end
    tot_em = 0; tot_had = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        tot_em  += int'(em[i][j]);
        tot_had += int'(had[i][j]);
      end
    hcore = int'(had[1][1]) + int'(had[2][1]) + int'(had[1][2]) + int'(had[2][2]);
    emi = tot_em - (int'(em[1][1]) + int'(em[2][1]) + int'(em[1][2]) + int'(em[2][2]));
    hai = tot_had - hcore;
    pairs[0] = int'(em[1][1]) + int'(em[1][2]);
    pairs[1] = int'(em[2][1]) + int'(em[2][2]);
    pairs[2] = int'(em[1][1]) + int'(em[2][1]);
    pairs[3] = int'(em[1][2]) + int'(em[2][2]);
    for (int t = 0; t < N_THR; t++) begin
      bit clus, tau;
      tau  = (t >= 8) && thr[t].tau;
      clus = 0;
      foreach (pairs[i])
        if ((tau ? pairs[i] + hcore : pairs[i]) > int'(thr[t].cluster)) clus = 1;
      h[t] = lmax && clus && emi <= int'(thr[t].em_iso) && hai <= int'(thr[t].had_iso)
             && (tau || hcore <= int'(thr[t].had_core));
    end
    return h;
  endfunction

  function automatic lane_t lane_beat(link_word_t w, int b);
    logic [FRAME_W-1:0] f;
    f = FRAME_W'(w);
    return f[b*LANE_W +: LANE_W];
  endfunction

  function automatic void rand_thr(ref thr_set_t thr[N_THR]);
    for (int t = 0; t < N_THR; t++) begin
      thr[t].cluster  = sum_t'($urandom_range(10, 160));
      thr[t].em_iso   = sum_t'($urandom_range(0, 200));
      thr[t].had_iso  = sum_t'($urandom_range(0, 200));
      thr[t].had_core = sum_t'($urandom_range(0, 120));
      thr[t].tau      = $urandom_range(0, 1) != 0;
    end
  endfunction

  class BcMux;
    int  n;
    bit  pend[];
    tt_t pval[];
    int  pairs_sent;   // crossings where tower B used the following slot
    int  lost;         // energy that could not be sent
    function new(int n_ch);
      n = n_ch;
      pend = new[n_ch];
      pval = new[n_ch];
      pairs_sent = 0;
      lost = 0;
    endfunction
    function link_word_t enc(int i, tt_t a, tt_t b);
      link_word_t w;
      if (pend[i]) begin
        w = make_word(1'b1, pval[i]);
        pend[i] = 0;
        if (a != 0 || b != 0) lost++;
      end else begin
        w = make_word(1'b0, a);
        if (b != 0) begin
          pend[i] = 1;
          pval[i] = b;
          pairs_sent++;
        end
      end
      return w;
    endfunction
  endclass

  // occupancy: chance in percent that an allowed tower has energy
  class TowerGen;
    int  n;
    bit  busy[];
    int  occ;
    function new(int n_pairs, int occupancy);
      n = n_pairs;
      busy = new[n_pairs];
      occ = occupancy;
    endfunction
    function void next(int i, output tt_t a, output tt_t b);
      a = 0; b = 0;
      if (busy[i]) begin
        busy[i] = 0;
        return;
      end
      if ($urandom_range(0, 99) < occ) a = tt_t'($urandom_range(1, 255));
      if ($urandom_range(0, 99) < occ) b = tt_t'($urandom_range(1, 255));
      if (a != 0 || b != 0) busy[i] = 1;
    endfunction
  endclass

endpackage
