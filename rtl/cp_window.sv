// cp_window: cluster-finding algorithm for one 4x4 trigger-tower window.
//
// Inputs are the 4x4 e.m. and hadronic tower energies of the window, indexed
// [eta][phi]; the central 2x2 towers are [1..2][1..2] and the other twelve form
// the isolation ring. Following the document:
//   * four e.m. clusters: sums of two adjacent central e.m. towers
//     (two pairs along eta, two along phi);
//   * e.m. and hadronic isolation: sums of the 12 ring towers of each layer;
//   * central hadronic isolation (e/gamma only): sum of the 2x2 central
//     hadronic towers;
//   * four tau/hadron clusters: each e.m. cluster plus the 2x2 central
//     hadronic towers;
//   * RoI: 2x2 e.m. + hadronic sum, which must be a local maximum against the
//     eight RoIs shifted by one tower.
// Threshold set t is passed (hits[t]) when the RoI is a local maximum, one of
// the four clusters is above the set's cluster threshold and each isolation sum
// is at or below its threshold. Sets 0..7 always use the e/gamma algorithm;
// sets 8..15 use the tau/hadron algorithm when their `tau` bit is set, which
// ignores the central hadronic threshold.
//
// This design's choices, where the document is silent: "above" is strictly
// greater and "below" is less than or equal; a tie with a neighbouring RoI
// counts as a maximum against the neighbours at lower phi (and lower eta in
// the same phi row) and not against the others, so two equal adjacent RoIs
// are reported once.
//
// Timing: two registers, both enabled by bc_en: the sums and the local-maximum
// test ("algorithm" stage), then the threshold comparison. hits is valid two
// crossings after the towers.
module cp_window
  import cpm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     bc_en,
  input  tt_t      em  [4][4],
  input  tt_t      had [4][4],
  input  thr_set_t thr [N_THR],
  output hits_t    hits,
  output logic     lmax          // algorithm-stage local-maximum flag
);
  // ---- algorithm stage (combinational part) -------------------------------
  sum_t em_pair_c [4];
  sum_t em_iso_c, had_iso_c, had_core_c;
  sum_t roi_c [3][3];
  logic lmax_c;

  always_comb begin
    em_pair_c[0] = sum_t'(em[1][1]) + sum_t'(em[2][1]);  // along eta, lower phi
    em_pair_c[1] = sum_t'(em[1][2]) + sum_t'(em[2][2]);  // along eta, upper phi
    em_pair_c[2] = sum_t'(em[1][1]) + sum_t'(em[1][2]);  // along phi, lower eta
    em_pair_c[3] = sum_t'(em[2][1]) + sum_t'(em[2][2]);  // along phi, upper eta
    had_core_c   = sum_t'(had[1][1]) + sum_t'(had[1][2])
                 + sum_t'(had[2][1]) + sum_t'(had[2][2]);
    em_iso_c  = '0;
    had_iso_c = '0;
    for (int e = 0; e < 4; e++)
      for (int p = 0; p < 4; p++)
        if (!(e inside {[1:2]} && p inside {[1:2]})) begin
          em_iso_c  += sum_t'(em[e][p]);
          had_iso_c += sum_t'(had[e][p]);
        end
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        roi_c[a][b] = sum_t'(em[a][b]) + sum_t'(em[a+1][b]) + sum_t'(em[a][b+1])
                    + sum_t'(em[a+1][b+1]) + sum_t'(had[a][b]) + sum_t'(had[a+1][b])
                    + sum_t'(had[a][b+1]) + sum_t'(had[a+1][b+1]);
    lmax_c = 1'b1;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if (b > 1 || (b == 1 && a > 1)) begin
          if (!(roi_c[1][1] > roi_c[a][b]))  lmax_c = 1'b0;
        end else if (!(a == 1 && b == 1)) begin
          if (!(roi_c[1][1] >= roi_c[a][b])) lmax_c = 1'b0;
        end
  end

  // ---- algorithm stage registers ------------------------------------------
  sum_t em_pair_q [4];
  sum_t em_iso_q, had_iso_q, had_core_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) em_pair_q[i] <= '0;
      em_iso_q   <= '0;
      had_iso_q  <= '0;
      had_core_q <= '0;
      lmax       <= 1'b0;
    end else if (bc_en) begin
      em_pair_q  <= em_pair_c;
      em_iso_q   <= em_iso_c;
      had_iso_q  <= had_iso_c;
      had_core_q <= had_core_c;
      lmax       <= lmax_c;
    end
  end

  // ---- threshold comparison stage -----------------------------------------
  hits_t hits_c;

  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      logic em_clus, tau_clus, iso;
      em_clus  = 1'b0;
      tau_clus = 1'b0;
      for (int i = 0; i < 4; i++) begin
        if (em_pair_q[i] > thr[t].cluster)                 em_clus  = 1'b1;
        if (em_pair_q[i] + had_core_q > thr[t].cluster)    tau_clus = 1'b1;
      end
      iso = (em_iso_q <= thr[t].em_iso) && (had_iso_q <= thr[t].had_iso);
      if (t >= N_EM_ONLY && thr[t].tau)
        hits_c[t] = lmax && iso && tau_clus;
      else
        hits_c[t] = lmax && iso && em_clus && (had_core_q <= thr[t].had_core);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     hits <= '0;
    else if (bc_en) hits <= hits_c;
  end

endmodule
