// cpm: Cluster Processor Module of the Level-1 calorimeter trigger.
//
// The module finds e/gamma and tau/hadron candidates in 64 overlapping 4x4
// trigger-tower windows (4 in eta x 16 in phi) and reports, every 25 ns
// bunch crossing, how many windows passed each of 16 threshold sets. To see
// all towers those windows touch it needs a region of 7 eta columns x 20 phi
// rows in both the e.m. and the hadronic layer, 280 towers:
//   * columns 1..4 arrive on the 80 LVDS links of the module (link word =
//     BC-muxed phi pair), link index = layer*40 + pair*4 + (column-1);
//   * column 0 comes over the backplane from the lower-eta neighbour and
//     columns 5, 6 from the higher-eta neighbour, as 160 MHz lanes;
//   * the module sends its columns 1, 2 to the lower-eta neighbour and
//     column 4 to the higher-eta one (120 towers each way).
// Board contents, as in the document: 20 SRL chips (SRL s serves layer s/10,
// phi pair s%10, columns 1..4), 8 CP chips (chip k: phi pairs k..k+2), two
// Hit Mergers (sets 0..7 and 8..15) driving the Common Merger Modules, and two
// readout controllers sending Level-2 RoIs and DAQ data over G-link. The
// LVDS deserialisers, G-link serialisers and backplane are outside this RTL:
// their parallel words and lanes are ports.
//
// Clocking: one 160 MHz clock. An internal counter gives `beat` 0..3 within
// each crossing; link words are presented for a whole crossing, changing at
// beat 0. Latency: towers on the links in crossing n reach the CP chip
// outputs in crossing n+7 (one crossing in the SRL, six in the CP chip) and
// the Hit Merger outputs two clocks later. l1a (sampled at beat 3) selects the
// crossing l1a_latency crossings back for readout.
//
// Calibration: with srl_mode = SRL_CALIB every SRL sends the calibration
// pattern and every CP chip input aligns itself to it; the neighbours must do
// the same on the fan-in lanes.
//
// Per-lane beat offsets, per-window local-maximum flags and the Hit Merger
// saturation flag are kept as named internal signals for monitoring and
// simulation; nothing on the board uses them, so lint lists them as unused.
module cpm
  import cpm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  output logic [1:0]      beat,
  // real-time inputs
  input  link_word_t      link_in      [N_LINKS],
  input  lane_t           fanin_lo     [2][N_PAIRS],      // column 0
  input  lane_t           fanin_hi     [2][2][N_PAIRS],   // columns 5, 6
  output lane_t           fanout_lo    [2][2][N_PAIRS],   // columns 1, 2
  output lane_t           fanout_hi    [2][N_PAIRS],      // column 4
  // configuration
  input  srl_mode_e       srl_mode,
  input  thr_set_t        thr          [N_THR],
  input  logic            host_we,
  input  logic [4:0]      host_srl,
  input  logic [LAT_W-1:0] host_addr,
  input  logic [LINKS_PER_SRL*WORD_W-1:0] host_data,
  // results to the Common Merger Modules
  output logic [MULT_W-1:0] cmm_mult   [2][N_EM_ONLY],
  // Level-1 accept and readout
  input  logic            l1a,
  input  logic [LAT_W-1:0] l1a_latency,
  output logic [GL_W-1:0] roi_gl_data,
  output logic            roi_gl_dav,
  output logic            roi_gl_cntl,
  output logic [GL_W-1:0] daq_gl_data,
  output logic            daq_gl_dav,
  output logic            daq_gl_cntl,
  // status
  output logic [N_CP-1:0] cp_locked,
  output logic            parity_err,
  output logic            ro_overflow
);
  localparam int unsigned CP_LAT_OFS = 7;   // crossings from link input to CP output

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) beat <= '0;
    else        beat <= beat + 1'b1;

  logic [LAT_W-1:0] cp_latency;
  assign cp_latency = l1a_latency - LAT_W'(CP_LAT_OFS);

  // ---- SRL chips ------------------------------------------------------------
  localparam int unsigned SW = LINKS_PER_SRL * WORD_W;
  lane_t       srl_lane   [N_SRL][LINKS_PER_SRL];
  logic [SW-1:0] srl_ro_data [N_SRL];
  logic        srl_ro_valid [N_SRL];
  logic        srl_ro_pop   [N_SRL];
  logic        srl_ovf      [N_SRL];

  for (genvar s = 0; s < N_SRL; s++) begin : g_srl
    link_word_t lin [LINKS_PER_SRL];
    for (genvar c = 0; c < LINKS_PER_SRL; c++) begin : g_c
      assign lin[c] = link_in[s*LINKS_PER_SRL + c];
    end
    srl_chip u_srl (
      .clk, .rst_n, .beat,
      .mode      (srl_mode),
      .link_in   (lin),
      .lane_out  (srl_lane[s]),
      .host_we   (host_we && host_srl == 5'(s)),
      .host_addr, .host_data,
      .l1a,
      .latency   (l1a_latency),
      .ro_pop    (srl_ro_pop[s]),
      .ro_data   (srl_ro_data[s]),
      .ro_valid  (srl_ro_valid[s]),
      .ro_overflow (srl_ovf[s])
    );
  end

  // ---- lane grid [layer][eta column][phi pair] and backplane ----------------
  lane_t grid [2][N_ETA][N_PAIRS];
  always_comb
    for (int ly = 0; ly < 2; ly++)
      for (int p = 0; p < N_PAIRS; p++) begin
        grid[ly][0][p] = fanin_lo[ly][p];
        for (int c = 0; c < N_CORE_ETA; c++)
          grid[ly][c+1][p] = srl_lane[ly*N_PAIRS + p][c];
        grid[ly][5][p] = fanin_hi[ly][0][p];
        grid[ly][6][p] = fanin_hi[ly][1][p];
        fanout_lo[ly][0][p] = grid[ly][1][p];
        fanout_lo[ly][1][p] = grid[ly][2][p];
        fanout_hi[ly][p]    = grid[ly][4][p];
      end

  // ---- CP chips ---------------------------------------------------------------
  hits_t        cp_hits     [N_CP][N_WIN];
  logic [N_WIN*N_THR-1:0] cp_ro_data [N_CP];
  logic         cp_ro_valid [N_CP];
  logic         cp_ro_pop   [N_CP];
  logic         cp_perr     [N_CP];
  logic         cp_ovf      [N_CP];

  for (genvar k = 0; k < N_CP; k++) begin : g_cp
    lane_t       lanes [CP_LANES];
    logic [1:0]  lane_offset [CP_LANES];
    logic        win_lmax [N_WIN];
    for (genvar ly = 0; ly < 2; ly++) begin : g_ly
      for (genvar c = 0; c < N_ETA; c++) begin : g_col
        for (genvar p = 0; p < CP_PAIRS; p++) begin : g_p
          assign lanes[ly*N_ETA*CP_PAIRS + c*CP_PAIRS + p] = grid[ly][c][k+p];
        end
      end
    end
    cp_chip u_cp (
      .clk, .rst_n, .beat,
      .calib       (srl_mode == SRL_CALIB),
      .lanes,
      .thr,
      .hits        (cp_hits[k]),
      .locked      (cp_locked[k]),
      .lane_offset,
      .win_lmax,
      .parity_err  (cp_perr[k]),
      .l1a,
      .latency     (cp_latency),
      .ro_pop      (cp_ro_pop[k]),
      .ro_data     (cp_ro_data[k]),
      .ro_valid    (cp_ro_valid[k]),
      .ro_overflow (cp_ovf[k])
    );
  end

  // ---- Hit Mergers ------------------------------------------------------------
  logic hm_sat [2];
  for (genvar h = 0; h < 2; h++) begin : g_hm
    hit_merger #(.THR_BASE(h * N_EM_ONLY), .N_SETS(N_EM_ONLY)) u_hm (
      .clk, .rst_n,
      .hits      (cp_hits),
      .mult      (cmm_mult[h]),
      .saturated (hm_sat[h])
    );
  end

  // ---- readout controllers ----------------------------------------------------
  localparam int unsigned MB = 2 * N_EM_ONLY * MULT_W;
  logic [MB-1:0] mult_flat;
  logic          daq_ovf;
  always_comb
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < N_EM_ONLY; s++)
        mult_flat[(h*N_EM_ONLY + s)*MULT_W +: MULT_W] = cmm_mult[h][s];

  roc_roi u_roc_roi (
    .clk, .rst_n, .beat,
    .src_data  (cp_ro_data),
    .src_valid (cp_ro_valid),
    .src_pop   (cp_ro_pop),
    .gl_data   (roi_gl_data),
    .gl_dav    (roi_gl_dav),
    .gl_cntl   (roi_gl_cntl)
  );

  roc_daq u_roc_daq (
    .clk, .rst_n, .beat,
    .l1a,
    .latency   (cp_latency),
    .mult_in   (mult_flat),
    .src_data  (srl_ro_data),
    .src_valid (srl_ro_valid),
    .src_pop   (srl_ro_pop),
    .gl_data   (daq_gl_data),
    .gl_dav    (daq_gl_dav),
    .gl_cntl   (daq_gl_cntl),
    .overflow  (daq_ovf)
  );

  always_comb begin
    parity_err  = 1'b0;
    ro_overflow = daq_ovf;
    for (int k = 0; k < N_CP; k++) begin
      parity_err  |= cp_perr[k];
      ro_overflow |= cp_ovf[k];
    end
    for (int s = 0; s < N_SRL; s++) ro_overflow |= srl_ovf[s];
  end

endmodule
