// cpm_pkg: types and constants shared by the Cluster Processor Module (CPM).
//
// The CPM sees, per calorimeter layer (electromagnetic and hadronic), a region of
// 7 trigger-tower columns in eta by 20 rows in phi. The four central eta columns
// arrive on the module's own 80 LVDS links (4 columns x 10 phi pairs x 2 layers);
// the outer three columns come over the backplane from the two neighbouring
// modules. Two phi-adjacent towers share one link through BC-multiplexing, so
// every "channel" below is a phi pair of towers.
//
// Link word (10 bits, one per 25 ns bunch crossing): 8-bit transverse energy,
// a BC-mux flag and an odd-parity bit. The 8-bit energy and the 10-bit word size
// are the document's; the split of the two extra bits is this design's choice.
//
// The 160 MHz lanes between SRL and CP chips carry one link word per bunch
// crossing in four beats of LANE_W bits (12 bits, the word in bits 9:0,
// beat 0 first). Beat count follows from 160 MHz / 40 MHz; the lane width and
// beat order are this design's choice.
package cpm_pkg;

  // ---- sizes from the document -------------------------------------------
  localparam int unsigned TT_W        = 8;    // tower transverse energy bits
  localparam int unsigned WORD_W      = 10;   // deserialiser word bits
  localparam int unsigned N_LINKS     = 80;   // LVDS links per CPM
  localparam int unsigned N_SRL       = 20;   // SRL chips per CPM
  localparam int unsigned N_CP        = 8;    // CP chips per CPM
  localparam int unsigned N_WIN       = 8;    // 4x4 windows per CP chip
  localparam int unsigned N_THR       = 16;   // threshold sets
  localparam int unsigned N_EM_ONLY   = 8;    // sets reserved for e/gamma
  localparam int unsigned MULT_W      = 3;    // multiplicity, saturates at 7
  localparam int unsigned BEATS       = 4;    // 160 MHz beats per 40 MHz tick

  // ---- geometry derived from the document's tower counts ------------------
  localparam int unsigned N_ETA       = 7;    // eta columns seen by a CPM
  localparam int unsigned N_PAIRS     = 10;   // phi pairs (20 phi rows)
  localparam int unsigned N_CORE_ETA  = 4;    // columns on the module's own links
  localparam int unsigned LINKS_PER_SRL = N_LINKS / N_SRL;   // 4
  // CP chip k covers windows eta 0..3 x phi rows 2k,2k+1 and needs phi pairs
  // k..k+2 of all 7 columns, both layers.
  localparam int unsigned CP_PAIRS    = 3;
  localparam int unsigned CP_LANES    = 2 * N_ETA * CP_PAIRS; // 42

  // ---- this design's choices ---------------------------------------------
  localparam int unsigned LANE_W      = 3;    // bits per 160 MHz beat
  localparam int unsigned FRAME_W     = LANE_W * BEATS;  // 12
  localparam int unsigned SUM_W       = 12;   // sums and thresholds (12 x 255 fits)
  localparam int unsigned GL_W        = 16;   // G-link data word
  localparam int unsigned PIPE_DEPTH  = 128;  // covers the 2 us (80 tick) Level-1 latency
  localparam int unsigned LAT_W       = $clog2(PIPE_DEPTH);

  // Calibration pattern sent by an SRL in calibration mode. Its four beats are
  // all different, so a receiver can find the beat alignment from one frame.
  localparam logic [FRAME_W-1:0] CAL_FRAME = 12'b111_100_010_001;

  typedef logic [TT_W-1:0]    tt_t;
  typedef logic [SUM_W-1:0]   sum_t;
  typedef logic [LANE_W-1:0]  lane_t;
  typedef logic [N_THR-1:0]   hits_t;

  typedef struct packed {
    logic      parity;   // odd parity over flag and data
    logic      bcmux;    // 1: data is the second tower of the pair, sent one tick late
    tt_t       data;
  } link_word_t;

  typedef enum logic [1:0] {
    SRL_NORMAL   = 2'd0,  // live link data
    SRL_PLAYBACK = 2'd1,  // data from the playback memory
    SRL_CALIB    = 2'd2   // fixed calibration pattern
  } srl_mode_e;

  // One threshold set: cluster threshold plus the three isolation thresholds.
  // Sets 8..15 may be switched to the tau/hadron algorithm.
  typedef struct packed {
    sum_t cluster;     // cluster sum must be above this
    sum_t em_iso;      // e.m. ring sum must not be above this
    sum_t had_iso;     // hadronic ring sum must not be above this
    sum_t had_core;    // central 2x2 hadronic sum (e/gamma only) must not be above this
    logic tau;         // 1: tau/hadron set (only honoured for sets 8..15)
  } thr_set_t;

  function automatic logic odd_parity(input logic bcmux, input tt_t data);
    return ~(^{bcmux, data});
  endfunction

  function automatic link_word_t make_word(input logic bcmux, input tt_t data);
    link_word_t w;
    w.bcmux  = bcmux;
    w.data   = data;
    w.parity = odd_parity(bcmux, data);
    return w;
  endfunction

endpackage
