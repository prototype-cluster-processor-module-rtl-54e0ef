// cp_chip: Cluster Processor chip, eight 4x4 windows.
//
// Chip k of a module processes the windows whose reference (lower-left central)
// tower lies in eta columns 1..4 and phi rows 2k+1, 2k+2 of the module's
// 7-column region. It needs 7 eta columns x 3 phi pairs x 2 layers = 42
// BC-muxed channels, which arrive as 160 MHz lanes (lane index
// layer*21 + column*3 + pair, layer 0 = e.m.). The data path follows the
// stages the document names for the chip:
//   synchronisation/deserialisation (cp_sync, per lane)
//   -> BC demultiplexing (bc_demux, per lane)
//   -> algorithm and threshold comparison (cp_window, per window)
//   -> output register feeding the Hit Mergers.
// Window w covers eta columns i..i+3 and phi rows j..j+3 of the chip's region,
// with i = w % 4 and j = w / 4. The chip's result per crossing is the set of
// threshold sets each window passed; a window with any bit set is a region of
// interest at (eta i, phi 2k+j). The results also go into a Level-1 pipeline
// that the RoI readout controller reads on L1A.
//
// Timing (clk = 160 MHz, beat 0..3, one crossing = 4 clocks): the threshold
// results for the towers whose words were on the input lanes in crossing n
// are on `hits` during crossing n+6, the 6-tick latency the document gives;
// 1 tick of it is the algorithm. The split of the 8 windows as 4 (eta) x
// 2 (phi), the lane order and the pipeline are this design's choices.
//
// The pipeline's playback output is left open: only the SRL chips replay
// data, so the CP chip uses its pipeline for readout only.
module cp_chip
  import cpm_pkg::*;
#(
  parameter int unsigned DEPTH = PIPE_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      beat,
  input  logic            calib,
  input  lane_t           lanes [CP_LANES],
  input  thr_set_t        thr   [N_THR],
  output hits_t           hits  [N_WIN],
  output logic            locked,       // every input aligned
  output logic [1:0]      lane_offset [CP_LANES], // beat offset chosen per lane
  output logic            win_lmax    [N_WIN],    // algorithm-stage local maxima
  output logic            parity_err,   // a parity error this crossing
  input  logic            l1a,
  input  logic [AW-1:0]   latency,
  input  logic            ro_pop,
  output logic [N_WIN*N_THR-1:0] ro_data,
  output logic            ro_valid,
  output logic            ro_overflow
);
  localparam int unsigned ROWS = 2 * CP_PAIRS;   // 6 phi rows

  logic        bc_en;
  link_word_t  word   [CP_LANES];
  logic        lk     [CP_LANES];
  logic        perr   [CP_LANES];
  tt_t         tt_a   [CP_LANES];
  tt_t         tt_b   [CP_LANES];
  tt_t         em_g   [N_ETA][ROWS];
  tt_t         had_g  [N_ETA][ROWS];
  tt_t         w_em   [N_WIN][4][4];
  tt_t         w_had  [N_WIN][4][4];
  logic [N_WIN*N_THR-1:0] hits_flat;

  assign bc_en = (beat == 2'd3);

  for (genvar l = 0; l < CP_LANES; l++) begin : g_lane
    cp_sync u_sync (
      .clk, .rst_n, .beat, .calib,
      .lane   (lanes[l]),
      .word   (word[l]),
      .locked (lk[l]),
      .offset (lane_offset[l])
    );
    bc_demux u_demux (
      .clk, .rst_n, .bc_en,
      .word       (word[l]),
      .tt_a       (tt_a[l]),
      .tt_b       (tt_b[l]),
      .parity_err (perr[l])
    );
  end

  // tower grids [eta][phi row]; pair p holds rows 2p (tower A) and 2p+1 (B)
  always_comb begin
    for (int c = 0; c < N_ETA; c++)
      for (int p = 0; p < CP_PAIRS; p++) begin
        em_g [c][2*p]   = tt_a[c*CP_PAIRS + p];
        em_g [c][2*p+1] = tt_b[c*CP_PAIRS + p];
        had_g[c][2*p]   = tt_a[N_ETA*CP_PAIRS + c*CP_PAIRS + p];
        had_g[c][2*p+1] = tt_b[N_ETA*CP_PAIRS + c*CP_PAIRS + p];
      end
    for (int w = 0; w < N_WIN; w++)
      for (int e = 0; e < 4; e++)
        for (int p = 0; p < 4; p++) begin
          w_em [w][e][p] = em_g [w%4 + e][w/4 + p];
          w_had[w][e][p] = had_g[w%4 + e][w/4 + p];
        end
  end

  for (genvar w = 0; w < N_WIN; w++) begin : g_win
    cp_window u_win (
      .clk, .rst_n, .bc_en,
      .em   (w_em[w]),
      .had  (w_had[w]),
      .thr,
      .hits (hits[w]),
      .lmax (win_lmax[w])
    );
  end

  always_comb begin
    locked     = 1'b1;
    parity_err = 1'b0;
    for (int l = 0; l < CP_LANES; l++) begin
      locked     &= lk[l];
      parity_err |= perr[l];
    end
    for (int w = 0; w < N_WIN; w++) hits_flat[w*N_THR +: N_THR] = hits[w];
  end

  l1_pipeline #(.W(N_WIN*N_THR), .DEPTH(DEPTH)) u_pipe (
    .clk, .rst_n, .bc_en,
    .din       (hits_flat),
    .freeze    (1'b0),
    .host_we   (1'b0),
    .host_addr ('0),
    .host_data ('0),
    .pb_dout   (),
    .l1a, .latency, .ro_pop, .ro_data, .ro_valid, .ro_overflow
  );

endmodule
