// srl_chip: Serialiser (SRL) chip of the CPM.
//
// Each SRL takes the 10-bit words of N_CH LVDS links (one link = one BC-muxed
// phi pair of towers of one layer) and:
//   * re-sends every word as a 160 MHz lane, four LANE_W-bit beats per bunch
//     crossing, beat 0 first; these lanes feed the CP chips on the board and,
//     through the backplane, the neighbouring modules;
//   * writes the words of all channels into a Level-1 pipeline memory, read
//     out on L1A by the DAQ readout controller;
//   * in playback mode sends the content of that memory, loaded by the host,
//     instead of the live links;
//   * in calibration mode sends a fixed pattern (cpm_pkg::CAL_FRAME) on every
//     lane, from which the CP chips set their input alignment.
// The document gives these tasks (20 SRLs per CPM, 160 MHz, playback memory
// doubling as pipeline, calibration pattern); the beat format, the pattern and
// the mode encoding are this design's choices.
//
// Timing: clk is the 160 MHz clock, `beat` counts 0..3 within a bunch
// crossing, and bc_en (beat == 3) marks its last clock. Link words are sampled
// at the end of the crossing in which they are presented and are sent during
// the next crossing. Lane outputs change with `beat`.
module srl_chip
  import cpm_pkg::*;
#(
  parameter int unsigned N_CH  = LINKS_PER_SRL,
  parameter int unsigned DEPTH = PIPE_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              beat,
  input  srl_mode_e               mode,
  input  link_word_t              link_in  [N_CH],
  output lane_t                   lane_out [N_CH],
  // host access to the playback memory
  input  logic                    host_we,
  input  logic [AW-1:0]           host_addr,
  input  logic [N_CH*WORD_W-1:0]  host_data,
  // Level-1 readout
  input  logic                    l1a,
  input  logic [AW-1:0]           latency,
  input  logic                    ro_pop,
  output logic [N_CH*WORD_W-1:0]  ro_data,
  output logic                    ro_valid,
  output logic                    ro_overflow
);
  logic                   bc_en;
  logic [N_CH*WORD_W-1:0] live, pb;
  logic [FRAME_W-1:0]     frame [N_CH];

  assign bc_en = (beat == 2'd3);

  always_comb
    for (int c = 0; c < N_CH; c++) live[c*WORD_W +: WORD_W] = link_in[c];

  l1_pipeline #(.W(N_CH*WORD_W), .DEPTH(DEPTH)) u_pipe (
    .clk, .rst_n, .bc_en,
    .din       (live),
    .freeze    (mode == SRL_PLAYBACK),
    .host_we, .host_addr, .host_data,
    .pb_dout   (pb),
    .l1a, .latency, .ro_pop, .ro_data, .ro_valid, .ro_overflow
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) frame[c] <= '0;
    end else if (bc_en) begin
      for (int c = 0; c < N_CH; c++)
        unique case (mode)
          SRL_PLAYBACK: frame[c] <= FRAME_W'(pb[c*WORD_W +: WORD_W]);
          SRL_CALIB:    frame[c] <= CAL_FRAME;
          default:      frame[c] <= FRAME_W'(live[c*WORD_W +: WORD_W]);
        endcase
    end
  end

  always_comb
    for (int c = 0; c < N_CH; c++) lane_out[c] = frame[c][beat*LANE_W +: LANE_W];

endmodule
