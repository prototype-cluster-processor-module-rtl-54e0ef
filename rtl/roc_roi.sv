// roc_roi: readout controller for the Level-2 path (regions of interest).
//
// On every Level-1 accept each CP chip copies its window results of the
// selected crossing into its readout buffer. When all eight buffers hold an
// event, this controller scans the 64 windows, chip 0 window 0 first, and for
// every window that passed at least one threshold set sends two G-link words,
// its coordinates and its threshold bits:
//   header   cntl=1  event number (counts events sent, from 0)
//   per RoI  {8'h00, phi[3:0], 2'b00, eta[1:0]}   then   hits[15:0]
//   trailer  cntl=1  number of RoIs
// then pops all eight buffers. eta (0..3) and phi (0..15) are the position of
// the window's reference tower among the module's 4 x 16 core towers. The
// document says this controller sends RoI coordinates and passed thresholds to
// Level-2 over G-link; the word layout and the scan order are this design's
// choices.
//
// Timing: clk = 160 MHz, beat 0..3; one scan step or one word per crossing.
module roc_roi
  import cpm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              beat,
  input  logic [N_WIN*N_THR-1:0]  src_data  [N_CP],
  input  logic                    src_valid [N_CP],
  output logic                    src_pop   [N_CP],
  output logic [GL_W-1:0]         gl_data,
  output logic                    gl_dav,
  output logic                    gl_cntl
);
  localparam int unsigned N_ALL = N_CP * N_WIN;   // 64
  localparam int unsigned IW    = $clog2(N_ALL);

  typedef enum logic [2:0] {IDLE, HEAD, SCAN, HITS, TRAIL} state_e;

  logic          bc_en, all_valid;
  state_e        state;
  logic [IW-1:0] idx;
  logic [GL_W-1:0] evnum, nroi;
  hits_t         cur;
  logic [2:0]    chip, win;

  assign bc_en = (beat == 2'd3);
  assign chip  = idx[5:3];
  assign win   = idx[2:0];
  assign cur   = src_data[chip][win * N_THR +: N_THR];

  always_comb begin
    all_valid = 1'b1;
    for (int k = 0; k < N_CP; k++) begin
      all_valid &= src_valid[k];
      src_pop[k] = bc_en && state == TRAIL;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      idx     <= '0;
      evnum   <= '0;
      nroi    <= '0;
      gl_data <= '0;
      gl_dav  <= 1'b0;
      gl_cntl <= 1'b0;
    end else if (bc_en) begin
      gl_dav  <= 1'b0;
      gl_cntl <= 1'b0;
      unique case (state)
        IDLE: if (all_valid) state <= HEAD;
        HEAD: begin
          gl_data <= evnum;
          gl_dav  <= 1'b1;
          gl_cntl <= 1'b1;
          idx     <= '0;
          nroi    <= '0;
          state   <= SCAN;
        end
        SCAN: begin
          if (cur != '0) begin
            // phi = 2*chip + window row, eta = window column
            gl_data <= {8'h00, chip, win[2], 2'b00, win[1:0]};
            gl_dav  <= 1'b1;
            state   <= HITS;
          end else if (idx == IW'(N_ALL - 1)) begin
            state <= TRAIL;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        HITS: begin
          gl_data <= cur;
          gl_dav  <= 1'b1;
          nroi    <= nroi + 1'b1;
          if (idx == IW'(N_ALL - 1)) state <= TRAIL;
          else begin
            idx   <= idx + 1'b1;
            state <= SCAN;
          end
        end
        TRAIL: begin
          gl_data <= nroi;
          gl_dav  <= 1'b1;
          gl_cntl <= 1'b1;
          evnum   <= evnum + 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
