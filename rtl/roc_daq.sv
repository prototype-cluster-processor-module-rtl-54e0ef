// roc_daq: readout controller for the DAQ path.
//
// On every Level-1 accept the SRL chips copy the link words of the selected
// crossing into their readout buffers, and this controller copies the hit
// multiplicities of the same crossing from its own Level-1 pipeline. When
// every source holds an event, the controller sends it as one G-link frame,
// one 16-bit word per bunch crossing:
//   header   cntl=1  event number (counts events sent, from 0)
//   N_SRC*CH words   link word of SRL s channel c, zero-extended, s outer
//   MULT_WORDS words multiplicities, 16 bits each, sets 0.. upward
//   trailer  cntl=1  number of payload words
// and pops every source buffer. The document says the DAQ controller empties
// its local pipeline and the SRL pipelines, tags the event and sends it over
// G-link; the frame layout is this design's choice. gl_dav marks a valid word.
//
// Timing: clk = 160 MHz, beat 0..3; the state advances on the last clock of
// each crossing, so each word is held for one crossing.
//
// The local pipeline's playback output is left open: it is used for readout
// only.
module roc_daq
  import cpm_pkg::*;
#(
  parameter int unsigned N_SRC     = N_SRL,
  parameter int unsigned CH        = LINKS_PER_SRL,
  parameter int unsigned MULT_BITS = 2 * N_EM_ONLY * MULT_W,   // 48
  parameter int unsigned DEPTH     = PIPE_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            beat,
  input  logic                  l1a,
  input  logic [AW-1:0]         latency,
  input  logic [MULT_BITS-1:0]  mult_in,
  input  logic [CH*WORD_W-1:0]  src_data  [N_SRC],
  input  logic                  src_valid [N_SRC],
  output logic                  src_pop   [N_SRC],
  output logic [GL_W-1:0]       gl_data,
  output logic                  gl_dav,
  output logic                  gl_cntl,
  output logic                  overflow
);
  localparam int unsigned MULT_WORDS = (MULT_BITS + GL_W - 1) / GL_W;
  localparam int unsigned N_TT       = N_SRC * CH;
  localparam int unsigned IW         = $clog2(MULT_WORDS + 1);
  localparam int unsigned SW         = $clog2(N_SRC);
  localparam int unsigned CW         = (CH > 1) ? $clog2(CH) : 1;

  typedef enum logic [2:0] {IDLE, HEAD, TT, MULT, TRAIL} state_e;

  logic                  bc_en;
  state_e                state;
  logic [IW-1:0]         idx;     // multiplicity word
  logic [SW-1:0]         sidx;    // source
  logic [CW-1:0]         cidx;    // channel within the source
  logic [GL_W-1:0]       evnum;
  logic [MULT_BITS-1:0]  loc_data;
  logic                  loc_valid, loc_pop, all_valid;
  logic [MULT_WORDS*GL_W-1:0] mult_pad;

  assign bc_en    = (beat == 2'd3);
  assign mult_pad = (MULT_WORDS*GL_W)'(loc_data);

  l1_pipeline #(.W(MULT_BITS), .DEPTH(DEPTH)) u_pipe (
    .clk, .rst_n, .bc_en,
    .din       (mult_in),
    .freeze    (1'b0),
    .host_we   (1'b0),
    .host_addr ('0),
    .host_data ('0),
    .pb_dout   (),
    .l1a, .latency,
    .ro_pop    (loc_pop),
    .ro_data   (loc_data),
    .ro_valid  (loc_valid),
    .ro_overflow (overflow)
  );

  always_comb begin
    all_valid = loc_valid;
    for (int s = 0; s < N_SRC; s++) all_valid &= src_valid[s];
    for (int s = 0; s < N_SRC; s++)
      src_pop[s] = bc_en && state == TT && sidx == SW'(s) && cidx == CW'(CH - 1);
    loc_pop = bc_en && state == MULT && idx == IW'(MULT_WORDS - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      idx     <= '0;
      sidx    <= '0;
      cidx    <= '0;
      evnum   <= '0;
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
          sidx    <= '0;
          cidx    <= '0;
          state   <= TT;
        end
        TT: begin
          gl_data <= GL_W'(src_data[sidx][cidx * WORD_W +: WORD_W]);
          gl_dav  <= 1'b1;
          if (cidx == CW'(CH - 1)) begin
            cidx <= '0;
            if (sidx == SW'(N_SRC - 1)) state <= MULT;
            else                        sidx  <= sidx + 1'b1;
          end else begin
            cidx <= cidx + 1'b1;
          end
        end
        MULT: begin
          gl_data <= mult_pad[idx * GL_W +: GL_W];
          gl_dav  <= 1'b1;
          if (idx == IW'(MULT_WORDS - 1)) state <= TRAIL;
          else                            idx   <= idx + 1'b1;
        end
        TRAIL: begin
          gl_data <= GL_W'(N_TT + MULT_WORDS);
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
