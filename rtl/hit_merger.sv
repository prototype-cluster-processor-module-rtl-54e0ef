// hit_merger: Hit Merger chip, multiplicities of eight threshold sets.
//
// Each CPM has two Hit Mergers; merger h handles threshold sets 8h..8h+7
// (THR_BASE). For every set it counts how many of the 64 windows of the eight
// CP chips passed it and sends the count to the Common Merger Module as a
// 3-bit multiplicity, saturating at 7 as the document specifies.
//
// Timing: two register stages on the 160 MHz clock, i.e. the half bunch-
// crossing tick the document allows for merging: per-chip counts first, then
// the sum over chips with saturation. A change of the CP chip outputs appears
// on `mult` two clocks later. The split of the sets between the two chips and
// the two-stage adder are this design's choices.
module hit_merger
  import cpm_pkg::*;
#(
  parameter int unsigned THR_BASE = 0,
  parameter int unsigned N_SETS   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  hits_t       hits [N_CP][N_WIN],
  output logic [MULT_W-1:0] mult [N_SETS],
  output logic        saturated          // some count was above 7
);
  localparam int unsigned CW = $clog2(N_WIN + 1);          // 0..8
  localparam int unsigned TW = $clog2(N_CP * N_WIN + 1);   // 0..64

  logic [CW-1:0] chip_cnt [N_CP][N_SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_CP; k++)
        for (int s = 0; s < N_SETS; s++) chip_cnt[k][s] <= '0;
    end else begin
      for (int k = 0; k < N_CP; k++)
        for (int s = 0; s < N_SETS; s++) begin
          logic [CW-1:0] c;
          c = '0;
          for (int w = 0; w < N_WIN; w++) c += CW'(hits[k][w][THR_BASE + s]);
          chip_cnt[k][s] <= c;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SETS; s++) mult[s] <= '0;
      saturated <= 1'b0;
    end else begin
      logic sat;
      sat = 1'b0;
      for (int s = 0; s < N_SETS; s++) begin
        logic [TW-1:0] t;
        t = '0;
        for (int k = 0; k < N_CP; k++) t += TW'(chip_cnt[k][s]);
        if (t > TW'(7)) begin
          mult[s] <= '1;
          sat = 1'b1;
        end else begin
          mult[s] <= MULT_W'(t);
        end
      end
      saturated <= sat;
    end
  end

endmodule
