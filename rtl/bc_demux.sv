// bc_demux: undoes the BC-multiplexing of one link.
//
// Two towers adjacent in phi (A and B) share a link. After bunch-crossing
// identification a tower with energy is always followed by an empty crossing,
// so the sender uses that empty slot: in crossing n it sends A(n) with the
// flag clear, and if B(n) is not zero it sends B(n) in crossing n+1 with the
// flag set. A word with the flag clear is therefore tower A of its own
// crossing; a word with the flag set is tower B of the crossing before. The
// document describes the idea of BC-mux; this flag meaning is this design's
// choice.
//
// Timing: words arrive one per crossing (bc_en); towers A and B of crossing n
// are presented together on tt_a / tt_b one crossing after word n+1 arrived,
// i.e. during crossing n+2 relative to word n. parity_err is raised for a
// crossing whose word n failed the odd-parity check.
module bc_demux
  import cpm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bc_en,
  input  link_word_t word,
  output tt_t        tt_a,
  output tt_t        tt_b,
  output logic       parity_err
);
  link_word_t prev;   // word of the previous crossing

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      tt_a       <= '0;
      tt_b       <= '0;
      parity_err <= 1'b0;
    end else if (bc_en) begin
      prev       <= word;
      tt_a       <= prev.bcmux ? '0 : prev.data;
      tt_b       <= word.bcmux ? word.data : '0;
      parity_err <= (prev.parity != odd_parity(prev.bcmux, prev.data));
    end
  end

endmodule
