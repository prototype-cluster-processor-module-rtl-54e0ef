// l1_pipeline: Level-1 pipeline memory with a readout buffer.
//
// Every bunch-crossing tick (bc_en) the word on din is written at the write
// pointer, which then advances; the memory therefore holds the last DEPTH
// ticks of data while the Level-1 decision is being made (2 us = 80 ticks in
// the document; DEPTH = 128 is this design's choice). When l1a is high on a
// tick, the entry written `latency` ticks earlier (latency = 1 is the entry
// written on the previous tick) is copied into a small readout FIFO, from
// which a readout controller pops it (ro_valid / ro_pop, first-word
// fall-through, one pop per clock).
//
// The same memory serves as the SRL chip's playback memory: with freeze high
// no live data is written, the pointer keeps cycling and pb_dout gives the
// entry at the write pointer, so the stored sequence is replayed over and
// over. A host port (host_we/addr/data) loads it; a host write wins over a
// live write to the same tick.
//
// The document says the SRL has a playback memory that is also the pipeline
// memory and that the ROC empties the pipelines of the SRL and CP chips; the
// pointer scheme, FIFO depth and overflow flag are this design's choices.
module l1_pipeline #(
  parameter int unsigned W          = 40,
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bc_en,       // one clock per bunch crossing
  input  logic [W-1:0]  din,
  input  logic          freeze,      // playback: stop live writes
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_data,
  output logic [W-1:0]  pb_dout,     // entry at the write pointer
  input  logic          l1a,         // sampled with bc_en
  input  logic [AW-1:0] latency,
  input  logic          ro_pop,
  output logic [W-1:0]  ro_data,
  output logic          ro_valid,
  output logic          ro_overflow  // sticky: an L1A found the FIFO full
);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [W-1:0]  fifo [FIFO_DEPTH];
  logic [FW-1:0] f_wr, f_rd;
  logic [FW:0]   f_cnt;
  logic          push, pop;

  assign pb_dout  = mem[wr_ptr];
  assign ro_data  = fifo[f_rd];
  assign ro_valid = (f_cnt != 0);
  assign pop      = ro_pop && ro_valid;
  assign push     = bc_en && l1a && (f_cnt != (FW+1)'(FIFO_DEPTH) || pop);

  always_ff @(posedge clk) begin
    if (host_we)
      mem[host_addr] <= host_data;
    else if (bc_en && !freeze)
      mem[wr_ptr] <= din;
    if (push)
      fifo[f_wr] <= mem[AW'(wr_ptr - latency)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      f_wr        <= '0;
      f_rd        <= '0;
      f_cnt       <= '0;
      ro_overflow <= 1'b0;
    end else begin
      if (bc_en) wr_ptr <= wr_ptr + 1'b1;
      if (push)  f_wr   <= (f_wr == FW'(FIFO_DEPTH-1)) ? '0 : f_wr + 1'b1;
      if (pop)   f_rd   <= (f_rd == FW'(FIFO_DEPTH-1)) ? '0 : f_rd + 1'b1;
      f_cnt <= f_cnt + (FW+1)'(push) - (FW+1)'(pop);
      if (bc_en && l1a && !push) ro_overflow <= 1'b1;
    end
  end

endmodule
