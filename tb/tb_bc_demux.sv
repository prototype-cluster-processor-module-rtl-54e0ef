// tb_bc_demux: BC-muxed words from the sender model into the demultiplexer.
// bc_en is held high, so each clock is a crossing. Towers of crossing n must
// appear right after the clock edge that takes in the word of crossing n+1.
// Some words get a wrong parity bit, which must be flagged for the crossing
// of that word. Counts how often tower B used the following slot.
module tb_bc_demux;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, bc_en = 1;
  link_word_t word;
  tt_t tt_a, tt_b;
  logic parity_err;
  int checks = 0, failures = 0;

  bc_demux dut (.clk, .rst_n, .bc_en, .word, .tt_a, .tt_b, .parity_err);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    BcMux    mux;
    TowerGen gen;
    tt_t a_q[$], b_q[$];
    bit  e_q[$];
    int  n_err = 0;
    mux = new(1);
    gen = new(1, 40);
    word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      tt_t a, b;
      bit bad;
      gen.next(0, a, b);
      word = mux.enc(0, a, b);
      bad = ($urandom_range(0, 49) == 0);
      if (bad) begin word.parity = ~word.parity; n_err++; end
      a_q.push_back(a); b_q.push_back(b); e_q.push_back(bad);
      @(posedge clk);
      #0.5;
      if (a_q.size() > 1) begin
        tt_t ea, eb;
        bit ee;
        ea = a_q.pop_front(); eb = b_q.pop_front(); ee = e_q.pop_front();
        checks++;
        if (tt_a !== ea || tt_b !== eb || parity_err !== ee) begin
          failures++;
          if (failures < 10)
            $display("crossing %0d: got %0d/%0d/%b expected %0d/%0d/%b", n - 1, tt_a, tt_b, parity_err, ea, eb, ee);
        end
      end
    end
    $display("B sent in following slot %0d times, lost %0d, parity errors %0d", mux.pairs_sent, mux.lost, n_err);
    if (mux.pairs_sent == 0 || mux.lost != 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
