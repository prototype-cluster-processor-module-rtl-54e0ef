// tb_cp_window: random 4x4 windows against the reference algorithm.
// The window is clocked with bc_en held high, so each clock is one crossing;
// hits must appear exactly two crossings after the towers. Counts how often a
// local maximum was rejected, and how often e/gamma and tau sets fired.
module tb_cp_window;
  import cpm_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, bc_en = 1;
  tt_t em[4][4], had[4][4];
  thr_set_t thr[N_THR];
  hits_t hits;
  logic lmax;
  int checks = 0, failures = 0;
  int n_notmax = 0, n_em = 0, n_tau = 0, n_isoveto = 0;

  cp_window dut (.clk, .rst_n, .bc_en, .em, .had, .thr, .hits, .lmax);

  always #2 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hits_t exp_q[$];

  initial begin
    rand_thr(thr);
    foreach (em[i, j]) begin em[i][j] = 0; had[i][j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 4000; v++) begin
      bit lm;
      hits_t e;
      if (v % 500 == 0) rand_thr(thr);
      // mostly small towers, with a few large ones to make clusters and peaks
      foreach (em[i, j]) begin
        em[i][j]  = tt_t'($urandom_range(0, 99) < 25 ? $urandom_range(0, 255) : $urandom_range(0, 6));
        had[i][j] = tt_t'($urandom_range(0, 99) < 15 ? $urandom_range(0, 120) : $urandom_range(0, 4));
      end
      if (v % 2 == 0)                // favour a peak in the centre
        for (int i = 1; i < 3; i++)
          for (int j = 1; j < 3; j++) em[i][j] = tt_t'($urandom_range(20, 255));
      if (v % 7 == 0) begin          // exact ties with a neighbour RoI
        em[0][1] = em[2][1]; em[0][2] = em[2][2]; had[0][1] = had[2][1]; had[0][2] = had[2][2];
      end
      e = ref_window(em, had, thr, lm);
      exp_q.push_back(e);
      if (!lm) n_notmax++;
      for (int t = 0; t < N_THR; t++)
        if (e[t]) begin if (t >= 8 && thr[t].tau) n_tau++; else n_em++; end
      @(posedge clk);
      #0.5;
      if (exp_q.size() > 1) begin
        hits_t x;
        x = exp_q.pop_front();
        checks++;
        if (hits !== x) begin
          failures++;
          if (failures < 10) $display("vector %0d: hits %h expected %h", v, hits, x);
        end
      end
      // lmax is one stage earlier than hits
      checks++;
      if (lmax !== lm) begin
        failures++;
        if (failures < 10) $display("vector %0d: lmax %b", v, lmax);
      end
    end
    $display("not a local maximum %0d, e/gamma hits %0d, tau hits %0d", n_notmax, n_em, n_tau);
    if (n_notmax == 0 || n_em == 0 || n_tau == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
