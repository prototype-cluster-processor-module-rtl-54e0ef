// tb_hit_merger: random window results from eight CP chips; the
// multiplicity of each set must appear two clocks after the inputs, equal to
// the number of windows that passed it, saturated at 7. Runs both the
// e/gamma merger (sets 0..7) and the second one (sets 8..15) and counts how
// often saturation happened.
module tb_hit_merger;
  import cpm_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  hits_t hits [N_CP][N_WIN];
  logic [MULT_W-1:0] mult0 [8], mult1 [8];
  logic sat0, sat1;
  int checks = 0, failures = 0, n_sat = 0, n_mid = 0;

  hit_merger #(.THR_BASE(0)) dut0 (.clk, .rst_n, .hits, .mult(mult0), .saturated(sat0));
  hit_merger #(.THR_BASE(8)) dut1 (.clk, .rst_n, .hits, .mult(mult1), .saturated(sat1));

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];      // 16 entries per vector

  initial begin
    foreach (hits[k, w]) hits[k][w] = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int v = 0; v < 2000; v++) begin
      int e[16];
      int density;
      density = $urandom_range(0, 30);     // percent of windows passing
      foreach (e[t]) e[t] = 0;
      foreach (hits[k, w])
        for (int t = 0; t < 16; t++) begin
          hits[k][w][t] = ($urandom_range(0, 99) < density);
          if (hits[k][w][t]) e[t]++;
        end
      for (int t = 0; t < 16; t++) exp_q.push_back(e[t]);
      @(posedge clk);
      #0.5;
      if (exp_q.size() > 16) begin
        int x[16];
        for (int t = 0; t < 16; t++) x[t] = exp_q.pop_front();
        for (int t = 0; t < 16; t++) begin
          int m;
          m = x[t] > 7 ? 7 : x[t];
          if (x[t] > 7) n_sat++;
          else if (x[t] > 0) n_mid++;
          checks++;
          if ((t < 8 ? mult0[t] : mult1[t-8]) !== MULT_W'(m)) begin
            failures++;
            if (failures < 10) $display("vector %0d set %0d: %0d expected %0d", v, t, t < 8 ? mult0[t] : mult1[t-8], m);
          end
        end
      end
    end
    $display("saturated counts %0d, counts 1..7 %0d", n_sat, n_mid);
    if (n_sat == 0 || n_mid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
