// tb_roc_roi: the Level-2 readout controller with eight modelled CP chip
// readout buffers. Each event has a random, sparse set of windows with
// threshold bits; the G-link stream must be the header with the event
// number, for each such window (chip 0 window 0 first) its coordinate word
// {phi, eta} and its threshold bits, then the trailer with the RoI count.
// Includes events with no RoI and with all 64 windows set.
module tb_roc_roi;
  import cpm_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic [1:0] beat = 0;
  logic [N_WIN*N_THR-1:0] src_data [N_CP];
  logic src_valid [N_CP], src_pop [N_CP];
  logic [GL_W-1:0] gl_data;
  logic gl_dav, gl_cntl;
  int checks = 0, failures = 0, n_events = 0, n_rois = 0, n_cntl = 0;

  roc_roi dut (.*);

  always #2 clk = ~clk;
  always_ff @(posedge clk) if (rst_n) beat <= beat + 1'b1;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_WIN*N_THR-1:0] q [N_CP][$];
  always_comb
    for (int k = 0; k < N_CP; k++) begin
      src_valid[k] = q[k].size() > 0;
      src_data[k]  = src_valid[k] ? q[k][0] : '0;
    end
  always @(posedge clk)
    for (int k = 0; k < N_CP; k++)
      if (src_pop[k]) begin
        if (q[k].size() == 0) begin failures++; $display("pop of empty chip %0d", k); end
        else void'(q[k].pop_front());
      end

  logic [15:0] exp_stream [$];
  bit          exp_cntl [$];

  initial begin
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int e = 0; e < 10; e++) begin
      int cnt;
      int dens;
      cnt = 0;
      dens = (e == 3) ? 0 : (e == 5) ? 100 : 10;
      exp_stream.push_back(16'(e)); exp_cntl.push_back(1);
      for (int k = 0; k < N_CP; k++) begin
        logic [N_WIN*N_THR-1:0] d;
        for (int w = 0; w < N_WIN; w++) begin
          hits_t h;
          h = ($urandom_range(0, 99) < dens) ? hits_t'($urandom_range(1, 65535)) : '0;
          d[w*N_THR +: N_THR] = h;
          if (h != 0) begin
            exp_stream.push_back({8'h00, 4'(2*k + w/4), 2'b00, 2'(w%4)}); exp_cntl.push_back(0);
            exp_stream.push_back(h); exp_cntl.push_back(0);
            cnt++;
          end
        end
        @(negedge clk);
        q[k].push_back(d);
      end
      n_rois += cnt;
      exp_stream.push_back(16'(cnt)); exp_cntl.push_back(1);
      repeat ($urandom_range(0, 100)) @(negedge clk);
    end
    for (int i = 0; i < 20000 && exp_stream.size() > 0; i++) @(negedge clk);
    checks++;
    if (exp_stream.size() != 0) begin failures++; $display("%0d words missing", exp_stream.size()); end
    for (int k = 0; k < N_CP; k++) begin
      checks++;
      if (q[k].size() != 0) begin failures++; $display("chip %0d not emptied", k); end
    end
    $display("events %0d, RoIs %0d", n_events, n_rois);
    if (n_events != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && beat == 2'd1 && gl_dav) begin
      checks++;
      if (exp_stream.size() == 0) begin
        failures++; $display("unexpected word %h", gl_data);
      end else begin
        logic [15:0] x;
        bit xc;
        x = exp_stream.pop_front();
        xc = exp_cntl.pop_front();
        if (gl_data !== x || gl_cntl !== xc) begin
          failures++;
          if (failures < 10) $display("G-link %h/%b expected %h/%b", gl_data, gl_cntl, x, xc);
        end
        if (xc) n_cntl++;
        n_events = n_cntl / 2;
      end
    end
endmodule
