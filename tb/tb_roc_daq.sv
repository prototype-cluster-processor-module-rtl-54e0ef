// tb_roc_daq: the DAQ readout controller with 20 modelled SRL readout
// buffers. Multiplicities change every crossing; L1As are issued with a
// latency, and each SRL buffer is loaded with four known words for the same
// accept. The G-link stream (one word per crossing) must be: header with the
// event number, 80 link words in order, three multiplicity words holding the
// multiplicities of the accepted crossing, trailer with the count 83. Also
// checks that every SRL buffer was popped exactly once per event.
module tb_roc_daq;
  import cpm_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 20, CH = 4, LAT = 12;
  logic clk = 0, rst_n = 0;
  logic [1:0] beat = 0;
  logic l1a = 0;
  logic [6:0] latency = 7'(LAT);
  logic [47:0] mult_in = 0;
  logic [CH*WORD_W-1:0] src_data [NS];
  logic src_valid [NS], src_pop [NS];
  logic [GL_W-1:0] gl_data;
  logic gl_dav, gl_cntl, overflow;
  int checks = 0, failures = 0, n_events = 0;

  roc_daq dut (.*);

  always #2 clk = ~clk;
  always_ff @(posedge clk) if (rst_n) beat <= beat + 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SRL buffer models
  logic [CH*WORD_W-1:0] q [NS][$];
  always_comb
    for (int s = 0; s < NS; s++) begin
      src_valid[s] = q[s].size() > 0;
      src_data[s]  = src_valid[s] ? q[s][0] : '0;
    end
  always @(posedge clk)
    for (int s = 0; s < NS; s++)
      if (src_pop[s]) begin
        if (q[s].size() == 0) begin failures++; $display("pop of empty SRL %0d", s); end
        else void'(q[s].pop_front());
      end

  logic [47:0] mult_hist [int];
  logic [15:0] exp_stream [$];
  bit          exp_cntl [$];
  int n = 0;

  // crossing counter and stimulus
  always @(posedge clk) if (rst_n && beat == 2'd3) n <= n + 1;

  initial begin
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int e = 0; e < 6; e++) begin
      // run some crossings with changing multiplicities
      repeat ($urandom_range(LAT + 2, LAT + 40)) begin
        @(negedge clk);
        while (beat != 2'd0) @(negedge clk);
        mult_in = {$urandom, $urandom};
        mult_hist[n] = mult_in;
      end
      // accept at the end of this crossing
      while (beat != 2'd3) @(negedge clk);
      l1a = 1;
      begin
        logic [47:0] mm;
        mm = mult_hist[n - LAT];
        exp_stream.push_back(16'(e)); exp_cntl.push_back(1);
        for (int s = 0; s < NS; s++) begin
          logic [CH*WORD_W-1:0] d;
          d = {$urandom, $urandom};
          q[s].push_back(d);
          for (int c = 0; c < CH; c++) begin
            exp_stream.push_back(16'(d[c*WORD_W +: WORD_W])); exp_cntl.push_back(0);
          end
        end
        for (int i = 0; i < 3; i++) begin
          exp_stream.push_back(mm[i*16 +: 16]); exp_cntl.push_back(0);
        end
        exp_stream.push_back(16'd83); exp_cntl.push_back(1);
      end
      @(negedge clk) l1a = 0;
    end
    // wait for the stream to drain
    for (int i = 0; i < 2000 && exp_stream.size() > 0; i++) @(negedge clk);
    checks++;
    if (exp_stream.size() != 0) begin failures++; $display("%0d words missing", exp_stream.size()); end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (q[s].size() != 0) begin failures++; $display("SRL %0d not emptied", s); end
    end
    $display("events %0d", n_events);
    if (n_events != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // G-link monitor: one word per crossing, sampled at beat 1
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
        if (xc && x == 16'd83) n_events++;
      end
    end
endmodule
