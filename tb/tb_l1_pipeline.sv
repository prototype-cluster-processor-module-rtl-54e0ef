// tb_l1_pipeline: writes a counting pattern each crossing (bc_en every 4th
// clock), raises L1A at random crossings with random latencies and checks
// that the readout FIFO returns the word written `latency` crossings before.
// Also fills the FIFO past its depth to see the overflow flag, and loads the
// memory through the host port, freezes it and checks the replayed sequence.
module tb_l1_pipeline;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 16, DEPTH = 128, FD = 8;
  logic clk = 0, rst_n = 0, bc_en = 0, freeze = 0, host_we = 0, l1a = 0, ro_pop = 0;
  logic [6:0] host_addr = 0, latency = 0;
  logic [W-1:0] din = 0, host_data = 0, pb_dout, ro_data;
  logic ro_valid, ro_overflow;
  int checks = 0, failures = 0;

  l1_pipeline #(.W(W), .DEPTH(DEPTH), .FIFO_DEPTH(FD)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;                       // crossing number; din = n during crossing n
  int exp_q[$];

  task automatic tick(input bit do_l1a, input int lat);
    din = W'(n * 7 + 3);
    repeat (3) @(posedge clk);
    #0.5;
    bc_en = 1; l1a = do_l1a; latency = 7'(lat);
    if (do_l1a) exp_q.push_back((n - lat) * 7 + 3);
    @(posedge clk);
    #0.5;
    bc_en = 0; l1a = 0;
    n++;
  endtask

  task automatic drain();
    while (exp_q.size() > 0) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (!ro_valid || ro_data !== W'(e)) begin
        failures++;
        if (failures < 10) $display("readout %h valid %b expected %h", ro_data, ro_valid, W'(e));
      end
      ro_pop = 1;
      @(posedge clk);
      #0.5;
      ro_pop = 0;
    end
    checks++;
    if (ro_valid) begin failures++; $display("FIFO not empty after drain"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int i = 0; i < 130; i++) tick(0, 0);
    for (int i = 0; i < 400; i++) begin
      bit t;
      t = ($urandom_range(0, 9) == 0);
      tick(t, $urandom_range(1, 100));
      if (exp_q.size() > 5) drain();
    end
    drain();
    checks++;
    if (ro_overflow) begin failures++; $display("unexpected overflow"); end
    // overflow: FD + 1 accepts without popping
    for (int i = 0; i < FD + 1; i++) tick(1, 5);
    checks++;
    if (!ro_overflow) begin failures++; $display("overflow not flagged"); end
    void'(exp_q.pop_back());       // the last accept was dropped
    drain();
    // playback: load 0..DEPTH-1 with a pattern and replay it
    freeze = 1;
    for (int a = 0; a < DEPTH; a++) begin
      host_we = 1; host_addr = 7'(a); host_data = W'(16'hA000 + a);
      @(posedge clk);
      #0.5;
    end
    host_we = 0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      logic [6:0] p;
      p = dut.wr_ptr;
      checks++;
      if (pb_dout !== W'(16'hA000 + p)) begin
        failures++;
        if (failures < 10) $display("playback %h at %0d", pb_dout, p);
      end
      tick(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
