// tb_workload_32bit: the 32-bit configuration of a link end, transmitter
// looped back to receiver, run with the source always ready. Checks that
// every event arrives unchanged and that the event rate reaches the
// 2.9 Meps the document reports for 32-bit events at 100 Mbps (random data
// average here: 16 symbols of 3.5 units plus a 6.5-unit close, 312.5 ns).
module tb_workload_32bit;
  localparam int AE_W = 32;
  localparam int NEV  = 400;
  logic rst = 0;
  logic tx_clk = 0, tx_pulse_clk = 0;
  logic [AE_W-1:0] tx_ae = 0;
  logic tx_src_rdy = 0, tx_dst_rdy, tx_pulse, tx_busy, tx_frame_start, tx_frame_end;
  logic rx_hsclk_p = 0, rx_hsclk_n = 1, rx_lsclk = 0;
  logic [AE_W-1:0] rx_ae;
  logic rx_src_rdy, rx_dst_rdy = 1, rx_alive, rx_idle, rx_error, rx_timeout, rx_overflow;
  int checks = 0, failures = 0;

  ib_as_aer_node #(.AE_W(AE_W)) dut (.*, .rx_pulse(tx_pulse));

  initial forever begin
    #2.5 tx_pulse_clk = 1; tx_clk = ~tx_clk;
    #2.5 tx_pulse_clk = 0;
  end
  always #(10.0 / 6) begin rx_hsclk_p = ~rx_hsclk_p; rx_hsclk_n = ~rx_hsclk_n; end
  initial begin #0.9; forever #5 rx_lsclk = ~rx_lsclk; end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AE_W-1:0] expq[$];
  int n_rx = 0, n_err = 0, n_end = 0;
  always @(posedge rx_lsclk) if (!rst) begin
    if (rx_error || rx_timeout || rx_overflow) n_err++;
    if (rx_src_rdy && rx_dst_rdy) begin
      checks++;
      n_rx++;
      if (expq.size() == 0 || rx_ae != expq[0]) failures++;
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end
  always @(posedge tx_clk) if (!rst && tx_frame_end) n_end++;

  initial begin
    realtime t0, t1;
    #1 rst = 1;
    #100 rst = 0;
    #100;
    fork begin @(posedge tx_frame_start); t0 = $realtime; end join_none
    for (int i = 0; i < NEV; i++) begin
      logic [AE_W-1:0] e;
      e = $urandom;
      @(negedge tx_clk);
      tx_ae = e; tx_src_rdy = 1;
      do @(posedge tx_clk); while (!tx_dst_rdy);
      expq.push_back(e);
      #0.1 tx_src_rdy = 0;
    end
    wait (n_end == NEV);
    t1 = $realtime;
    #1000;
    begin
      real rate;
      rate = NEV / ((t1 - t0) * 1.0e-9);
      $display("32-bit event rate %0.2f Meps, received %0d, errors %0d", rate / 1.0e6, n_rx, n_err);
      checks++; if (rate < 2.9e6) failures++;
    end
    checks++; if (n_rx != NEV || expq.size() != 0 || n_err != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
