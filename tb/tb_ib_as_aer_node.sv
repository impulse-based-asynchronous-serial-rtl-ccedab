// tb_ib_as_aer_node: end-to-end test of one link end with its transmitter
// looped back to its receiver, at the default (16-bit) configuration.
//
// The transmitter runs on its own 100/200 MHz clock pair, scaled by a skew
// factor; the receiver on an independent 100/300 MHz pair. Phases:
//   1. random events with pauses and a slow sink on the receiver side, so
//      that frames start both after idle and back to back, and the
//      transmitter holds off its source (dst_rdy low);
//   2. a continuous run whose event rate is checked against the 5.5 Meps
//      reported for 16-bit events at 100 Mbps;
//   3. a sweep of the transmitter/receiver clock difference over the points
//      of the published error-rate curve (-7..+7 %); events must arrive
//      without error within +-2 %, and the error rate is printed per point;
//   4. faults injected on the line in place of the transmitter: wrong
//      parity, an illegal interval, a cut frame (timeout), a burst that
//      overfills the interval FIFO, and a receiver sink that stops (SPAER
//      overflow).
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_ib_as_aer_node;
  localparam int AE_W = 16, NSYM = AE_W / 2;
  logic rst = 0;
  logic tx_clk = 0, tx_pulse_clk = 0;
  logic [AE_W-1:0] tx_ae = 0;
  logic tx_src_rdy = 0, tx_dst_rdy, tx_pulse, tx_busy, tx_frame_start, tx_frame_end;
  logic rx_pulse, rx_hsclk_p = 0, rx_hsclk_n = 1, rx_lsclk = 0;
  logic [AE_W-1:0] rx_ae;
  logic rx_src_rdy, rx_dst_rdy = 1, rx_alive, rx_idle, rx_error, rx_timeout, rx_overflow;
  int checks = 0, failures = 0;

  ib_as_aer_node dut (.*);

  // line: loop-back, or the test's own pulse generator
  logic inject = 0, inj_pulse = 0;
  assign rx_pulse = inject ? inj_pulse : tx_pulse;

  // clocks
  real tx_scale = 1.0;
  initial forever begin
    #(2.5 * tx_scale) tx_pulse_clk = 1; tx_clk = ~tx_clk;
    #(2.5 * tx_scale) tx_pulse_clk = 0;
  end
  always #(10.0 / 6) begin rx_hsclk_p = ~rx_hsclk_p; rx_hsclk_n = ~rx_hsclk_n; end
  initial begin #0.9; forever #5 rx_lsclk = ~rx_lsclk; end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- receive side checking
  logic [AE_W-1:0] expq[$];
  int n_rx = 0, n_bad = 0;
  int n_err = 0, n_tmo = 0, n_ovf = 0, n_fifo_ovf = 0;
  bit strict = 1;     // every event must arrive unchanged
  always @(posedge rx_lsclk) if (!rst) begin
    if (rx_error) n_err++;
    if (rx_timeout) n_tmo++;
    if (rx_overflow) n_ovf++;
    if (rx_src_rdy && rx_dst_rdy) begin
      n_rx++;
      if (expq.size() != 0 && rx_ae == expq[0]) void'(expq.pop_front());
      else begin
        n_bad++;
        if (strict) begin
          checks++; failures++;
          $display("%0t event %h unexpected", $realtime, rx_ae);
        end
      end
      if (strict) checks++;
    end
  end
  always @(posedge dut.u_rx.hsclk_p) if (!rst && dut.u_rx.fifo_ovf) n_fifo_ovf++;

  // ---- transmit side counters
  int n_start = 0, n_end = 0, n_stall = 0;
  always @(posedge tx_clk) if (!rst) begin
    if (tx_frame_start) n_start++;
    if (tx_frame_end) n_end++;
    if (tx_src_rdy && !tx_dst_rdy) n_stall++;
  end

  task automatic send(logic [AE_W-1:0] e);
    @(negedge tx_clk);
    tx_ae = e; tx_src_rdy = 1;
    do @(posedge tx_clk); while (!tx_dst_rdy);
    expq.push_back(e);
    #0.1 tx_src_rdy = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while (tx_busy || expq.size() != 0) begin
      #100;
      guard++;
      if (guard > 50) break;
    end
    #300;
  endtask

  // ---- injected faults
  task automatic ipulse();
    inj_pulse = 1; #2.5; inj_pulse = 0;
  endtask
  task automatic iwait(int u);
    #(u * 5.0 - 2.5);
  endtask

  int n_b2b;
  initial begin
    realtime t0, t1;
    #1 rst = 1;
    #100 rst = 0;
    #100;
    // 1. random traffic with pauses
    for (int i = 0; i < 200; i++) begin
      send(AE_W'($urandom));
      if ($urandom % 3 == 0) repeat ($urandom % 30) @(negedge tx_clk);
    end
    drain();
    checks++;
    if (expq.size() != 0) begin failures++; $display("phase 1 lost %0d", expq.size()); end

    // 2. continuous run
    fork begin @(posedge tx_frame_start); t0 = $realtime; end join_none
    begin
      int n0;
      n0 = n_end;
      for (int i = 0; i < 400; i++) send(AE_W'($urandom));
      wait (n_end == n0 + 400);
      t1 = $realtime;
    end
    drain();
    begin
      real rate;
      rate = 400.0 / ((t1 - t0) * 1.0e-9);
      $display("continuous 16-bit event rate %0.2f Meps", rate / 1.0e6);
      checks++;
      if (rate < 5.5e6) failures++;
    end
    checks++;
    if (expq.size() != 0 || n_err != 0 || n_tmo != 0) begin
      failures++;
      $display("phase 2: lost %0d errors %0d timeouts %0d", expq.size(), n_err, n_tmo);
    end

    // 3. clock difference sweep
    begin
      int pts[7] = '{-7, -5, -2, 0, 2, 5, 7};
      strict = 0;
      foreach (pts[k]) begin
        int rx0, bad0, err0, tmo0, nsend;
        nsend = 300;
        // a faster transmitter clock means a shorter period
        tx_scale = 1.0 / (1.0 + pts[k] / 100.0);
        #200;
        rx0 = n_rx; bad0 = n_bad; err0 = n_err; tmo0 = n_tmo;
        expq.delete();
        for (int i = 0; i < nsend; i++) send(AE_W'($urandom));
        drain();
        begin
          int lost;
          lost = nsend - ((n_rx - rx0) - (n_bad - bad0));
          $display("clock difference %0d %%: %0d of %0d events not received correctly (%0.2f %%)",
                   pts[k], lost, nsend, 100.0 * lost / nsend);
          if (pts[k] >= -2 && pts[k] <= 2) begin
            checks++;
            if (lost != 0 || n_err != err0 || n_tmo != tmo0) failures++;
          end
        end
        expq.delete();
        // let the receiver settle before the next point
        #500;
      end
      tx_scale = 1.0;
      strict = 1;
      #500;
    end

    // 4. injected faults
    inject = 1;
    #200;
    begin
      int e0, t0i, o0, f0;
      logic [AE_W-1:0] e;
      // wrong parity
      e0 = n_err;
      e = AE_W'($urandom);
      ipulse();
      for (int i = NSYM - 1; i >= 0; i--) begin iwait(2 + int'(e[2*i +: 2])); ipulse(); end
      iwait(6 + int'(~^e)); ipulse();
      #400;
      checks++; if (n_err - e0 != 1) begin failures++; $display("parity error not seen"); end
      // illegal interval
      e0 = n_err;
      ipulse(); iwait(3); ipulse(); iwait(1); ipulse();
      #400;
      checks++; if (n_err - e0 != 1) begin failures++; $display("illegal interval not seen"); end
      // cut frame
      t0i = n_tmo;
      ipulse(); iwait(4); ipulse(); iwait(5); ipulse();
      #400;
      checks++; if (n_tmo - t0i != 1) begin failures++; $display("timeout not seen"); end
      // FIFO overflow
      f0 = n_fifo_ovf; e0 = n_err;
      repeat (80) begin ipulse(); #2.5; end
      #600;
      checks++; if (n_fifo_ovf == f0 || n_err == e0) begin failures++; $display("fifo overflow not seen"); end
      // SPAER overflow: two frames while the sink is stopped
      o0 = n_ovf;
      @(negedge rx_lsclk) rx_dst_rdy = 0;
      e = AE_W'($urandom);
      expq.push_back(e);
      ipulse();
      for (int i = NSYM - 1; i >= 0; i--) begin iwait(2 + int'(e[2*i +: 2])); ipulse(); end
      iwait(6 + int'(^e)); ipulse();
      e = AE_W'($urandom);
      for (int i = NSYM - 1; i >= 0; i--) begin iwait(2 + int'(e[2*i +: 2])); ipulse(); end
      iwait(6 + int'(^e)); ipulse();
      #400;
      @(negedge rx_lsclk) rx_dst_rdy = 1;
      #100;
      checks++; if (n_ovf - o0 != 1 || expq.size() != 0) begin failures++; $display("spaer overflow not seen"); end
    end
    inject = 0;

    // mechanism coverage
    n_b2b = n_end - n_start;
    $display("frames=%0d fresh_starts=%0d back_to_back=%0d tx_stall_cycles=%0d", n_end, n_start, n_b2b, n_stall);
    $display("rx errors=%0d timeouts=%0d spaer_overflows=%0d fifo_overflows=%0d", n_err, n_tmo, n_ovf, n_fifo_ovf);
    checks++; if (n_start == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_err == 0) failures++;
    checks++; if (n_tmo == 0) failures++;
    checks++; if (n_ovf == 0) failures++;
    checks++; if (n_fifo_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
