// tb_ib_as_aer_link_test: runs the complete link-test system, at its
// default parameters (16-bit events), with the line looped back through a
// model of the optical path that can lose pulses.
//
// The transmitter side runs on a 100/200 MHz clock pair scaled by a skew
// factor, the receiver on an independent 100/300 MHz set. The system is
// reset before each run, so every counter is per run. Runs:
//   1. saturated generator (period 0): the link must carry every event
//      without error at no less than the 5.5 Meps reported for 16-bit
//      events at 100 Mbps, and the generator must drop the triggers that
//      come while the transmitter is busy;
//   2. slower trigger with jitter: the spacing between events must vary,
//      no trigger may be dropped, and no event lost;
//   3. transmitter clock 1.5 % fast and 1.5 % slow: still no errors;
//   4. transmitter clock 7 % slow, outside the tolerance: the checker must
//      count events not received correctly;
//   5. one pulse in 157 lost on the line: the checker must count damaged
//      or lost events and the receiver must flag errors, while
//      good + errors still accounts for every event sent.
// The number of events not received correctly is sent - good. Each
// mechanism is counted, and a failure is counted for any that never
// happened.
module tb_ib_as_aer_link_test;
  localparam int CNT_W = 33;
  logic rst = 0;
  logic tx_clk = 0, tx_pulse_clk = 0;
  logic rx_hsclk_p = 0, rx_hsclk_n = 1, rx_lsclk = 0;
  logic gen_enable = 0;
  logic [15:0] gen_period = 0, gen_jitter = 0;
  logic tx_pulse, rx_pulse;
  logic [CNT_W-1:0] gen_sent, gen_missed, chk_good, chk_lost, chk_corrupted, chk_resyncs;
  logic chk_mismatch, tx_busy, rx_alive, rx_idle, rx_error, rx_timeout;
  int checks = 0, failures = 0;

  ib_as_aer_link_test dut (.*);

  // clocks
  real tx_scale = 1.0;
  initial forever begin
    #(2.5 * tx_scale) tx_pulse_clk = 1; tx_clk = ~tx_clk;
    #(2.5 * tx_scale) tx_pulse_clk = 0;
  end
  always #(10.0 / 6) begin rx_hsclk_p = ~rx_hsclk_p; rx_hsclk_n = ~rx_hsclk_n; end
  initial begin #0.9; forever #5 rx_lsclk = ~rx_lsclk; end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // optical path model: passes pulses, or loses one in `drop_every`
  int drop_every = 0, n_pulses = 0, n_dropped = 0;
  bit drop_next = 0;
  assign rx_pulse = tx_pulse && !drop_next;
  always @(negedge tx_pulse) begin
    n_pulses++;
    if (drop_next) n_dropped++;
    drop_next = (drop_every != 0) && (n_pulses % drop_every == 0);
  end

  // spacing between handed-over events, in transmitter cycles
  int tx_cyc = 0, last_take = -1;
  int spacing [int];
  always @(posedge tx_clk) begin
    tx_cyc++;
    if (!rst && dut.tx_src_rdy && dut.tx_dst_rdy) begin
      if (last_take >= 0) spacing[tx_cyc - last_take] = 1;
      last_take = tx_cyc;
    end
  end

  int n_rx_err = 0;
  always @(posedge rx_lsclk) if (!rst && rx_error) n_rx_err++;

  // mechanism counters
  int m_missed = 0, m_jitter = 0, m_clean = 0, m_skew_ok = 0, m_skew_err = 0, m_line_err = 0;

  task automatic restart();
    gen_enable = 0;
    drop_every = 0;
    repeat (4) @(negedge rx_lsclk);
    rst = 1;
    repeat (6) @(negedge tx_clk);
    repeat (6) @(negedge rx_lsclk);
    rst = 0;
    last_take = -1;
    spacing.delete();
    n_rx_err = 0;
    repeat (30) @(negedge rx_lsclk);
  endtask

  // run until `n` events were sent, then let the link drain
  task automatic run(int n, int period, int jitter);
    gen_period = 16'(period);
    gen_jitter = 16'(jitter);
    @(negedge tx_clk);
    gen_enable = 1;
    while (gen_sent < CNT_W'(n)) @(negedge tx_clk);
    gen_enable = 0;
    repeat (200) @(negedge rx_lsclk);
  endtask

  function automatic longint errs();
    return longint'(gen_sent) - longint'(chk_good);
  endfunction

  task automatic expect_clean(string what);
    checks++;
    if (errs() != 0 || chk_lost != 0 || chk_corrupted != 0 || n_rx_err != 0) begin
      failures++;
      $display("%s: sent %0d good %0d lost %0d corrupted %0d rx errors %0d",
               what, gen_sent, chk_good, chk_lost, chk_corrupted, n_rx_err);
    end
  endtask

  initial begin
    realtime t0, t1;
    real meps, rate;
    // reset with an edge, for the asynchronously reset toggle flip-flop
    repeat (3) @(negedge rx_lsclk);

    // 1. saturated
    restart();
    gen_period = 0; gen_jitter = 0;
    @(negedge tx_clk);
    gen_enable = 1;
    wait (gen_sent == 1);
    t0 = $realtime;
    wait (gen_sent == 2001);
    t1 = $realtime;
    meps = 2000.0 / ((t1 - t0) * 1.0e-3);
    while (gen_sent < 3000) @(negedge tx_clk);
    gen_enable = 0;
    repeat (200) @(negedge rx_lsclk);
    $display("saturated: %0d events, %.2f Meps, %0d triggers dropped",
             gen_sent, meps, gen_missed);
    expect_clean("saturated");
    checks++;
    if (meps < 5.5) begin failures++; $display("rate below 5.5 Meps"); end
    if (gen_missed != 0) m_missed++;
    if (errs() == 0) m_clean++;

    // 2. slower, jittered trigger
    restart();
    run(1000, 40, 31);
    $display("jittered: %0d events, %0d distinct spacings, %0d dropped",
             gen_sent, spacing.num(), gen_missed);
    expect_clean("jittered");
    checks++;
    if (gen_missed != 0) begin failures++; $display("jittered run dropped triggers"); end
    if (spacing.num() > 8) m_jitter++;

    // 3. clock difference inside the tolerance
    for (int s = 0; s < 2; s++) begin
      tx_scale = (s == 0) ? 1.0 / 1.015 : 1.0 / 0.985;
      restart();
      run(1500, 0, 0);
      $display("tx clock %.1f %%: sent %0d good %0d", (1.0 / tx_scale - 1.0) * 100.0,
               gen_sent, chk_good);
      expect_clean("skew");
      if (errs() == 0) m_skew_ok++;
    end

    // 4. clock difference outside it
    tx_scale = 1.0 / 0.93;
    restart();
    run(600, 0, 0);
    rate = real'(errs()) / real'(gen_sent);
    $display("tx clock -7.0 %%: sent %0d good %0d lost %0d corrupted %0d resyncs %0d, error rate %.3f",
             gen_sent, chk_good, chk_lost, chk_corrupted, chk_resyncs, rate);
    checks++;
    if (errs() == 0) begin failures++; $display("no errors at -7 %%"); end
    else m_skew_err++;
    tx_scale = 1.0;

    // 5. pulses lost on the line
    restart();
    drop_every = 157;
    run(1500, 3, 7);
    drop_every = 0;
    $display("line loss: %0d pulses dropped, sent %0d good %0d lost %0d corrupted %0d resyncs %0d, rx errors %0d",
             n_dropped, gen_sent, chk_good, chk_lost, chk_corrupted, chk_resyncs, n_rx_err);
    checks++;
    if (errs() == 0 || n_rx_err == 0) begin
      failures++; $display("lost pulses went unnoticed");
    end else m_line_err++;
    checks++;
    if (chk_good > gen_sent) begin failures++; $display("more good events than sent"); end

    // every mechanism happened
    $display("mechanisms: dropped triggers %0d, jitter %0d, clean %0d, skew ok %0d, skew errors %0d, line errors %0d",
             m_missed, m_jitter, m_clean, m_skew_ok, m_skew_err, m_line_err);
    checks++;
    if (m_missed == 0 || m_jitter == 0 || m_clean == 0 || m_skew_ok != 2 ||
        m_skew_err == 0 || m_line_err == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
