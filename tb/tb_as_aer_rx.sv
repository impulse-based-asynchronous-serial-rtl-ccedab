// tb_as_aer_rx: self-checking test of the complete receiver.
// Receiver clocks: 100 MHz low-speed and 300 MHz high-speed (complementary
// pair). A pulse-train generator written here produces 2.5 ns pulses at the
// spacings of the interval code, with a transmitter time unit of
// 5 ns * (1 + skew) for several skews within +-1.5 %, and free phase to the
// receiver clocks. Cases: single frames after a pause, back-to-back bursts,
// a wrong parity, an illegal (too short) interval, a frame cut short
// (timeout), a fast burst that overfills the interval FIFO, and events left
// waiting at the SPAER output (overflow). Received events are compared with
// the good frames sent; each error case must raise its status output.
module tb_as_aer_rx;
  localparam int AE_W = 16, NSYM = AE_W / 2;
  logic pulse_in = 0, hsclk_p = 0, hsclk_n = 1, lsclk = 0, rst = 0;
  logic [AE_W-1:0] ae;
  logic src_rdy, dst_rdy = 1, alive, idle, error, timeout, overflow;
  int checks = 0, failures = 0;

  as_aer_rx #(.AE_W(AE_W)) dut (.*);

  always #(10.0 / 6) begin hsclk_p = ~hsclk_p; hsclk_n = ~hsclk_n; end
  initial begin #0.7; forever #5 lsclk = ~lsclk; end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- pulse generation
  real unit_ns = 5.0;
  task automatic pulse();
    pulse_in = 1; #2.5; pulse_in = 0;
  endtask
  task automatic wait_units(int u);
    #(u * unit_ns - 2.5);
  endtask
  // one frame, starting from the reference pulse already sent
  task automatic frame_body(logic [AE_W-1:0] e, logic bad_par);
    for (int i = NSYM - 1; i >= 0; i--) begin wait_units(2 + int'(e[2*i +: 2])); pulse(); end
    wait_units(6 + int'((^e) ^ bad_par)); pulse();
  endtask

  // ---- monitors
  logic [AE_W-1:0] expq[$];
  int n_err = 0, n_tmo = 0, n_ovf = 0, n_alive = 0, n_rx = 0;
  always @(posedge lsclk) if (!rst) begin
    if (error) n_err++;
    if (timeout) n_tmo++;
    if (overflow) n_ovf++;
    if (alive) n_alive++;
    if (src_rdy && dst_rdy) begin
      checks++;
      n_rx++;
      if (expq.size() == 0 || ae != expq[0]) begin
        failures++;
        $display("%0t event %h unexpected", $realtime, ae);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  task automatic settle();
    #400;
  endtask
  task automatic expect_status(int e0, int t0, int o0, int de, int dt, int dov, string what);
    checks++;
    if (n_err - e0 != de || n_tmo - t0 != dt || (dov >= 0 && n_ovf - o0 != dov)) begin
      failures++;
      $display("%s: error %0d timeout %0d overflow %0d", what, n_err - e0, n_tmo - t0, n_ovf - o0);
    end
  endtask

  int n_good = 0;
  initial begin
    real skews[5] = '{0.0, 0.015, -0.015, 0.01, -0.01};
    #1 rst = 1;
    #100 rst = 0;
    #50;
    checks++; if (!idle) failures++;
    foreach (skews[si]) begin
      unit_ns = 5.0 * (1.0 + skews[si]);
      for (int it = 0; it < 40; it++) begin
        int e0, t0, o0, kind;
        logic [AE_W-1:0] e;
        e0 = n_err; t0 = n_tmo; o0 = n_ovf;
        kind = $urandom % 8;
        e = AE_W'($urandom);
        #(($urandom % 100) / 10.0);
        case (kind)
          0, 1, 2: begin // single frame
            pulse(); expq.push_back(e); frame_body(e, 0); n_good++;
            settle(); expect_status(e0, t0, o0, 0, 0, 0, "single");
            checks++; if (!idle) failures++;
          end
          3: begin // back-to-back burst
            pulse();
            for (int b = 0; b < 6; b++) begin
              e = AE_W'($urandom); expq.push_back(e); frame_body(e, 0); n_good++;
            end
            settle(); expect_status(e0, t0, o0, 0, 0, 0, "burst");
          end
          4: begin // wrong parity
            pulse(); frame_body(e, 1);
            settle(); expect_status(e0, t0, o0, 1, 0, 0, "parity");
          end
          5: begin // too short an interval inside a frame
            pulse(); wait_units(3); pulse(); wait_units(1); pulse();
            settle(); expect_status(e0, t0, o0, 1, 0, 0, "illegal");
          end
          6: begin // frame cut short
            pulse(); wait_units(4); pulse(); wait_units(2); pulse();
            settle(); expect_status(e0, t0, o0, 0, 1, 0, "cut");
          end
          default: begin // events pile up at the SPAER output
            @(negedge lsclk) dst_rdy = 0;
            pulse();
            expq.push_back(e); frame_body(e, 0); n_good++;
            e = AE_W'($urandom); frame_body(e, 0);
            settle();
            expect_status(e0, t0, o0, 0, 0, 1, "spaer overflow");
            @(negedge lsclk) dst_rdy = 1;
            #20;
          end
        endcase
      end
    end
    // interval FIFO overflow: pulses far faster than any legal code
    begin
      int e0, t0, o0;
      e0 = n_err; t0 = n_tmo; o0 = n_ovf;
      unit_ns = 5.0;
      repeat (80) begin pulse(); #2.5; end
      settle();
      checks++;
      if (n_err - e0 < 1) begin failures++; $display("fifo overflow not reported"); end
    end
    settle();
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events lost", expq.size()); end
    checks++;
    if (n_alive == 0) failures++;
    $display("good events %0d received %0d", n_good, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
