// tb_as_aer_tx: self-checking test of the complete transmitter.
// Clocks: 100 MHz base clock and phase-aligned 200 MHz pulse clock. Random
// events are offered with random pauses, then a long run with the source
// always ready. The output pulses are timed, every pulse must be 2.5 ns wide,
// and the pulse spacings (rounded to 5 ns units) are decoded here with the
// interval code (long gap = reference, 2..5 = symbol, 6/7 = close with even
// parity) and compared with the events sent. The continuous run checks the
// event rate for random 16-bit events against the 5.5 Meps the document
// reports at 100 Mbps.
module tb_as_aer_tx;
  localparam int AE_W = 16, NSYM = AE_W / 2;
  localparam int NEV1 = 150, NEV2 = 300;
  logic clk = 0, pulse_clk = 0, rst = 1;
  logic [AE_W-1:0] ae = 0;
  logic src_rdy = 0, dst_rdy, pulse_out, busy, frame_start, frame_end;
  int checks = 0, failures = 0;

  as_aer_tx #(.AE_W(AE_W)) dut (.*);

  initial forever begin
    #2.5 pulse_clk = 1; clk = ~clk;
    #2.5 pulse_clk = 0;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AE_W-1:0] sent[$];
  int nrx = 0, nstart = 0, nb2b = 0;

  // receiver model
  realtime t_last = -1000.0, t_rise;
  int nsym = -1;           // -1: waiting for a reference pulse
  logic [AE_W-1:0] sh;
  logic after_close = 0;
  always @(posedge pulse_out) if (!rst) begin
    int u;
    t_rise = $realtime;
    u = int'((t_rise - t_last) / 5.0);   // int' rounds to nearest
    t_last = t_rise;
    if (u >= 8) begin
      checks++;
      if (nsym != -1 && !(after_close && nsym == 0)) begin failures++; $display("frame cut"); end
      nsym = 0; nstart++; after_close = 0;
    end else if (nsym >= 0 && nsym < NSYM) begin
      checks++;
      if (u < 2 || u > 5) begin failures++; $display("%0t bad symbol interval %0d nsym=%0d nrx=%0d", $realtime, u, nsym, nrx); end
      if (nsym == 0 && after_close) nb2b++;
      after_close = 0;
      sh = {sh[AE_W-3:0], 2'(u - 2)};
      nsym++;
    end else if (nsym == NSYM) begin
      checks++;
      if (u != 6 + int'(^sh)) begin failures++; $display("bad close %0d", u); end
      checks++;
      if (sent.size() == 0 || sent[0] != sh) begin
        failures++;
        $display("event %h unexpected", sh);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      nrx++;
      nsym = 0; after_close = 1;
    end else begin
      checks++; failures++;
      $display("pulse outside a frame");
    end
  end
  always @(negedge pulse_out) if (!rst) begin
    checks++;
    if ($realtime - t_rise < 2.49 || $realtime - t_rise > 2.51) failures++;
  end

  // source, driven on the falling edge
  task automatic offer(logic [AE_W-1:0] e);
    @(negedge clk);
    ae = e; src_rdy = 1;
    do @(posedge clk); while (!dst_rdy);
    sent.push_back(e);
    @(negedge clk);
    src_rdy = 0;
  endtask

  initial begin
    realtime t0, t1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < NEV1; i++) begin
      offer(AE_W'($urandom));
      repeat ($urandom % 40) @(negedge clk);
    end
    wait (nrx == NEV1);
    repeat (20) @(negedge clk);
    // continuous run: source always ready
    t0 = -1;
    fork
      for (int i = 0; i < NEV2; i++) begin
        logic [AE_W-1:0] e;
        e = AE_W'($urandom);
        ae = e; src_rdy = 1;
        do @(posedge clk); while (!dst_rdy);
        sent.push_back(e);
        #1;
      end
    join
    @(negedge clk) src_rdy = 0;
    wait (nrx == NEV1 + NEV2);
    t1 = t_last;
    repeat (20) @(negedge clk);
    checks++;
    if (sent.size() != 0) failures++;
    checks++;
    if (nb2b < NEV2 - 2) begin failures++; $display("only %0d back-to-back", nb2b); end
    begin
      real rate;
      // events of the continuous run per second, from their pulse trains
      rate = real'(NEV2) / ((t1 - t_run0) * 1.0e-9);
      $display("event rate %0.2f Meps (starts=%0d back-to-back=%0d)", rate / 1.0e6, nstart, nb2b);
      checks++;
      if (rate < 5.5e6) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time of the reference pulse of the continuous run
  realtime t_run0 = 0;
  always @(posedge pulse_out) if (!rst && nrx == NEV1 && nsym == 0 && !after_close) t_run0 = $realtime;
endmodule
