// tb_nrzm_sequencer: self-checking test of the NRZM sequencer.
// A model of the SPAER interface feeds random events, sometimes back to
// back and sometimes after a pause. Every command (flip of pulse_tog) is
// turned into a pulse time in units, 2 * cycle + delay, and the pulse
// spacings are checked against the interval code worked out here from the
// events: reference pulse after at least 8 quiet units, 2 + symbol per data
// pair, 6 + even parity to close. It also checks that back-to-back frames
// follow each other with no extra time, i.e. that the event rate equals one
// event per frame length.
module tb_nrzm_sequencer;
  localparam int AE_W = 16;
  localparam int NSYM = AE_W / 2;
  localparam int NEV  = 300;
  logic clk = 0, rst = 1;
  logic strobe, take, pulse_tog, start, end_o, busy;
  logic [1:0] chunk, delay, data;
  int checks = 0, failures = 0;

  nrzm_sequencer #(.AE_W(AE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chunk source
  logic [AE_W-1:0] evq[$];
  int k = 0;
  int nsent = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  assign strobe = (evq.size() != 0) && !rst;
  assign chunk  = (evq.size() != 0) ? evq[0][AE_W-1-2*k -: 2] : 2'd0;

  always @(posedge clk) if (!rst && take) begin
    k++;
    if (k == NSYM) begin k = 0; void'(evq.pop_front()); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (nsent < NEV) begin
      // bursts of back-to-back events, then a pause
      int burst = 1 + $urandom % 5;
      for (int i = 0; i < burst; i++) begin evq.push_back(AE_W'($urandom)); nsent++; end
      wait (evq.size() == 0);
      repeat ($urandom % 30) @(posedge clk);
    end
  end

  // expected intervals
  int expq[$];
  longint t_last = -1000;
  longint units;
  logic last_tog = 0;
  int nb2b = 0, nstart = 0, nend = 0;
  longint b2b_t0 = -1, b2b_units = 0;

  // events as they are consumed: rebuild expectations from the source side
  logic [AE_W-1:0] shadow[$];
  always @(posedge clk) if (!rst && take && k == 0) shadow.push_back(evq[0]);

  task automatic push_expect(logic [AE_W-1:0] e);
    for (int i = NSYM - 1; i >= 0; i--) expq.push_back(2 + int'(e[2*i +: 2]));
    expq.push_back(6 + int'(^e));
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst && pulse_tog != last_tog) begin
      last_tog = pulse_tog;
      units = 2 * (cyc - 1) + delay;
      if (start) begin
        nstart++;
        checks++;
        if (expq.size() != 0) begin failures++; $display("start before frame done"); end
        if (units - t_last < 8) begin failures++; $display("gap %0d too short", units - t_last); end
        if (shadow.size() == 0) failures++; else push_expect(shadow.pop_front());
      end else begin
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected pulse"); end
        else begin
          int e;
          e = expq.pop_front();
          if (units - t_last != e) begin
            failures++;
            $display("interval %0d expected %0d at %0d", units - t_last, e, cyc);
          end
        end
        if (end_o) begin
          nend++;
          checks++;
          if (expq.size() != 0) failures++;
          // a waiting event continues back to back from this pulse
          if (shadow.size() != 0) begin nb2b++; push_expect(shadow.pop_front()); end
        end
      end
      t_last = units;
    end
  end

  initial begin
    wait (nsent == NEV && evq.size() == 0);
    repeat (40) @(posedge clk);
    checks++;
    if (nend != NEV || nb2b == 0 || nstart == 0) failures++;
    $display("frames=%0d starts=%0d back_to_back=%0d", nend, nstart, nb2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
