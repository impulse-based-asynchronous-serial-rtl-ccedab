// tb_ptp_synchronizer: self-checking test of the pulse-to-toggle-to-pulse
// synchroniser. A FIFO model on the high-speed side (300 MHz) offers random
// words in bursts; the low-speed side (100 MHz, unrelated phase) must put
// out every word once, in order. Error pulses sent on the high-speed side,
// spaced apart, must each arrive as one low-speed error pulse. It also
// checks the throughput: a long burst must move at one word per low-speed
// cycle, within the pipeline latency.
module tb_ptp_synchronizer;
  localparam int W = 6, SLOTS = 4;
  logic hsclk = 0, lsclk = 0, rst = 1;
  logic fifo_empty = 1, fifo_rd, err_in = 0;
  logic [W-1:0] fifo_data, data;
  logic strobe, error;
  int checks = 0, failures = 0;
  logic [W-1:0] src[$], exp_q[$];
  int nerr_sent = 0, nerr_got = 0, ngot = 0;
  longint ls_cyc = 0;

  ptp_synchronizer #(.W(W), .SLOTS(SLOTS)) dut (.*);

  always #1.667 hsclk = ~hsclk;
  initial begin #1.3; forever #5 lsclk = ~lsclk; end
  always @(posedge lsclk) ls_cyc++;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model: outputs change only at the falling edge
  always @(negedge hsclk) begin
    fifo_empty = (src.size() == 0);
    fifo_data  = (src.size() != 0) ? src[0] : '0;
  end
  always @(posedge hsclk) if (!rst && fifo_rd) begin
    exp_q.push_back(src.pop_front());
  end

  always @(posedge lsclk) begin
    #0.1;
    if (!rst && strobe) begin
      checks++;
      ngot++;
      if (exp_q.size() == 0 || data != exp_q[0]) begin
        failures++;
        $display("word %h unexpected", data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (!rst && error) nerr_got++;
  end

  initial begin
    longint t0;
    repeat (6) @(posedge lsclk);
    rst <= 0;
    repeat (3) @(posedge lsclk);
    // random bursts
    for (int b = 0; b < 50; b++) begin
      int n;
      n = 1 + $urandom % 12;
      @(posedge hsclk);
      for (int i = 0; i < n; i++) src.push_back(W'($urandom));
      repeat ($urandom % 40) @(posedge hsclk);
      if (b % 5 == 0) begin
        err_in <= 1; @(posedge hsclk); err_in <= 0; nerr_sent++;
        repeat (12) @(posedge hsclk);
      end
    end
    wait (src.size() == 0 && exp_q.size() == 0);
    // throughput: 200 words
    @(posedge lsclk);
    t0 = ls_cyc;
    ngot = 0;
    @(posedge hsclk);
    for (int i = 0; i < 200; i++) src.push_back(W'($urandom));
    wait (ngot == 200);
    checks++;
    if (ls_cyc - t0 > 200 + 8) begin
      failures++;
      $display("200 words took %0d ls cycles", ls_cyc - t0);
    end
    repeat (10) @(posedge lsclk);
    checks++;
    if (nerr_got != nerr_sent) begin failures++; $display("errors %0d/%0d", nerr_got, nerr_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
