// tb_spaer_rx_if: self-checking test of the receiver SPAER interface.
// Offers decoded events (some with bad parity) while the sink takes them
// with random dst_rdy. Checks that good events come out in order, bad ones
// never, that an offered event is held until taken, and that an event that
// finds the register occupied is flagged on overflow and dropped.
module tb_spaer_rx_if;
  localparam int AE_W = 16;
  logic clk = 0, rst = 1;
  logic [AE_W-1:0] data = 0, ae;
  logic strobe = 0, data_ok = 0, src_rdy, dst_rdy = 0, overflow;
  int checks = 0, failures = 0;
  logic [AE_W-1:0] expq[$];
  int novf = 0, nout = 0;

  spaer_rx_if #(.AE_W(AE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp_ovf = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      dst_rdy = ($urandom % 3 != 0);
      strobe  = ($urandom % 3 == 0);
      data_ok = ($urandom % 5 != 0);
      data    = AE_W'($urandom);
      exp_ovf = strobe && data_ok && src_rdy && !dst_rdy;
      // model: taken event leaves, a good event enters if there is room
      if (src_rdy && dst_rdy) begin
        checks++;
        nout++;
        if (expq.size() == 0 || ae != expq[0]) failures++;
        if (expq.size() != 0) void'(expq.pop_front());
      end
      if (strobe && data_ok && !exp_ovf) expq.push_back(data);
      if (exp_ovf) novf++;
      @(posedge clk);
      #0.1;
      checks++;
      if (overflow != exp_ovf) failures++;
      checks++;
      if (src_rdy != (expq.size() != 0)) failures++;
      strobe = 0;
    end
    checks++;
    if (novf == 0 || nout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
