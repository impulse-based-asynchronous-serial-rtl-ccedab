// tb_aer_event_gen: checks the pseudo-random event generator.
//
// A cycle model in the testbench, written from the generator's description,
// predicts the payload, src_rdy and both counters after every clock while
// the sink's dst_rdy, the enable, the period and the jitter mask change at
// random. Two further checks do not rely on the model: with a sink that is
// always ready, period P and no jitter, events must be handed over exactly
// P + 1 cycles apart; and a saturated run of 2^16 - 1 events must produce
// every non-zero 16-bit address exactly once.
module tb_aer_event_gen;
  localparam int AE_W = 16, CNT_W = 33;
  logic clk = 0, rst = 1, enable = 0, dst_rdy = 0;
  logic [15:0] period = 0, jitter = 0;
  logic [AE_W-1:0] ae;
  logic src_rdy;
  logic [CNT_W-1:0] sent, missed;
  int checks = 0, failures = 0;

  aer_event_gen #(.AE_W(AE_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent LFSR steps (right-shifting Galois form)
  function automatic logic [15:0] pay_next(logic [15:0] x);
    logic fb = x[0];
    x = x >> 1;
    if (fb) x = x ^ 16'b1011_0100_0000_0000;   // taps 16, 14, 13, 11
    return x;
  endfunction

  // model state
  logic [15:0] m_pay, m_jit, m_ae;
  int unsigned m_wait;
  bit m_src;
  longint m_sent, m_missed;

  task automatic model_reset();
    m_pay = 16'd1; m_jit = 16'hACE1; m_ae = 0; m_wait = 0;
    m_src = 0; m_sent = 0; m_missed = 0;
  endtask

  task automatic model_step();
    bit trig = enable && (m_wait == 0);
    bit free = !m_src || dst_rdy;
    if (m_src && dst_rdy) begin m_src = 0; m_sent++; end
    if (trig) begin
      m_wait = int'(period) + int'(m_jit & jitter);
      m_jit  = pay_next(m_jit);
      if (free) begin m_ae = m_pay; m_src = 1; m_pay = pay_next(m_pay); end
      else m_missed++;
    end else if (m_wait != 0) m_wait--;
  endtask

  task automatic compare();
    checks++;
    if (src_rdy !== m_src || (m_src && ae !== m_ae) ||
        sent !== CNT_W'(m_sent) || missed !== CNT_W'(m_missed)) begin
      failures++;
      if (failures < 10)
        $display("%0t mismatch: src_rdy %0b/%0b ae %h/%h sent %0d/%0d missed %0d/%0d",
                 $time, src_rdy, m_src, ae, m_ae, sent, m_sent, missed, m_missed);
    end
  endtask

  // handover spacing
  int last_take = -1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  bit seen [logic [15:0]];

  initial begin
    int p;
    model_reset();
    repeat (3) @(negedge clk);
    rst = 0;

    // 1. random control, compared with the model every cycle
    for (int phase = 0; phase < 40; phase++) begin
      period = 16'($urandom_range(0, 12));
      jitter = (phase % 3 == 0) ? 16'h0 : 16'($urandom_range(0, 15));
      for (int c = 0; c < 300; c++) begin
        compare();
        enable  = ($urandom_range(0, 9) != 0);
        dst_rdy = ($urandom_range(0, 3) != 0) || (phase % 4 == 0);
        model_step();
        @(negedge clk);
      end
    end
    if (m_missed == 0) begin failures++; $display("no trigger was ever dropped"); end

    // 2. exact spacing with an always-ready sink and no jitter
    for (p = 0; p <= 9; p += 3) begin
      enable = 0; dst_rdy = 1; period = 16'(p); jitter = 0;
      repeat (40) @(negedge clk);
      last_take = -1;
      enable = 1;
      for (int c = 0; c < 20 * (p + 1) + 5; c++) begin
        if (src_rdy && dst_rdy) begin
          if (last_take >= 0) begin
            checks++;
            if (cyc - last_take != p + 1) begin
              failures++;
              $display("period %0d: events %0d cycles apart", p, cyc - last_take);
            end
          end
          last_take = cyc;
        end
        @(negedge clk);
      end
    end

    // 3. full payload space: restart and take 2^16 - 1 events back to back
    enable = 0; rst = 1; dst_rdy = 1; period = 0; jitter = 0;
    repeat (3) @(negedge clk);
    rst = 0; enable = 1;
    while (sent < 65535) begin
      if (src_rdy) begin
        checks++;
        if (ae == 0 || seen.exists(ae)) begin
          failures++;
          if (failures < 10) $display("address %h repeated or zero", ae);
        end
        seen[ae] = 1;
      end
      @(negedge clk);
    end
    checks++;
    if (seen.num() != 65535) begin
      failures++;
      $display("%0d distinct addresses", seen.num());
    end
    checks++;
    if (missed != 0) begin failures++; $display("saturated run dropped triggers"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
