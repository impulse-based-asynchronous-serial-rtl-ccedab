// tb_delayed_nrzm_modulator: self-checking test of the delayed modulator.
// Issues commands (toggle flag flip plus delay) from a clock at half the
// pulse-clock rate, at random spacings, and checks that the spacing of the
// resulting tx_data transitions, in pulse-clock periods, equals
// 2 * (command spacing in clock cycles) + (difference of the delays).
module tb_delayed_nrzm_modulator;
  logic pulse_clk = 0, clk = 0, rst = 1;
  logic pulse_tog = 0;
  logic [1:0] delay = 0;
  logic tx_data;
  int checks = 0, failures = 0;
  longint pcyc = 0, ccyc = 0;
  longint exp_t[$];      // expected transition time, in pulse-clock cycles + const
  longint first_exp = -1, first_got = -1;
  int ntog = 0;
  logic last_tx = 0;

  delayed_nrzm_modulator dut (.pulse_clk, .rst, .pulse_tog, .delay, .tx_data);

  // clk and pulse_clk from one process, rising edges aligned
  initial forever begin
    #2.5 pulse_clk = 1; pcyc++; clk = ~clk;
    #2.5 pulse_clk = 0;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) ccyc++;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [1:0] d;
      // spacing of transitions must stay >= 2 pulse-clock periods
      d = 2'($urandom % 2);
      pulse_tog <= ~pulse_tog;
      delay     <= d;
      exp_t.push_back(2 * (ccyc + 1) + d);
      repeat (1 + $urandom % 3) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_t.size() != 0) begin failures++; $display("missing %0d", exp_t.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse_clk) begin
    #0.1;
    if (!rst && tx_data != last_tx) begin
      longint e;
      last_tx = tx_data;
      checks++;
      if (exp_t.size() == 0) failures++;
      else begin
        e = exp_t.pop_front();
        if (first_exp < 0) begin first_exp = e; first_got = pcyc; end
        else if (pcyc - first_got != e - first_exp) begin
          failures++;
          $display("transition at %0d expected %0d", pcyc - first_got, e - first_exp);
        end
      end
    end
  end
endmodule
