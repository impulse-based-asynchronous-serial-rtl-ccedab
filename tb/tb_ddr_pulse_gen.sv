// tb_ddr_pulse_gen: self-checking test of the DDR pulse generator.
// Toggles tx_data on random pulse-clock cycles and checks that each
// transition gives exactly one output pulse that starts at the next rising
// clock edge and lasts half a clock period (2.5 ns at 200 MHz).
module tb_ddr_pulse_gen;
  logic pulse_clk = 0, rst = 1, tx_data = 0, pulse_out;
  int checks = 0, failures = 0;
  int ntog = 0, npulse = 0;
  realtime t_rise, t_tog;

  ddr_pulse_gen dut (.*);

  always #2.5 pulse_clk = ~pulse_clk;   // 200 MHz

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse_out) if (!rst) begin
    t_rise = $realtime;
    npulse++;
    checks++;
    // starts at the rising clock edge right after the transition
    if (t_rise - t_tog > 5.01 || t_rise - t_tog < 0) failures++;
  end
  always @(negedge pulse_out) if (!rst) begin
    checks++;
    if ($realtime - t_rise < 2.49 || $realtime - t_rise > 2.51) begin
      failures++;
      $display("pulse width %0t", $realtime - t_rise);
    end
  end

  initial begin
    repeat (3) @(posedge pulse_clk);
    rst <= 0;
    repeat (2) @(posedge pulse_clk);
    for (int i = 0; i < 200; i++) begin
      repeat (2 + $urandom % 4) @(posedge pulse_clk);
      tx_data <= ~tx_data;
      t_tog = $realtime;
      ntog++;
    end
    repeat (5) @(posedge pulse_clk);
    checks++;
    if (npulse != ntog) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
