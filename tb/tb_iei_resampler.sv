// tb_iei_resampler: self-checking test of the resampler. Every count 0..31
// must come out as the unit value u with |count - 3u| <= 1, i.e. the
// nearest whole number of transmitter units at 3 samples per unit.
module tb_iei_resampler;
  logic clk = 0, rst = 1;
  logic [4:0] count = 0, units;
  logic strobe_in = 0, err_in = 0, strobe, error;
  int checks = 0, failures = 0;

  iei_resampler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int rep = 0; rep < 3; rep++)
      for (int c = 0; c < 32; c++) begin
        logic e;
        int u;
        e = ($urandom % 4 == 0);
        count <= 5'(c); strobe_in <= 1; err_in <= e;
        @(posedge clk);
        strobe_in <= 0;
        #0.1;
        u = int'(units);
        checks++;
        if (!strobe || error != e || (c - 3 * u) > 1 || (3 * u - c) > 1) begin
          failures++;
          $display("count %0d -> %0d", c, u);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
