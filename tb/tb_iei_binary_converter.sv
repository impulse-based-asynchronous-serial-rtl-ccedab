// tb_iei_binary_converter: self-checking test of the LFSR-to-binary
// converter. Feeds the LFSR code of every count 0..62, produced by a
// reference LFSR model written here, and checks the 5-bit output against
// min(count, 31), plus the strobe and error pass-through.
module tb_iei_binary_converter;
  import ib_as_aer_pkg::lfsr6_t;
  logic clk = 0, rst = 1;
  lfsr6_t iei = 0;
  logic strobe_in = 0, err_in = 0, strobe, error;
  logic [4:0] count;
  int checks = 0, failures = 0;

  iei_binary_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lfsr6_t x;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int rep = 0; rep < 4; rep++) begin
      x = 6'b000001;
      for (int n = 0; n <= 62; n++) begin
        logic e;
        e = ($urandom % 5 == 0);
        iei <= x; strobe_in <= 1; err_in <= e;
        @(posedge clk);
        strobe_in <= 0; err_in <= 0;
        #0.1;
        checks++;
        if (!strobe || error != e || count != 5'((n > 31) ? 31 : n)) begin
          failures++;
          $display("count %0d got %0d", n, count);
        end
        x = {x[4:0], x[5] ^ x[4]};
        @(posedge clk);
        #0.1;
        checks++;
        if (strobe) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
