// tb_ddr_sampler: self-checking test of the DDR sampler.
// Drives a random asynchronous line, records its value at every rising edge
// of hsclk_p and of hsclk_n, and checks that each output pair is
// {later sample, earlier sample} of two consecutive half periods, two
// high-speed periods after they were taken.
module tb_ddr_sampler;
  logic hsclk_p = 0, hsclk_n = 1, rst = 1, rx_data = 0;
  logic [1:0] data;
  int checks = 0, failures = 0;
  logic ps[$], ns[$];
  int ncyc = 0;

  ddr_sampler dut (.*);

  always #1.667 begin hsclk_p = ~hsclk_p; hsclk_n = ~hsclk_n; end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // asynchronous line, changes never on a clock edge
  initial begin
    #0.5;
    forever begin
      #(0.4 + ($urandom % 50) / 10.0);
      rx_data = ~rx_data;
    end
  end

  always @(posedge hsclk_p) if (!rst) ps.push_back(rx_data);
  always @(posedge hsclk_n) if (!rst) ns.push_back(rx_data);

  initial begin
    repeat (4) @(posedge hsclk_p);
    rst = 0;    // right after an hsclk_p edge, before the next hsclk_n edge
    repeat (2) @(posedge hsclk_p);
    // the first two pairs still hold synchroniser contents from reset
    repeat (1000) begin
      @(posedge hsclk_p);
      #0.1;
      ncyc++;
      if (ps.size() >= 3 && ns.size() >= 3) begin
        checks++;
        // ps[$] was taken at this edge, ns[$] half a period before it
        if (data != {ns[$-1], ps[$-2]}) begin
          failures++;
          $display("got %b expected %b%b", data, ns[$-1], ps[$-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
