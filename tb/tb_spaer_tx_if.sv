// tb_spaer_tx_if: self-checking test of the transmitter SPAER interface.
// Sends random events with random source pauses, consumes chunks with random
// stalls, and checks that every event comes out as AE_W/2 two-bit chunks,
// most significant first, and that dst_rdy is high exactly when the
// interface holds no event.
module tb_spaer_tx_if;
  localparam int AE_W = 16;
  localparam int NEV  = 200;
  logic clk = 0, rst = 1;
  logic [AE_W-1:0] ae;
  logic src_rdy, dst_rdy, strobe, take;
  logic [1:0] chunk;
  int checks = 0, failures = 0;
  logic [AE_W-1:0] sent[$];
  logic [AE_W-1:0] cur;
  int nchunk = 0, nev_out = 0, nev_in = 0;

  spaer_tx_if #(.AE_W(AE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    src_rdy = 0; ae = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (nev_in < NEV) begin
      @(posedge clk);
      if (src_rdy && dst_rdy) begin sent.push_back(ae); nev_in++; src_rdy <= 0; end
      if (!(src_rdy && !dst_rdy) && nev_in < NEV && ($urandom % 3 != 0)) begin
        if (!src_rdy || dst_rdy) begin src_rdy <= 1; ae <= AE_W'($urandom); end
      end
    end
    src_rdy <= 0;
  end

  // sink: takes chunks with random stalls
  always @(negedge clk) take = strobe && ($urandom % 4 != 0) && !rst;

  always @(posedge clk) if (!rst) begin
    checks++;
    if (dst_rdy != !strobe) failures++;
    if (take) begin
      if (nchunk == 0) begin
        if (sent.size() == 0) begin failures++; cur = '0; end
        else cur = sent.pop_front();
      end
      checks++;
      if (chunk != cur[AE_W-1-2*nchunk -: 2]) begin
        failures++;
        $display("chunk mismatch ev=%0d k=%0d got=%0d", nev_out, nchunk, chunk);
      end
      nchunk++;
      if (nchunk == AE_W/2) begin nchunk = 0; nev_out++; end
    end
    if (nev_out == NEV) begin
      checks++;
      if (sent.size() != 0) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
