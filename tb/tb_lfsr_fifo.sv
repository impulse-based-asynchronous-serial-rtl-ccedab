// tb_lfsr_fifo: self-checking test of the LFSR-pointer FIFO.
// Random pushes and pops against a queue model: checks data order, the
// empty and full flags (capacity 2**PTR_W - 2 words) and the overflow flag
// for a push into a full FIFO.
module tb_lfsr_fifo;
  localparam int W = 6, PTR_W = 4, CAP = 2**PTR_W - 2;
  logic clk = 0, rst = 1;
  logic wr = 0, rd = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int nfull = 0, novf = 0;
  logic exp_ovf = 0;

  lfsr_fifo #(.W(W), .PTR_W(PTR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      @(negedge clk);
      // flags against the model
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == CAP)) begin
        failures++;
        $display("flags e=%b f=%b size=%0d", empty, full, model.size());
      end
      checks++;
      if (overflow != exp_ovf) failures++;
      if (!empty) begin
        checks++;
        if (rdata != model[0]) failures++;
      end
      if (full) nfull++;
      bias = ((i / 500) % 2 == 0) ? 3 : 1;    // phases of filling and draining
      wr    = ($urandom % 4) < bias;
      rd    = !empty && (($urandom % 4) >= bias);
      wdata = W'($urandom);
      exp_ovf = wr && model.size() == CAP;
      if (exp_ovf) novf++;
      @(posedge clk);
      #0.1;
      if (rd) void'(model.pop_front());
      if (wr && !exp_ovf) model.push_back(wdata);
    end
    checks++;
    if (nfull == 0 || novf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
