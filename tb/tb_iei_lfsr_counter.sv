// tb_iei_lfsr_counter: self-checking test of the LFSR interval counter.
// Builds a sample stream with edges at known positions (random spacings,
// long quiet spells and a few double edges within one cycle), feeds it two
// samples per cycle and checks every reported interval, after converting the
// LFSR code with a reference LFSR model written here, against the true
// spacing saturated at 62, and that error flags exactly the double edges.
module tb_iei_lfsr_counter;
  import ib_as_aer_pkg::lfsr6_t;
  logic clk = 0, rst = 1;
  logic [1:0] data = 0;
  lfsr6_t iei;
  logic strobe, error;
  int checks = 0, failures = 0;

  iei_lfsr_counter dut (.*);

  always #2 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: count n -> code
  function automatic lfsr6_t ref_code(int n);
    lfsr6_t x = 6'b000001;
    for (int i = 0; i < n; i++) x = {x[4:0], x[5] ^ x[4]};
    return x;
  endfunction

  localparam int NS = 8000;
  logic smp[NS];
  int   expq[$];
  logic experr[$];
  int nerr = 0, nsat = 0;

  initial begin
    int pos, last_edge, gap;
    logic v;
    // build stream
    v = 0; pos = 0; last_edge = -1000;
    while (pos < NS) begin
      int r;
      r = $urandom % 20;
      if (r == 0) gap = 40 + $urandom % 60;    // quiet spell
      else if (r == 1) gap = 1;                // glitch
      else gap = 2 + $urandom % 25;
      for (int i = 0; i < gap && pos < NS; i++) begin smp[pos] = v; pos++; end
      v = ~v;
    end
    // expected intervals (first edge from the reset state counts as long)
    last_edge = -1000;
    for (int i = 0; i < NS; i++) begin
      logic prev;
      prev = (i == 0) ? 1'b0 : smp[i-1];
      if (smp[i] != prev) begin
        int d;
        d = i - last_edge;
        if (d > 62) begin d = 62; nsat++; end
        // a second edge in the same cycle is flagged, not reported
        if (i % 2 == 1 && i - last_edge == 1) begin
          experr[experr.size()-1] = 1'b1;
        end else begin
          expq.push_back(d);
          experr.push_back(1'b0);
        end
        last_edge = i;
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < NS / 2; c++) begin
      data <= {smp[2*c+1], smp[2*c]};
      @(posedge clk);
    end
    data <= {smp[NS-1], smp[NS-1]};
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d intervals missing", expq.size()); end
    checks++;
    if (nerr == 0 || nsat == 0) failures++;
    $display("double edges=%0d saturated=%0d", nerr, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #0.1;
    if (!rst && strobe) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        int e;
        logic ee;
        e  = expq.pop_front();
        ee = experr.pop_front();
        if (iei != ref_code(e)) begin
          failures++;
          $display("iei code %h expected count %0d", iei, e);
        end
        checks++;
        if (error != ee) failures++;
        if (error) nerr++;
      end
    end else if (!rst && error) failures++;
  end
endmodule
