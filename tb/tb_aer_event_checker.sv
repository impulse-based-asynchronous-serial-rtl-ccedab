// tb_aer_event_checker: feeds the link checker a pseudo-random event
// sequence with known damage and compares its counters with the damage
// injected.
//
// The testbench runs its own copy of the 16-bit payload sequence and, event
// by event, sends it intact, drops 1..3 events (each must count as lost),
// replaces one event by a value that matches none of the next four
// (one corrupted event, then the sequence continues), or drops a run of 4
// to 40 events, which the checker cannot bridge: that run costs two
// corrupted events and one resynchronisation, and the events after it must
// be good again. Events arrive with random idle cycles between them, or in
// consecutive cycles. The counters are compared after every event, and the
// mismatch pulse is checked against the corrupted count.
module tb_aer_event_checker;
  localparam int AE_W = 16, CNT_W = 33;
  logic clk = 0, rst = 1;
  logic [AE_W-1:0] ae = 0;
  logic src_rdy = 0;
  logic [CNT_W-1:0] good, lost, corrupted, resyncs;
  logic mismatch;
  int checks = 0, failures = 0;

  aer_event_checker #(.AE_W(AE_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] nxt(logic [15:0] x);
    logic fb = x[0];
    x = x >> 1;
    if (fb) x = x ^ 16'b1011_0100_0000_0000;
    return x;
  endfunction

  logic [15:0] seq;                  // next value of the sent sequence
  longint e_good = 0, e_lost = 0, e_corr = 0, e_resync = 0, n_pulse = 0;
  int n_drop = 0, n_corrupt = 0, n_long = 0;

  always @(posedge clk) if (!rst && mismatch) n_pulse++;

  task automatic send(logic [15:0] v);
    ae = v; src_rdy = 1;
    @(negedge clk);
    src_rdy = 0;
    repeat ($urandom_range(0, 1) ? 0 : $urandom_range(1, 3)) @(negedge clk);
  endtask

  task automatic expect_counts(string what);
    checks++;
    if (good !== CNT_W'(e_good) || lost !== CNT_W'(e_lost) ||
        corrupted !== CNT_W'(e_corr) || resyncs !== CNT_W'(e_resync)) begin
      failures++;
      if (failures < 10)
        $display("%0t after %s: good %0d/%0d lost %0d/%0d corrupted %0d/%0d resyncs %0d/%0d",
                 $time, what, good, e_good, lost, e_lost, corrupted, e_corr,
                 resyncs, e_resync);
    end
  endtask

  task automatic send_good(int n);
    for (int i = 0; i < n; i++) begin
      send(seq); seq = nxt(seq); e_good++;
      expect_counts("good event");
    end
  endtask

  initial begin
    logic [15:0] bad, w;
    int kind, k;
    bit clash;
    seq = 16'd1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    send_good(20);
    for (int it = 0; it < 600; it++) begin
      kind = $urandom_range(0, 9);
      if (kind < 3) begin
        // drop 1..3 events
        k = $urandom_range(1, 3);
        repeat (k) seq = nxt(seq);
        send(seq); seq = nxt(seq);
        e_good++; e_lost += k; n_drop++;
        expect_counts("short drop");
      end else if (kind < 5) begin
        // one damaged event, unlike any of the next four
        do begin
          bad = 16'($urandom);
          clash = 0; w = seq;
          for (int j = 0; j < 4; j++) begin
            if (bad == w) clash = 1;
            w = nxt(w);
          end
        end while (clash);
        send(bad); seq = nxt(seq);
        e_corr++; n_corrupt++;
        expect_counts("corrupted event");
      end else if (kind == 5) begin
        // a long gap the look-ahead cannot bridge
        k = $urandom_range(4, 40);
        repeat (k) seq = nxt(seq);
        send(seq); seq = nxt(seq);
        send(seq); seq = nxt(seq);
        e_corr += 2; e_resync++; n_long++;
        expect_counts("long drop");
      end
      send_good($urandom_range(2, 5));
    end
    repeat (2) @(negedge clk);
    checks++;
    if (n_pulse != e_corr) begin
      failures++;
      $display("mismatch pulsed %0d times for %0d corrupted events", n_pulse, e_corr);
    end
    checks++;
    if (n_drop == 0 || n_corrupt == 0 || n_long == 0) begin
      failures++;
      $display("a damage kind never happened");
    end
    $display("short drops %0d, corrupted %0d, long drops %0d, good %0d",
             n_drop, n_corrupt, n_long, e_good);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
