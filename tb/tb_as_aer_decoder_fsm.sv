// tb_as_aer_decoder_fsm: self-checking test of the decoder FSM.
// Feeds interval sequences in transmitter units: well-formed frames after a
// long (start) interval, back-to-back frames, frames with a wrong parity,
// with an illegal interval, cut short (timeout), upstream error pulses, and
// a lost reference recovered on a closing interval instead of a pause.
// Checks the decoded events, data_ok, and the error/timeout/idle/alive
// outputs against what each case must produce.
module tb_as_aer_decoder_fsm;
  localparam int AE_W = 16, NSYM = AE_W / 2, TIMEOUT = 16;
  logic clk = 0, rst = 1;
  logic [4:0] units = 0;
  logic strobe_in = 0, err_in = 0;
  logic [AE_W-1:0] data;
  logic strobe, data_ok, alive, idle, error, timeout;
  int checks = 0, failures = 0;
  int n_ev = 0, n_err = 0, n_tmo = 0, n_alive = 0;
  int n_good = 0, n_b2b = 0, n_par = 0, n_bad = 0, n_cut = 0, n_up = 0, n_realign = 0;

  as_aer_decoder_fsm #(.AE_W(AE_W), .TIMEOUT(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected events: {data, ok}
  logic [AE_W:0] expq[$];

  always @(posedge clk) begin
    #0.1;
    if (!rst) begin
      if (strobe) begin
        checks++;
        n_ev++;
        if (expq.size() == 0 || {data, data_ok} != expq[0]) begin
          failures++;
          $display("event %h ok=%b unexpected", data, data_ok);
        end
        if (expq.size() != 0) void'(expq.pop_front());
      end
      if (error) n_err++;
      if (timeout) n_tmo++;
      if (alive) n_alive++;
    end
  end

  task automatic send(int u, int gap = 0);
    // inputs change on the falling edge, away from the sampling edge
    @(negedge clk);
    units = 5'(u); strobe_in = 1;
    @(negedge clk);
    strobe_in = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic frame(logic [AE_W-1:0] e, logic flip_par);
    for (int i = NSYM - 1; i >= 0; i--) send(2 + int'(e[2*i +: 2]), $urandom % 3);
    send(6 + int'((^e) ^ flip_par), $urandom % 2);
  endtask

  int err0, tmo0;   // counts at the start of the current case
  task automatic expect_counts(int e_err, int e_tmo, string what);
    repeat (TIMEOUT + 4) @(posedge clk);
    checks++;
    if (n_err - err0 != e_err || n_tmo - tmo0 != e_tmo) begin
      failures++;
      $display("%s: errors %0d timeouts %0d", what, n_err - err0, n_tmo - tmo0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (!idle) failures++;
    for (int it = 0; it < 400; it++) begin
      logic [AE_W-1:0] e;
      int kind;
      e = AE_W'($urandom);
      kind = $urandom % 7;
      err0 = n_err; tmo0 = n_tmo;
      case (kind)
        0, 1: begin // good frame after a start interval
          send(8 + $urandom % 20);
          expq.push_back({e, 1'b1});
          frame(e, 0);
          n_good++;
          // sometimes a back-to-back frame follows
          if (kind == 1) begin
            e = AE_W'($urandom);
            expq.push_back({e, 1'b1});
            frame(e, 0);
            n_b2b++;
          end
          expect_counts(0, 0, "good");
          checks++; if (!idle) failures++;   // back to idle after the quiet time
        end
        2: begin // wrong parity
          send(9);
          expq.push_back({e, 1'b0});
          frame(e, 1);
          n_par++;
          expect_counts(1, 0, "parity");
        end
        3: begin // illegal interval inside a frame
          bit short_frame;
          short_frame = ($urandom % 2) == 0;
          send(10);
          send(3);
          send(short_frame ? 6 : 1);
          n_bad++;
          // a closing interval that comes too early keeps the FSM aligned
          checks++; if (idle == short_frame) failures++;
          expect_counts(1, 0, "illegal");
          checks++; if (!idle) failures++;
        end
        6: begin // realignment on a closing interval, without a pause
          send(10);
          send(1);                       // illegal: back to idle
          send(6 + $urandom % 2);        // a closing interval realigns
          checks++; if (idle) failures++;
          expq.push_back({e, 1'b1});
          frame(e, 0);
          n_realign++;
          expect_counts(1, 0, "realign");
        end
        4: begin // frame cut short
          send(12);
          for (int i = 0; i < 1 + $urandom % (NSYM - 1); i++) send(2 + $urandom % 4);
          checks++; if (idle) failures++;
          n_cut++;
          expect_counts(0, 1, "cut");
          checks++; if (!idle) failures++;
        end
        5: begin // error from the stages before, in mid-frame
          send(8);
          send(4);
          @(negedge clk); err_in = 1; @(negedge clk); err_in = 0;
          n_up++;
          expect_counts(1, 0, "upstream");
        end
        default: ;
      endcase
    end
    checks++;
    if (expq.size() != 0) failures++;
    checks++;
    if (n_alive == 0) failures++;
    $display("good=%0d b2b=%0d parity=%0d illegal=%0d cut=%0d upstream=%0d realign=%0d",
             n_good, n_b2b, n_par, n_bad, n_cut, n_up, n_realign);
    checks++;
    if (n_realign == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
