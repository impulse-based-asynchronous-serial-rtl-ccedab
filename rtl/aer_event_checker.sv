// aer_event_checker: compares the events that arrive over a link with the
// pseudo-random sequence that aer_event_gen sends, and counts the events
// that were not received correctly.
//
// It runs the generator's payload LFSR (prbs_step in ib_as_aer_pkg) from
// the same reset value and keeps the payload it expects next. An arriving
// event is compared with that value and with the next LOOKAHEAD values of
// the sequence at once:
//   * a match k steps ahead (k = 0 when nothing was lost) counts one good
//     event and k lost ones, and the expectation moves past the match;
//   * no match counts one corrupted event, and the expectation moves on by
//     one, as if the event had arrived damaged in its place;
//   * a second miss in a row means the checker has lost the sequence (more
//     than LOOKAHEAD events dropped at once): because the LFSR state is the
//     payload itself, it restarts from the event just received and counts a
//     resynchronisation.
// Events lost after the last one received are not seen here; the number of
// events not received correctly is the generator's `sent` minus `good`.
//
// Interface: SPAER sink that always accepts, so an event is taken in every
// cycle where src_rdy is high. Counters are CNT_W bits (33 by default, room
// for 2^32 events); `mismatch` pulses for one cycle with each corrupted
// event. Synchronous reset.
//
// The document states that sent and received events are compared for error
// detection; the look-ahead and resynchronisation rules are this design's.
module aer_event_checker
  import ib_as_aer_pkg::*;
#(
  parameter int unsigned AE_W      = 16,
  parameter int unsigned CNT_W     = 33,
  parameter int unsigned LOOKAHEAD = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AE_W-1:0]  ae,
  input  logic             src_rdy,
  output logic [CNT_W-1:0] good,
  output logic [CNT_W-1:0] lost,
  output logic [CNT_W-1:0] corrupted,
  output logic [CNT_W-1:0] resyncs,
  output logic             mismatch
);
  logic [31:0] expect_q;              // next payload expected
  logic [31:0] cand [LOOKAHEAD+1];    // expect_q and the values after it
  logic        hit;
  logic [$clog2(LOOKAHEAD+1)-1:0] skip;
  logic        missed_last;

  always_comb begin
    cand[0] = expect_q;
    for (int k = 1; k <= LOOKAHEAD; k++) cand[k] = prbs_step(cand[k-1], AE_W);
    hit  = 1'b0;
    skip = '0;
    for (int k = LOOKAHEAD; k >= 0; k--) begin
      if (ae == cand[k][AE_W-1:0]) begin
        hit  = 1'b1;
        skip = k[$bits(skip)-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      expect_q    <= 32'd1;
      good        <= '0;
      lost        <= '0;
      corrupted   <= '0;
      resyncs     <= '0;
      mismatch    <= 1'b0;
      missed_last <= 1'b0;
    end else begin
      mismatch <= 1'b0;
      if (src_rdy) begin
        if (hit) begin
          good        <= good + 1'b1;
          lost        <= lost + CNT_W'(skip);
          expect_q    <= prbs_step(cand[skip], AE_W);
          missed_last <= 1'b0;
        end else begin
          corrupted   <= corrupted + 1'b1;
          mismatch    <= 1'b1;
          missed_last <= 1'b1;
          if (missed_last) begin
            expect_q <= prbs_step(32'(ae), AE_W);
            resyncs  <= resyncs + 1'b1;
          end else begin
            expect_q <= cand[1];
          end
        end
      end
    end
  end

  initial assert (prbs_taps(AE_W) != 0)
    else $error("aer_event_checker: no LFSR polynomial for AE_W=%0d", AE_W);
endmodule
