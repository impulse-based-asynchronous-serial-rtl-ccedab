// aer_event_gen: pseudo-random address-event source for link tests, with a
// trigger whose rate and jitter are set at run time.
//
// Payloads come from a Galois LFSR as wide as the event (see prbs_step in
// ib_as_aer_pkg), starting at 1 after reset, so a long run walks through
// every non-zero AE_W-bit address; a checker on the far side of the link
// runs the same sequence. A down-counter fires the trigger: after each
// trigger it is reloaded with `period` plus a random value masked by
// `jitter` (a second, 16-bit LFSR), so the interval between triggers is
// period + 1 + (rnd & jitter) clock cycles. With period = 0 and jitter = 0
// a trigger fires every cycle, which keeps the link saturated.
//
// Interface: SPAER source (ae, src_rdy, dst_rdy); an event is handed over
// in a cycle with src_rdy && dst_rdy. A trigger that finds the previous
// event still waiting is dropped and counted in `missed`; `sent` counts
// handed-over events. Both counters are CNT_W bits wide, 33 by default so
// that a run of 2^32 events fits. The generator runs while `enable` is high;
// a pending event is still offered when it drops. Synchronous reset.
//
// The document names a pseudo-random event generator whose trigger has a
// configurable rate and jitter; the LFSRs, counter widths and the
// drop-when-busy rule are this design's choices.
module aer_event_gen
  import ib_as_aer_pkg::*;
#(
  parameter int unsigned AE_W  = 16,
  parameter int unsigned CNT_W = 33
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [15:0]      period,
  input  logic [15:0]      jitter,
  output logic [AE_W-1:0]  ae,
  output logic             src_rdy,
  input  logic             dst_rdy,
  output logic [CNT_W-1:0] sent,
  output logic [CNT_W-1:0] missed
);
  localparam logic [15:0] JIT_SEED = 16'hACE1;

  logic [31:0] pay;        // payload LFSR, state in the low AE_W bits
  logic [31:0] jit;        // jitter LFSR, 16-bit state
  logic [16:0] wait_cnt;   // cycles until the next trigger
  logic        trigger, free;

  assign trigger = enable && (wait_cnt == '0);
  assign free    = !src_rdy || dst_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      pay      <= 32'd1;
      jit      <= {16'h0, JIT_SEED};
      wait_cnt <= '0;
      ae       <= '0;
      src_rdy  <= 1'b0;
      sent     <= '0;
      missed   <= '0;
    end else begin
      if (src_rdy && dst_rdy) begin
        src_rdy <= 1'b0;
        sent    <= sent + 1'b1;
      end
      if (trigger) begin
        wait_cnt <= {1'b0, period} + {1'b0, jit[15:0] & jitter};
        jit      <= prbs_step(jit, 16);
        if (free) begin
          ae      <= pay[AE_W-1:0];
          src_rdy <= 1'b1;
          pay     <= prbs_step(pay, AE_W);
        end else begin
          missed  <= missed + 1'b1;
        end
      end else if (wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end
    end
  end

  // the payload width must have a known maximal-length polynomial
  initial assert (prbs_taps(AE_W) != 0)
    else $error("aer_event_gen: no LFSR polynomial for AE_W=%0d", AE_W);

  // SPAER source rule: an offered event stays until it is taken
  a_hold: assert property (@(posedge clk) disable iff (rst)
    src_rdy && !dst_rdy |=> src_rdy && $stable(ae));
endmodule
