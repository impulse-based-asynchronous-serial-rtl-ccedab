// delayed_nrzm_modulator: turns pulse commands into transitions of the
// modified NRZ (NRZM) line `tx_data`.
//
// Runs on `pulse_clk`, which is twice the sequencer clock and phase aligned
// with it (200 MHz for a 100 MHz sequencer). A command is a flip of
// `pulse_tog`, issued by the sequencer in the `clk` domain, with `delay`
// giving the number of pulse-clock periods (0..3) by which the transition is
// postponed. The modulator sees every command at the same pulse-clock edge
// relative to the sequencer clock, so adding `delay` places transitions at
// pulse-clock resolution although the sequencer runs at half that rate. A
// 4-bit schedule register holds pending transitions, so a new command may
// arrive before an earlier delayed one has been played out; this is what
// lets frames be sent back to back at full speed. Each bit of the schedule
// that reaches position 0 toggles `tx_data`. That a delayed modulator exists
// follows the transmitter block diagram; the toggle-flag command interface
// and the schedule register are this design's choices.
module delayed_nrzm_modulator (
  input  logic       pulse_clk,
  input  logic       rst,
  input  logic       pulse_tog,
  input  logic [1:0] delay,
  output logic       tx_data
);
  logic       seen_tog;
  logic [3:0] sched;
  logic [3:0] sched_now;

  always_comb begin
    sched_now = sched;
    if (pulse_tog != seen_tog) sched_now[delay] = 1'b1;
  end

  always_ff @(posedge pulse_clk) begin
    if (rst) begin
      seen_tog <= 1'b0;
      sched    <= '0;
      tx_data  <= 1'b0;
    end else begin
      seen_tog <= pulse_tog;
      sched    <= sched_now >> 1;
      if (sched_now[0]) tx_data <= ~tx_data;
    end
  end
endmodule
