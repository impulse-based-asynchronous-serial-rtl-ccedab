// as_aer_tx: IB-AS-AER transmitter.
//
// Chain of the transmitter block diagram: SPAER interface -> NRZM sequencer
// -> delayed NRZM modulator -> DDR pulse generator. An AE_W-bit event given
// with src_rdy/dst_rdy becomes a train of AE_W/2 + 2 pulses (one fewer when
// it follows the previous frame back to back) on `pulse_out`, each half a
// pulse-clock period wide, whose spacings carry the payload (see
// ib_as_aer_pkg). `clk` is the base clock (100 MHz for 100 Mbps) and
// `pulse_clk` is twice that frequency and phase aligned with it. `busy`,
// `frame_start` and `frame_end` are status outputs.
module as_aer_tx #(
  parameter int unsigned AE_W = 16
) (
  input  logic            clk,
  input  logic            pulse_clk,
  input  logic            rst,
  input  logic [AE_W-1:0] ae,
  input  logic            src_rdy,
  output logic            dst_rdy,
  output logic            pulse_out,
  output logic            busy,
  output logic            frame_start,
  output logic            frame_end
);
  logic       strobe, take;
  logic [1:0] chunk;
  logic       pulse_tog;
  logic [1:0] delay, sym;
  logic       tx_data;

  spaer_tx_if #(.AE_W(AE_W)) u_if (
    .clk, .rst, .ae, .src_rdy, .dst_rdy, .strobe, .chunk, .take
  );

  nrzm_sequencer #(.AE_W(AE_W)) u_seq (
    .clk, .rst, .strobe, .chunk, .take,
    .pulse_tog, .delay, .data(sym), .start(frame_start), .end_o(frame_end), .busy
  );

  delayed_nrzm_modulator u_mod (
    .pulse_clk, .rst, .pulse_tog, .delay, .tx_data
  );

  ddr_pulse_gen u_ddr (
    .pulse_clk, .rst, .tx_data, .pulse_out
  );

  // The symbol field of the command is only informative here.
  logic unused_sym;
  assign unused_sym = ^sym;
endmodule
