// ib_as_aer_node: one full-duplex IB-AS-AER link end, an impulse-based
// asynchronous serial AER transmitter and receiver side by side.
//
// The transmitter takes AE_W-bit address events on a SPAER handshake and
// drives `tx_pulse` (to the laser driver of the outgoing optical fibre); the
// receiver takes `rx_pulse` (from the photodiode conditioning circuit of the
// incoming fibre) and offers the decoded events on its own SPAER handshake.
// The two halves share nothing but the reset: the transmitter runs on
// `tx_clk` and the phase-aligned `tx_pulse_clk` (2x), the receiver on
// `rx_lsclk` and `rx_hsclk_p`/`rx_hsclk_n` (3x, complementary). No clock
// relationship between transmitter and receiver is needed; the receiver
// tolerates a few percent of frequency difference to the far transmitter.
//
// Lint reports `rst` as used both synchronously and asynchronously: that is
// intended. Only the toggle flip-flop, whose clock is the pulse stream and
// may be silent, needs an asynchronous reset; all clocked stages reset
// synchronously.
module ib_as_aer_node #(
  parameter int unsigned AE_W    = 16,
  parameter int unsigned PTR_W   = 4,
  parameter int unsigned SLOTS   = 4,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic            rst,
  // transmitter
  input  logic            tx_clk,
  input  logic            tx_pulse_clk,
  input  logic [AE_W-1:0] tx_ae,
  input  logic            tx_src_rdy,
  output logic            tx_dst_rdy,
  output logic            tx_pulse,
  output logic            tx_busy,
  output logic            tx_frame_start,
  output logic            tx_frame_end,
  // receiver
  input  logic            rx_pulse,
  input  logic            rx_hsclk_p,
  input  logic            rx_hsclk_n,
  input  logic            rx_lsclk,
  output logic [AE_W-1:0] rx_ae,
  output logic            rx_src_rdy,
  input  logic            rx_dst_rdy,
  output logic            rx_alive,
  output logic            rx_idle,
  output logic            rx_error,
  output logic            rx_timeout,
  output logic            rx_overflow
);
  as_aer_tx #(.AE_W(AE_W)) u_tx (
    .clk(tx_clk), .pulse_clk(tx_pulse_clk), .rst,
    .ae(tx_ae), .src_rdy(tx_src_rdy), .dst_rdy(tx_dst_rdy),
    .pulse_out(tx_pulse), .busy(tx_busy),
    .frame_start(tx_frame_start), .frame_end(tx_frame_end)
  );

  as_aer_rx #(.AE_W(AE_W), .PTR_W(PTR_W), .SLOTS(SLOTS), .TIMEOUT(TIMEOUT)) u_rx (
    .pulse_in(rx_pulse), .hsclk_p(rx_hsclk_p), .hsclk_n(rx_hsclk_n),
    .lsclk(rx_lsclk), .rst,
    .ae(rx_ae), .src_rdy(rx_src_rdy), .dst_rdy(rx_dst_rdy),
    .alive(rx_alive), .idle(rx_idle), .error(rx_error),
    .timeout(rx_timeout), .overflow(rx_overflow)
  );
endmodule
