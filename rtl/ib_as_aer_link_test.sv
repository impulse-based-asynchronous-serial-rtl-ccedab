// ib_as_aer_link_test: the link-test system around one IB-AS-AER node: a
// pseudo-random event generator feeds the node's transmitter, and a checker
// compares what the node's receiver decodes with the same sequence.
//
// The optical path (laser driver, laser, fibre, photodiode and its
// conditioning circuit) is analog and lies outside: `tx_pulse` goes to the
// laser driver and `rx_pulse` comes from the conditioning circuit. Joining
// the two directly gives an electrical loop-back. The generator runs in the
// transmitter clock domain (tx_clk), the checker in the receiver's
// low-speed domain (rx_lsclk); the two domains need no common clock. The
// generator's rate and jitter, and its enable, are set at run time.
//
// Counters: gen_sent and gen_missed (triggers dropped because the
// transmitter was still busy) from the generator; chk_good, chk_lost,
// chk_corrupted and chk_resyncs from the checker. Events not received
// correctly = gen_sent - chk_good once the link is idle. The receiver's
// status outputs are brought out as well, except its overflow flag: the
// checker accepts every event in the cycle it arrives, so none is dropped
// at the receiver's output.
//
// Lint reports `rst` as used both synchronously and asynchronously: that is
// intended, see ib_as_aer_node. `rst` must be held for a few cycles of the
// slower of tx_clk and rx_lsclk.
module ib_as_aer_link_test #(
  parameter int unsigned AE_W  = 16,
  parameter int unsigned CNT_W = 33
) (
  input  logic             rst,
  input  logic             tx_clk,
  input  logic             tx_pulse_clk,
  input  logic             rx_hsclk_p,
  input  logic             rx_hsclk_n,
  input  logic             rx_lsclk,
  // generator control (tx_clk domain)
  input  logic             gen_enable,
  input  logic [15:0]      gen_period,
  input  logic [15:0]      gen_jitter,
  // line
  output logic             tx_pulse,
  input  logic             rx_pulse,
  // results
  output logic [CNT_W-1:0] gen_sent,
  output logic [CNT_W-1:0] gen_missed,
  output logic [CNT_W-1:0] chk_good,
  output logic [CNT_W-1:0] chk_lost,
  output logic [CNT_W-1:0] chk_corrupted,
  output logic [CNT_W-1:0] chk_resyncs,
  output logic             chk_mismatch,
  output logic             tx_busy,
  output logic             rx_alive,
  output logic             rx_idle,
  output logic             rx_error,
  output logic             rx_timeout
);
  logic [AE_W-1:0] tx_ae, rx_ae;
  logic            tx_src_rdy, tx_dst_rdy, rx_src_rdy;
  logic            tx_frame_start, tx_frame_end;
  logic            rx_overflow;

  aer_event_gen #(.AE_W(AE_W), .CNT_W(CNT_W)) u_gen (
    .clk(tx_clk), .rst, .enable(gen_enable),
    .period(gen_period), .jitter(gen_jitter),
    .ae(tx_ae), .src_rdy(tx_src_rdy), .dst_rdy(tx_dst_rdy),
    .sent(gen_sent), .missed(gen_missed)
  );

  ib_as_aer_node #(.AE_W(AE_W)) u_node (
    .rst,
    .tx_clk, .tx_pulse_clk, .tx_ae, .tx_src_rdy, .tx_dst_rdy,
    .tx_pulse, .tx_busy, .tx_frame_start, .tx_frame_end,
    .rx_pulse, .rx_hsclk_p, .rx_hsclk_n, .rx_lsclk,
    .rx_ae, .rx_src_rdy, .rx_dst_rdy(1'b1),
    .rx_alive, .rx_idle, .rx_error, .rx_timeout, .rx_overflow
  );

  aer_event_checker #(.AE_W(AE_W), .CNT_W(CNT_W)) u_chk (
    .clk(rx_lsclk), .rst, .ae(rx_ae), .src_rdy(rx_src_rdy),
    .good(chk_good), .lost(chk_lost), .corrupted(chk_corrupted),
    .resyncs(chk_resyncs), .mismatch(chk_mismatch)
  );

  // frame markers are for observation only; the receiver's overflow flag
  // cannot rise, because the checker takes every event at once
  logic unused;
  assign unused = tx_frame_start ^ tx_frame_end ^ rx_overflow;
endmodule
