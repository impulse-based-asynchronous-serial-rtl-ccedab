// as_aer_rx: IB-AS-AER receiver.
//
// Chain of the receiver block diagram. Asynchronous part: a toggle
// flip-flop clocked by the received pulses turns them into edges.
// High-speed (hs) domain: a DDR sampler takes two samples per hs period, an
// LFSR counter measures the inter-edge intervals (IEI) and an LFSR-based
// FIFO buffers them. A pulse-to-toggle-to-pulse synchroniser moves them to
// the low-speed (ls) domain, where they are converted to binary sample
// counts, rescaled to transmitter units, decoded into events by the decoder
// FSM and offered on the SPAER interface. With hsclk three times lsclk and
// lsclk equal to the transmitter clock, one transmitter unit is 3 samples.
// Errors of the counter (double edge) and of the FIFO (overflow) travel to
// the decoder's `error`. `rst` is active high and must be held for a few
// cycles of both clocks.
//
// Lint reports `rst` as used both synchronously and asynchronously: that is
// intended. Only the toggle flip-flop, whose clock is the pulse stream and
// may be silent, needs an asynchronous reset; all clocked stages reset
// synchronously.
module as_aer_rx #(
  parameter int unsigned AE_W    = 16,
  parameter int unsigned PTR_W   = 4,
  parameter int unsigned SLOTS   = 4,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic            pulse_in,
  input  logic            hsclk_p,
  input  logic            hsclk_n,
  input  logic            lsclk,
  input  logic            rst,
  output logic [AE_W-1:0] ae,
  output logic            src_rdy,
  input  logic            dst_rdy,
  output logic            alive,
  output logic            idle,
  output logic            error,
  output logic            timeout,
  output logic            overflow
);
  import ib_as_aer_pkg::*;

  logic            rx_data;
  logic [1:0]      samples;
  lfsr6_t          iei, fifo_q, sync_q;
  logic            iei_stb, iei_err;
  logic            fifo_rd, fifo_empty, fifo_full, fifo_ovf;
  logic            sync_stb, sync_err;
  logic [4:0]      count, units;
  logic            cnt_stb, cnt_err, res_stb, res_err;
  logic [AE_W-1:0] ev;
  logic            ev_stb, ev_ok;

  toggle_ff u_tff (.pulse_in, .rst, .q(rx_data));

  ddr_sampler u_ddr (.hsclk_p, .hsclk_n, .rst, .rx_data, .data(samples));

  iei_lfsr_counter u_cnt (
    .clk(hsclk_p), .rst, .data(samples), .iei, .strobe(iei_stb), .error(iei_err)
  );

  lfsr_fifo #(.W(LFSR_W), .PTR_W(PTR_W)) u_fifo (
    .clk(hsclk_p), .rst, .wr(iei_stb), .wdata(iei), .rd(fifo_rd),
    .rdata(fifo_q), .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf)
  );

  ptp_synchronizer #(.W(LFSR_W), .SLOTS(SLOTS)) u_ptp (
    .hsclk(hsclk_p), .rst, .fifo_empty, .fifo_data(fifo_q), .fifo_rd,
    .err_in(iei_err | fifo_ovf),
    .lsclk, .data(sync_q), .strobe(sync_stb), .error(sync_err)
  );

  iei_binary_converter u_bin (
    .clk(lsclk), .rst, .iei(sync_q), .strobe_in(sync_stb), .err_in(sync_err),
    .count, .strobe(cnt_stb), .error(cnt_err)
  );

  iei_resampler u_res (
    .clk(lsclk), .rst, .count, .strobe_in(cnt_stb), .err_in(cnt_err),
    .units, .strobe(res_stb), .error(res_err)
  );

  as_aer_decoder_fsm #(.AE_W(AE_W), .TIMEOUT(TIMEOUT)) u_dec (
    .clk(lsclk), .rst, .units, .strobe_in(res_stb), .err_in(res_err),
    .data(ev), .strobe(ev_stb), .data_ok(ev_ok),
    .alive, .idle, .error, .timeout
  );

  spaer_rx_if #(.AE_W(AE_W)) u_if (
    .clk(lsclk), .rst, .data(ev), .strobe(ev_stb), .data_ok(ev_ok),
    .ae, .src_rdy, .dst_rdy, .overflow
  );

  // `full` is not needed: the FIFO reports a write while full itself.
  logic unused_full;
  assign unused_full = fifo_full;
endmodule
