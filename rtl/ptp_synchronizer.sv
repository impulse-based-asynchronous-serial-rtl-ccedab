// ptp_synchronizer: pulse-to-toggle-to-pulse transfer of interval words
// from the high-speed (hs) clock domain to the low-speed (ls) domain.
//
// hs side: whenever the FIFO is not empty and the next of SLOTS holding
// registers is free, it pops a word (`fifo_rd`), stores it in that slot and
// flips the slot's request toggle. ls side: each request toggle passes two
// synchronising flip-flops; the ls side visits the slots in order and, when
// the current slot's synchronised toggle differs from its acknowledge
// toggle, reads the slot (stable since before the toggle moved), emits it
// with a one-cycle `strobe` and flips the acknowledge toggle, which returns
// through two hs flip-flops to free the slot. Several slots keep the link
// moving at one word per ls cycle despite the round-trip latency. Error
// pulses of the hs side (`err_in`) travel the same way on a toggle of their
// own and come out as a one-cycle `error` in the ls domain. The block name
// and its place follow the receiver block diagram; the slot scheme and
// synchroniser depth are this design's choices. `rst` must be held for a few
// cycles of both clocks.
module ptp_synchronizer #(
  parameter int unsigned W     = 6,
  parameter int unsigned SLOTS = 4
) (
  // hs domain
  input  logic         hsclk,
  input  logic         rst,
  input  logic         fifo_empty,
  input  logic [W-1:0] fifo_data,
  output logic         fifo_rd,
  input  logic         err_in,
  // ls domain
  input  logic         lsclk,
  output logic [W-1:0] data,
  output logic         strobe,
  output logic         error
);
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  // hs side
  logic [W-1:0]     slot [SLOTS];
  logic [SLOTS-1:0] req_tog, ack_s1, ack_s2;
  logic [SW-1:0]    wsel;
  logic             err_tog;
  // ls side
  logic [SLOTS-1:0] req_s1, req_s2, ack_tog;
  logic [SW-1:0]    rsel;
  logic [2:0]       err_s;

  assign fifo_rd = !fifo_empty && (req_tog[wsel] == ack_s2[wsel]);

  always_ff @(posedge hsclk) begin
    if (rst) begin
      req_tog <= '0;
      ack_s1  <= '0;
      ack_s2  <= '0;
      wsel    <= '0;
      err_tog <= 1'b0;
    end else begin
      ack_s1 <= ack_tog;
      ack_s2 <= ack_s1;
      if (err_in) err_tog <= ~err_tog;
      if (fifo_rd) begin
        req_tog[wsel] <= ~req_tog[wsel];
        wsel          <= (wsel == SW'(SLOTS - 1)) ? '0 : wsel + 1'b1;
      end
    end
  end

  always_ff @(posedge hsclk) begin
    if (fifo_rd) slot[wsel] <= fifo_data;
  end

  always_ff @(posedge lsclk) begin
    if (rst) begin
      req_s1  <= '0;
      req_s2  <= '0;
      ack_tog <= '0;
      rsel    <= '0;
      err_s   <= '0;
      data    <= '0;
      strobe  <= 1'b0;
      error   <= 1'b0;
    end else begin
      req_s1 <= req_tog;
      req_s2 <= req_s1;
      err_s  <= {err_s[1:0], err_tog};
      error  <= err_s[2] ^ err_s[1];
      strobe <= 1'b0;
      if (req_s2[rsel] != ack_tog[rsel]) begin
        data          <= slot[rsel];
        strobe        <= 1'b1;
        ack_tog[rsel] <= ~ack_tog[rsel];
        rsel          <= (rsel == SW'(SLOTS - 1)) ? '0 : rsel + 1'b1;
      end
    end
  end
endmodule
