// spaer_tx_if: synchronous parallel AER (SPAER) input of the transmitter.
//
// Accepts one AE_W-bit address event with a src_rdy/dst_rdy handshake (an
// event moves on a clock edge where both are high) and hands it to the
// sequencer as AE_W/2 chunks of 2 bits, most significant pair first.
// `strobe` says that `chunk` is valid; the sequencer pulses `take` in the
// cycle it consumes a chunk. The interface holds one event: dst_rdy is high
// while the buffer is empty, and drops for the cycles in which an event is
// being serialised. The block and its 2-bit output follow the transmitter
// block diagram; the one-event buffer and the `take` handshake are this
// design's choices. Synchronous active-high reset, all in the `clk` domain.
module spaer_tx_if #(
  parameter int unsigned AE_W = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AE_W-1:0] ae,
  input  logic            src_rdy,
  output logic            dst_rdy,
  output logic            strobe,
  output logic [1:0]      chunk,
  input  logic            take
);
  localparam int unsigned NCH = AE_W / 2;

  logic [AE_W-1:0]          shreg;
  logic                     full;
  logic [$clog2(NCH+1)-1:0] cnt;

  assign dst_rdy = !full;
  assign strobe  = full;
  assign chunk   = shreg[AE_W-1 -: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      full  <= 1'b0;
      cnt   <= '0;
      shreg <= '0;
    end else if (!full) begin
      if (src_rdy) begin
        shreg <= ae;
        full  <= 1'b1;
        cnt   <= '0;
      end
    end else if (take) begin
      shreg <= shreg << 2;
      cnt   <= cnt + 1'b1;
      if (cnt == ($bits(cnt))'(NCH - 1)) full <= 1'b0;
    end
  end

  // The sequencer may only consume a chunk that is there.
  a_take_valid: assert property (@(posedge clk) disable iff (rst) take |-> strobe);
endmodule
