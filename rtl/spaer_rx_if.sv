// spaer_rx_if: synchronous parallel AER (SPAER) output of the receiver.
//
// Holds one decoded event and offers it on `ae` with `src_rdy`; the event
// leaves on a clock edge where `src_rdy` and `dst_rdy` are both high. Only
// frames with correct parity (`data_ok`) are offered. A new event that
// arrives while the register is still occupied (and is not being taken in
// the same cycle) is dropped and flagged on `overflow` for one cycle, since
// the serial link itself cannot be paused. The block and its
// AE/src_rdy/dst_rdy signals follow the document; the one-event register
// and the overflow flag are this design's choices.
module spaer_rx_if #(
  parameter int unsigned AE_W = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AE_W-1:0] data,
  input  logic            strobe,
  input  logic            data_ok,
  output logic [AE_W-1:0] ae,
  output logic            src_rdy,
  input  logic            dst_rdy,
  output logic            overflow
);
  logic room;
  assign room = !src_rdy || dst_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      ae       <= '0;
      src_rdy  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= strobe && data_ok && !room;
      if (strobe && data_ok && room) begin
        ae      <= data;
        src_rdy <= 1'b1;
      end else if (src_rdy && dst_rdy) begin
        src_rdy <= 1'b0;
      end
    end
  end

  // An offered event stays unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (src_rdy && !dst_rdy) |=> (src_rdy && $stable(ae)));
endmodule
