// toggle_ff: asynchronous input toggle flip-flop of the receiver.
//
// Its clock is the received pulse stream itself: every incoming pulse flips
// `q`, which turns the impulse code back into an edge code (one transition
// per pulse) that the DDR sampler can sample at leisure however short the
// pulses are. `rst` clears it asynchronously. The toggle flip-flop and its
// pulse clock are described in the document.
module toggle_ff (
  input  logic pulse_in,
  input  logic rst,
  output logic q
);
  always_ff @(posedge pulse_in or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= ~q;
  end
endmodule
