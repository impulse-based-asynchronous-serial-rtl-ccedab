// iei_resampler: rescales an interval from receiver samples to transmitter
// units U by rounding to the nearest multiple of SAMPLES_PER_UNIT.
//
// With the receiver high-speed clock at three times the low-speed clock, the
// low-speed clock at the transmitter clock frequency and both sides working
// at double data rate, one transmitter unit (half a transmitter clock
// period) spans 3 samples. A count c becomes round(c / 3) = (c + 1) / 3, so
// each unit value u covers counts 3u-1..3u+1; that one-sample margin is what
// makes the link tolerant to a difference between the two free-running
// clocks. Registered, one ls cycle latency; `error` passes alongside. The
// clock ratio of three follows the document; the rounding rule is this
// design's choice.
module iei_resampler #(
  parameter int unsigned SAMPLES_PER_UNIT = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] count,
  input  logic       strobe_in,
  input  logic       err_in,
  output logic [4:0] units,
  output logic       strobe,
  output logic       error
);
  logic [4:0] rounded;
  assign rounded = 5'((6'(count) + 6'(SAMPLES_PER_UNIT / 2)) / 6'(SAMPLES_PER_UNIT));

  always_ff @(posedge clk) begin
    if (rst) begin
      units  <= '0;
      strobe <= 1'b0;
      error  <= 1'b0;
    end else begin
      strobe <= strobe_in;
      error  <= err_in;
      if (strobe_in) units <= rounded;
    end
  end
endmodule
