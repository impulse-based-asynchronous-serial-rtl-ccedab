// iei_binary_converter: converts an interval from the LFSR code of the
// receiver counters to a binary number of samples.
//
// The LFSR-to-count table is worked out at elaboration by stepping the LFSR
// (ib_as_aer_pkg::lfsr6_to_bin), so it holds no hand-written constants. The
// 6-bit count (0..62) is narrowed to 5 bits by saturating at 31: every legal
// data or closing interval is shorter than that, and any longer interval
// only means "opens a frame". Registered, one ls cycle latency; `error`
// passes alongside. The 6-bit input and 5-bit output follow the receiver
// block diagram; the saturation is how this design reads that narrowing.
module iei_binary_converter
  import ib_as_aer_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  lfsr6_t     iei,
  input  logic       strobe_in,
  input  logic       err_in,
  output logic [4:0] count,
  output logic       strobe,
  output logic       error
);
  logic [5:0] bin;
  assign bin = lfsr6_to_bin(iei);

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      strobe <= 1'b0;
      error  <= 1'b0;
    end else begin
      strobe <= strobe_in;
      error  <= err_in;
      if (strobe_in) count <= (bin > 6'd31) ? 5'd31 : bin[4:0];
    end
  end
endmodule
