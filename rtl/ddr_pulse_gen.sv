// ddr_pulse_gen: double-data-rate output stage that emits one short pulse
// for every transition of the NRZM line `tx_data`.
//
// `lead` follows `tx_data` on the rising edge of `pulse_clk`, `trail`
// follows `lead` on the falling edge, and the output is their XOR: a
// transition of `tx_data` makes `pulse_out` high from the next rising edge
// to the following falling edge, i.e. for half a pulse-clock period (2.5 ns
// at 200 MHz). The pulse width of half a pulse-clock period and the DDR
// output stage follow the document; the two-flop XOR form is this design's
// way of writing the DDR register without using the clock as data.
module ddr_pulse_gen (
  input  logic pulse_clk,
  input  logic rst,
  input  logic tx_data,
  output logic pulse_out
);
  logic lead, trail;

  always_ff @(posedge pulse_clk) begin
    if (rst) lead <= 1'b0;
    else     lead <= tx_data;
  end

  always_ff @(negedge pulse_clk) begin
    if (rst) trail <= 1'b0;
    else     trail <= lead;
  end

  assign pulse_out = lead ^ trail;
endmodule
