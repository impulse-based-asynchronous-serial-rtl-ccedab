// ddr_sampler: samples the asynchronous edge-coded line `rx_data` on both
// the rising edges of `hsclk_p` and of `hsclk_n` (the inverted high-speed
// clock), giving two samples per high-speed period.
//
// Each sample path has two synchronising flip-flops against metastability.
// On each rising edge of `hsclk_p` the output `data` gets one pair of
// consecutive samples: data[0] is the earlier (hsclk_p) sample and data[1]
// the sample taken half a period later (hsclk_n). Latency is about two
// high-speed periods. Sampling on both clock phases follows the receiver
// block diagram; the synchroniser depth is this design's choice.
module ddr_sampler (
  input  logic       hsclk_p,
  input  logic       hsclk_n,
  input  logic       rst,
  input  logic       rx_data,
  output logic [1:0] data
);
  logic p1, p2, n1, n2;

  always_ff @(posedge hsclk_p) begin
    if (rst) begin
      p1   <= 1'b0;
      p2   <= 1'b0;
      data <= '0;
    end else begin
      p1   <= rx_data;
      p2   <= p1;
      data <= {n2, p2};
    end
  end

  always_ff @(posedge hsclk_n) begin
    if (rst) begin
      n1 <= 1'b0;
      n2 <= 1'b0;
    end else begin
      n1 <= rx_data;
      n2 <= n1;
    end
  end
endmodule
