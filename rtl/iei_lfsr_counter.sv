// iei_lfsr_counter: measures the inter-edge interval (IEI) of the sampled
// line, in samples, with a 6-bit LFSR counter.
//
// Takes two samples per high-speed cycle (data[0] earlier, data[1] later).
// `since` holds, in LFSR code, the number of samples from the last edge to
// sample data[0] of the current cycle. An edge at sample i ends an interval
// of since + i samples, which is put out as `iei` (LFSR code, see
// ib_as_aer_pkg) with a one-cycle `strobe`. Counting saturates at 62
// samples, so after a quiet line the first edge reports 62: a long interval.
// Two edges in the same cycle (a one-sample interval, far below any legal
// spacing) raise `error`; the first interval is still reported. An LFSR
// counter is used, as in the document, because it needs no carry chain at
// the high sampling clock. Output registered, one cycle latency.
module iei_lfsr_counter
  import ib_as_aer_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] data,
  output lfsr6_t     iei,
  output logic       strobe,
  output logic       error
);
  logic   last;
  lfsr6_t since;
  logic   e0, e1;

  assign e0 = data[0] ^ last;
  assign e1 = data[1] ^ data[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      last   <= 1'b0;
      since   <= LFSR6_SAT;
      iei    <= LFSR6_SAT;
      strobe <= 1'b0;
      error  <= 1'b0;
    end else begin
      last   <= data[1];
      strobe <= e0 | e1;
      error  <= e0 & e1;
      if (e0) begin
        iei  <= since;
        since <= e1 ? lfsr6_code(1) : lfsr6_code(2);
      end else if (e1) begin
        iei  <= lfsr6_inc(since);
        since <= lfsr6_code(1);
      end else begin
        since <= lfsr6_inc(lfsr6_inc(since));
      end
    end
  end
endmodule
