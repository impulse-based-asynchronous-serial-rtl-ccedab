// lfsr_fifo: single-clock FIFO whose read and write pointers are LFSRs.
//
// Storage has 2**PTR_W entries addressed by the pointer state; a PTR_W-bit
// maximal LFSR visits 2**PTR_W - 1 of them, and one is kept free to tell
// full from empty, so the FIFO holds 2**PTR_W - 2 words. LFSR pointers need
// no adder, which suits the high-speed clock. Show-ahead read: `rdata` is
// the oldest word whenever `empty` is low and `rd` pops it. A write while
// full is dropped and flagged on `overflow` for one cycle. The LFSR-based
// FIFO and its data/strobe/empty/full/read signals follow the receiver block
// diagram; the depth is this design's choice.
module lfsr_fifo
  import ib_as_aer_pkg::*;
#(
  parameter int unsigned W     = 6,
  parameter int unsigned PTR_W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         overflow
);
  logic [W-1:0]     mem [2**PTR_W];
  logic [PTR_W-1:0] wp, rp, wp_next, rp_next;

  assign wp_next  = PTR_W'(lfsr_ptr_step(8'(wp), PTR_W));
  assign rp_next  = PTR_W'(lfsr_ptr_step(8'(rp), PTR_W));
  assign empty    = (wp == rp);
  assign full     = (wp_next == rp);
  assign rdata    = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= PTR_W'(1);
      rp       <= PTR_W'(1);
      overflow <= 1'b0;
    end else begin
      overflow <= wr && full;
      if (wr && !full) wp <= wp_next;
      if (rd && !empty) rp <= rp_next;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp] <= wdata;
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd |-> !empty);
endmodule
