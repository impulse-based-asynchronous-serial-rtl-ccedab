// ib_as_aer_pkg: constants and helper functions shared by the IB-AS-AER
// transmitter and receiver.
//
// Line code. An event of AE_W bits is sent as a train of short pulses. The
// information is in the time between consecutive pulses, counted in units U
// of one transmitter pulse-clock period (5 ns at the nominal 200 MHz pulse
// clock, i.e. half a 100 MHz transmitter clock period):
//   * a reference pulse opens a frame after the line has been quiet for at
//     least GAP_UNITS units (the receiver sees a long interval);
//   * each 2-bit symbol s (most significant pair first) is an interval of
//     SYM_BASE + s units (2..5 U);
//   * a closing interval of END_BASE + p units (6 or 7 U) ends the frame,
//     where p is the even-parity bit of the payload;
//   * the closing pulse can serve as the reference pulse of the next frame,
//     so frames can follow each other back to back.
// The document states that data are coded in pulse-to-pulse intervals with
// 2-bit symbols and start/end/parity overhead; the interval values above are
// this design's choice.
//
// The receiver measures intervals with 6-bit LFSR counters; the functions
// below give the LFSR sequence and its mapping back to binary counts.
package ib_as_aer_pkg;

  // Interval code, in transmitter units U.
  localparam int unsigned SYM_BASE  = 2;  // data symbol s -> SYM_BASE + s
  localparam int unsigned END_BASE  = 6;  // closing interval -> END_BASE + parity
  localparam int unsigned START_MIN = 8;  // any interval >= START_MIN opens a frame
  localparam int unsigned GAP_UNITS = 8;  // quiet time before a fresh reference pulse

  // 6-bit maximal-length LFSR (x^6 + x^5 + 1), 63 states.
  localparam int unsigned LFSR_W = 6;
  typedef logic [LFSR_W-1:0] lfsr6_t;
  localparam lfsr6_t LFSR6_ZERO = 6'b000001;   // state that stands for count 0
  localparam int unsigned LFSR6_MAX = 62;      // counting saturates here

  function automatic lfsr6_t lfsr6_step(lfsr6_t x);
    return {x[4:0], x[5] ^ x[4]};
  endfunction

  // State reached after n steps from LFSR6_ZERO, i.e. the code of count n.
  function automatic lfsr6_t lfsr6_code(int unsigned n);
    lfsr6_t x = LFSR6_ZERO;
    for (int unsigned i = 0; i < 63; i++)
      if (i < n) x = lfsr6_step(x);
    return x;
  endfunction

  localparam lfsr6_t LFSR6_SAT = lfsr6_code(LFSR6_MAX);

  // Count that an LFSR state stands for (0..62); 63 for the unused zero state.
  function automatic logic [5:0] lfsr6_to_bin(lfsr6_t s);
    lfsr6_t x = LFSR6_ZERO;
    logic [5:0] r = 6'd63;
    for (int unsigned i = 0; i < 63; i++) begin
      if (x == s) r = 6'(i);
      x = lfsr6_step(x);
    end
    return r;
  endfunction

  // Saturating increment of an LFSR count.
  function automatic lfsr6_t lfsr6_inc(lfsr6_t x);
    return (x == LFSR6_SAT) ? LFSR6_SAT : lfsr6_step(x);
  endfunction

  // Generic Fibonacci LFSR step for FIFO pointers of 3..8 bits (maximal taps).
  function automatic logic [7:0] lfsr_ptr_step(logic [7:0] x, int unsigned w);
    logic fb;
    case (w)
      3:       fb = x[2] ^ x[1];
      4:       fb = x[3] ^ x[2];
      5:       fb = x[4] ^ x[2];
      6:       fb = x[5] ^ x[4];
      7:       fb = x[6] ^ x[5];
      default: fb = x[7] ^ x[5] ^ x[4] ^ x[3];
    endcase
    return ({x[6:0], fb}) & ((8'd1 << w) - 8'd1);
  endfunction

  // Pseudo-random test patterns: a Galois LFSR as wide as the event, one
  // step per event, so that its 2^w - 1 states cover every non-zero payload.
  // The state sits in the low w bits of a 32-bit word; prbs_taps gives the
  // feedback mask of a maximal-length polynomial for the widths supported
  // (8, 12, 16, 20, 24, 32), and 0 for any other width.
  function automatic logic [31:0] prbs_taps(int unsigned w);
    case (w)
      8:       return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      12:      return 32'h0000_0829;  // x^12+x^6+x^4+x+1
      16:      return 32'h0000_B400;  // x^16+x^14+x^13+x^11+1
      20:      return 32'h0009_0000;  // x^20+x^17+1
      24:      return 32'h00E1_0000;  // x^24+x^23+x^22+x^17+1
      32:      return 32'h8020_0003;  // x^32+x^22+x^2+x+1
      default: return 32'h0;
    endcase
  endfunction

  function automatic logic [31:0] prbs_step(logic [31:0] x, int unsigned w);
    return x[0] ? ((x >> 1) ^ prbs_taps(w)) : (x >> 1);
  endfunction

endpackage
