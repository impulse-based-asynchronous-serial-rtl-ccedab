// nrzm_sequencer: schedules the pulses of IB-AS-AER frames.
//
// Runs on the transmitter clock `clk` (100 MHz nominal). Interval lengths
// are counted in units U of half a clock period (one pulse-clock period), so
// every clock cycle covers two units. The sequencer keeps `t_next`, the
// number of units from the start of the current cycle to the next pulse.
// In the cycle that holds that pulse it issues a command to the modulator:
// `pulse_tog` flips and `delay` (0 or 1) tells in which half of the cycle the
// pulse falls; it then adds the length of the next interval to `t_next`.
// Since every interval is at least 2 U, at most one pulse falls in a cycle.
//
// Frame: a reference pulse (only after GAP_UNITS of quiet), AE_W/2 data
// intervals of SYM_BASE + symbol units, and a closing interval of
// END_BASE + parity units (see ib_as_aer_pkg). If the next event's first
// chunk is already waiting when the closing pulse is issued, that pulse is
// the reference of the next frame (back-to-back packets). `start` and `end_o`
// mark the command of the reference and closing pulses, `data` carries the
// symbol whose interval the issued pulse opens, and `busy` is high while a
// frame is being scheduled. The split of the sequencer (symbols, start, end,
// delay) and the delayed modulator follows the transmitter block diagram;
// the scheduling arithmetic is this design's own.
module nrzm_sequencer
  import ib_as_aer_pkg::*;
#(
  parameter int unsigned AE_W = 16
) (
  input  logic       clk,
  input  logic       rst,
  // chunk stream from the SPAER interface
  input  logic       strobe,
  input  logic [1:0] chunk,
  output logic       take,
  // command to the delayed modulator
  output logic       pulse_tog,
  output logic [1:0] delay,
  output logic [1:0] data,
  output logic       start,
  output logic       end_o,
  // status
  output logic       busy
);
  localparam int unsigned NSYM = AE_W / 2;

  typedef enum logic [1:0] {SQ_IDLE, SQ_DATA, SQ_CLOSE} sq_state_t;

  sq_state_t                 state;
  logic [3:0]                t_next;   // units from cycle start to next pulse
  logic [3:0]                quiet;    // units since the last pulse (saturating)
  logic [$clog2(NSYM+1)-1:0] nsym;     // data intervals scheduled so far
  logic                      parity;

  logic fire;
  assign fire = (state != SQ_IDLE) && (t_next < 4'd2);

  // Consume a chunk when opening a data interval.
  always_comb begin
    take = 1'b0;
    unique case (state)
      SQ_IDLE:  take = strobe && (quiet >= 4'(GAP_UNITS));
      SQ_DATA:  take = fire && (nsym != ($bits(nsym))'(NSYM));
      SQ_CLOSE: take = fire && strobe;
      default:  take = 1'b0;
    endcase
  end

  assign busy = (state != SQ_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= SQ_IDLE;
      t_next    <= '0;
      quiet     <= 4'(GAP_UNITS);
      nsym      <= '0;
      parity    <= 1'b0;
      pulse_tog <= 1'b0;
      delay     <= '0;
      data      <= '0;
      start     <= 1'b0;
      end_o     <= 1'b0;
    end else begin
      start <= 1'b0;
      end_o <= 1'b0;
      unique case (state)
        SQ_IDLE: begin
          if (take) begin
            // reference pulse at the start of this cycle
            pulse_tog <= ~pulse_tog;
            delay     <= 2'd0;
            data      <= chunk;
            start     <= 1'b1;
            t_next    <= 4'(SYM_BASE) + 4'(chunk) - 4'd2;
            nsym      <= ($bits(nsym))'(1);
            parity    <= ^chunk;
            state     <= SQ_DATA;
          end else if (quiet < 4'(GAP_UNITS)) begin
            quiet <= quiet + 4'd2;
          end
        end
        SQ_DATA: begin
          if (fire) begin
            pulse_tog <= ~pulse_tog;
            delay     <= 2'(t_next);
            if (take) begin
              data   <= chunk;
              t_next <= t_next + 4'(SYM_BASE) + 4'(chunk) - 4'd2;
              nsym   <= nsym + 1'b1;
              parity <= parity ^ (^chunk);
            end else begin
              data   <= {1'b0, parity};
              t_next <= t_next + 4'(END_BASE) + 4'(parity) - 4'd2;
              state  <= SQ_CLOSE;
            end
          end else begin
            t_next <= t_next - 4'd2;
          end
        end
        SQ_CLOSE: begin
          if (fire) begin
            pulse_tog <= ~pulse_tog;
            delay     <= 2'(t_next);
            end_o     <= 1'b1;
            if (take) begin
              // back-to-back: the closing pulse opens the next frame
              data   <= chunk;
              t_next <= t_next + 4'(SYM_BASE) + 4'(chunk) - 4'd2;
              nsym   <= ($bits(nsym))'(1);
              parity <= ^chunk;
              state  <= SQ_DATA;
            end else begin
              quiet  <= 4'd2 - t_next;
              state  <= SQ_IDLE;
            end
          end else begin
            t_next <= t_next - 4'd2;
          end
        end
        default: state <= SQ_IDLE;
      endcase
    end
  end

  // A frame, once started, always has its next chunk ready in time.
  a_chunk_ready: assert property (@(posedge clk) disable iff (rst)
    (state == SQ_DATA && fire && nsym != ($bits(nsym))'(NSYM)) |-> strobe);
endmodule
