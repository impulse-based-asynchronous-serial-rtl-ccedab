// as_aer_decoder_fsm: rebuilds address events from the sequence of
// intervals (in transmitter units U) delivered by the resampler.
//
// States: IDLE waits for an interval of at least START_MIN units, which
// marks the reference pulse of a frame; DATA collects AE_W/2 symbols from
// intervals of 2..5 units (most significant pair first); CLOSE expects the
// closing interval of 6 + p units and checks p against the even parity of
// the payload. A complete frame is put out on `data` with a one-cycle
// `strobe` and `data_ok` (parity correct). After a frame the FSM waits in
// DATA, since the closing pulse may open a back-to-back frame. Because a
// closing interval cannot be taken for anything else, the FSM also
// realigns on one: in IDLE it moves to DATA, and in DATA it drops the short
// frame and starts over, so that a receiver that lost a pulse recovers on a
// line that never pauses. Status:
// `alive` pulses for each accepted interval, `idle` is high in IDLE, `error`
// pulses for an illegal interval, a parity mismatch or an error reported by
// the stages before, and `timeout` pulses when a frame in progress gets no
// interval for TIMEOUT cycles (the frame is then dropped). The status names
// follow the receiver block diagram; their exact meaning, the interval code
// and the timeout length are this design's choices. All outputs registered.
module as_aer_decoder_fsm
  import ib_as_aer_pkg::*;
#(
  parameter int unsigned AE_W    = 16,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      units,
  input  logic            strobe_in,
  input  logic            err_in,
  output logic [AE_W-1:0] data,
  output logic            strobe,
  output logic            data_ok,
  output logic            alive,
  output logic            idle,
  output logic            error,
  output logic            timeout
);
  localparam int unsigned NSYM = AE_W / 2;

  typedef enum logic [1:0] {D_IDLE, D_DATA, D_CLOSE} dec_state_t;

  dec_state_t                   state;
  logic [AE_W-1:0]              shreg;
  logic [$clog2(NSYM+1)-1:0]    nsym;
  logic                         in_frame;   // a reference pulse has opened a frame
  logic [$clog2(TIMEOUT+1)-1:0] quiet;

  logic is_start, is_sym, is_close;
  logic [1:0] sym;
  logic       par;
  assign is_start = (units >= 5'(START_MIN));
  assign is_sym   = (units >= 5'(SYM_BASE)) && (units <= 5'(SYM_BASE + 3));
  assign is_close = (units == 5'(END_BASE)) || (units == 5'(END_BASE + 1));
  assign sym      = 2'(units - 5'(SYM_BASE));
  assign par      = (units == 5'(END_BASE + 1));

  assign idle = (state == D_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= D_IDLE;
      shreg    <= '0;
      nsym     <= '0;
      in_frame <= 1'b0;
      quiet    <= '0;
      data     <= '0;
      strobe   <= 1'b0;
      data_ok  <= 1'b0;
      alive    <= 1'b0;
      error    <= 1'b0;
      timeout  <= 1'b0;
    end else begin
      strobe  <= 1'b0;
      alive   <= 1'b0;
      error   <= 1'b0;
      timeout <= 1'b0;
      if (err_in) begin
        error    <= 1'b1;
        state    <= D_IDLE;
        in_frame <= 1'b0;
      end else if (strobe_in) begin
        quiet <= '0;
        if (is_start) begin
          // a frame cut short by a long pause is an error
          if (in_frame) error <= 1'b1;
          alive    <= 1'b1;
          state    <= D_DATA;
          nsym     <= '0;
          in_frame <= 1'b1;
        end else begin
          unique case (state)
            D_IDLE: begin
              // a closing interval is unmistakable: the pulse that ends it
              // can open the next frame, so a busy line resynchronises
              // without waiting for a pause
              if (is_close) begin
                state <= D_DATA;
                nsym  <= '0;
              end
            end
            D_DATA: begin
              if (is_sym) begin
                alive    <= 1'b1;
                in_frame <= 1'b1;
                shreg    <= {shreg[AE_W-3:0], sym};
                nsym     <= nsym + 1'b1;
                if (nsym == ($bits(nsym))'(NSYM - 1)) state <= D_CLOSE;
              end else if (is_close) begin
                // frame too short: drop it, but stay aligned on this pulse
                error    <= 1'b1;
                nsym     <= '0;
                in_frame <= 1'b0;
              end else begin
                error    <= 1'b1;
                state    <= D_IDLE;
                in_frame <= 1'b0;
              end
            end
            D_CLOSE: begin
              if (is_close) begin
                alive    <= 1'b1;
                data     <= shreg;
                strobe   <= 1'b1;
                data_ok  <= (par == ^shreg);
                if (par != ^shreg) error <= 1'b1;
                state    <= D_DATA;
                nsym     <= '0;
                in_frame <= 1'b0;
              end else begin
                error    <= 1'b1;
                state    <= D_IDLE;
                in_frame <= 1'b0;
              end
            end
            default: state <= D_IDLE;
          endcase
        end
      end else if (state != D_IDLE) begin
        if (quiet == ($bits(quiet))'(TIMEOUT)) begin
          timeout  <= in_frame;
          state    <= D_IDLE;
          in_frame <= 1'b0;
          quiet    <= '0;
        end else begin
          quiet <= quiet + 1'b1;
        end
      end
    end
  end
endmodule
