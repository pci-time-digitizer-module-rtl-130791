// link_sync: frame source of the gigabit data emitter and receiver word-boundary sync.
//
// In normal operation the emitter repeats the reference frame, which reaches every
// channel's inverter gate; a pulse inverts it, and the receivers return the modified
// frames. To put the receivers on the right 40-bit word boundary, the document provides a
// way to override the input pulses and send a special sequence. Here a `sync_req` pulse
// starts that: the FSM raises `override_inputs` (the front end then passes the emitter's
// stream unmodified), sends the sync frame and tells the aligners to search (`align`).
// When every enabled receiver reports `aligned`, it goes back to the reference frame but
// keeps the inputs overridden for GUARD more frames so that sync frames still in flight
// are not taken for pulses; `busy` covers the whole sequence. If the receivers have not
// all locked after TIMEOUT frames it gives up and sets `failed` until the next request.
// State changes happen on frame enables. The FSM, GUARD and TIMEOUT are this design's.
module link_sync
  import tdc_pkg::*;
#(
  parameter int unsigned GUARD   = 8,
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               sync_req,
  input  logic [NCH-1:0]     ch_en,
  input  logic [NCH-1:0]     aligned,
  output logic [FRAME_W-1:0] tx_word,
  output logic               override_inputs,
  output logic               align,
  output logic               busy,
  output logic               failed
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_FLUSH} state_t;
  state_t      state;
  logic        req_pend;
  logic [$clog2(TIMEOUT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req_pend <= 1'b0;
      cnt      <= '0;
      failed   <= 1'b0;
    end else begin
      if (sync_req) req_pend <= 1'b1;
      if (ce) begin
        unique case (state)
          S_IDLE: if (req_pend || sync_req) begin
            state    <= S_SEND;
            req_pend <= 1'b0;
            failed   <= 1'b0;
            cnt      <= '0;
          end
          S_SEND: begin
            cnt <= cnt + 1'b1;
            // wait at least two frames so that stale lock flags are cleared
            if (cnt >= 2 && (aligned & ch_en) == ch_en) begin
              state <= S_FLUSH;
              cnt   <= '0;
            end else if (cnt == TIMEOUT[$bits(cnt)-1:0]) begin
              state  <= S_FLUSH;
              failed <= 1'b1;
              cnt    <= '0;
            end
          end
          S_FLUSH: begin
            cnt <= cnt + 1'b1;
            if (cnt == GUARD[$bits(cnt)-1:0] - 1'b1) state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign tx_word         = (state == S_SEND) ? SYNC_FRAME : REF_FRAME;
  assign override_inputs = (state != S_IDLE);
  assign align           = (state == S_SEND);
  assign busy            = (state != S_IDLE);
endmodule
