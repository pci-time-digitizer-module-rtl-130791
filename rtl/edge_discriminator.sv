// edge_discriminator: edge polarity discriminator with time stamping of one channel.
//
// A state machine takes 104-bit words from the receive queue. In a word's 41 pulse-level
// bits (bit 0 = last bit of the previous frame) an edge at position j (0..39) means that
// level bit j+1 differs from bit j; its polarity is the new level (1 = rising = leading
// edge of a pulse, 0 = falling = trailing edge). The edges allowed by `edge_sel` become
// a mask, and the FSM emits one 64-bit event per clock for the lowest remaining mask bit:
// time = frame time + j (so 0.4 ns resolution), polarity, tag. A frame with n selected
// edges therefore takes n clocks; the next word is taken in the clock that emits the last
// edge of the current one, so back-to-back words run without gaps. If the EMIFA queue is
// full the FSM waits (`out_full`), and the receive queue absorbs the backlog; pulses are
// then lost only where the receive queue overflows. The decoding and event format follow
// the document; one edge per clock and waiting on a full output queue are this design's.
module edge_discriminator
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  edge_sel_t edge_sel,
  input  rx_entry_t in_data,
  input  logic      in_empty,
  output logic      in_rd,
  output event_t    out_data,
  output logic      out_wr,
  input  logic      out_full
);
  typedef enum logic {S_IDLE, S_EMIT} state_t;
  state_t             state;
  logic [FRAME_W-1:0] mask;
  logic [FRAME_W-1:0] level;   // new level after each position
  logic [TIME_W-1:0]  t0;
  logic [TAG_W-1:0]   tag;

  logic [FRAME_W-1:0] in_edges, in_mask;
  logic [FINE_W-1:0]  j;
  logic               emit, last;

  always_comb begin
    in_edges = in_data.lvl[FRAME_W:1] ^ in_data.lvl[FRAME_W-1:0];
    in_mask  = '0;
    if (edge_sel[0]) in_mask |= in_edges &  in_data.lvl[FRAME_W:1];
    if (edge_sel[1]) in_mask |= in_edges & ~in_data.lvl[FRAME_W:1];
  end

  always_comb begin
    j = '0;
    for (int k = FRAME_W - 1; k >= 0; k--)
      if (mask[k]) j = FINE_W'(k);
  end

  assign emit  = (state == S_EMIT) && !out_full;
  assign last  = ((mask & (mask - 1'b1)) == '0);
  assign in_rd = !in_empty && ((state == S_IDLE) || (emit && last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mask     <= '0;
      level    <= '0;
      t0       <= '0;
      tag      <= '0;
      out_wr   <= 1'b0;
      out_data <= '0;
    end else begin
      out_wr <= emit;
      if (emit) begin
        out_data.t   <= t0 + TIME_W'(j);
        out_data.pol <= level[j];
        out_data.tag <= tag;
        mask[j]      <= 1'b0;
        if (last) state <= S_IDLE;
      end
      if (in_rd) begin
        mask  <= in_mask;
        level <= in_data.lvl[FRAME_W:1];
        t0    <= in_data.t;
        tag   <= in_data.tag;
        state <= (in_mask != '0) ? S_EMIT : S_IDLE;
      end
    end
  end

  a_one_hot_pick: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_EMIT) |-> (mask != '0));
endmodule
