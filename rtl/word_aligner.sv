// word_aligner: finds the 40-bit word boundary of one receiver and measures its latency.
//
// A receiver delivers 40 bits per frame, but after power-up its frames may start at any of
// 40 bit positions of the emitter's frames. The aligner keeps the previous word; the 80
// bits {current, previous} hold, in time order (bit 0 first), every 40-bit window that
// could be the true frame. While `align` is high it compares the 40 windows that end in
// the current word (offsets 1..40) with the sync frame on each frame enable. On the first
// match of a search it stores that window offset, sets `locked`, and stores in `latency`
// the number of frame enables from the start of the search (the frame in which the
// emitter switched to the sync frame) to that match. A receiver whose words end a few
// bits after a frame enable delivers each frame one enable later than one on the frame
// boundary; `latency` exposes that difference so that the channel can take it out of its
// time stamps. Offset and latency are kept when `align` falls; `locked` is cleared when a
// new search starts. `rx_aligned` is the window at the stored offset, registered on the
// frame enable: the frame whose last bit arrived in the current word appears one clock
// later. The search and the latency measurement are this design's: the document only says
// that a special sequence puts the receivers on the right word boundary.
module word_aligner
  import tdc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               align,
  input  logic [FRAME_W-1:0] rx_raw,
  output logic [FRAME_W-1:0] rx_aligned,
  output logic               locked,
  output logic [3:0]         latency
);
  logic [FRAME_W-1:0]   prev;
  logic [2*FRAME_W-1:0] win;
  logic [5:0]           offset;
  logic                 align_d;
  logic                 hit;
  logic [5:0]           hit_off;
  logic [3:0]           lat_cnt;

  assign win = {rx_raw, prev};

  always_comb begin
    hit     = 1'b0;
    hit_off = '0;
    for (int k = FRAME_W; k >= 1; k--) begin
      if (win[k +: FRAME_W] == SYNC_FRAME) begin
        hit     = 1'b1;
        hit_off = 6'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      offset     <= 6'(FRAME_W);
      locked     <= 1'b0;
      align_d    <= 1'b0;
      rx_aligned <= '0;
      latency    <= '0;
      lat_cnt    <= '0;
    end else if (ce) begin
      prev       <= rx_raw;
      align_d    <= align;
      rx_aligned <= win[7'(offset) +: FRAME_W];
      if (align) begin
        if (!align_d) begin
          // first enable of a new search
          lat_cnt <= 4'd1;
          locked  <= hit;
          if (hit) begin
            offset  <= hit_off;
            latency <= '0;
          end
        end else if (!locked) begin
          if (lat_cnt != '1) lat_cnt <= lat_cnt + 1'b1;
          if (hit) begin
            offset  <= hit_off;
            latency <= lat_cnt;
            locked  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
