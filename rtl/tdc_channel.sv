// tdc_channel: one of the eight TDC channels of the pulse processor.
//
// Data path, as drawn in the document for each channel: receiver word -> word aligner ->
// 40-bit word event detector and time stamping -> 511 x 104 receive queue -> edge polarity
// discriminator -> 511 x 64 EMIFA queue, which the DSP reads over the EMIFA bus. Frames
// arrive on the frame enable (one per 16 ns, up to 20 edges of one polarity each), so the
// receive queue takes bursts at up to 1.25 Gevent/s; the discriminator drains it at one
// edge per 125 MHz clock. `overflow` pulses when a frame is lost because the receive queue
// is full; `half_full` is the EMIFA queue's flag that the interrupt logic turns into an
// interrupt. The 7-bit tag of each event is {channel number (3 bits), external tag bits
// 3..0}: the document says the tag identifies the channel but not how the bits are made up.
// The frame time given to the detector is the shared time minus 40 x the latency the
// aligner measured during the last sync, so that every channel stamps a frame with the
// time at which the emitter sent it, whatever the delay of its receiver (this latency
// correction is this design's).
// The receive queue's full, half-full and count outputs are left open on purpose: the
// discriminator only needs `empty`, and only the queue's overflow is reported.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned CH_ID = 0,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic                       en,
  input  logic                       align,
  input  edge_sel_t                  edge_sel,
  input  logic [FRAME_W-1:0]         rx_raw,
  input  logic [TIME_W-1:0]          time_x40,
  input  logic [3:0]                 ext_tag,
  input  logic                       rd_en,
  output event_t                     rd_data,
  output logic                       not_empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       half_full,
  output logic                       overflow,
  output logic                       locked
);
  logic [FRAME_W-1:0] rx_al;
  logic               det_wr;
  rx_entry_t          det_data, rxq_data;
  logic               rxq_empty, rxq_rd, rxq_ovf;
  event_t             ev;
  logic               ev_wr, evq_full, evq_empty, evq_ovf;
  logic [TAG_W-1:0]   tag;

  assign tag = {3'(CH_ID), ext_tag};

  logic [3:0]        latency;
  logic [TIME_W-1:0] t_frame;

  word_aligner u_align (
    .clk, .rst_n, .ce, .align, .rx_raw, .rx_aligned(rx_al), .locked, .latency
  );

  // time_x40 - 40 x latency
  assign t_frame = time_x40 - ((TIME_W'(latency) << 5) + (TIME_W'(latency) << 3));

  event_detector u_det (
    .clk, .rst_n, .ce, .en, .rx_word(rx_al), .time_x40(t_frame), .tag,
    .wr_en(det_wr), .wr_data(det_data)
  );

  sync_fifo #(.W($bits(rx_entry_t)), .DEPTH(DEPTH)) u_rxq (
    .clk, .rst_n, .wr_en(det_wr), .wr_data(det_data), .rd_en(rxq_rd), .rd_data(rxq_data),
    .empty(rxq_empty), .full(), .half_full(), .overflow(rxq_ovf), .count()
  );

  edge_discriminator u_disc (
    .clk, .rst_n, .edge_sel, .in_data(rxq_data), .in_empty(rxq_empty), .in_rd(rxq_rd),
    .out_data(ev), .out_wr(ev_wr), .out_full(evq_full)
  );

  // The discriminator's output register lags the full flag by one clock, so the queue
  // is treated as full one word early to make evq_ovf impossible.
  logic evq_afull;
  sync_fifo #(.W($bits(event_t)), .DEPTH(DEPTH)) u_evq (
    .clk, .rst_n, .wr_en(ev_wr), .wr_data(ev), .rd_en, .rd_data,
    .empty(evq_empty), .full(evq_afull), .half_full, .overflow(evq_ovf), .count
  );
  assign evq_full  = evq_afull || (count == ($bits(count))'(DEPTH - 1) && ev_wr);
  assign not_empty = !evq_empty;
  assign overflow  = rxq_ovf || evq_ovf;
endmodule
