// tdc_digitizer_top: pulse processor of the eight-channel 2.5 Gbit/s time digitizer.
//
// How the board measures time: a 2.5 Gbit/s emitter sends a known 40-bit frame every 16 ns
// to eight gates, one per input channel; while a detector pulse is high the gate inverts
// the stream. Eight receivers sample the result with a clock recovered from the emitter
// and deliver it as 40-bit words, one per 16 ns. This module is the FPGA logic behind
// them plus the board's tag register. It takes the eight receivers' parallel words
// (`rx_word`) and supplies the emitter's frame (`tx_word`); the serial links, level
// converters and gates are outside. A 50-bit frame counter times 40 gives a 56-bit time in
// 0.4 ns units, shared by all channels; each channel finds the edges in its frames and
// queues one 64-bit event per edge (time, polarity, tag) for the DSP, which reads them,
// the four 64-bit registers and the queue fill counts over its EMIFA bus (CE0).
//
// Timing: one clock, 125 MHz; frames and the time counter advance every second clock.
// EMIFA accesses are one-clock cycles (cs with rd or wr); read data follows one clock
// later. Every event time carries the same fixed pipeline offset (frame delay through the
// aligner and detector) on all channels, so time differences are exact.
//
// Following the document: 8 channels, 40-bit frames, 50-bit counter x40 = 56-bit time,
// 104-bit receive queue and 64-bit event queue of 511 words each, 7 tag bits, half-full
// and overflow interrupts, control/status/current-time/test registers, sync override.
// This design's choices: register map and fields, tag bit layout, frame patterns, bit
// order, one edge decoded per clock, synchronous EMIFA timing.
module tdc_digitizer_top
  import tdc_pkg::*;
#(
  parameter int unsigned NCHAN = NCH,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic                            clk_125,
  input  logic                            rst_n,
  // gigabit transceivers
  input  logic [NCHAN-1:0][FRAME_W-1:0]   rx_word,
  output logic [FRAME_W-1:0]              tx_word,
  output logic                            override_inputs,
  // front end
  input  logic                            ext_start,
  input  logic                            ch8_pulse,
  input  logic [XTAG_W-1:0]               ext_tag,
  // DSP EMIFA bus, CE0
  input  logic                            emif_cs,
  input  logic                            emif_rd,
  input  logic                            emif_wr,
  input  logic [7:0]                      emif_addr,
  input  logic [DATA_W-1:0]               emif_wdata,
  output logic [DATA_W-1:0]               emif_rdata,
  output logic                            irq_half,
  output logic                            irq_ovf
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic                 rst_s, ce;
  logic [CNT_W-1:0]     frames;
  logic [TIME_W-1:0]    time_x40;
  ctrl_t                ctrl;
  dec_t                 dec;
  logic [DATA_W-1:0]    status, status_clr;
  logic                 align, sync_busy, sync_failed;
  logic [NCHAN-1:0]     locked, hf, ovf, nempty, flag_half, flag_ovf;
  event_t [NCH-1:0]     ev;
  logic [NCH-1:0][9:0]  cnt10;
  logic [XTAG_W-1:0]    tag_q, tag_s1, tag_s2;

  clk_mgmt u_clk (.clk(clk_125), .rst_n_in(rst_n), .rst_n(rst_s), .ce_word(ce));

  time_counter #(.W(CNT_W)) u_tc (
    .clk(clk_125), .rst_n(rst_s), .ce, .run(ctrl.run), .clear(ctrl.clear),
    .ext_start, .ext_start_en(ctrl.xstart_en), .count(frames)
  );

  time_mult40 #(.WIN(CNT_W), .WOUT(TIME_W)) u_mul (
    .clk(clk_125), .rst_n(rst_s), .frames, .time_x40
  );

  link_sync u_sync (
    .clk(clk_125), .rst_n(rst_s), .ce, .sync_req(ctrl.sync_req), .ch_en(ctrl.ch_en[NCHAN-1:0]),
    .aligned(locked), .tx_word, .override_inputs, .align, .busy(sync_busy), .failed(sync_failed)
  );

  tag_latch #(.W(XTAG_W)) u_tag (.latch(ch8_pulse), .rst_n, .d(ext_tag), .q(tag_q));

  always_ff @(posedge clk_125 or negedge rst_s) begin
    if (!rst_s) {tag_s2, tag_s1} <= '0;
    else        {tag_s2, tag_s1} <= {tag_s1, tag_q};
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    if (c < NCHAN) begin : g_on
      logic [CW-1:0] count;
      tdc_channel #(.CH_ID(c), .DEPTH(DEPTH)) u_ch (
        .clk(clk_125), .rst_n(rst_s), .ce,
        .en(ctrl.run && ctrl.ch_en[c] && !sync_busy), .align,
        .edge_sel(ctrl.edge_sel), .rx_raw(rx_word[c]), .time_x40, .ext_tag(tag_s2[3:0]),
        .rd_en(dec.pop[c]), .rd_data(ev[c]), .not_empty(nempty[c]), .count,
        .half_full(hf[c]), .overflow(ovf[c]), .locked(locked[c])
      );
      assign cnt10[c] = 10'(count);
    end else begin : g_off
      assign ev[c]    = '0;
      assign cnt10[c] = '0;
    end
  end

  emif_decoder u_dec (.cs(emif_cs), .rd(emif_rd), .wr(emif_wr), .addr(emif_addr), .dec);

  emif_regs u_regs (
    .clk(clk_125), .rst_n(rst_s), .dec, .wdata(emif_wdata), .rdata(emif_rdata), .ctrl,
    .status_clr, .status, .cur_time(time_x40), .fifo_data(ev), .fifo_count(cnt10)
  );

  irq_logic #(.N(NCHAN)) u_irq (
    .clk(clk_125), .rst_n(rst_s), .half_full(hf), .overflow(ovf),
    .clr_half(status_clr[NCHAN-1:0]), .clr_ovf(status_clr[8 +: NCHAN]),
    .en_half(ctrl.ien_half), .en_ovf(ctrl.ien_ovf),
    .flag_half, .flag_ovf, .irq_half, .irq_ovf
  );

  // STATUS: [7:0] half-full flags, [15:8] overflow flags (both write-one-to-clear),
  // [23:16] receivers locked, [24] sync busy, [25] sync failed, [31:26] latched tag,
  // [39:32] queues not empty. Bits of a STATUS write above 15 have no flag to clear.
  always_comb begin
    status           = '0;
    status[0  +: NCHAN] = flag_half;
    status[8  +: NCHAN] = flag_ovf;
    status[16 +: NCHAN] = locked;
    status[24]          = sync_busy;
    status[25]          = sync_failed;
    status[26 +: 6]     = tag_s2;
    status[32 +: NCHAN] = nempty;
  end
endmodule
