// event_detector: 40-bit word event detector and time stamping of one channel.
//
// Each frame enable brings one aligned 40-bit receiver word. XOR with the reference frame
// undoes the emitter's sequence and leaves the sampled pulse level, one bit per 0.4 ns
// (bit 0 first). The last level bit of the previous frame is prepended as bit 0 of a
// 41-bit word, so that an edge on the frame boundary is seen. If any two neighbouring bits
// of the 41 differ, the word is written to the receive queue together with the frame time
// (56 bits) and the 7 tag bits: 104 bits, one write per frame at most, one clock after the
// frame enable. With `en` low nothing is written but the level history is still tracked.
// The 41-bit word, the 104-bit entry and its fields follow the document; removing the
// reference sequence by XOR in the FPGA is this design's reading of the inverter scheme.
module event_detector
  import tdc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               en,
  input  logic [FRAME_W-1:0] rx_word,
  input  logic [TIME_W-1:0]  time_x40,
  input  logic [TAG_W-1:0]   tag,
  output logic               wr_en,
  output rx_entry_t          wr_data
);
  logic [FRAME_W-1:0] lvl;
  logic [FRAME_W:0]   w41;
  logic               last_bit;

  assign lvl = rx_word ^ REF_FRAME;
  assign w41 = {lvl, last_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_bit <= 1'b0;
      wr_en    <= 1'b0;
      wr_data  <= '0;
    end else begin
      wr_en <= 1'b0;
      if (ce) begin
        last_bit <= lvl[FRAME_W-1];
        if (en && (w41[FRAME_W:1] != w41[FRAME_W-1:0])) begin
          wr_en       <= 1'b1;
          wr_data.t   <= time_x40;
          wr_data.lvl <= w41;
          wr_data.tag <= tag;
        end
      end
    end
  end
endmodule
