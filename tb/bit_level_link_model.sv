// bit_level_link_model: behavioural model, for testbenches only, of the analogue side of
// all eight channels at the 2.5 Gbit/s bit level.
//
// Emitter: on each frame enable of the 125 MHz clock it takes the 40-bit frame and sends
// it bit 0 first, one bit per 0.4 ns (the 125 MHz clock multiplied by 20). Inverter gate:
// each channel's stream is the emitter stream XOR the channel's pulse input, unless the
// inputs are overridden. Sampling register and clock recovery: each channel's stream is
// sampled in the middle of every bit slot, 0.2 ns after the slot starts. Receivers: the
// samples are grouped into 40-bit words starting OFFS[c] bits into the stream, so each
// receiver begins off the frame boundary, and the newest complete word is presented on
// the next frame enable. Pulse inputs may change at any time (picosecond steps).
module bit_level_link_model
  import tdc_pkg::*;
#(
  parameter int unsigned OFFS [NCH] = '{0, 7, 13, 23, 31, 39, 1, 20}
) (
  input  logic                        clk,
  input  logic                        ce,
  input  logic [FRAME_W-1:0]          tx_word,
  input  logic                        override_inputs,
  input  logic [NCH-1:0]              pulse,
  output logic [NCH-1:0][FRAME_W-1:0] rx_word
);
  timeunit 1ns; timeprecision 1ps;

  logic [NCH-1:0][FRAME_W-1:0] sh, hold;
  longint unsigned nbit = 0;

  initial begin
    sh = '0; hold = '0; rx_word = '0;
  end

  task automatic send_frame(input logic [FRAME_W-1:0] w);
    for (int k = 0; k < FRAME_W; k++) begin
      #0.2;
      for (int c = 0; c < NCH; c++) begin
        int p;
        p = int'((nbit + FRAME_W - OFFS[c]) % FRAME_W);
        sh[c][p] = w[k] ^ (pulse[c] && !override_inputs);
        if (p == FRAME_W - 1) hold[c] = sh[c];
      end
      nbit++;
      #0.2;
    end
  endtask

  always @(posedge clk) begin
    if (ce) begin
      rx_word <= hold;
      fork send_frame(tx_word); join_none
    end
  end
endmodule
