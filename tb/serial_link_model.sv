// serial_link_model: behavioural, word-level model of one channel's analogue path, for
// testbenches only: emitter serialiser, inverter gate, LVPECL sampling register and
// gigabit receiver. On each frame enable the emitter's 40-bit frame, inverted bit by bit
// where the pulse level is 1 (unless `override_inputs` is set), enters a bit stream (bit
// 0 first). The receiver word is the 40-bit window of that stream starting OFFSET bits
// into the older of the last two frames, which models a receiver that has not yet been
// put on the frame boundary. A frame entered at enable F is complete in the word
// presented after enable F+1.
module serial_link_model #(
  parameter int unsigned OFFSET = 0
) (
  input  logic        clk,
  input  logic        ce,
  input  logic [39:0] tx_word,
  input  logic [39:0] level,
  input  logic        override_inputs,
  output logic [39:0] rx_word
);
  logic [39:0] f1 = '0, f0 = '0;
  logic [79:0] s;
  always_ff @(posedge clk) if (ce) begin
    f1 <= tx_word ^ (override_inputs ? 40'h0 : level);
    f0 <= f1;
  end
  assign s = {f1, f0};
  assign rx_word = s[OFFSET +: 40];
endmodule
