// clk_mgmt: clock management of the pulse processor.
//
// The board's 125 MHz oscillator clocks all FPGA logic. The document's 62.5 MHz rate (the
// 125 MHz clock divided by two, one 40-bit frame every 16 ns) is produced here as a clock
// enable, ce_word, high on every second cycle, rather than as a second clock: this keeps the
// whole pulse processor in one clock domain. The asynchronous board reset is synchronised
// (asserted at once, released after two clock edges). ce_word is low while reset is held and
// first rises on the second cycle after the release. The synchroniser flops take the
// board reset asynchronously and feed the rest of the logic's asynchronous reset, which is
// why lint sees the same net used both ways; that is the intended reset bridge.
module clk_mgmt (
  input  logic clk,        // 125 MHz
  input  logic rst_n_in,   // asynchronous, active low
  output logic rst_n,      // synchronised reset
  output logic ce_word     // 62.5 MHz frame enable
);
  logic [1:0] rst_sync;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) rst_sync <= '0;
    else           rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce_word <= 1'b0;
    else        ce_word <= ~ce_word;
  end
endmodule
