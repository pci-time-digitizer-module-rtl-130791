// time_counter: 50-bit coarse time counter common to all channels.
//
// The counter advances by one on each frame enable (62.5 MHz, 16 ns per step) while `run`
// is set; software starts it through the control register. A `clear` pulse zeroes it. When
// `ext_start_en` is set, a rising edge on the external start input, which is asynchronous
// and passed through a two-flop synchroniser, also zeroes it, so that the time stamps are
// counted from that pulse. A clear takes effect on the next frame enable; the count is
// registered. The width follows the document; the clear and external-start behaviour are
// this design's reading of "started by software" and "an external start pulse can be used
// to mark an absolute time reference".
module time_counter #(
  parameter int unsigned W = 50
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         run,
  input  logic         clear,
  input  logic         ext_start,
  input  logic         ext_start_en,
  output logic [W-1:0] count
);
  logic [2:0] xs_sync;
  logic       pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs_sync <= '0;
      pending <= 1'b0;
      count   <= '0;
    end else begin
      xs_sync <= {xs_sync[1:0], ext_start};
      if (clear || (ext_start_en && xs_sync[1] && !xs_sync[2])) pending <= 1'b1;
      else if (ce)                                              pending <= 1'b0;
      if (ce) begin
        if (pending)  count <= '0;
        else if (run) count <= count + 1'b1;
      end
    end
  end
endmodule
