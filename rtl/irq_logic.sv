// irq_logic: interrupt logic of the pulse processor.
//
// The document raises a DSP interrupt when a channel's EMIFA queue becomes half full (the
// DSP then moves half a queue to memory) and when pulses are discarded because a queue
// overflowed; the status register tells which channels caused it. Here each channel has
// a sticky half-full flag, set on the rising edge of its half_full level, and a sticky
// overflow flag, set by its overflow pulse. Flags are cleared by write-one-to-clear
// pulses; a set in the same clock as a clear wins. The two DSP interrupt lines are the OR
// of the flags, each gated by its enable, and change one clock after a flag changes. The
// two separate lines and the flag behaviour are this design's.
module irq_logic #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] half_full,
  input  logic [N-1:0] overflow,
  input  logic [N-1:0] clr_half,
  input  logic [N-1:0] clr_ovf,
  input  logic         en_half,
  input  logic         en_ovf,
  output logic [N-1:0] flag_half,
  output logic [N-1:0] flag_ovf,
  output logic         irq_half,
  output logic         irq_ovf
);
  logic [N-1:0] hf_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hf_d      <= '0;
      flag_half <= '0;
      flag_ovf  <= '0;
      irq_half  <= 1'b0;
      irq_ovf   <= 1'b0;
    end else begin
      hf_d      <= half_full;
      flag_half <= (flag_half & ~clr_half) | (half_full & ~hf_d);
      flag_ovf  <= (flag_ovf & ~clr_ovf) | overflow;
      irq_half  <= en_half && (flag_half != '0);
      irq_ovf   <= en_ovf && (flag_ovf != '0);
    end
  end
endmodule
