// tag_latch: the board's 6-bit tag register.
//
// Six external NIM tag inputs, after level conversion, are captured by a register clocked
// by the channel-8 input pulse, so that the tag bits in force at that pulse are held for
// the FPGA. The register is cleared by the board reset. This follows the "6-bit register,
// latch from CH8" of the front-end drawing; the rising edge as the capturing edge is this
// design's choice. The FPGA reads the output through a synchroniser.
module tag_latch #(
  parameter int unsigned W = 6
) (
  input  logic         latch,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge latch or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
