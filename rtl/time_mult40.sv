// time_mult40: frame count to time in 0.4 ns units.
//
// A frame holds 40 bits of 0.4 ns, so multiplying the 50-bit frame count by 40 gives the
// time of the frame start as a count of bit periods, 56 bits wide (2^50 x 40 < 2^56), as
// in the document. The product is formed as (n << 5) + (n << 3) and registered: one clock
// of latency.
module time_mult40 #(
  parameter int unsigned WIN  = 50,
  parameter int unsigned WOUT = 56
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [WIN-1:0]  frames,
  output logic [WOUT-1:0] time_x40
);
  logic [WOUT-1:0] n;
  assign n = WOUT'(frames);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) time_x40 <= '0;
    else        time_x40 <= (n << 5) + (n << 3);
  end
endmodule
