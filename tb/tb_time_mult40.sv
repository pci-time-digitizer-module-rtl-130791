// tb_time_mult40: compares the registered x40 product with 64-bit multiplication for
// random and extreme 50-bit counts, one clock after each input.
module tb_time_mult40;
  logic clk = 0, rst_n = 0;
  logic [49:0] frames = '0;
  logic [55:0] time_x40;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  time_mult40 dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] exp;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      case (i)
        0: frames = '0;
        1: frames = '1;
        2: frames = 50'd1;
        default: frames = {$urandom, $urandom} & ((64'd1 << (1 + $urandom % 50)) - 1);
      endcase
      exp = 64'(frames) * 64'd40;
      @(posedge clk); #1;
      checks++;
      if (time_x40 != exp[55:0] || exp[63:56] != 0) begin
        failures++; $display("FAIL %0d*40 gave %0d", frames, time_x40);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
