// tb_time_counter: checks run/stop, software clear, and zeroing by the external start
// pulse (only when armed), against a cycle count kept by the testbench.
module tb_time_counter;
  localparam int W = 50;
  logic clk = 0, rst_n = 0, ce = 0, run = 0, clear = 0, ext_start = 0, ext_start_en = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? ~ce : 1'b0;
  time_counter dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (count=%0d)", m, count); end
  endtask
  task automatic frames(input int n); repeat (2*n) @(posedge clk); #1; endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] c0;
    repeat (2) @(posedge clk); rst_n = 1;
    frames(5); chk(count == 0, "no count without run");
    run = 1; frames(1); c0 = count;
    frames(100); chk(count == c0 + 100, "100 frames counted");
    run = 0; c0 = count; frames(10); chk(count == c0, "stopped");
    run = 1;
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    frames(1); chk(count <= 1, "cleared");
    c0 = count; frames(20); chk(count == c0 + 20, "counts after clear");
    // external start ignored when not armed
    ext_start = 1; frames(3); ext_start = 0; frames(3);
    chk(count == c0 + 26, "unarmed external start ignored");
    ext_start_en = 1; frames(2);
    ext_start = 1; frames(3); ext_start = 0;
    chk(count <= 3, "external start zeroes counter");
    c0 = count; frames(50); chk(count == c0 + 50, "counts after external start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
