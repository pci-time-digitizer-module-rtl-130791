// tb_link_sync: a sync request must switch the emitter to the sync frame with the inputs
// overridden and the aligners searching, return to the reference frame once all enabled
// receivers lock, keep the override for GUARD frames, and time out if they never lock.
module tb_link_sync;
  import tdc_pkg::*;
  localparam int GUARD = 8, TIMEOUT = 40;
  logic clk = 0, rst_n = 0, ce = 0, sync_req = 0;
  logic [NCH-1:0] ch_en = 8'hFF, aligned = 0;
  logic [FRAME_W-1:0] tx_word;
  logic override_inputs, align, busy, failed;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? ~ce : 1'b0;
  link_sync #(.GUARD(GUARD), .TIMEOUT(TIMEOUT)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk); #1;
    chk(tx_word == REF_FRAME && !override_inputs && !busy, "idle sends reference");
    @(negedge clk) sync_req = 1; @(negedge clk) sync_req = 0;
    repeat (4) @(posedge clk); #1;
    chk(tx_word == SYNC_FRAME && override_inputs && align && busy, "sync frame sent");
    repeat (20) @(posedge clk);
    aligned = 8'h7F; repeat (20) @(posedge clk); #1;
    chk(align, "waits for all enabled receivers");
    ch_en = 8'h7F; n = 0;
    while (align) begin @(posedge clk); #1; n++; end
    chk(tx_word == REF_FRAME && override_inputs && busy, "flush with override");
    n = 0;
    while (busy) begin @(posedge clk); #1; n++; end
    chk(n >= 2*GUARD - 3 && n <= 2*GUARD + 1, $sformatf("guard length %0d clocks", n));
    chk(!override_inputs && !failed && tx_word == REF_FRAME, "back to idle");
    // timeout
    aligned = 0;
    @(negedge clk) sync_req = 1; @(negedge clk) sync_req = 0;
    n = 0;
    while (!busy) @(posedge clk);
    while (align) begin @(posedge clk); #1; n++; end
    chk(failed, "timeout flagged");
    chk(n >= 2*TIMEOUT - 2 && n <= 2*TIMEOUT + 4, $sformatf("timeout length %0d clocks", n));
    while (busy) @(posedge clk);
    #1 chk(failed && tx_word == REF_FRAME, "failed held after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
