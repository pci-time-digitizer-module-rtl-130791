// tb_sync_fifo: the 511-word queue at its full depth against a queue model: random
// pushes and pops, a fill to full with the overflow pulse on a refused write, the
// half-full threshold of 256 words, and draining to empty.
module tb_sync_fifo;
  localparam int W = 104, DEPTH = 511;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, half_full, overflow;
  logic [8:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_ovf = 0;
  always #4 clk = ~clk;
  sync_fifo dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (count=%0d model=%0d)", m, count, q.size()); end
  endtask

  task automatic step(input logic w, input logic r);
    logic ovf_exp;
    @(negedge clk);
    chk(count == 9'(q.size()) && empty == (q.size() == 0) && full == (q.size() == DEPTH) &&
        half_full == (q.size() >= 256), "flags");
    if (q.size() > 0) chk(rd_data == q[0], "head");
    wr_en = w; rd_en = r; wr_data = {$urandom, $urandom, $urandom, $urandom};
    ovf_exp = w && q.size() == DEPTH;
    @(posedge clk);
    if (r && q.size() > 0) void'(q.pop_front());
    if (w && !ovf_exp) q.push_back(wr_data);
    #1 chk(overflow == ovf_exp, "overflow pulse");
    n_ovf += overflow;
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) step($urandom % 3 != 0, $urandom % 2 == 0);
    for (int i = 0; i < 700; i++) step(1, 0);
    chk(full && count == 511, "full at 511");
    for (int i = 0; i < 100; i++) step(1, $urandom % 2 == 0);
    for (int i = 0; i < 700; i++) step($urandom % 4 == 0, 1);
    for (int i = 0; i < 20; i++) step(0, 1);
    chk(empty, "drained");
    step(0, 1);
    chk(n_ovf > 0, "overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
