// tb_clk_mgmt: checks the reset synchroniser and the divide-by-two frame enable.
// Reset must release on the second clock edge after the board reset rises, and ce_word
// must then alternate 0,1,0,1 (62.5 MHz at a 125 MHz clock).
module tb_clk_mgmt;
  logic clk = 0, rst_n_in = 0, rst_n, ce_word;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  clk_mgmt dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 chk(!rst_n && !ce_word, "held in reset");
    rst_n_in = 1;
    @(posedge clk); #1 chk(!rst_n, "reset still held after one edge");
    @(posedge clk); #1 chk(rst_n, "reset released after two edges");
    chk(!ce_word, "ce low at release");
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1 chk(ce_word == ((i % 2) == 0), $sformatf("ce phase %0d", i));
    end
    rst_n_in = 0; #1 chk(!rst_n && !ce_word, "async assert");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
