// tb_tag_latch: the tag register must take its inputs on the rising edge of the latch
// pulse only, hold them otherwise, and clear on reset.
module tb_tag_latch;
  logic latch = 0, rst_n = 1;
  logic [5:0] d = '0, q, exp;
  int checks = 0, failures = 0;
  tag_latch dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    #4 checks++; if (q != 0) failures++;
    rst_n = 1; exp = 0;
    for (int i = 0; i < 100; i++) begin
      d = 6'($urandom); #3;
      checks++; if (q != exp) begin failures++; $display("FAIL held %h exp %h", q, exp); end
      if ($urandom % 2) begin latch = 1; exp = d; end
      #2;
      checks++; if (q != exp) begin failures++; $display("FAIL latched %h exp %h", q, exp); end
      d = ~d; latch = 0; #2;
      checks++; if (q != exp) begin failures++; $display("FAIL falling edge %h exp %h", q, exp); end
    end
    rst_n = 0; #1 checks++; if (q != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
