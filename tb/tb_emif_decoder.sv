// tb_emif_decoder: every address with every cs/rd/wr combination, against the register
// map written out independently here.
module tb_emif_decoder;
  import tdc_pkg::*;
  logic cs, rd, wr;
  logic [7:0] addr;
  dec_t dec;
  int checks = 0, failures = 0;
  emif_decoder dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int m = 0; m < 8; m++) begin
        logic r, w;
        logic [NCH-1:0] pop;
        {cs, rd, wr} = 3'(m); addr = 8'(a); #1;
        r = cs && rd; w = cs && wr && !rd;
        pop = (r && a >= 8 && a < 16) ? (8'd1 << (a - 8)) : 8'd0;
        checks++;
        if (dec.rd_ctrl != (r && a == 0) || dec.rd_status != (r && a == 1) ||
            dec.rd_time != (r && a == 2) || dec.rd_test != (r && a == 3) ||
            dec.rd_fifo != (r && a >= 8 && a < 16) || dec.rd_count != (r && a >= 16 && a < 24) ||
            dec.wr_ctrl != (w && a == 0) || dec.wr_status != (w && a == 1) ||
            dec.wr_test != (w && a == 3) || dec.pop != pop || dec.ch != 3'(a)) begin
          failures++; $display("FAIL addr %02h mode %0d", a, m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
