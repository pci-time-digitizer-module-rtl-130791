// tb_event_detector: random pulse levels are encoded as the receivers would return them
// (reference frame XOR level). A frame must be written, one clock after its frame
// enable, exactly when its 41 level bits (previous last bit included) hold an edge, with
// the time and tag of that frame; nothing is written while disabled.
module tb_event_detector;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, en = 0;
  logic [FRAME_W-1:0] rx_word = REF_FRAME;
  logic [TIME_W-1:0] time_x40 = '0;
  logic [TAG_W-1:0] tag = '0;
  logic wr_en;
  rx_entry_t wr_data;
  int checks = 0, failures = 0, writes = 0;
  always #4 clk = ~clk;
  event_detector dut (.*);

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [FRAME_W-1:0] lvl;
    logic prev, has;
    logic [FRAME_W:0] w;
    prev = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case ($urandom % 4)
        0: lvl = '0;
        1: lvl = '1;
        2: lvl = {$urandom, $urandom};
        default: lvl = prev ? ~(FRAME_W'(1) << ($urandom % FRAME_W)) : (FRAME_W'(1) << ($urandom % FRAME_W));
      endcase
      en = (n % 500) < 450;
      rx_word = lvl ^ REF_FRAME;
      time_x40 = TIME_W'(n) * 40;
      tag = 7'($urandom);
      w = {lvl, prev};
      has = en && (w[FRAME_W:1] != w[FRAME_W-1:0]);
      ce = 1;
      @(negedge clk); ce = 0;
      checks++;
      if (wr_en != has) begin failures++; $display("FAIL n=%0d wr_en=%0d exp %0d", n, wr_en, has); end
      else if (has) begin
        writes++;
        checks++;
        if (wr_data.lvl != w || wr_data.t != time_x40 || wr_data.tag != tag) begin
          failures++; $display("FAIL n=%0d data", n);
        end
      end
      @(negedge clk);
      checks++; if (wr_en) begin failures++; $display("FAIL write without frame"); end
      prev = lvl[FRAME_W-1];
    end
    checks++; if (writes < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
