// tb_word_aligner: for every bit offset 0..39 between emitter frames and receiver words,
// a bit stream of sync frames followed by random frames is cut into receiver words. The
// aligner must lock during the sync frames and then output exactly the emitted frames,
// each one clock after the receiver word that completes it. The measured latency must be
// 0 frames on the frame boundary and 1 frame at every other offset.
module tb_word_aligner;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, align = 0;
  logic [FRAME_W-1:0] rx_raw = '0, rx_aligned;
  logic locked;
  logic [3:0] latency;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  word_aligner dut (.*);

  localparam int NF = 40;
  logic [FRAME_W-1:0] frames [NF];
  logic stream [NF*FRAME_W + FRAME_W];

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < FRAME_W; d++) begin
      for (int f = 0; f < NF; f++) frames[f] = (f < 10) ? SYNC_FRAME : {$urandom, $urandom};
      for (int b = 0; b < NF*FRAME_W; b++) stream[b] = frames[b / FRAME_W][b % FRAME_W];
      for (int b = NF*FRAME_W; b < NF*FRAME_W + FRAME_W; b++) stream[b] = 1'b0;
      // one all-zero word first, so that no stale bits can complete a sync frame
      @(negedge clk); rx_raw = '0; ce = 1; @(negedge clk); ce = 0;
      align = 1;
      for (int n = 0; n < NF - 1; n++) begin
        @(negedge clk);
        for (int b = 0; b < FRAME_W; b++) rx_raw[b] = stream[n*FRAME_W + d + b];
        ce = 1;
        @(negedge clk); ce = 0;
        if (n == 9) align = 0;
        // the frame completed by word n: frame n if d == 0, else frame n (bits up to 40n+39)
        if (n == 9) begin
          checks++; if (!locked) begin failures++; $display("FAIL no lock d=%0d", d); end
          // the first sync frame is complete in word 0 only on the frame boundary;
          // otherwise word 1 is the first that completes a sync frame
          checks++;
          if (latency != ((d == 0) ? 4'd0 : 4'd1)) begin
            failures++; $display("FAIL latency %0d at d=%0d", latency, d);
          end
        end
        if (n >= 11) begin
          checks++;
          if (rx_aligned != frames[n]) begin
            failures++; $display("FAIL d=%0d n=%0d got %h exp %h", d, n, rx_aligned, frames[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
