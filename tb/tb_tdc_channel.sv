// tb_tdc_channel: one channel at its full queue depth behind a word-level model of the
// serial link with a bit offset of 23. The channel is first put on the frame boundary
// with sync frames, then fed pulse levels generated here. Expected events (time in 0.4 ns
// units = 40 x frame number + bit position, polarity, tag) are built from the level bits
// alone and compared with what is read from the EMIFA queue. The first event fixes the
// constant pipeline offset, which must then hold for every later event. Covered: both edges, leading edges only, a 511-pulse burst at the peak
// rate of 20 pulses per 16 ns frame with no loss, a longer burst that overflows the
// queues, and the half-full flag.
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int OFF = 23, CH = 5;
  logic clk = 0, rst_n = 0, ce = 0, en = 0, align = 0, rd_en = 0, override_inputs = 1;
  edge_sel_t edge_sel = EDGE_BOTH;
  logic [FRAME_W-1:0] rx_raw, tx_word = SYNC_FRAME, level = '0;
  logic [TIME_W-1:0] time_x40 = '0;
  logic [3:0] ext_tag = 4'hA;
  event_t rd_data;
  logic not_empty, half_full, overflow, locked;
  logic [8:0] count;
  event_t exp [$];
  int checks = 0, failures = 0, frame = 0, n_ovf = 0, n_hf = 0, nread = 0, lost = 0;
  int burst_clocks = 0;
  logic reading = 1, lossy = 0, last_lvl = 0;
  always #4 clk = ~clk;

  serial_link_model #(.OFFSET(OFF)) u_link (.clk, .ce, .tx_word, .level, .override_inputs, .rx_word(rx_raw));
  tdc_channel #(.CH_ID(CH)) dut (.*);

  // frame enable every second clock; time and levels change between enables
  always @(posedge clk) ce <= rst_n ? ~ce : 1'b0;
  always @(negedge clk) if (!ce && rst_n) time_x40 <= TIME_W'(frame + 1) * 40;
  always @(posedge clk) if (ce) frame <= frame + 1;

  // reader: pops whenever the queue is not empty
  always @(negedge clk) rd_en = reading && not_empty;
  logic have_off = 0;
  logic [TIME_W-1:0] t_off;
  event_t got;
  always @(posedge clk) begin
    if (rd_en) begin
      nread++;
      if (!have_off && exp.size() > 0) begin t_off = rd_data.t - exp[0].t; have_off = 1; end
      got = rd_data;
      got.t = rd_data.t - t_off;
      if (lossy) begin
        while (exp.size() > 0 && exp[0] != got) begin void'(exp.pop_front()); lost++; end
      end
      checks++;
      if (exp.size() == 0 || exp[0] != got) begin
        failures++;
        $display("FAIL event t=%0d pol=%0d tag=%h exp t=%0d", got.t, got.pol, got.tag,
                 (exp.size() > 0) ? exp[0].t : 0);
      end
      if (exp.size() > 0) void'(exp.pop_front());
    end
    n_ovf += overflow;
    n_hf  += half_full;
  end

  // drive the level bits of one frame and record the expected events
  task automatic send(input logic [FRAME_W-1:0] lv);
    @(negedge clk); while (ce) @(negedge clk);
    level = lv;
    for (int j = 0; j < FRAME_W; j++) begin
      logic p;
      p = (j == 0) ? last_lvl : lv[j-1];
      if (lv[j] != p && ((lv[j] && edge_sel[0]) || (!lv[j] && edge_sel[1]))) begin
        event_t e;
        e.t = TIME_W'(frame) * 40 + TIME_W'(j); e.pol = lv[j]; e.tag = {3'(CH), ext_tag};
        exp.push_back(e);
      end
    end
    last_lvl = lv[FRAME_W-1];
    @(posedge clk);
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp.size() > 0 || not_empty) && guard < 20000) begin @(posedge clk); guard++; end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // word-boundary sync
    align = 1;
    repeat (20) @(posedge clk);
    checks++; if (!locked) begin failures++; $display("FAIL not locked"); end
    align = 0; tx_word = REF_FRAME;
    repeat (10) @(posedge clk);
    override_inputs = 0;
    repeat (10) @(posedge clk);
    en = 1;
    // sparse pulses, both edges
    for (int i = 0; i < 400; i++) begin
      logic [FRAME_W-1:0] lv;
      case ($urandom % 4)
        0: lv = FRAME_W'({$urandom, $urandom});
        1: lv = last_lvl ? '1 : '0;
        2: lv = last_lvl ? '0 : '1;
        default: lv = {FRAME_W{last_lvl}} ^ (FRAME_W'(7) << ($urandom % 30));
      endcase
      send(lv);
    end
    send('0); drain();
    checks++; if (exp.size() != 0) begin failures++; $display("FAIL %0d events missing", exp.size()); end
    // leading edges only
    @(negedge clk) edge_sel = EDGE_LEAD;
    for (int i = 0; i < 200; i++) send(FRAME_W'({$urandom, $urandom}));
    send('0); drain();
    checks++; if (exp.size() != 0) begin failures++; $display("FAIL %0d leading events missing", exp.size()); end
    // peak-rate burst: 511 pulses of 0.4 ns width every 0.8 ns, queue not read during it
    reading = 0;
    for (int i = 0; i < 25; i++) send(40'h55_5555_5555);
    send(40'h00_0015_5555); // 11 more pulses: 511 in all
    send('0);
    repeat (700) @(posedge clk);
    checks++; if (count != 9'd511) begin failures++; $display("FAIL burst stored %0d of 511", count); end
    checks++; if (n_ovf != 0) begin failures++; $display("FAIL overflow during 511 burst"); end
    checks++; if (n_hf == 0) begin failures++; $display("FAIL half-full not seen"); end
    reading = 1; drain();
    checks++; if (exp.size() != 0) begin failures++; $display("FAIL burst events missing"); end
    // overflow: 700 dense frames with the reader stopped
    reading = 0; lossy = 1;
    for (int i = 0; i < 700; i++) send(40'h55_5555_5555);
    send('0);
    repeat (50) @(posedge clk);
    checks++; if (n_ovf == 0) begin failures++; $display("FAIL no overflow"); end
    reading = 1; drain();
    // frames refused by the full receive queue are the newest ones, so the loss shows
    // as events never read rather than as gaps
    lost += exp.size();
    checks++; if (lost == 0) begin failures++; $display("FAIL nothing was lost"); end
    checks++; if (!(n_ovf > 0 && lost == 20 * n_ovf)) begin
      failures++; $display("FAIL %0d events lost for %0d refused frames", lost, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
