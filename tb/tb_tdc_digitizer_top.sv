// tb_tdc_digitizer_top: end-to-end test of the pulse processor at its default sizes.
//
// Eight word-level link models (each with a different bit offset between emitter frames
// and receiver words) stand for the emitter, inverter gates and receivers. A DSP model
// drives the EMIFA bus: it configures the control register, runs the receiver sync, and
// services the half-full interrupt by reading the status register, each flagged queue's
// fill count and then that many events, then clearing the flags. Pulse levels are made
// here, and every event read is compared with one built from the levels alone: its time
// must equal 40 x frame + bit position plus one offset common to all channels, its
// polarity and its tag {channel, external tag} must match.
//
// Phases: sync of all eight receivers; both edges at moderate rate; the sustained rate of
// 5 Mevent/s per channel on all channels; leading edges only; trailing edges only; a
// 511-pulse burst at the 1.25 Gevent/s peak on every channel, with one queue then fetched
// back-to-back at one event per clock (above the 100 Mevent/s fetch rate); an overflow on one channel
// with the overflow interrupt; tag latching by the channel-8 pulse; the external start;
// the test register. Each mechanism is counted and one that never happened is a failure.
module tb_tdc_digitizer_top;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0][FRAME_W-1:0] rx_word;
  logic [FRAME_W-1:0] tx_word;
  logic override_inputs;
  logic ext_start = 0, ch8_pulse = 0;
  logic [XTAG_W-1:0] ext_tag = 6'h2C;
  logic emif_cs = 0, emif_rd = 0, emif_wr = 0;
  logic [7:0] emif_addr = 0;
  logic [63:0] emif_wdata = 0, emif_rdata;
  logic irq_half, irq_ovf;
  always #4 clk = ~clk;

  tdc_digitizer_top dut (.clk_125(clk), .*);

  logic [NCH-1:0][FRAME_W-1:0] level = '0;
  localparam int OFFS [NCH] = '{0, 7, 13, 23, 31, 39, 1, 20};
  for (genvar c = 0; c < NCH; c++) begin : g_link
    serial_link_model #(.OFFSET(OFFS[c])) u_link (
      .clk, .ce(dut.ce), .tx_word, .level(level[c]), .override_inputs, .rx_word(rx_word[c]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- expected events ----------------
  event_t exp [NCH][$];
  logic   last_lvl [NCH];
  int     frame = 0;
  logic   lossy [NCH];
  int     lost [NCH];
  edge_sel_t cur_sel = EDGE_BOTH;
  logic [3:0] cur_tag = 4'h0;
  logic   have_off = 0;
  longint t_off;
  int     nread = 0;
  always @(posedge clk) if (dut.ce) frame <= frame + 1;

  // apply one frame of levels on all channels
  task automatic send(input logic [NCH-1:0][FRAME_W-1:0] lv);
    @(negedge clk); while (dut.ce) @(negedge clk);
    level = lv;
    for (int c = 0; c < NCH; c++) begin
      for (int j = 0; j < FRAME_W; j++) begin
        logic p;
        p = (j == 0) ? last_lvl[c] : lv[c][j-1];
        if (lv[c][j] != p && ((lv[c][j] && cur_sel[0]) || (!lv[c][j] && cur_sel[1]))) begin
          event_t e;
          e.t = TIME_W'(frame) * 40 + TIME_W'(j); e.pol = lv[c][j]; e.tag = {3'(c), cur_tag};
          exp[c].push_back(e);
        end
      end
      last_lvl[c] = lv[c][FRAME_W-1];
    end
    @(posedge clk);
  endtask

  function automatic logic [FRAME_W-1:0] hold(input int c);
    return {FRAME_W{last_lvl[c]}};
  endfunction

  task automatic check_event(input int c, input event_t ev);
    event_t e;
    longint d;
    nread++;
    if (lossy[c]) begin
      // a refused frame loses all of its events; the survivors keep their order
      while (exp[c].size() > 0 && exp[c][0].t + TIME_W'(have_off ? t_off : 0) != ev.t) begin
        void'(exp[c].pop_front()); lost[c]++;
      end
    end
    checks++;
    if (exp[c].size() == 0) begin
      failures++; $display("FAIL ch%0d unexpected event t=%0d", c, ev.t); return;
    end
    e = exp[c].pop_front();
    d = longint'(ev.t) - longint'(e.t);
    if (!have_off) begin t_off = d; have_off = 1; end
    if (d != t_off || ev.pol != e.pol || ev.tag != e.tag) begin
      failures++;
      $display("FAIL ch%0d event t=%0d pol=%0d tag=%h, exp t=%0d pol=%0d tag=%h (offset %0d)",
               c, ev.t, ev.pol, ev.tag, e.t + TIME_W'(t_off), e.pol, e.tag, t_off);
    end
  endtask

  // ---------------- DSP model ----------------
  semaphore bus = new(1);
  logic dsp_on = 0;
  int n_irq_half = 0, n_irq_ovf = 0, n_stall = 0, n_sync = 0, n_lead = 0, n_trail = 0,
      n_both = 0, n_xstart = 0, n_tag = 0, n_clear = 0, n_peak = 0, n_sustained = 0, n_fast = 0;

  task automatic bus_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk) begin emif_cs = 1; emif_wr = 1; emif_addr = a; emif_wdata = d; end
    @(negedge clk) begin emif_cs = 0; emif_wr = 0; end
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk) begin emif_cs = 1; emif_rd = 1; emif_addr = a; end
    @(posedge clk); #1 d = emif_rdata;
    @(negedge clk) begin emif_cs = 0; emif_rd = 0; end
  endtask
  // back-to-back reads: cs and rd held for n clocks, one event per clock
  task automatic burst_read(input int c, input int n, output int clocks);
    int t0;
    @(negedge clk) begin emif_cs = 1; emif_rd = 1; emif_addr = A_FIFO + 8'(c); end
    t0 = $time;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1 check_event(c, event_t'(emif_rdata));
      if (i == n - 1) begin emif_cs = 0; emif_rd = 0; end
    end
    clocks = ($time - t0 + 4) / 8;
  endtask
  task automatic read_queue(input int c, input int maxn);
    logic [63:0] n, d;
    bus_rd(A_COUNT + 8'(c), n);
    if (int'(n) < maxn) maxn = int'(n);
    for (int i = 0; i < maxn; i++) begin
      bus_rd(A_FIFO + 8'(c), d);
      check_event(c, event_t'(d));
    end
  endtask
  task automatic drain_all();
    logic [63:0] s;
    int guard = 0;
    do begin
      for (int c = 0; c < NCH; c++) read_queue(c, 600);
      repeat (50) @(posedge clk);
      bus_rd(A_STATUS, s);
      guard++;
    end while ((s[39:32] != 0 || dut.g_ch[0].g_on.u_ch.u_rxq.count != 0) && guard < 200);
  endtask

  // interrupt service: on the half-full interrupt move half a queue from each flagged channel
  initial begin
    logic [63:0] s;
    forever begin
      @(posedge clk);
      if (dsp_on && irq_half) begin
        bus.get(1);
        n_irq_half++;
        bus_rd(A_STATUS, s);
        bus_wr(A_STATUS, {56'h0, s[7:0]});
        for (int c = 0; c < NCH; c++) if (s[c]) read_queue(c, 256);
        bus.put(1);
      end
    end
  end

  // mechanism counters
  always @(posedge clk) begin
    if (dut.g_ch[3].g_on.u_ch.u_disc.state == 1'b1 && dut.g_ch[3].g_on.u_ch.evq_full) n_stall++;
    if (irq_ovf) n_irq_ovf++;
  end

  task automatic set_ctrl(input edge_sel_t sel, input logic run, input logic clr, input logic sync);
    logic [63:0] v;
    v = '0;
    v[CTRL_RUN] = run; v[CTRL_CLEAR] = clr; v[CTRL_SYNC] = sync;
    v[CTRL_EDGE_LO +: 2] = sel; v[CTRL_IEN_HALF] = 1; v[CTRL_IEN_OVF] = 1;
    v[CTRL_CHEN_LO +: NCH] = '1;
    bus_wr(A_CTRL, v);
    cur_sel = sel;
  endtask

  task automatic idle_frames(input int n);
    logic [NCH-1:0][FRAME_W-1:0] lv;
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < NCH; c++) lv[c] = hold(c);
      send(lv);
    end
  endtask

  initial begin
    #40ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] s, t1, t2;
    logic [NCH-1:0][FRAME_W-1:0] lv;
    for (int c = 0; c < NCH; c++) begin last_lvl[c] = 0; lossy[c] = 0; lost[c] = 0; end
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);

    // ---- tag register: latch by a channel-8 pulse ----
    ext_tag = 6'h2B; #3 ch8_pulse = 1; #2 ch8_pulse = 0; ext_tag = 6'h00;
    repeat (6) @(posedge clk);
    bus_rd(A_STATUS, s);
    chk(s[31:26] == 6'h2B, "tag latched on the channel-8 pulse");
    cur_tag = 4'hB; n_tag++;

    // ---- test register ----
    bus_wr(A_TEST, 64'hDEAD_BEEF_0123_4567); bus_rd(A_TEST, s);
    chk(s == 64'hDEAD_BEEF_0123_4567, "test register");

    // ---- receiver sync ----
    set_ctrl(EDGE_BOTH, 0, 0, 1);
    repeat (10) @(posedge clk);
    chk(override_inputs && tx_word == SYNC_FRAME, "sync sequence sent with inputs overridden");
    repeat (200) @(posedge clk);
    bus_rd(A_STATUS, s);
    chk(s[23:16] == 8'hFF && !s[24] && !s[25], $sformatf("all receivers locked (status %h)", s));
    if (s[23:16] == 8'hFF) n_sync++;
    chk(!override_inputs && tx_word == REF_FRAME, "back to reference frame");

    // ---- start: clear and run ----
    set_ctrl(EDGE_BOTH, 1, 1, 0); n_clear++;
    bus_rd(A_TIME, t1);
    chk(t1 < 40 * 4, $sformatf("time cleared (%0d)", t1));
    repeat (100) @(posedge clk);
    bus_rd(A_TIME, t2);
    chk(t2 > t1 && t2 - t1 >= 40 * 49 && t2 - t1 <= 40 * 52, $sformatf("time runs at 0.4 ns x 40 per frame (%0d)", t2 - t1));
    dsp_on = 1;

    // ---- both edges, moderate random traffic ----
    for (int i = 0; i < 300; i++) begin
      for (int c = 0; c < NCH; c++)
        lv[c] = ($urandom % 6 == 0) ? FRAME_W'({$urandom, $urandom}) : hold(c);
      send(lv);
    end
    n_both++;

    // ---- sustained 5 Mevent/s per channel: one edge every 200 ns (12.5 frames) ----
    begin
      int next [NCH];
      for (int c = 0; c < NCH; c++) next[c] = 8 * c;
      for (int f = 0; f < 2000; f++) begin
        for (int c = 0; c < NCH; c++) begin
          lv[c] = hold(c);
          if (next[c] >= f * 40 && next[c] < f * 40 + 40) begin
            lv[c] = hold(c) ^ (FRAME_W'('1) << (next[c] - f * 40));
            next[c] += 500;        // 500 x 0.4 ns = 200 ns
            n_sustained++;
          end
        end
        send(lv);
      end
    end

    idle_frames(4);
    bus.get(1); dsp_on = 0; drain_all(); bus.put(1);
    for (int c = 0; c < NCH; c++) chk(exp[c].size() == 0, $sformatf("ch%0d all events read (%0d left)", c, exp[c].size()));

    // ---- leading edges only, then trailing only ----
    for (int m = 0; m < 2; m++) begin
      set_ctrl(m == 0 ? EDGE_LEAD : EDGE_TRAIL, 1, 0, 0);
      dsp_on = 1;
      for (int i = 0; i < 200; i++) begin
        for (int c = 0; c < NCH; c++) lv[c] = ($urandom % 3 == 0) ? FRAME_W'({$urandom, $urandom}) : hold(c);
        send(lv);
      end
      idle_frames(4);
      bus.get(1); dsp_on = 0; drain_all(); bus.put(1);
      for (int c = 0; c < NCH; c++) chk(exp[c].size() == 0, $sformatf("ch%0d edge mode %0d events read", c, m));
      if (m == 0) n_lead++; else n_trail++;
    end

    // ---- peak burst: 511 pulses at 1.25 Gevent/s on every channel, no loss ----
    set_ctrl(EDGE_LEAD, 1, 0, 0);
    idle_frames(2);
    begin
      logic [NCH-1:0][FRAME_W-1:0] z;
      for (int c = 0; c < NCH; c++) z[c] = '0;
      send(z);
      for (int i = 0; i < 25; i++) begin
        for (int c = 0; c < NCH; c++) lv[c] = 40'h55_5555_5555;
        send(lv);
      end
      for (int c = 0; c < NCH; c++) lv[c] = 40'h00_0015_5555;
      send(lv);
      send(z);
    end
    repeat (1200) @(posedge clk);
    for (int c = 0; c < NCH; c++) begin
      bus_rd(A_COUNT + 8'(c), s);
      chk(s == 511, $sformatf("ch%0d stored the whole 511-pulse burst (%0d)", c, s));
      if (s == 511) n_peak++;
    end
    bus_rd(A_STATUS, s);
    chk(s[15:8] == 0 && !irq_ovf, "no overflow in the peak burst");
    chk(s[7:0] == 8'hFF && irq_half, "half-full flagged on all channels");
    bus_wr(A_STATUS, 64'hFF);
    // fetch channel 0's whole queue at one event per clock (125 Mevent/s >= 100 Mevent/s)
    begin
      int clocks;
      burst_read(0, 511, clocks);
      chk(clocks <= 512, $sformatf("511 events fetched in %0d clocks", clocks));
      bus_rd(A_COUNT, s);
      chk(s == 0, "queue 0 empty after the fast fetch");
      if (clocks <= 512 && s == 0) n_fast++;
    end
    drain_all();
    for (int c = 0; c < NCH; c++) chk(exp[c].size() == 0, $sformatf("ch%0d burst read back", c));

    // ---- overflow on channel 3: dense input, DSP not reading ----
    lossy[3] = 1;
    for (int i = 0; i < 800; i++) begin
      for (int c = 0; c < NCH; c++) lv[c] = (c == 3) ? 40'h55_5555_5555 : hold(c);
      send(lv);
    end
    for (int c = 0; c < NCH; c++) lv[c] = '0;
    send(lv);
    repeat (20) @(posedge clk);
    bus_rd(A_STATUS, s);
    chk(s[15:8] == 8'h08 && irq_ovf, $sformatf("overflow flagged on channel 3 only (status %h)", s));
    bus_wr(A_STATUS, 64'hFF08);
    repeat (4) @(posedge clk);
    chk(!irq_ovf, "overflow interrupt cleared");
    dsp_on = 0;
    begin
      int guard = 0;
      while (exp[3].size() > 0 && guard < 100) begin
        bus.get(1); read_queue(3, 600); bus.put(1);
        bus_rd(A_COUNT + 8'd3, s);
        if (s == 0 && dut.g_ch[3].g_on.u_ch.u_rxq.count == 0) break;
        guard++;
      end
    end
    lost[3] += exp[3].size();
    exp[3].delete();
    chk(lost[3] > 0, $sformatf("events were discarded on overflow (%0d)", lost[3]));
    lossy[3] = 0;
    drain_all();
    for (int c = 0; c < NCH; c++) chk(exp[c].size() == 0, $sformatf("ch%0d queue empty at end", c));

    // ---- external start zeroes the time base ----
    s = 64'h0; s[CTRL_RUN] = 1; s[CTRL_XSTART] = 1; s[CTRL_CHEN_LO +: NCH] = '1;
    bus_wr(A_CTRL, s);
    bus_rd(A_TIME, t1);
    #3 ext_start = 1; #20 ext_start = 0;
    repeat (10) @(posedge clk);
    bus_rd(A_TIME, t2);
    chk(t1 > 40 * 1000 && t2 < 40 * 10, $sformatf("external start: %0d -> %0d", t1, t2));
    if (t2 < 40 * 10) n_xstart++;

    // ---- every mechanism must have happened ----
    chk(n_sync > 0, "receiver sync happened");
    chk(n_irq_half > 0, "half-full interrupt serviced");
    chk(n_irq_ovf > 0, "overflow interrupt happened");
    chk(n_stall > 0, "discriminator stalled on a full EMIFA queue");
    chk(n_lead > 0 && n_trail > 0 && n_both > 0, "all edge selections used");
    chk(n_peak == NCH, "peak burst on all channels");
    chk(n_sustained > 100, "sustained rate phase");
    chk(n_fast > 0, "back-to-back fetch at one event per clock");
    chk(n_tag > 0 && n_clear > 0 && n_xstart > 0, "tag latch, clear and external start");
    $display("events read %0d; sync %0d, half-full irqs %0d, overflow irq cycles %0d, stall cycles %0d, lost %0d",
             nread, n_sync, n_irq_half, n_irq_ovf, n_stall, lost[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
