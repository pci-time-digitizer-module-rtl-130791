// tb_timing_accuracy: checks the time measurement itself, with pulses placed at random
// picosecond times and a bit-level model of the 2.5 Gbit/s path.
//
// After the receiver sync, each of the eight channels gets random pulses. Widths and gaps
// are 0.45 ns to 30 ns, so they include pulses and dead times just over the 0.4 ns
// minimum. Both edges are recorded. Every edge must appear as exactly one event with the
// right polarity. Its time, relative to the first edge on channel 0, must match the true
// time difference to within one 0.4 ns step, on the same channel and across channels.
module tb_timing_accuracy;
  import tdc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0][FRAME_W-1:0] rx_word;
  logic [FRAME_W-1:0] tx_word;
  logic override_inputs;
  logic ext_start = 0, ch8_pulse = 0;
  logic [XTAG_W-1:0] ext_tag = '0;
  logic emif_cs = 0, emif_rd = 0, emif_wr = 0;
  logic [7:0] emif_addr = 0;
  logic [63:0] emif_wdata = 0, emif_rdata;
  logic irq_half, irq_ovf;
  logic [NCH-1:0] pulse = '0;
  always #4 clk = ~clk;

  tdc_digitizer_top dut (.clk_125(clk), .*);
  bit_level_link_model u_link (.clk, .ce(dut.ce), .tx_word, .override_inputs, .pulse, .rx_word);

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic bus_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk) begin emif_cs = 1; emif_wr = 1; emif_addr = a; emif_wdata = d; end
    @(negedge clk) begin emif_cs = 0; emif_wr = 0; end
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk) begin emif_cs = 1; emif_rd = 1; emif_addr = a; end
    @(posedge clk); #1 d = emif_rdata;
    @(negedge clk) begin emif_cs = 0; emif_rd = 0; end
  endtask

  // true edge times (ps) and polarities per channel
  longint edge_ps [NCH][$];
  logic   edge_pol [NCH][$];

  function automatic longint now_ps();
    real rt;
    rt = $realtime;
    return longint'(rt * 1000.0);
  endfunction

  task automatic drive(input int c, input longint t_start_ps, input int n);
    longint t;
    t = t_start_ps;
    for (int i = 0; i < 2 * n; i++) begin
      t += 450 + $urandom % 29550;    // 0.45 .. 30 ns
      edge_ps[c].push_back(t);
      edge_pol[c].push_back(i % 2 == 0);
    end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one process per channel plays its edge list
  for (genvar c = 0; c < NCH; c++) begin : g_play
    initial begin
      @(posedge dut.ctrl.run);
      repeat (200) @(posedge clk);
      for (int i = 0; i < 1000000; i++) begin
        if (i < edge_ps[c].size()) begin
          longint dps;
          dps = edge_ps[c][i] - now_ps();
          #(dps * 1ps);
          pulse[c] = edge_pol[c][i];
        end
      end
    end
  end

  initial begin
    logic [63:0] s, v, n, d;
    longint t0_ps, tnow;
    longint m0;
    logic have0;
    int nev [NCH];
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);
    v = '0; v[CTRL_SYNC] = 1; v[CTRL_CHEN_LO +: NCH] = '1; v[CTRL_EDGE_LO +: 2] = EDGE_BOTH;
    bus_wr(A_CTRL, v);
    repeat (200) @(posedge clk);
    bus_rd(A_STATUS, s);
    chk(s[23:16] == 8'hFF, $sformatf("all receivers locked (%h)", s[23:16]));
    // plan the pulses before starting
    tnow = now_ps();
    t0_ps = tnow + 200 * 8000 + 100000;
    for (int c = 0; c < NCH; c++) drive(c, t0_ps + 37 * c, 120);
    v[CTRL_SYNC] = 0; v[CTRL_RUN] = 1; v[CTRL_CLEAR] = 1;
    bus_wr(A_CTRL, v);
    // let all pulses happen
    begin
      longint last, dps;
      last = 0;
      for (int c = 0; c < NCH; c++) if (edge_ps[c][$] > last) last = edge_ps[c][$];
      dps = last - now_ps();
      #(dps * 1ps);
    end
    repeat (2000) @(posedge clk);
    // read and compare
    have0 = 0; m0 = 0;
    for (int c = 0; c < NCH; c++) begin
      bus_rd(A_COUNT + 8'(c), n);
      nev[c] = int'(n);
      chk(nev[c] == edge_ps[c].size(), $sformatf("ch%0d: %0d events for %0d edges", c, nev[c], edge_ps[c].size()));
      for (int i = 0; i < nev[c]; i++) begin
        event_t e;
        real err;
        bus_rd(A_FIFO + 8'(c), d);
        e = event_t'(d);
        if (!have0) begin m0 = longint'(e.t); have0 = 1; end
        if (i < edge_ps[c].size()) begin
          err = real'(longint'(e.t) - m0) * 0.4 - real'(edge_ps[c][i] - edge_ps[0][0]) / 1000.0;
          chk(e.pol == edge_pol[c][i], $sformatf("ch%0d edge %0d polarity", c, i));
          chk(err > -0.4 && err < 0.4, $sformatf("ch%0d edge %0d time error %.3f ns", c, i, err));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
