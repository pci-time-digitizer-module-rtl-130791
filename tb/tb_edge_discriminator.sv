// tb_edge_discriminator: random receive-queue words (held in a testbench queue acting as
// the first-word-fall-through FIFO) under all four edge selections, with random stalls of
// the output. Every output event is compared with a list built independently from the
// level bits; the test also checks the rate of one event per clock with no gap between
// words when nothing stalls, including a 40-edge frame.
module tb_edge_discriminator;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0, out_full = 0;
  edge_sel_t edge_sel = EDGE_BOTH;
  rx_entry_t in_data;
  logic in_empty, in_rd, out_wr;
  event_t out_data;
  rx_entry_t inq [$];
  event_t exp [$];
  int checks = 0, failures = 0, stall_pct = 0, nev = 0;
  always #4 clk = ~clk;
  edge_discriminator dut (.*);

  assign in_empty = (inq.size() == 0);
  assign in_data  = in_empty ? '0 : inq[0];

  always @(posedge clk) begin
    if (in_rd) void'(inq.pop_front());
    if (out_wr) begin
      checks++; nev++;
      if (exp.size() == 0 || out_data != exp[0]) begin
        failures++; $display("FAIL event %h", out_data);
      end
      if (exp.size() > 0) void'(exp.pop_front());
    end
  end
  always @(negedge clk) out_full = ($urandom % 100) < stall_pct;

  task automatic push(input rx_entry_t e);
    for (int j = 0; j < FRAME_W; j++) begin
      logic nl;
      nl = e.lvl[j+1];
      if (nl != e.lvl[j] && ((nl && edge_sel[0]) || (!nl && edge_sel[1]))) begin
        event_t v;
        v.t = e.t + TIME_W'(j); v.pol = nl; v.tag = e.tag;
        exp.push_back(v);
      end
    end
    inq.push_back(e);
  endtask

  function automatic rx_entry_t rnd(input int kind);
    rx_entry_t e;
    e.t = {$urandom, $urandom} & 56'hFF_FFFF_FFFF_FFF8;
    e.tag = 7'($urandom);
    case (kind)
      0: e.lvl = {$urandom, $urandom};
      1: e.lvl = 41'h0AA_AAAA_AAAA;               // 40 edges
      default: e.lvl = 41'(1) << ($urandom % 41);
    endcase
    if (e.lvl == '0) e.lvl = 41'h3;
    return e;
  endfunction

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1, n0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk) edge_sel = edge_sel_t'((s + 1) % 4);
      stall_pct = 30;
      for (int i = 0; i < 300; i++) push(rnd($urandom % 3));
      while (inq.size() > 0 || exp.size() > 0) @(posedge clk);
      repeat (4) @(posedge clk);
    end
    // rate: 10 frames of 40 edges each, no stall: 400 events in about 400 clocks
    stall_pct = 0;
    @(negedge clk) edge_sel = EDGE_BOTH;
    n0 = nev;
    for (int i = 0; i < 10; i++) push(rnd(1));
    t0 = $time;
    while (exp.size() > 0) @(posedge clk);
    t1 = $time;
    checks++;
    if (nev - n0 != 400 || (t1 - t0) / 8 > 403) begin
      failures++; $display("FAIL rate: %0d events in %0d clocks", nev - n0, (t1 - t0) / 8);
    end
    repeat (4) @(posedge clk);
    checks++; if (exp.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
