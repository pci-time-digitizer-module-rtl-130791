// tb_emif_regs: writes and reads the control, test and status registers through the
// decoder, reads time, queue data and counts, and checks the one-clock read latency,
// the self-clearing CLEAR/SYNC bits and the status write-one-to-clear pulses.
module tb_emif_regs;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs = 0, rd = 0, wr = 0;
  logic [7:0] addr = 0;
  logic [63:0] wdata = 0, rdata, status_clr, status;
  logic [55:0] cur_time;
  event_t [NCH-1:0] fifo_data;
  logic [NCH-1:0][9:0] fifo_count;
  ctrl_t ctrl;
  dec_t dec;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;
  emif_decoder u_dec (.*);
  emif_regs dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic bus_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk) begin cs = 1; wr = 1; addr = a; wdata = d; end
    @(negedge clk) begin cs = 0; wr = 0; end
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk) begin cs = 1; rd = 1; addr = a; end
    @(posedge clk); #1 d = rdata;
    cs = 0; rd = 0;
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic saw_clear, saw_sync;
  always @(posedge clk) begin
    if (ctrl.clear) saw_clear <= 1;
    if (ctrl.sync_req) saw_sync <= 1;
  end

  initial begin
    logic [63:0] d, v;
    saw_clear = 0; saw_sync = 0;
    status = 64'h0123_4567_89AB_CDEF;
    cur_time = 56'hAB_CDEF_0123_4567;
    for (int c = 0; c < NCH; c++) begin
      fifo_data[c] = {$urandom, $urandom};
      fifo_count[c] = 10'(c * 37 + 5);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    bus_rd(A_CTRL, d); chk(d == 0, "control resets to 0");
    v = 64'hFFFF_0000_0000_A5F1 | 64'h1 | (64'd1 << CTRL_CLEAR) | (64'd1 << CTRL_SYNC);
    bus_wr(A_CTRL, v);
    @(posedge clk); #1 chk(saw_clear && saw_sync, "clear and sync pulses");
    chk(!ctrl.clear && !ctrl.sync_req, "pulses self-clear");
    bus_rd(A_CTRL, d); chk(d == (v & ~64'hA), "control read back without pulse bits");
    chk(ctrl.run && ctrl.ch_en == 8'hA5 && ctrl.edge_sel == EDGE_BOTH && ctrl.ien_half && ctrl.ien_ovf, "control fields");
    for (int i = 0; i < 20; i++) begin
      v = {$urandom, $urandom}; bus_wr(A_TEST, v); bus_rd(A_TEST, d); chk(d == v, "test register");
    end
    bus_rd(A_STATUS, d); chk(d == status, "status read");
    bus_rd(A_TIME, d); chk(d == {8'h0, cur_time}, "current time read");
    for (int c = 0; c < NCH; c++) begin
      bus_rd(A_FIFO + 8'(c), d); chk(d == fifo_data[c], "fifo data");
      bus_rd(A_COUNT + 8'(c), d); chk(d == 64'(fifo_count[c]), "fifo count");
    end
    bus_rd(8'h40, d); chk(d == 0, "unmapped read is zero");
    // status write: one-cycle clear pulse
    @(negedge clk) begin cs = 1; wr = 1; addr = A_STATUS; wdata = 64'h0000_0000_0000_3C81; end
    @(posedge clk); #1 chk(status_clr == 64'h3C81, "clear pulse");
    cs = 0; wr = 0;
    @(posedge clk); #1 chk(status_clr == 0, "clear pulse one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
