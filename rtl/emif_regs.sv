// emif_regs: the DSP-visible 64-bit registers and the EMIFA read multiplexer.
//
// Four 64-bit registers as in the document: CONTROL (read/write; configures the pulse
// processor, fields in tdc_pkg), STATUS (read; the write-one-to-clear interrupt flags and
// other state), CURRENT TIME (read; the 56-bit time in 0.4 ns units) and TEST (read/write
// scratch register for bus tests). The CLEAR and SYNC control bits act as one-cycle pulses
// and read back as zero. A write to STATUS produces one-cycle clear pulses for the flags
// whose bits are 1. Read data, including an event popped from a channel queue, appears on
// `rdata` one clock after the read cycle. Reset clears CONTROL and TEST. The field layout
// is this design's: the document names the registers and their width only. The decoder's
// one-hot pop strobes in `dec` go straight to the channel queues and are not used here.
module emif_regs
  import tdc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  dec_t                 dec,
  input  logic [DATA_W-1:0]    wdata,
  output logic [DATA_W-1:0]    rdata,
  output ctrl_t                ctrl,
  output logic [DATA_W-1:0]    status_clr,
  input  logic [DATA_W-1:0]    status,
  input  logic [TIME_W-1:0]    cur_time,
  input  event_t [NCH-1:0]     fifo_data,
  input  logic [NCH-1:0][9:0]  fifo_count
);
  logic [DATA_W-1:0] ctrl_q, test_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q     <= '0;
      test_q     <= '0;
      rdata      <= '0;
      status_clr <= '0;
    end else begin
      status_clr <= dec.wr_status ? wdata : '0;
      ctrl_q[CTRL_CLEAR] <= 1'b0;
      ctrl_q[CTRL_SYNC]  <= 1'b0;
      if (dec.wr_ctrl) ctrl_q <= wdata;
      if (dec.wr_test) test_q <= wdata;
      unique0 case (1'b1)
        dec.rd_ctrl:   rdata <= ctrl_q & ~((64'd1 << CTRL_CLEAR) | (64'd1 << CTRL_SYNC));
        dec.rd_status: rdata <= status;
        dec.rd_time:   rdata <= DATA_W'(cur_time);
        dec.rd_test:   rdata <= test_q;
        dec.rd_fifo:   rdata <= fifo_data[dec.ch];
        dec.rd_count:  rdata <= DATA_W'(fifo_count[dec.ch]);
        default:       rdata <= '0;
      endcase
    end
  end

  assign ctrl.run       = ctrl_q[CTRL_RUN];
  assign ctrl.clear     = ctrl_q[CTRL_CLEAR];
  assign ctrl.xstart_en = ctrl_q[CTRL_XSTART];
  assign ctrl.sync_req  = ctrl_q[CTRL_SYNC];
  assign ctrl.edge_sel  = edge_sel_t'(ctrl_q[CTRL_EDGE_LO +: 2]);
  assign ctrl.ien_half  = ctrl_q[CTRL_IEN_HALF];
  assign ctrl.ien_ovf   = ctrl_q[CTRL_IEN_OVF];
  assign ctrl.ch_en     = ctrl_q[CTRL_CHEN_LO +: NCH];
endmodule
