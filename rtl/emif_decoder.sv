// emif_decoder: decoding logic for the DSP EMIFA bus (chip enable CE0).
//
// The DSP reaches the pulse processor through its external memory interface. For a bus
// cycle with `cs` and `rd` or `wr` high, the decoder turns the 8-bit word address into
// one read or write select: control 0x00, status 0x01, current time 0x02, test 0x03,
// event queue of channel n at 0x08+n (a read pops one event), fill count of queue n at
// 0x10+n. Accesses to other addresses select nothing (reads return zero). Purely
// combinational. The address map is this design's; the document only names the block.
module emif_decoder
  import tdc_pkg::*;
(
  input  logic       cs,
  input  logic       rd,
  input  logic       wr,
  input  logic [7:0] addr,
  output dec_t       dec
);
  logic r, w;
  assign r = cs && rd;
  assign w = cs && wr && !rd;

  always_comb begin
    dec           = '0;
    dec.ch        = addr[2:0];
    dec.rd_ctrl   = r && (addr == A_CTRL);
    dec.rd_status = r && (addr == A_STATUS);
    dec.rd_time   = r && (addr == A_TIME);
    dec.rd_test   = r && (addr == A_TEST);
    dec.rd_fifo   = r && (addr[7:3] == A_FIFO[7:3]);
    dec.rd_count  = r && (addr[7:3] == A_COUNT[7:3]);
    dec.wr_ctrl   = w && (addr == A_CTRL);
    dec.wr_status = w && (addr == A_STATUS);
    dec.wr_test   = w && (addr == A_TEST);
    if (dec.rd_fifo) dec.pop[addr[2:0]] = 1'b1;
  end
endmodule
