// tdc_pkg: types and constants shared by the time digitizer pulse processor.
//
// The pulse processor turns 40-bit frames from eight 2.5 Gbit/s receivers into 64-bit
// time-stamped edge events. One frame lasts 16 ns (40 bits of 0.4 ns); the frame count is
// multiplied by 40 to give a 56-bit time in 0.4 ns units, to which the 6-bit position of an
// edge inside its frame is added. The widths (40-bit frame, 50-bit counter, 56-bit time,
// 7 tag bits, 104-bit receive word, 64-bit event, 511-word queues) follow the document.
// The reference and sync frame patterns, the bit order and the register map are choices of
// this design: the document does not give them.
package tdc_pkg;

  localparam int unsigned NCH        = 8;    // TDC channels per board
  localparam int unsigned FRAME_W    = 40;   // bits per receiver frame (16 ns)
  localparam int unsigned CNT_W      = 50;   // coarse frame counter
  localparam int unsigned TIME_W     = 56;   // frame count x 40, in 0.4 ns units
  localparam int unsigned TAG_W      = 7;    // tag bits per event
  localparam int unsigned FINE_W     = 6;    // edge position inside a frame, 0..39
  localparam int unsigned XTAG_W     = 6;    // external NIM tag inputs
  localparam int unsigned FIFO_DEPTH = 511;  // both queues
  localparam int unsigned DATA_W     = 64;   // EMIFA data bus

  // Reference frame sent to every inverter gate while no sync is in progress: four
  // alternating 10-bit symbols (1010101010). Bit 0 is the first bit in time.
  localparam logic [FRAME_W-1:0] REF_FRAME  = 40'hAA_AAAA_AAAA;
  // Sync frame: four 10-bit symbols (two commas and two data symbols) chosen so that no
  // rotation of the frame other than zero equals it, which makes the word boundary unique.
  localparam logic [FRAME_W-1:0] SYNC_FRAME = 40'h3E_B05A_A955;

  // Entry of the receive queue: frame time, 40 pulse-level bits plus the last bit of the
  // previous frame (bit 0), and the tag. 56 + 41 + 7 = 104 bits.
  typedef struct packed {
    logic [TIME_W-1:0]  t;
    logic [FRAME_W:0]   lvl;
    logic [TAG_W-1:0]   tag;
  } rx_entry_t;

  // Event written to the EMIFA queue: edge time in 0.4 ns units, polarity (1 = rising,
  // the leading edge of a pulse), tag. 56 + 1 + 7 = 64 bits.
  typedef struct packed {
    logic [TIME_W-1:0]  t;
    logic               pol;
    logic [TAG_W-1:0]   tag;
  } event_t;

  typedef enum logic [1:0] {
    EDGE_NONE  = 2'b00,
    EDGE_LEAD  = 2'b01,
    EDGE_TRAIL = 2'b10,
    EDGE_BOTH  = 2'b11
  } edge_sel_t;

  // Control register fields (64-bit register, bits not listed read back as written).
  localparam int unsigned CTRL_RUN      = 0;   // time counter runs, channels acquire
  localparam int unsigned CTRL_CLEAR    = 1;   // write 1: zero the time counter (self-clearing)
  localparam int unsigned CTRL_XSTART   = 2;   // external start pulse zeroes the counter
  localparam int unsigned CTRL_SYNC     = 3;   // write 1: run a receiver sync (self-clearing)
  localparam int unsigned CTRL_EDGE_LO  = 4;   // [5:4] edge_sel_t
  localparam int unsigned CTRL_IEN_HALF = 6;   // enable half-full interrupt
  localparam int unsigned CTRL_IEN_OVF  = 7;   // enable overflow interrupt
  localparam int unsigned CTRL_CHEN_LO  = 8;   // [15:8] channel enables

  typedef struct packed {
    logic [NCH-1:0] ch_en;
    logic           ien_ovf;
    logic           ien_half;
    edge_sel_t      edge_sel;
    logic           sync_req;      // one-cycle pulse
    logic           xstart_en;
    logic           clear;         // one-cycle pulse
    logic           run;
  } ctrl_t;

  // EMIFA (CE0) word addresses.
  localparam logic [7:0] A_CTRL   = 8'h00;
  localparam logic [7:0] A_STATUS = 8'h01;
  localparam logic [7:0] A_TIME   = 8'h02;
  localparam logic [7:0] A_TEST   = 8'h03;
  localparam logic [7:0] A_FIFO   = 8'h08;   // 0x08..0x0F: pop event of channel 0..7
  localparam logic [7:0] A_COUNT  = 8'h10;   // 0x10..0x17: fill of EMIFA queue 0..7

  // Outputs of the address decoder for one bus cycle.
  typedef struct packed {
    logic           rd_ctrl, rd_status, rd_time, rd_test, rd_fifo, rd_count;
    logic           wr_ctrl, wr_status, wr_test;
    logic [2:0]     ch;        // channel of a FIFO or count access
    logic [NCH-1:0] pop;       // one-hot FIFO pop
  } dec_t;

endpackage
