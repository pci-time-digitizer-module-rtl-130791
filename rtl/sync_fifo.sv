// sync_fifo: single-clock first-word-fall-through queue.
//
// Used twice per channel: as the 511 x 104 receive queue and as the 511 x 64 EMIFA queue
// (the depth of 511 follows the document). `rd_data` shows the oldest word whenever
// `empty` is low; `rd_en` removes it at the clock edge. A write while the queue is full
// is dropped and `overflow` pulses for one clock; a read of an empty queue is ignored.
// `half_full` is high while at least (DEPTH+1)/2 words are stored. Storage is a plain
// array with wrapping pointers and a fill counter. A write and a read in the same cycle
// both take effect, except that a write to a full queue is refused.
module sync_fifo #(
  parameter int unsigned W     = 104,
  parameter int unsigned DEPTH = 511
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       half_full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty     = (count == '0);
  assign full      = (count == DEPTH[$bits(count)-1:0]);
  assign half_full = (count >= (($bits(count))'((DEPTH + 1) / 2)));
  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign rd_data   = mem[rp];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
endmodule
