// dma_fifo: FPGA-side buffer of a target-to-host DMA channel.
//
// A synchronous first-in first-out memory of DEPTH elements of W bits (the
// emulator uses two such channels, of 65535 and 262143 sixteen-bit
// elements). The logger pushes with wr_en; the host side pops with rd_en and
// receives rd_data with rd_valid one clock later (block-RAM style registered
// read). A push into a full FIFO is dropped and sets the sticky overflow
// alarm, which alarm_clr clears (the operator's "reset FIFO alarm"). full
// is the "FIFO full?" indicator. Pointers wrap modulo DEPTH, so DEPTH need not
// be a power of two. Element size and depths are the document's; the
// interface and the alarm behaviour are this design's.
//
// Timing: one push and one pop per clock; a pop of the last element and a
// push in the same clock are both accepted.
module dma_fifo #(
  parameter int unsigned DEPTH = 65535,
  parameter int unsigned W     = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       rd_valid,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  input  logic                       alarm_clr
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (32'(count) == DEPTH);
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && !full;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
    if (do_rd) rd_data <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
      if (alarm_clr)              overflow <= 1'b0;
      else if (wr_en && full)     overflow <= 1'b1;
    end
  end

  // the element count never exceeds the depth
  assert property (@(posedge clk) disable iff (rst) 32'(count) <= DEPTH);

endmodule
