// log_channel: one target-to-host logging channel.
//
// NVAR of the NSRC model variables are selected by index (sel), sampled
// together at a model step, converted to IEEE single precision (fx_to_sgl)
// and written into the channel's DMA FIFO (dma_fifo) as two 16-bit elements
// each, upper half first, in selection order. With decim = 0 every model step
// is logged (5 us resolution), with decim = 1 every second step (10 us). The
// emulator has two channels: 8 selectable variables into a 65535-element
// FIFO (online scope display via the real-time CPU) and 16 selectable
// variables into a 262143-element FIFO (TDMS logging on the host PC).
// Variable counts, SGL type, element size, depths and the two resolutions
// are the document's; the sample-then-serialise scheme is this design's.
//
// Timing: a sample occupies the FIFO write port for 2*NVAR clocks after the
// step, far less than the 200-clock step; a step that arrives while a sample
// is still being written is counted in missed and not logged.
// The FIFO's empty flag is not needed here (the host sees count).
module log_channel
  import hil_pkg::*;
#(
  parameter int unsigned NVAR  = 8,
  parameter int unsigned NSRC  = 32,
  parameter int unsigned DEPTH = 65535
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        step_en,
  input  logic                        enable,     // logging on
  input  logic                        decim,      // 0: 5 us, 1: 10 us
  input  fx_t                         src [NSRC], // model variables
  input  logic [$clog2(NSRC)-1:0]     sel [NVAR], // selected variable per slot
  // host side of the DMA FIFO
  input  logic                        rd_en,
  output logic [15:0]                 rd_data,
  output logic                        rd_valid,
  output logic                        full,
  output logic                        overflow,
  input  logic                        alarm_clr,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic [15:0]                 missed
);

  localparam int WW = $clog2(2 * NVAR + 1);
  localparam int VW = (NVAR > 1) ? $clog2(NVAR) : 1;

  fx_t           snap [NVAR];
  logic          busy, phase;
  logic [WW-1:0] word;
  logic [31:0]   sgl;
  logic          wr_en, empty;
  logic [15:0]   wr_data;
  logic          take;

  assign take = step_en && enable && (!decim || phase);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      phase  <= 1'b0;
      word   <= '0;
      missed <= '0;
      for (int i = 0; i < NVAR; i++) snap[i] <= '0;
    end else begin
      if (step_en) phase <= ~phase;
      if (take && busy) begin
        missed <= missed + 1'b1;
      end else if (take) begin
        for (int i = 0; i < NVAR; i++) snap[i] <= src[sel[i]];
        busy <= 1'b1;
        word <= '0;
      end
      if (busy) begin
        if (word == WW'(2 * NVAR - 1)) busy <= 1'b0;
        word <= word + 1'b1;
      end
    end
  end

  fx_to_sgl u_cvt (.x(snap[word[VW:1]]), .sgl(sgl));

  assign wr_en   = busy;
  assign wr_data = word[0] ? sgl[15:0] : sgl[31:16];

  dma_fifo #(.DEPTH(DEPTH), .W(16)) u_fifo (
    .clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data, .rd_valid,
    .empty, .full, .count, .overflow, .alarm_clr
  );

endmodule
