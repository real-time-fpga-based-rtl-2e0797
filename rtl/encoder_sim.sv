// encoder_sim: incremental (ABZ) encoder simulator for the control board.
//
// Runs in its own 100 MHz loop, independent of the model step, so the edges
// the board's 50 MHz encoder input samples are placed to 10 ns. A 32-bit phase
// accumulator holds the position within one encoder line (2^32 = one line
// period) and advances by freq every clock; freq is the line frequency in
// periods per tick (Q0.32, signed so the shaft may turn both ways), e.g.
// 0.000395247 periods/tick = 39.5 kHz = 1158 rpm with 2048 lines. Each
// channel is a square wave with its own phase offset (fraction of a period)
// and the common duty cycle:
//   A = frac(pos + phase_a) < duty,   B = frac(pos + phase_b) < duty
// so phase_b = 0.75 puts B a quarter period behind A. line_cnt counts lines
// modulo z_count (lines per revolution) up or down with the accumulator's
// wrap; Z is high while line_cnt is 0 and A is high, once per revolution.
// Frequency, offset, duty cycle and the line count per revolution are the
// simulator's settings on the operator panel; the accumulator realisation and
// the Z pulse shape are this design's choices. The settings come from the
// host and are assumed static or changed only between uses.
//
// Timing: a, b, z are registers, one clock after the accumulator.
module encoder_sim (
  input  logic               clk,       // 100 MHz
  input  logic               rst,
  input  logic               enable,
  input  logic signed [31:0] freq,      // periods per tick, Q0.32
  input  logic        [31:0] phase_a,   // A offset, Q0.32 of a period
  input  logic        [31:0] phase_b,   // B offset, Q0.32 of a period
  input  logic        [31:0] duty,      // duty cycle, Q0.32 of a period
  input  logic        [15:0] z_count,   // lines per revolution
  output logic               a,
  output logic               b,
  output logic               z,
  output logic        [15:0] line_cnt
);

  logic [31:0] pos, pos_n;
  logic        up_wrap, dn_wrap;

  always_comb begin
    pos_n   = pos + freq;
    up_wrap = !freq[31] && (pos_n < pos);
    dn_wrap =  freq[31] && (pos_n > pos);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos      <= '0;
      line_cnt <= '0;
      a        <= 1'b0;
      b        <= 1'b0;
      z        <= 1'b0;
    end else if (enable) begin
      pos <= pos_n;
      if (up_wrap)
        line_cnt <= (line_cnt >= z_count - 1) ? '0 : line_cnt + 1'b1;
      else if (dn_wrap)
        line_cnt <= (line_cnt == 0) ? z_count - 1 : line_cnt - 1'b1;
      a <= (pos + phase_a) < duty;
      b <= (pos + phase_b) < duty;
      z <= (line_cnt == 0) && ((pos + phase_a) < duty);
    end
  end

endmodule
