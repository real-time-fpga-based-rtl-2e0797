// lpf_bw: first-order Butterworth low-pass filter (bilinear transform),
// one sample per model step.
//
//   y[n] = A*y[n-1] + B*(x[n] + x[n-1])
// with A = (1 - wc*T/2)/(1 + wc*T/2) and B = (wc*T/2)/(1 + wc*T/2) in Q2.30.
// The defaults A = 1072730222 and B = 505751 are the scaled coefficients of
// the emulator's 30 Hz filter at the 5 us step (wc*T/2 = 2*pi*30*5e-6/2);
// they smooth the active power, reactive power and torque sent to the
// turbine model. A second, wider accumulator (Q16.46) keeps the filter state
// so the small input weight B is not lost to rounding. The structure
// follows from the two printed coefficients; the word lengths are this
// design's.
//
// Timing: y is a register updated on step_en (one step of latency).
// The top 32 bits of the 96-bit product sum are never needed (|y| stays
// within the input range) and are left unused on purpose.
module lpf_bw
  import hil_pkg::*;
#(
  parameter longint COEF_A = 1072730222,  // Q2.30
  parameter longint COEF_B = 505751       // Q2.30
) (
  input  logic clk,
  input  logic rst,
  input  logic step_en,
  input  fx_t  x,
  output fx_t  y
);

  logic signed [63:0] acc;    // y in Q16.46
  fx_t                x_d;
  logic signed [95:0] nxt;

  // (x + x_prev) is Q16.16 and B is Q2.30, so their product is Q.46 like acc
  always_comb begin
    nxt = ((96'(acc) * 96'(COEF_A)) >>> 30)
        + (96'(64'(x) + 64'(x_d)) * 96'(COEF_B));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      x_d <= '0;
    end else if (step_en) begin
      acc <= 64'(nxt);
      x_d <= x;
    end
  end

  assign y = fx_t'(acc >>> 30);

endmodule
