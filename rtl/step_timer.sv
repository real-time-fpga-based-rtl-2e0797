// step_timer: fundamental sample-time generator of the electrical model.
//
// The model is advanced once per fundamental step of 5 us. With the 40 MHz
// FPGA clock that is one step every TICKS = 200 clock cycles, the tick count
// shown for the fundamental sample time of the emulator's main loop. A
// free-running counter counts 0..TICKS-1 and raises step_en for one cycle
// when it wraps; every state register of the model updates only on step_en,
// so the combinational model arithmetic has TICKS clock periods to settle.
// step_cnt counts the steps taken since reset (the main loop iteration
// counter). Synchronous active-high reset and the enable input (the IP
// block's clock enable) are this design's choice.
//
// Timing: first step_en TICKS cycles after reset is released with enable
// high, then every TICKS cycles.
module step_timer #(
  parameter int unsigned TICKS = 200
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  output logic        step_en,
  output logic [31:0] step_cnt
);

  logic [$clog2(TICKS)-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick     <= '0;
      step_en  <= 1'b0;
      step_cnt <= '0;
    end else begin
      step_en <= 1'b0;
      if (enable) begin
        if (32'(tick) == TICKS - 1) begin
          tick     <= '0;
          step_en  <= 1'b1;
          step_cnt <= step_cnt + 1;
        end else begin
          tick <= tick + 1'b1;
        end
      end
    end
  end

endmodule
