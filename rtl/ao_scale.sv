// ao_scale: analog-output scaling of the emulator's sensor feedbacks.
//
// The control board reads the converter's voltages and currents as analog
// signals, so the emulator drives digital-to-analog converters with them.
// This block takes NCH model signals in per unit, multiplies each one by a
// run-time gain (output volts per per-unit, set by the host) and turns the
// result into a signed 16-bit DAC code for a +/-FS_V volt output:
//   code = saturate( x * gain * 32768 / FS_V )
// One code per channel is registered on each model step strobe, so the
// analog outputs change once per 5 us step like the model itself.
//
// Interface: x[] and gain[] are Q16.16; code[] is the two's-complement
// DAC word (-32768 .. 32767 = -FS_V .. +FS_V); clip[] flags a channel that
// hit full scale on the last update. Latency is one clock after step_en.
//
// The channel list and per-channel scale factors follow the emulator's
// AO scaling panel (eight AO channels: grid current, three rotor currents,
// GSC current, DC link voltage, grid and stator voltage); the +/-10 V range
// is that of the FPGA card's analog outputs. The code format, the rounding
// (towards minus infinity) and the saturation flag are this design's own.
module ao_scale
  import hil_pkg::*;
#(
  parameter int unsigned NCH  = 8,     // analog output channels
  parameter real         FS_V = 10.0   // full-scale output voltage [V]
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               step_en,
  input  fx_t                x    [NCH],  // signals [pu]
  input  fx_t                gain [NCH],  // output volts per pu
  output logic signed [15:0] code [NCH],  // DAC words
  output logic [NCH-1:0]     clip          // channel saturated
);

  // 1 / FS_V as a Q8.24 coefficient; the factor 2^15 is a shift below
  localparam coef_t C_INV_FS = to_coef(1.0 / FS_V);

  logic signed [15:0] nxt [NCH];
  logic [NCH-1:0]     nxt_clip;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      fx_t                v;      // output voltage / FS_V, Q16.16
      logic signed [63:0] w;
      v = mulc(mulx(x[c], gain[c]), C_INV_FS);
      w = 64'(v) >>> 1;           // Q16.16 -> Q1.15 code: x 2^15 / 2^16
      if (w > 64'sd32767)       begin nxt[c] = 16'sh7FFF; nxt_clip[c] = 1'b1; end
      else if (w < -64'sd32768) begin nxt[c] = 16'sh8000; nxt_clip[c] = 1'b1; end
      else                      begin nxt[c] = 16'(w);    nxt_clip[c] = 1'b0; end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NCH; c++) code[c] <= '0;
      clip <= '0;
    end else if (step_en) begin
      for (int c = 0; c < NCH; c++) code[c] <= nxt[c];
      clip <= nxt_clip;
    end
  end

endmodule
