// breaker_status: breakers and contactors of the emulated converter, with
// their check-back signals and the gate-pulse activity indicators.
//
// The control board closes the main circuit breaker (MCB), the DC precharge
// contactor, the GSC contactor and the stator (synchronisation) contactor
// through digital outputs and expects a check-back of each. The operator
// can force the precharge, GSC and stator contactors closed from the host
// (for tests without the board's sequence) and can trip the emulator, which
// opens everything. This block resolves commands, forces and trip into the
// switch states used by the electrical model and reports them back:
//   closed = !trip && (command || force)        (the MCB has no force)
// Each state is registered on the model step strobe, so a switch changes
// only between model steps and its check-back equals the state the model
// used. The pulses-active flags report whether any gate of the GSC or RSC
// was on during the last PULSE_WIN model steps.
//
// Interface: all inputs are sampled on step_en; outputs change one clock
// after it. gsc_gates/rsc_gates are the six gate signals of a converter.
//
// The set of switches, the force inputs, the trip and the two pulse
// indicators follow the emulator's operation-sequence panel; the resolution
// rule, the step-aligned switching and PULSE_WIN (1 ms, longer than a
// 3.5 kHz PWM period) are this design's own choices.
module breaker_status #(
  parameter int unsigned PULSE_WIN = 200   // model steps without pulses before "inactive"
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       step_en,
  input  logic       mcb_cmd,           // main circuit breaker command
  input  logic       precharge_cmd,     // precharge contactor command
  input  logic       gsc_cmd,           // GSC contactor command
  input  logic       synch_cmd,         // stator contactor command
  input  logic       force_precharge,   // host: force precharge contactor
  input  logic       force_gsc,         // host: force GSC contactor
  input  logic       force_synch,       // host: force stator contactor
  input  logic       trip,              // host: open everything
  input  logic [5:0] gsc_gates,
  input  logic [5:0] rsc_gates,
  output logic       mcb_closed,
  output logic       precharge_closed,
  output logic       gsc_closed,
  output logic       stator_closed,
  output logic       gsc_pulses_active,
  output logic       rsc_pulses_active
);

  localparam int CW = $clog2(PULSE_WIN + 1);

  logic [CW-1:0] gsc_cnt, rsc_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      mcb_closed       <= 1'b0;
      precharge_closed <= 1'b0;
      gsc_closed       <= 1'b0;
      stator_closed    <= 1'b0;
      gsc_cnt          <= '0;
      rsc_cnt          <= '0;
    end else if (step_en) begin
      mcb_closed       <= !trip && mcb_cmd;
      precharge_closed <= !trip && (precharge_cmd || force_precharge);
      gsc_closed       <= !trip && (gsc_cmd || force_gsc);
      stator_closed    <= !trip && (synch_cmd || force_synch);
      if (|gsc_gates)         gsc_cnt <= CW'(PULSE_WIN);
      else if (gsc_cnt != '0) gsc_cnt <= gsc_cnt - 1'b1;
      if (|rsc_gates)         rsc_cnt <= CW'(PULSE_WIN);
      else if (rsc_cnt != '0) rsc_cnt <= rsc_cnt - 1'b1;
    end
  end

  assign gsc_pulses_active = (gsc_cnt != '0);
  assign rsc_pulses_active = (rsc_cnt != '0);

endmodule
