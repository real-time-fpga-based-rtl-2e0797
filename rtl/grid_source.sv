// grid_source: ideal three-phase grid with a programmable voltage dip.
//
// The stator (grid) angle theta_s is a 32-bit phase accumulator advanced by
// PHASE_INC every model step: 50 Hz with 5 us steps is 2^32*50*5e-6. The grid
// amplitude is amp (per unit of the phase peak voltage) except during a
// voltage dip: a one-cycle dip_start pulse while dip_en is set starts a dip
// of dip_steps model steps (the dip duration; 50 ms = 10000 steps), during
// which the amplitude is dip_level. The dq voltage in the grid-voltage
// oriented frame is then (amp_eff, 0); abc voltages are made from theta_s
// and amp_eff with inv_park_transform. The dip test (duration, level, enable)
// is the one of the emulator's operator panel; the use of a phase
// accumulator and the meaning of dip_level as the remaining voltage are this
// design's choices.
//
// Timing: theta_s, amp_eff and dip_active are registers updated on step_en
// (dip_start is sampled every clock).
module grid_source
  import hil_pkg::*;
#(
  parameter real   TS     = 5.0e-6,
  parameter real   F_GRID = 50.0,
  parameter angle_t PHASE_INC = angle_t'($rtoi(F_GRID * TS * 4294967296.0 + 0.5))
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        step_en,
  input  fx_t         amp,        // nominal amplitude [pu]
  input  logic        dip_en,     // LVRT test enabled
  input  logic        dip_start,  // start a dip (one clock)
  input  fx_t         dip_level,  // amplitude during the dip [pu]
  input  logic [31:0] dip_steps,  // dip duration [model steps]
  output angle_t      theta_s,    // grid angle
  output fx_t         amp_eff,    // present amplitude [pu]
  output logic        dip_active
);

  logic [31:0] dip_cnt;
  logic        pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      theta_s    <= '0;
      amp_eff    <= '0;
      dip_cnt    <= '0;
      dip_active <= 1'b0;
      pending    <= 1'b0;
    end else begin
      if (dip_start && dip_en) pending <= 1'b1;
      if (step_en) begin
        theta_s <= theta_s + PHASE_INC;
        if (pending) begin
          pending    <= 1'b0;
          dip_cnt    <= dip_steps;
          dip_active <= (dip_steps != 0);
          amp_eff    <= (dip_steps != 0) ? dip_level : amp;
        end else if (dip_cnt > 1) begin
          dip_cnt <= dip_cnt - 1;
          amp_eff <= dip_level;
        end else begin
          dip_cnt    <= '0;
          dip_active <= 1'b0;
          amp_eff    <= amp;
        end
      end
    end
  end

endmodule
