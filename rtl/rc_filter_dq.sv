// rc_filter_dq: stator RC filter in the synchronous dq frame (per unit).
//
// A series resistor R feeds a capacitor C per phase; written in the frame
// rotating at the grid angular speed we, the capacitor voltage obeys
//   i_q = C*dv_q/dt + C*we*v_d,   i_d = C*dv_d/dt - C*we*v_q,
//   i = (v_gen - v)/R
// which gives, per step (forward Euler),
//   v_q += TS/(RC)*(v_qGen - v_q) - TS*we*v_d
//   v_d += TS/(RC)*(v_dGen - v_d) + TS*we*v_q
// The filter smooths the open-circuit stator voltage the machine model
// computes during synchronisation. The current equations and the first form
// are those of the filter description; the sign of the we*v_q term follows
// the current equation for i_d. R and C are this design's assumptions
// (time constant 0.2 ms). we is in per unit of the base angular speed.
//
// Timing: the state updates on step_en; v_f is the registered state.
module rc_filter_dq
  import hil_pkg::*;
#(
  parameter real TS = 5.0e-6,   // model step [s]
  parameter real FB = 50.0,     // base frequency [Hz]
  parameter real R  = 0.2,      // series resistance [Ohm]
  parameter real C  = 1.0e-3    // capacitance [F]
) (
  input  logic clk,
  input  logic rst,
  input  logic step_en,
  input  dq_t  v_gen,   // unfiltered generator voltage [pu]
  input  fx_t  we,      // grid angular speed [pu]
  output dq_t  v_f      // capacitor (filtered) voltage [pu]
);

  localparam coef_t C_TRC = to_coef(TS / (R * C));
  localparam coef_t C_TWB = to_coef(TS * 2.0 * 3.14159265358979 * FB);

  st_t vd_s, vq_s;
  fx_t vd, vq;

  assign vd  = st_fx(vd_s);
  assign vq  = st_fx(vq_s);
  assign v_f = '{d: vd, q: vq};

  always_ff @(posedge clk) begin
    if (rst) begin
      vd_s <= '0;
      vq_s <= '0;
    end else if (step_en) begin
      vq_s <= st_add(st_add(vq_s, inc(sub(v_gen.q, vq), C_TRC)), -inc(mulx(we, vd), C_TWB));
      vd_s <= st_add(st_add(vd_s, inc(sub(v_gen.d, vd), C_TRC)),  inc(mulx(we, vq), C_TWB));
    end
  end

endmodule
