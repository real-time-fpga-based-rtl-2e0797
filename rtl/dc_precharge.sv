// dc_precharge: DC link precharge circuit (transformer and half-wave diode
// rectifier with a series resistor).
//
// While the precharge contactor command is on, the highest of the three grid
// phase voltages, stepped up by the precharge transformer ratio KTR, drives
// current through the diode and the resistor RPRE into the DC link:
//   i_pre = (KTR*max(e_a, e_b, e_c) - Udc)/RPRE   if positive, else 0
// The default ratio makes a 690 V grid (563 V phase peak) charge the link to
// about 896 V, the precharge level the document reports. done is set while
// Udc has reached the precharge set-point (the controller's cue for the next
// step of the start-up sequence). The circuit topology is the one the model
// description names; the resistor, the ratio's derivation and the done flag
// are this design's.
//
// Purely combinational within a model step; i_pre feeds gsc_model.
module dc_precharge
  import hil_pkg::*;
#(
  parameter real KTR  = 896.0 / 563.0, // transformer ratio
  parameter real RPRE = 1.0            // precharge resistor [Ohm]
) (
  input  logic cmd,       // precharge contactor command
  input  abc_t e_g,       // grid phase voltages [V]
  input  fx_t  udc,       // DC link voltage [V]
  input  fx_t  setpoint,  // precharge set-point [V]
  output fx_t  i_pre,     // precharge current into the link [A]
  output logic done       // Udc >= set-point
);

  localparam coef_t C_KTR = to_coef(KTR);
  localparam coef_t C_G   = to_coef(1.0 / RPRE);

  fx_t vmax, vsrc, dv;

  always_comb begin
    vmax = e_g.a;
    if (e_g.b > vmax) vmax = e_g.b;
    if (e_g.c > vmax) vmax = e_g.c;
    vsrc  = mulc(vmax, C_KTR);
    dv    = sub(vsrc, udc);
    i_pre = (cmd && !dv[FX_W-1]) ? mulc(dv, C_G) : '0;
    done  = (udc >= setpoint);
  end

endmodule
