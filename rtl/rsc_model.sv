// rsc_model: rotor side converter (RSC) of the back-to-back converter.
//
// Transfer-function model of a two-level inverter fed from a split DC link
// (midpoint o). For each leg the gate pair gives the switching function
// k (switching_function); SF1 = +1/-1 (upper/lower device conducting) and
// SF2 = 1/0 (upper device carries the leg current). Then
//   V_xo = Vd/2 * SF1_x                      leg voltages
//   V_ab = V_ao - V_bo, ...                  line voltages
//   V_no = (V_ao + V_bo + V_co)/3,  V_xn = V_xo - V_no   phase voltages
//   I_s1 = I_a*SF2_a, I_s3 = I_b*SF2_b, I_s5 = I_c*SF2_c  switch currents
//   i_in = I_s1 + I_s3 + I_s5                DC input current
// as in the converter model description. The load currents I_a..I_c are
// the rotor currents from the machine model (positive out of the leg).
// With both gates of a leg off the freewheeling diode is chosen by the sign
// of the leg current (this design's choice, see switching_function).
//
// Purely combinational: outputs follow the DC link voltage, gates and rotor
// currents within the same model step. Units: volts, amperes, Q16.16.
module rsc_model
  import hil_pkg::*;
(
  input  fx_t        udc,        // DC link voltage Vd [V]
  input  logic [2:0] gate_up,    // S1, S3, S5
  input  logic [2:0] gate_dn,    // S4, S6, S2
  input  abc_t       i_r,        // rotor (load) currents Ia, Ib, Ic [A]
  output abc_t       v_o,        // leg voltages Vao, Vbo, Vco
  output abc_t       v_ll,       // line voltages Vab, Vbc, Vca
  output abc_t       v_n,        // phase voltages Van, Vbn, Vcn
  output abc_t       i_sw,       // switch currents Is1, Is3, Is5
  output fx_t        i_in,       // DC input current (i_load of the DC link)
  output logic [2:0] sf2,        // switching functions SF2 (= k)
  output logic       shoot_through
);

  localparam coef_t C_3RD = to_coef(1.0 / 3.0);

  fx_t  ir [3];
  fx_t  vo [3];
  fx_t  vn [3];
  fx_t  vll [3];
  fx_t  isw [3];
  fx_t  half;
  fx_t  vno;
  logic [2:0] st;

  assign ir[0] = i_r.a;
  assign ir[1] = i_r.b;
  assign ir[2] = i_r.c;
  assign half  = udc >>> 1;

  for (genvar x = 0; x < 3; x++) begin : g_leg
    switching_function u_sf (
      .gate_up(gate_up[x]), .gate_dn(gate_dn[x]), .i_in(sub('0, ir[x])),
      .k(sf2[x]), .shoot_through(st[x])
    );
  end

  always_comb begin
    for (int x = 0; x < 3; x++) begin
      vo[x]  = sf2[x] ? half : sub('0, half);
      isw[x] = sf2[x] ? ir[x] : '0;
    end
    vno = mulc(add(add(vo[0], vo[1]), vo[2]), C_3RD);
    for (int x = 0; x < 3; x++) begin
      vn[x]  = sub(vo[x], vno);
      vll[x] = sub(vo[x], vo[(x + 1) % 3]);
    end
  end

  assign v_o  = '{a: vo[0],  b: vo[1],  c: vo[2]};
  assign v_n  = '{a: vn[0],  b: vn[1],  c: vn[2]};
  assign v_ll = '{a: vll[0], b: vll[1], c: vll[2]};
  assign i_sw = '{a: isw[0], b: isw[1], c: isw[2]};
  assign i_in = add(add(isw[0], isw[1]), isw[2]);
  assign shoot_through = |st;

endmodule
