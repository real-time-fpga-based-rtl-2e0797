// rlc_filter: dv/dt filter between the rotor side converter and the rotor.
//
// Per phase, the RSC choke (Rr, Lr) feeds the filter branch (Rf in series
// with Cf). The second-order equation
//   Uin = Lr*Cf*U'' + (Rr + Rf)*Cf*U' + U,   I = Cf*U',   Vout = Rf*I + U
// is integrated with the branch current I = Cf*dU/dt as second state, which
// keeps both states in the Q16.16 range:
//   I(n+1) = I(n) + TS/Lr * (Uin - (Rr + Rf)*I(n) - U(n))
//   U(n+1) = U(n) + TS/Cf * I(n+1)
// (semi-implicit Euler: the capacitor update uses the new current, which
// keeps the lightly damped LC resonance from growing; plain forward Euler
// would diverge). The equations follow the filter description; the state
// choice, the integration rule and all component values are this design's.
//
// Timing: states update on step_en; v_out is combinational from the states.
// Units: volts, amperes.
module rlc_filter
  import hil_pkg::*;
#(
  parameter real TS = 5.0e-6,    // model step [s]
  parameter real LR = 100.0e-6,  // RSC choke inductance [H]
  parameter real RR = 2.0e-3,    // RSC choke resistance [Ohm]
  parameter real RF = 0.5,       // filter damping resistor [Ohm]
  parameter real CF = 5.0e-6     // filter capacitor [F]
) (
  input  logic clk,
  input  logic rst,
  input  logic step_en,
  input  abc_t v_in,    // converter phase voltages Uin [V]
  output abc_t v_out,   // filtered rotor voltages Vout [V]
  output abc_t i_f,     // filter branch currents I [A]
  output abc_t u_cf     // capacitor voltages [V]
);

  localparam coef_t C_TL = to_coef(TS / LR);
  localparam coef_t C_TC = to_coef(TS / CF);
  localparam coef_t C_RS = to_coef(RR + RF);
  localparam coef_t C_RF = to_coef(RF);

  st_t i_s [3];
  st_t u_s [3];
  fx_t uin [3];
  fx_t vo [3];
  fx_t iv [3];
  fx_t uv [3];
  st_t i_n [3];

  assign uin[0] = v_in.a;
  assign uin[1] = v_in.b;
  assign uin[2] = v_in.c;

  always_comb begin
    for (int x = 0; x < 3; x++) begin
      iv[x]  = st_fx(i_s[x]);
      uv[x]  = st_fx(u_s[x]);
      vo[x]  = add(mulc(iv[x], C_RF), uv[x]);
      i_n[x] = st_add(i_s[x], inc(sub(sub(uin[x], mulc(iv[x], C_RS)), uv[x]), C_TL));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int x = 0; x < 3; x++) begin
        i_s[x] <= '0;
        u_s[x] <= '0;
      end
    end else if (step_en) begin
      for (int x = 0; x < 3; x++) begin
        i_s[x] <= i_n[x];
        u_s[x] <= st_add(u_s[x], inc(st_fx(i_n[x]), C_TC));
      end
    end
  end

  assign v_out = '{a: vo[0], b: vo[1], c: vo[2]};
  assign i_f   = '{a: iv[0], b: iv[1], c: iv[2]};
  assign u_cf  = '{a: uv[0], b: uv[1], c: uv[2]};

endmodule
