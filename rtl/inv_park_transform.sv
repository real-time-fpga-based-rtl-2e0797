// inv_park_transform: rotating dq frame to three-phase abc quantities.
//
// Inverse of park_transform:
//   alpha = d*cos(theta) - q*sin(theta),  beta = d*sin(theta) + q*cos(theta)
//   a = alpha,  b = -alpha/2 + sqrt(3)/2*beta,  c = -alpha/2 - sqrt(3)/2*beta
// followed by the scale GAIN (for example per unit to amperes with the
// rotor current base). GAIN is applied as a Q16.16 factor, so it may be large
// (a base current) but loses precision below about 1e-3. The document names
// the measurement outputs in abc (Ir_abc, V_abc stator, I_abc stator); this
// transform and its scaling are this design's choices.
//
// Purely combinational.
module inv_park_transform
  import hil_pkg::*;
#(
  parameter real GAIN = 1.0
) (
  input  dq_t  x_dq,
  input  fx_t  sin_t,
  input  fx_t  cos_t,
  output abc_t x_abc
);

  localparam coef_t C_RT3H = to_coef($sqrt(3.0) / 2.0);
  localparam fx_t   F_G    = to_fx(GAIN);

  fx_t alpha, beta, ha, hb;

  always_comb begin
    alpha = sub(mulx(x_dq.d, cos_t), mulx(x_dq.q, sin_t));
    beta  = add(mulx(x_dq.d, sin_t), mulx(x_dq.q, cos_t));
    ha    = alpha >>> 1;
    hb    = mulc(beta, C_RT3H);
    x_abc.a = mulx(alpha, F_G);
    x_abc.b = mulx(sub(hb, ha), F_G);
    x_abc.c = mulx(sub(sub('0, ha), hb), F_G);
  end

endmodule
