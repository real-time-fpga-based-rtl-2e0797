// park_transform: three-phase abc quantities to the rotating dq frame.
//
// Amplitude-invariant Clarke transform followed by the rotation by theta:
//   alpha = (2a - b - c)/3,  beta = (b - c)/sqrt(3)
//   d =  alpha*cos(theta) + beta*sin(theta)
//   q = -alpha*sin(theta) + beta*cos(theta)
// so that a = V*cos(theta) gives d = V, q = 0 (d axis on the voltage, as the
// control board's grid-voltage orientation uses). GAIN scales the result,
// for example from volts to per unit at the boundary between the converter
// models (SI units) and the machine model (per unit). sin/cos of theta come
// from a shared sincos instance. The document names the Park transformer;
// the amplitude-invariant form and the gain are this design's choices.
//
// Purely combinational.
module park_transform
  import hil_pkg::*;
#(
  parameter real GAIN = 1.0      // output scale, |GAIN| < 64
) (
  input  abc_t x_abc,
  input  fx_t  sin_t,
  input  fx_t  cos_t,
  output dq_t  x_dq
);

  localparam coef_t C_3RD = to_coef(1.0 / 3.0);
  localparam coef_t C_RT3 = to_coef(1.0 / $sqrt(3.0));
  localparam coef_t C_G   = to_coef(GAIN);

  fx_t alpha, beta, d, q;

  always_comb begin
    alpha = mulc(sub(sub(add(x_abc.a, x_abc.a), x_abc.b), x_abc.c), C_3RD);
    beta  = mulc(sub(x_abc.b, x_abc.c), C_RT3);
    d = add(mulx(alpha, cos_t), mulx(beta, sin_t));
    q = sub(mulx(beta, cos_t), mulx(alpha, sin_t));
    x_dq.d = mulc(d, C_G);
    x_dq.q = mulc(q, C_G);
  end

endmodule
