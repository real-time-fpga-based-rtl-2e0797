// sincos: sine and cosine of a binary angle, for the Park transforms.
//
// The angle is a 32-bit binary angle (2^32 = one turn). The top two bits
// select the quadrant; the remaining 30 bits are a fraction f of a quarter
// turn. sin(f*pi/2) and sin((1-f)*pi/2) = cos(f*pi/2) are evaluated with the
// 9th-order Taylor polynomial in Horner form
//   sin t = t*(1 - t^2/6*(1 - t^2/20*(1 - t^2/42*(1 - t^2/72))))
// in Q2.30 arithmetic (error below 4e-6 on the quarter wave), then the
// quadrant symmetries give both functions on the whole circle. Results are
// Q16.16. The document names the Park transformer and the stator and rotor
// angles; this evaluation method is this design's choice.
//
// Purely combinational.
module sincos
  import hil_pkg::*;
(
  input  angle_t theta,
  output fx_t    sin_o,
  output fx_t    cos_o
);

  localparam logic signed [63:0] ONE   = 64'sd1073741824;  // 1.0 in Q2.30
  localparam logic signed [63:0] PIH   = 64'sd1686629713;  // pi/2 in Q2.30
  localparam logic signed [63:0] INV6  = 64'sd178956971;
  localparam logic signed [63:0] INV20 = 64'sd53687091;
  localparam logic signed [63:0] INV42 = 64'sd25565282;
  localparam logic signed [63:0] INV72 = 64'sd14913081;

  function automatic logic signed [63:0] m30(logic signed [63:0] a, logic signed [63:0] b);
    return (a * b) >>> 30;
  endfunction

  // sin of f*pi/2, f in [0, 1] as Q2.30 (0..2^30), result Q2.30
  function automatic logic signed [63:0] qsin(logic [30:0] f);
    logic signed [63:0] t, t2, r;
    t  = m30(64'(f), PIH);
    t2 = m30(t, t);
    r  = ONE - m30(m30(t2, INV72), ONE);
    r  = ONE - m30(m30(t2, INV42), r);
    r  = ONE - m30(m30(t2, INV20), r);
    r  = ONE - m30(m30(t2, INV6), r);
    return m30(t, r);
  endfunction

  logic [30:0] f, fc;
  logic signed [63:0] s0, s1;
  logic signed [63:0] sn, cs;

  always_comb begin
    f  = {1'b0, theta[29:0]};
    fc = 31'h4000_0000 - f;
    s0 = qsin(f);
    s1 = qsin(fc);
    unique case (theta[31:30])
      2'd0: begin sn =  s0; cs =  s1; end
      2'd1: begin sn =  s1; cs = -s0; end
      2'd2: begin sn = -s0; cs = -s1; end
      default: begin sn = -s1; cs =  s0; end
    endcase
  end

  // Q2.30 to Q16.16 with rounding
  assign sin_o = fx_t'((sn + 64'sd8192) >>> 14);
  assign cos_o = fx_t'((cs + 64'sd8192) >>> 14);

endmodule
