// fx_to_sgl: Q16.16 fixed point to IEEE-754 single precision (SGL).
//
// The logged model variables are handed to the host as single-precision
// floats. The magnitude's leading one at bit p gives the exponent
// 127 + p - 16; the magnitude shifted so that the leading one lands on bit 31
// gives the 23-bit fraction from bits 30..8 (rounded towards zero: a Q16.16
// value has at most 32 significant bits). Zero maps to +0. The SGL type is
// the document's; the conversion circuit is this design's.
//
// Purely combinational.
// Only 23 bits of the normalised magnitude form the mantissa; the hidden
// leading one and the bits below the mantissa are unused by design
// (truncation).
module fx_to_sgl
  import hil_pkg::*;
(
  input  fx_t         x,
  output logic [31:0] sgl
);

  logic [31:0] mag, norm;
  logic [4:0]  p;
  logic        found;

  always_comb begin
    mag   = x[FX_W-1] ? 32'(-x) : 32'(x);
    p     = '0;
    found = 1'b0;
    for (int i = 31; i >= 0; i--) begin
      if (!found && mag[i]) begin
        p     = 5'(i);
        found = 1'b1;
      end
    end
    norm = mag << (5'd31 - p);
    if (mag == 0) sgl = '0;
    else          sgl = {x[FX_W-1], 8'(8'd111 + 8'(p)), norm[30:8]};
  end

endmodule
