// hil_pkg: number formats, bundle types and arithmetic helpers shared by the
// DFIG hardware-in-the-loop emulator.
//
// Every model signal is a signed 32-bit fixed-point number with 16 fraction
// bits (Q16.16, range +/-32768, step 1.5e-5). Converter quantities are held in
// SI units (volts, amperes); the machine model works in per unit. Model
// coefficients (products of the 5 us step with R/L, 1/C and similar) are
// signed 32-bit numbers with 24 fraction bits (Q8.24), computed at
// elaboration from real-valued parameters with to_coef(). Products are
// rounded towards minus infinity and saturated to the Q16.16 range.
// Angles are unsigned 32-bit binary angles: 2^32 is one full turn.
package hil_pkg;

  localparam int FX_W  = 32;
  localparam int FX_FB = 16;   // fraction bits of a signal
  localparam int CF_FB = 24;   // fraction bits of a coefficient

  typedef logic signed [FX_W-1:0] fx_t;     // Q16.16 signal
  typedef logic signed [31:0]     coef_t;   // Q8.24 coefficient
  typedef logic        [31:0]     angle_t;  // binary angle, 2^32 = 2*pi

  // Integrator state: Q16.32, 16 more fraction bits than a signal so that
  // small per-step increments (slow time constants) are not lost.
  typedef logic signed [47:0] st_t;

  typedef struct packed {
    fx_t a;
    fx_t b;
    fx_t c;
  } abc_t;

  typedef struct packed {
    fx_t d;
    fx_t q;
  } dq_t;

  localparam fx_t FX_MAX = 32'sh7FFF_FFFF;
  localparam fx_t FX_MIN = 32'sh8000_0000;

  // Real value to Q16.16 (elaboration time).
  function automatic fx_t to_fx(real r);
    return fx_t'($rtoi(r * 65536.0));
  endfunction

  // Real value to Q8.24 coefficient (elaboration time).
  function automatic coef_t to_coef(real r);
    return coef_t'($rtoi(r * 16777216.0));
  endfunction

  // Saturate a wide intermediate to Q16.16.
  function automatic fx_t sat(logic signed [63:0] v);
    if (v > 64'sh0000_0000_7FFF_FFFF)      return FX_MAX;
    else if (v < -64'sh0000_0000_8000_0000) return FX_MIN;
    else                                    return fx_t'(v);
  endfunction

  // Signal times coefficient.
  function automatic fx_t mulc(fx_t x, coef_t c);
    logic signed [63:0] p;
    p = 64'(x) * 64'(c);
    return sat(p >>> CF_FB);
  endfunction

  // Signal times signal.
  function automatic fx_t mulx(fx_t x, fx_t y);
    logic signed [63:0] p;
    p = 64'(x) * 64'(y);
    return sat(p >>> FX_FB);
  endfunction

  // Saturating add and subtract.
  function automatic fx_t add(fx_t x, fx_t y);
    return sat(64'(x) + 64'(y));
  endfunction

  function automatic fx_t sub(fx_t x, fx_t y);
    return sat(64'(x) - 64'(y));
  endfunction

  // Saturate a wide intermediate to the integrator state range.
  function automatic st_t sat_st(logic signed [63:0] v);
    if (v > 64'sh0000_7FFF_FFFF_FFFF)      return 48'sh7FFF_FFFF_FFFF;
    else if (v < -64'sh0000_8000_0000_0000) return 48'sh8000_0000_0000;
    else                                    return st_t'(v);
  endfunction

  // Per-step integrator increment: signal times coefficient, in Q16.32.
  function automatic st_t inc(fx_t x, coef_t c);
    logic signed [63:0] p;
    p = 64'(x) * 64'(c);
    return sat_st(p >>> (CF_FB - 16));
  endfunction

  // state + increment, saturating.
  function automatic st_t st_add(st_t s, st_t d);
    return sat_st(64'(s) + 64'(d));
  endfunction

  // Integrator state to signal.
  function automatic fx_t st_fx(st_t s);
    return fx_t'(s >>> 16);
  endfunction

  // Signal to integrator state.
  function automatic st_t fx_st(fx_t x);
    return st_t'(x) <<< 16;
  endfunction

endpackage
