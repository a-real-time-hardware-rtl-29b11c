// anfis_pkg: number formats and constants shared by the ANFIS linearizer and
// the sensor-interface blocks around it.
//
// Every analog quantity (the divider voltage Vin, membership parameters,
// consequent parameters and the linearized output) is carried as a signed
// two's-complement fixed-point number with FX_FRAC fractional bits in an
// FX_W-bit word (Q16.16 by default). Rule firing strengths and normalized
// weights lie in [0, 1] and are carried unsigned with the same fractional
// precision and one integer bit (W_W = FX_FRAC + 1 bits).
//
// The word format is this design's choice: the original design describes the linearizer
// only at the level of its equations. A 32-bit input and a 32-bit output plus a
// clock account for the 65 bonded I/O pins reported for the implemented
// linearizer, which is why 32 bits were chosen.
package anfis_pkg;

  parameter int unsigned FX_W    = 32;          // width of a fixed-point value
  parameter int unsigned FX_FRAC = 16;          // fractional bits
  parameter int unsigned W_W     = FX_FRAC + 1; // width of a weight in [0,1]

  typedef logic signed [FX_W-1:0]   fx_t;       // Q(FX_W-FX_FRAC).FX_FRAC
  typedef logic        [W_W-1:0]    w_t;        // Q1.FX_FRAC, 0 .. 1.0
  typedef logic signed [2*FX_W-1:0] fx_wide_t;  // full product of two fx_t

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_FRAC;
  localparam w_t  W_ONE  = w_t'(1) << FX_FRAC;

  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  // Convert a real constant to fixed point, rounding to nearest. Used only on
  // parameters, at elaboration time.
  function automatic fx_t real_to_fx(real v);
    real scaled;
    scaled = v * (2.0 ** FX_FRAC);
    if (scaled >= 0.0) return fx_t'($rtoi(scaled + 0.5));
    else               return fx_t'(-$rtoi(-scaled + 0.5));
  endfunction

  // Saturate a wide signed value (already scaled to FX_FRAC) to fx_t.
  function automatic fx_t sat_fx(fx_wide_t v);
    if (v > fx_wide_t'(FX_MAX))      return FX_MAX;
    else if (v < fx_wide_t'(FX_MIN)) return FX_MIN;
    else                             return v[FX_W-1:0];
  endfunction

  // Fixed-point multiply of two fx_t values with truncation toward minus
  // infinity and saturation.
  function automatic fx_t mul_fx(fx_t a, fx_t b);
    fx_wide_t p;
    p = fx_wide_t'(a) * fx_wide_t'(b);
    return sat_fx(p >>> FX_FRAC);
  endfunction

endpackage
