// anfis_consequent: Layer-4 node of the ANFIS linearizer, the product of a
// normalized rule weight and that rule's first-order (linear) TSK output:
//
//   wf = wbar * f,   f = Q*x + R
//
// The general two-input rule f = P*x + Q*y + R collapses to Q*x + R because the
// linearizer has a single input (the trained P coefficients are 0). Q and R are
// real parameters turned into fixed-point constants at elaboration. Both
// products are truncated to FX_FRAC fraction bits and saturated to the fx_t
// range.
//
// Interface: x (fx_t), wbar (w_t, 0..1) in; wf (fx_t) out.
// Timing: purely combinational; the enclosing linearizer registers wf.
module anfis_consequent
  import anfis_pkg::*;
#(
  parameter real Q = 4.5,
  parameter real R = -0.03
) (
  input  fx_t x,
  input  w_t  wbar,
  output fx_t wf
);

  localparam fx_t Q_FX = real_to_fx(Q);
  localparam fx_t R_FX = real_to_fx(R);

  fx_t f;

  always_comb begin
    f  = sat_fx(fx_wide_t'(mul_fx(Q_FX, x)) + fx_wide_t'(R_FX));
    wf = mul_fx(fx_t'(wbar), f);
  end

endmodule
