// tri_mf: triangular membership function, the adaptive Layer-1 node of the
// ANFIS linearizer.
//
//   Tri(x) = 0                          x <= a
//          = x/(b-a)  - a/(b-a)         a <= x <= b
//          = -x/(c-b) + c/(c-b)         b <= x <= c
//          = 0                          x >= c
//
// As in the original design, each sloped side is written as slope*x + intercept, so the
// node needs one multiplier and no divider: the slopes and intercepts are
// computed from the real parameters A < B < C at elaboration time and stored
// as fixed-point constants. The region compare selects which (slope,
// intercept) pair feeds the single multiplier. The result is clamped to
// [0, 1] so that rounding of the constants can never push a grade outside the
// unit interval (clamping is this design's addition).
//
// Interface: x is a signed fixed-point input (anfis_pkg::fx_t), grade is the
// membership grade in unsigned Q1.FX_FRAC (anfis_pkg::w_t).
// Timing: purely combinational; the enclosing linearizer registers it.
module tri_mf
  import anfis_pkg::*;
#(
  parameter real A = 0.21,   // left foot
  parameter real B = 3.0,    // peak
  parameter real C = 6.305   // right foot
) (
  input  fx_t x,
  output w_t  grade
);

  if (!(A < B && B < C)) begin : g_bad_params
    $error("tri_mf needs A < B < C");
  end

  localparam fx_t A_FX       = real_to_fx(A);
  localparam fx_t B_FX       = real_to_fx(B);
  localparam fx_t C_FX       = real_to_fx(C);
  localparam fx_t RISE_SLOPE = real_to_fx(1.0 / (B - A));
  localparam fx_t RISE_ICPT  = real_to_fx(-A / (B - A));
  localparam fx_t FALL_SLOPE = real_to_fx(-1.0 / (C - B));
  localparam fx_t FALL_ICPT  = real_to_fx(C / (C - B));

  fx_t slope, icpt, lin;

  always_comb begin
    if (x <= B_FX) begin
      slope = RISE_SLOPE;
      icpt  = RISE_ICPT;
    end else begin
      slope = FALL_SLOPE;
      icpt  = FALL_ICPT;
    end
    lin = mul_fx(slope, x) + icpt;

    if (x <= A_FX || x >= C_FX) grade = '0;
    else if (lin <= 0)          grade = '0;
    else if (lin >= FX_ONE)     grade = W_ONE;
    else                        grade = w_t'(lin);
  end

endmodule
