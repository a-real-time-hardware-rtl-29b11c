// anfis_ref_pkg: real-valued reference models used by the testbenches:
// the thermistor divider (R_T = R0*exp(beta*(1/T - 1/T0)), V = 5*1k/(1k+R_T))
// and the two-rule ANFIS with its trained parameters, evaluated in double
// precision straight from the network equations.
package anfis_ref_pkg;

  // trained network
  localparam real TRI1_A = -3.13, TRI1_B = -0.35, TRI1_C = 5.169;
  localparam real TRI2_A = 0.21,  TRI2_B = 3.0,   TRI2_C = 6.305;
  localparam real F1_Q = 4.5,   F1_R = -0.03;
  localparam real F2_Q = 1.225, F2_R = 0.5;

  // thermistor and divider
  localparam real R0 = 10000.0, T0 = 298.0, BETA = 3950.0, RS = 1000.0, VS = 5.0;

  function automatic real tri_val(real v, real a, real b, real c);
    if (v <= a || v >= c) return 0.0;
    if (v <= b) return (v - a) / (b - a);
    return (c - v) / (c - b);
  endfunction

  // Returns the network output; no_rule is set when both weights are zero.
  function automatic real anfis(real x, output bit no_rule);
    real w1, w2;
    w1 = tri_val(x, TRI1_A, TRI1_B, TRI1_C);
    w2 = tri_val(x, TRI2_A, TRI2_B, TRI2_C);
    no_rule = (w1 + w2 == 0.0);
    if (no_rule) return 0.0;
    return (w1 * (F1_Q * x + F1_R) + w2 * (F2_Q * x + F2_R)) / (w1 + w2);
  endfunction

  // Divider voltage across the 1 kohm resistor at temperature t_c (deg C).
  function automatic real divider_v(real t_c);
    real rt;
    rt = R0 * $exp(BETA * (1.0 / (t_c + 273.15) - 1.0 / T0));
    return VS * RS / (RS + rt);
  endfunction

  // 12-bit code of an ideal ADC with a 5 V reference.
  function automatic int adc_code(real v);
    int c;
    c = $rtoi(v / 5.0 * 4096.0);
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return c;
  endfunction

endpackage
