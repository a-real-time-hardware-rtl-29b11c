// tb_tri_mf: checks the triangular membership node against a real-valued
// evaluation of the piecewise-linear triangle. Two instances are tested: the
// default parameters (a=0.21, b=3, c=6.305) and the skewed first membership
// (a=-3.13, b=-0.35, c=5.169). The input is swept across both feet, points
// exactly on a, b and c are tried, and random inputs are added. Tolerance is
// 4 LSB of the Q1.16 grade.
module tb_tri_mf;
  import anfis_pkg::*;

  int checks = 0, failures = 0;

  fx_t x;
  w_t  g_def, g_skew;

  tri_mf                                       u_def  (.x(x), .grade(g_def));
  tri_mf #(.A(-3.13), .B(-0.35), .C(5.169))    u_skew (.x(x), .grade(g_skew));

  function automatic real tri_ref(real v, real a, real b, real c);
    if (v <= a || v >= c) return 0.0;
    if (v <= b) return (v - a) / (b - a);
    return (c - v) / (c - b);
  endfunction

  function automatic fx_t to_fx(real v);
    return fx_t'($rtoi(v * 65536.0));
  endfunction

  task automatic check_at(fx_t xv);
    real xr, e1, e2;
    x = xv;
    #1;
    xr = real'(xv) / 65536.0;
    e1 = real'(g_def)  / 65536.0 - tri_ref(xr, 0.21, 3.0, 6.305);
    e2 = real'(g_skew) / 65536.0 - tri_ref(xr, -3.13, -0.35, 5.169);
    checks += 2;
    if (e1 > 4.0/65536.0 || e1 < -4.0/65536.0) begin
      failures++;
      $display("FAIL default x=%f grade=%f ref=%f", xr, real'(g_def)/65536.0, tri_ref(xr, 0.21, 3.0, 6.305));
    end
    if (e2 > 4.0/65536.0 || e2 < -4.0/65536.0) begin
      failures++;
      $display("FAIL skew x=%f grade=%f ref=%f", xr, real'(g_skew)/65536.0, tri_ref(xr, -3.13, -0.35, 5.169));
    end
    if (g_def > W_ONE || g_skew > W_ONE) begin
      failures++;
      $display("FAIL grade above 1 at x=%f", xr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // sweep -5 .. 8 in steps of 1/64
    for (int i = -5 * 64; i <= 8 * 64; i++) check_at(fx_t'(i) <<< 10);
    // corners
    check_at(to_fx(0.21));  check_at(to_fx(3.0));   check_at(to_fx(6.305));
    check_at(to_fx(-3.13)); check_at(to_fx(-0.35)); check_at(to_fx(5.169));
    // peak must be exactly 1 within tolerance, feet exactly 0
    x = to_fx(3.0); #1; checks++;
    if (g_def < W_ONE - 4) begin failures++; $display("FAIL peak %0d", g_def); end
    x = to_fx(6.4); #1; checks++;
    if (g_def != 0 || g_skew != 0) begin failures++; $display("FAIL outside not zero"); end
    // random inputs in -6 .. 10
    repeat (2000) check_at(fx_t'($urandom_range(0, 16 * 65536)) - fx_t'(6 * 65536));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
