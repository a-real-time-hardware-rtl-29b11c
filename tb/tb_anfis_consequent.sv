// tb_anfis_consequent: checks the Layer-4 node wbar*(Q*x + R) against real
// arithmetic for the first rule (Q = 4.5, R = -0.03) and for the second rule
// (Q = 1.225, R = 0.5), over random inputs in -8..8 and weights in 0..1, with
// wbar = 0 and wbar = 1 tried explicitly. Tolerance 2e-4.
module tb_anfis_consequent;
  import anfis_pkg::*;

  int checks = 0, failures = 0;

  fx_t x;
  w_t  wbar;
  fx_t wf1, wf2;

  anfis_consequent                          u1 (.x(x), .wbar(wbar), .wf(wf1));
  anfis_consequent #(.Q(1.225), .R(0.5))    u2 (.x(x), .wbar(wbar), .wf(wf2));

  task automatic check_at(fx_t xv, w_t wv);
    real xr, wr, r1, r2, e1, e2;
    x = xv; wbar = wv;
    #1;
    xr = real'(xv) / 65536.0;
    wr = real'(wv) / 65536.0;
    r1 = wr * (4.5 * xr - 0.03);
    r2 = wr * (1.225 * xr + 0.5);
    e1 = real'(wf1) / 65536.0 - r1;
    e2 = real'(wf2) / 65536.0 - r2;
    checks += 2;
    if (e1 > 2e-4 || e1 < -2e-4) begin failures++; $display("FAIL rule1 x=%f w=%f got %f ref %f", xr, wr, real'(wf1)/65536.0, r1); end
    if (e2 > 2e-4 || e2 < -2e-4) begin failures++; $display("FAIL rule2 x=%f w=%f got %f ref %f", xr, wr, real'(wf2)/65536.0, r2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_at(0, W_ONE);
    check_at(FX_ONE, W_ONE);
    check_at(FX_ONE * 3, 0);
    check_at(-FX_ONE * 2, W_ONE);
    check_at(FX_ONE * 2, W_ONE >> 1);
    repeat (3000)
      check_at(fx_t'($urandom_range(0, 16 * 65536)) - fx_t'(8 * 65536),
               w_t'($urandom_range(0, 65536)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
