// tb_anfis_linearizer: end-to-end check of the ANFIS network. Inputs are swept
// from -4 V to 7 V (through the region of rule 1 only, of both rules, of
// rule 2 only and outside both) and random inputs are added; each output is
// compared with the network equations evaluated in double precision
// (tolerance 4e-3). Also checked: the latency of 20 clocks from the accepting
// edge to out_valid, in_ready low while busy, an input offered while busy is
// ignored, no_rule outside both memberships.
module tb_anfis_linearizer;
  import anfis_pkg::*;
  import anfis_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_no_rule = 0, n_both = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid, no_rule;
  fx_t  vin = '0, vout;

  always #5 clk = ~clk;

  anfis_linearizer dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fx_t v);
    real xr, r, e;
    bit  nr;
    int  n;
    @(posedge clk); #1;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL not ready when idle"); end
    vin = v; in_valid = 1;
    @(posedge clk); #1;          // accepted here
    vin = FX_ONE * 2;            // a second offer while busy must be ignored
    n = 0;
    while (!out_valid && n < 100) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      @(posedge clk); #1; n++;
    end
    in_valid = 0;
    checks++;
    if (n != FX_FRAC + 4) begin failures++; $display("FAIL latency %0d", n); end
    xr = real'(v) / 65536.0;
    r  = anfis(xr, nr);
    e  = real'(vout) / 65536.0 - r;
    checks += 2;
    if (nr) n_no_rule++;
    if (tri_val(xr, TRI1_A, TRI1_B, TRI1_C) > 0 && tri_val(xr, TRI2_A, TRI2_B, TRI2_C) > 0) n_both++;
    if (no_rule != nr) begin failures++; $display("FAIL no_rule=%0b at x=%f", no_rule, xr); end
    if (e > 4e-3 || e < -4e-3) begin
      failures++; $display("FAIL x=%f vout=%f ref=%f", xr, real'(vout)/65536.0, r);
    end
    // the ignored second offer must not produce a result
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra result"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = -4 * 32; i <= 7 * 32; i++) run(fx_t'(i) <<< 11);   // step 1/32 V
    repeat (300) run(fx_t'($urandom_range(0, 5 * 65536)));
    checks += 2;
    if (n_no_rule == 0) begin failures++; $display("FAIL no_rule never seen"); end
    if (n_both == 0)    begin failures++; $display("FAIL both rules never fired together"); end
    $display("no_rule samples %0d, two-rule samples %0d", n_no_rule, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
