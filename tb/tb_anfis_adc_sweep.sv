// tb_anfis_adc_sweep: workload test of the linearizer at its default
// parameters. First every one of the 4096 codes of a 12-bit, 5 V ADC is
// converted to Vin = code*5/4096 and linearized; then the thermistor divider is
// swept from 0 C to 105 C in 1 C steps, the temperature ramp the system is
// meant for. Every result is compared with the network equations evaluated in
// double precision (tolerance 4e-3 V) and every latency must be 20 clocks.
// For information the test prints, for the temperature ramp, the largest
// distance of the output from its least-squares straight line.
module tb_anfis_adc_sweep;
  import anfis_pkg::*;
  import anfis_ref_pkg::*;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid, no_rule;
  fx_t  vin = '0, vout;

  always #5 clk = ~clk;

  anfis_linearizer dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Linearize one input; returns the hardware result in volts.
  task automatic run(real v, output real got);
    real r, e;
    bit  nr;
    int  n;
    @(posedge clk); #1;
    vin = fx_t'($rtoi(v * 65536.0)); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    n = 0;
    while (!out_valid && n < 100) begin @(posedge clk); #1; n++; end
    got = real'(vout) / 65536.0;
    r   = anfis(real'(vin) / 65536.0, nr);
    e   = got > r ? got - r : r - got;
    if (e > max_err) max_err = e;
    checks += 3;
    if (n != FX_FRAC + 4) begin failures++; $display("FAIL latency %0d", n); end
    if (e > 4e-3) begin failures++; $display("FAIL Vin=%f Vout=%f expected %f", v, got, r); end
    if (no_rule != nr) begin failures++; $display("FAIL no_rule at Vin=%f", v); end
  endtask

  real temps[106], outs[106];

  initial begin
    real got, mt, mo, sxy, sxx, slope, dev, max_dev;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int code = 0; code < 4096; code++) run(real'(code) * 5.0 / 4096.0, got);
    $display("all 4096 ADC codes: largest error %f V", max_err);
    for (int t = 0; t <= 105; t++) begin
      temps[t] = real'(t);
      run(divider_v(real'(t)), got);
      outs[t] = got;
    end
    mt = 0; mo = 0;
    for (int t = 0; t <= 105; t++) begin mt += temps[t]; mo += outs[t]; end
    mt /= 106.0; mo /= 106.0;
    sxy = 0; sxx = 0;
    for (int t = 0; t <= 105; t++) begin
      sxy += (temps[t] - mt) * (outs[t] - mo);
      sxx += (temps[t] - mt) * (temps[t] - mt);
    end
    slope = sxy / sxx;
    max_dev = 0;
    for (int t = 0; t <= 105; t++) begin
      dev = outs[t] - (mo + slope * (temps[t] - mt));
      if (dev < 0) dev = -dev;
      if (dev > max_dev) max_dev = dev;
    end
    $display("0..105 C: Vout %f .. %f V, fitted slope %f V/C, largest deviation from the line %f V",
             outs[0], outs[105], slope, max_dev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
