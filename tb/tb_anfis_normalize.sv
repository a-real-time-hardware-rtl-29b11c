// tb_anfis_normalize: checks the Layer-3 divider. Random weight pairs (and
// corner pairs: one weight zero, both equal, both one) are divided and each
// quotient is compared with the exact integer floor(w_i * 2^16 / (w1+w2)).
// The latency from start to out_valid must be exactly 17 clocks, busy must
// hold while dividing, and both weights zero must give zero_sum and zeros.
module tb_anfis_normalize;
  import anfis_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  w_t   w1 = '0, w2 = '0;
  logic busy, out_valid, zero_sum;
  w_t   wbar1, wbar2;

  always #5 clk = ~clk;

  anfis_normalize dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(w_t a, w_t b);
    longint unsigned e1, e2, s;
    int n;
    @(posedge clk); #1;
    w1 = a; w2 = b; start = 1;
    @(posedge clk); #1;          // start taken on this edge
    start = 0; w1 = $urandom; w2 = $urandom;   // inputs must not matter now
    n = 0;
    while (!out_valid && n < 100) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while dividing"); end
      @(posedge clk); #1; n++;
    end
    checks++;
    if (n != W_W) begin failures++; $display("FAIL latency %0d, expected %0d", n, W_W); end
    s = longint'(a) + longint'(b);
    checks += 3;
    if (s == 0) begin
      if (!zero_sum || wbar1 != 0 || wbar2 != 0) begin
        failures++; $display("FAIL zero sum: flag=%0b %0d %0d", zero_sum, wbar1, wbar2);
      end
    end else begin
      e1 = (longint'(a) << FX_FRAC) / s;
      e2 = (longint'(b) << FX_FRAC) / s;
      if (zero_sum) begin failures++; $display("FAIL zero_sum set"); end
      if (wbar1 != w_t'(e1)) begin failures++; $display("FAIL w1=%0d w2=%0d wbar1=%0d exp %0d", a, b, wbar1, e1); end
      if (wbar2 != w_t'(e2)) begin failures++; $display("FAIL w1=%0d w2=%0d wbar2=%0d exp %0d", a, b, wbar2, e2); end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one clock"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(W_ONE, 0);
    run(0, W_ONE);
    run(W_ONE, W_ONE);
    run(0, 0);
    run(1, 0);
    run(1, 1);
    run(12345, 54321);
    run(W_ONE, 1);
    repeat (400) run(w_t'($urandom_range(0, 1 << FX_FRAC)), w_t'($urandom_range(0, 1 << FX_FRAC)));
    repeat (100) run(w_t'($urandom_range(0, 50)), w_t'($urandom_range(0, 1 << FX_FRAC)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
