// tb_ntc_linearizer_top: end-to-end test of the linearizer system with
// shortened timing: a 1 MHz clock (so the LCD's microsecond waits are short),
// a 4000-clock sample period, fast SPI clocks and a 100-clock UART bit.
// A behavioural MCP3202 returns the code of the thermistor divider voltage for
// temperatures 0..105 C, followed by the extreme codes 0, 1, 4094 and 4095.
// For each sample the test checks
//   - the linearized result against the network equations (tolerance 4e-3),
//   - the code the behavioural MCP4921 receives (clipped to 0..4095),
//   - the dac_clip flag, and that no_rule never rises (the ADC range lies
//     inside the memberships),
//   - each UART report (marker + 32-bit result) against the results that were
//     not skipped.
// The UART frame (5000 clocks) is longer than the sample period here, so
// every other report is skipped. Each mechanism is counted and must occur:
// rule-1-only samples, two-rule samples, clipping high and low, UART reports
// and UART skips. The LCD title and its bus timing are checked at the end.
module tb_ntc_linearizer_top;
  import anfis_pkg::*;
  import anfis_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned SAMPLE_PERIOD = 4000;
  localparam int unsigned BAUD_DIV      = 100;

  int checks = 0, failures = 0;
  int n_results = 0, n_rule1_only = 0, n_two_rules = 0, n_clip_hi = 0, n_clip_lo = 0;
  int n_frames = 0, n_skips = 0;

  logic clk = 0, rst_n = 0;
  always #500 clk = ~clk;   // 1 MHz, matching CLK_HZ below

  logic adc_cs_n, adc_sclk, adc_din, adc_dout;
  logic dac_cs_n, dac_sck, dac_sdi, dac_ldac_n;
  logic uart_txd, result_valid, result_no_rule, dac_clip, uart_skip;
  logic lcd_rs, lcd_rw, lcd_e, lcd_ready;
  logic [7:0] lcd_d;
  fx_t  result_vout;

  ntc_linearizer_top #(
    .CLK_HZ(1_000_000), .SAMPLE_PERIOD(SAMPLE_PERIOD), .ADC_CLK_DIV(4), .DAC_CLK_DIV(2),
    .BAUD(10_000)
  ) dut (.*);

  logic [11:0] adc_value = '0;
  logic [3:0]  adc_cmd;
  int          adc_nclk, adc_transfers;
  mcp3202_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout),
                     .value(adc_value), .cmd(adc_cmd), .nclk(adc_nclk), .transfers(adc_transfers));

  logic [15:0] dac_word;
  logic [11:0] dac_code;
  int          dac_updates, dac_bad;
  mcp4921_model dac (.cs_n(dac_cs_n), .sck(dac_sck), .sdi(dac_sdi), .ldac_n(dac_ldac_n),
                     .word(dac_word), .code(dac_code), .updates(dac_updates), .bad_writes(dac_bad));

  logic [7:0] rx_byte;
  logic       rx_valid;
  int         rx_ferr;
  uart_rx_model #(.BAUD_DIV(BAUD_DIV)) rx (.clk(clk), .rxd(uart_txd), .data(rx_byte),
                                           .valid(rx_valid), .framing_errors(rx_ferr));

  // ---------------- UART report checking ----------------
  int   lcd_violations, lcd_writes;
  logic lcd_on, lcd_2l;
  hd44780_model lcd (.rs(lcd_rs), .rw(lcd_rw), .e(lcd_e), .d(lcd_d), .violations(lcd_violations),
                     .writes(lcd_writes), .display_on(lcd_on), .two_lines(lcd_2l));
  localparam logic [8*32-1:0] TITLE = "Linearisation ofNonlinear Sensor";

  task automatic check_lcd();
    wait (lcd_ready);
    repeat (10) @(posedge clk);
    checks += 3;
    if (lcd_writes != 41 || lcd_violations != 0) begin
      failures++; $display("FAIL LCD: %0d writes, %0d violations", lcd_writes, lcd_violations);
    end
    if (!lcd_on || !lcd_2l) begin failures++; $display("FAIL LCD mode"); end
    for (int c = 0; c < 32; c++)
      if (lcd.char_at(c / 16, c % 16) != TITLE[8*(31 - c) +: 8]) begin
        failures++; $display("FAIL LCD text at %0d", c); break;
      end
  endtask

  fx_t        sent[$];
  logic [7:0] frame[$];
  always @(posedge rx_valid) begin
    frame.push_back(rx_byte);
    if (frame.size() == 5) begin
      checks += 2;
      n_frames++;
      if (frame[0] != 8'hA5) begin failures++; $display("FAIL UART marker %h", frame[0]); end
      if (sent.size() == 0) begin
        failures++; $display("FAIL UART report with nothing sent");
      end else begin
        if ({frame[1], frame[2], frame[3], frame[4]} != sent[0]) begin
          failures++; $display("FAIL UART data %h%h%h%h expected %h", frame[1], frame[2], frame[3], frame[4], sent[0]);
        end
        void'(sent.pop_front());
      end
      frame.delete();
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait for one result of the current ADC value and check it.
  task automatic check_sample(int code);
    real vin_r, ref_v, got, dac_ideal;
    bit  nr;
    int  exp_dac, u0;
    bit  exp_clip;
    u0 = dac_updates;
    @(posedge result_valid);
    #1;
    n_results++;
    vin_r = real'(code) * 5.0 / 4096.0;
    ref_v = anfis(vin_r, nr);
    got   = real'(result_vout) / 65536.0;
    checks += 3;
    if (got - ref_v > 4e-3 || ref_v - got > 4e-3) begin
      failures++; $display("FAIL code %0d: vout %f expected %f", code, got, ref_v);
    end
    if (result_no_rule) begin failures++; $display("FAIL no_rule at code %0d", code); end
    if (vin_r <= TRI2_A) n_rule1_only++; else n_two_rules++;
    // DAC code from the delivered result
    dac_ideal = got * 4096.0 / 5.0;
    exp_clip  = (dac_ideal < 0.0) || (dac_ideal >= 4096.0);
    if (dac_ideal < 0.0) begin exp_dac = 0; n_clip_lo++; end
    else if (dac_ideal >= 4096.0) begin exp_dac = 4095; n_clip_hi++; end
    else exp_dac = $rtoi(dac_ideal);
    if (dac_clip != exp_clip) begin failures++; $display("FAIL dac_clip=%0b for %f", dac_clip, got); end
    if (uart_skip) n_skips++; else sent.push_back(result_vout);
    // the DAC write follows
    while (dac_updates == u0) @(posedge clk);
    #1;
    checks += 2;
    if (int'(dac_code) - exp_dac > 1 || exp_dac - int'(dac_code) > 1) begin
      failures++; $display("FAIL DAC code %0d expected %0d", dac_code, exp_dac);
    end
    if (dac_bad != 0) begin failures++; $display("FAIL malformed DAC write"); end
  endtask

  int codes[$];

  initial begin
    for (int t = 0; t <= 105; t += 5) codes.push_back(adc_code(divider_v(real'(t))));
    codes.push_back(0);
    codes.push_back(1);
    codes.push_back(4094);
    codes.push_back(4095);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (codes[i]) begin
      adc_value = 12'(codes[i]);
      check_sample(codes[i]);
    end
    // let the last report finish
    repeat (60 * BAUD_DIV) @(posedge clk);
    checks += 4;
    if (rx_ferr != 0)   begin failures++; $display("FAIL UART framing errors %0d", rx_ferr); end
    if (sent.size() != 0) begin failures++; $display("FAIL %0d reports never arrived", sent.size()); end
    if (n_frames + n_skips != n_results) begin failures++; $display("FAIL report count"); end
    if (adc_cmd != 4'b1101) begin failures++; $display("FAIL ADC command %b", adc_cmd); end
    // every mechanism must have happened
    checks += 6;
    if (n_rule1_only == 0) begin failures++; $display("FAIL no rule-1-only sample"); end
    if (n_two_rules == 0)  begin failures++; $display("FAIL no two-rule sample"); end
    if (n_clip_hi == 0)    begin failures++; $display("FAIL DAC never clipped high"); end
    if (n_clip_lo == 0)    begin failures++; $display("FAIL DAC never clipped low"); end
    if (n_frames == 0)     begin failures++; $display("FAIL no UART report"); end
    if (n_skips == 0)      begin failures++; $display("FAIL no UART skip"); end
    $display("results %0d: rule-1-only %0d, two-rule %0d, clip high %0d, clip low %0d, reports %0d, skipped %0d",
             n_results, n_rule1_only, n_two_rules, n_clip_hi, n_clip_lo, n_frames, n_skips);
    check_lcd();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
