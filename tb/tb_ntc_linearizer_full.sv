// tb_ntc_linearizer_full: the linearizer system with every parameter at its
// default (100 MHz clock, one sample per 100000 clocks, 1 MHz ADC SCLK,
// 10 MHz DAC SCK, 115200 baud). A behavioural MCP3202 returns the divider
// code for 0, 25, 50, 75 and 100 C. For each sample the result, the DAC code
// and the UART report are checked; at the default rates no report is skipped.
// Finally the LCD title, written after the 40 ms power-up wait, is checked.
module tb_ntc_linearizer_full;
  import anfis_pkg::*;
  import anfis_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned BAUD_DIV = 868;   // 100 MHz / 115200

  int checks = 0, failures = 0, n_frames = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_cs_n, adc_sclk, adc_din, adc_dout;
  logic dac_cs_n, dac_sck, dac_sdi, dac_ldac_n;
  logic uart_txd, result_valid, result_no_rule, dac_clip, uart_skip;
  logic lcd_rs, lcd_rw, lcd_e, lcd_ready;
  logic [7:0] lcd_d;
  fx_t  result_vout;

  ntc_linearizer_top dut (.*);

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

  // every result that is not skipped is expected as a UART report
  fx_t        sent[$];
  logic [7:0] frame[$];
  always @(posedge clk) if (result_valid && !uart_skip) sent.push_back(result_vout);
  always @(posedge rx_valid) begin
    frame.push_back(rx_byte);
    if (frame.size() == 5) begin
      checks++;
      n_frames++;
      if (frame[0] != 8'hA5 || sent.size() == 0 ||
          {frame[1], frame[2], frame[3], frame[4]} != sent[0]) begin
        failures++; $display("FAIL UART report %h %h%h%h%h", frame[0], frame[1], frame[2], frame[3], frame[4]);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      frame.delete();
    end
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vin_r, ref_v, got, ideal;
    bit  nr;
    int  code, u0, exp_dac;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t <= 100; t += 25) begin
      code = adc_code(divider_v(real'(t)));
      adc_value = 12'(code);
      u0 = dac_updates;
      @(posedge result_valid);
      #1;
      vin_r = real'(code) * 5.0 / 4096.0;
      ref_v = anfis(vin_r, nr);
      got   = real'(result_vout) / 65536.0;
      $display("T=%0d C  code=%0d  Vin=%f V  Vout=%f V (expected %f)", t, code, vin_r, got, ref_v);
      checks += 3;
      if (got - ref_v > 4e-3 || ref_v - got > 4e-3) begin failures++; $display("FAIL result"); end
      if (uart_skip) begin failures++; $display("FAIL report skipped at default rates"); end
      ideal   = got * 4096.0 / 5.0;
      exp_dac = ideal < 0.0 ? 0 : ideal >= 4096.0 ? 4095 : $rtoi(ideal);
      if (dac_clip != (ideal < 0.0 || ideal >= 4096.0)) begin failures++; $display("FAIL dac_clip"); end
      while (dac_updates == u0) @(posedge clk);
      #1;
      checks++;
      if (int'(dac_code) - exp_dac > 1 || exp_dac - int'(dac_code) > 1) begin
        failures++; $display("FAIL DAC code %0d expected %0d", dac_code, exp_dac);
      end
    end
    check_lcd();          // the system keeps sampling meanwhile
    checks += 2;
    if (n_frames < 5 || sent.size() > 1) begin failures++; $display("FAIL %0d reports, %0d pending", n_frames, sent.size()); end
    if (rx_ferr != 0 || dac_bad != 0) begin failures++; $display("FAIL serial errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
