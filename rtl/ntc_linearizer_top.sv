// ntc_linearizer_top: FPGA design of the thermistor linearizer. An NTC
// thermistor in series with a 1 kohm resistor across +5 V gives a voltage that
// rises nonlinearly with temperature; an ANFIS network trained on the
// inverse characteristic maps it to a value that is linear in temperature.
//
// Data path, one sample every SAMPLE_PERIOD clocks:
//   adc_ctrl (MCP3202, SPI) -> 12-bit code -> Vin = code * ADC_VREF / 4096
//   -> anfis_linearizer -> Vout
//   -> dac_ctrl (MCP4921, SPI): code = Vout * 4096 / DAC_VREF, clipped to 0..4095
//   -> uart_ctrl (RS-232): frame with the 32-bit Vout
//   -> result_* ports.
// Independently, lcd_ctrl initializes the 16x2 character LCD and writes its
// two-line title.
// The chain of blocks follows the system description. The scaling between
// codes and volts, the sample timer, the clipping of the DAC code and the
// rule that a report is skipped when the UART is still sending the previous
// one are this design's choices. The LCD shows only the fixed title, as far as
// the original system shows it; the result_* ports bring the result out for any other
// display.
//
// Status outputs: dac_clip pulses when a result lies outside the DAC range,
// uart_skip when a report was dropped, result_no_rule marks a sample outside
// both membership functions.
// Timing: one sample per SAMPLE_PERIOD clocks; result_valid follows the ADC's
// done by the linearizer latency (FX_FRAC+4 clocks).
module ntc_linearizer_top
  import anfis_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned SAMPLE_PERIOD = 100_000,     // clocks per sample (1 kS/s)
  parameter int unsigned ADC_CLK_DIV   = 50,
  parameter int unsigned DAC_CLK_DIV   = 5,
  parameter int unsigned BAUD          = 115_200,
  parameter real         ADC_VREF      = 5.0,
  parameter real         DAC_VREF      = 5.0
) (
  input  logic clk,
  input  logic rst_n,
  // MCP3202 ADC
  output logic adc_cs_n,
  output logic adc_sclk,
  output logic adc_din,
  input  logic adc_dout,
  // MCP4921 DAC
  output logic dac_cs_n,
  output logic dac_sck,
  output logic dac_sdi,
  output logic dac_ldac_n,
  // RS-232 to the PC
  output logic uart_txd,
  // character LCD
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_d,
  output logic       lcd_ready,
  // result, for a display
  output logic result_valid,
  output fx_t  result_vout,
  output logic result_no_rule,
  // status
  output logic dac_clip,
  output logic uart_skip
);

  localparam int unsigned TMR_W = $clog2(SAMPLE_PERIOD + 1);
  localparam fx_t ADC_LSB_FX   = real_to_fx(ADC_VREF);          // Vin = code*this >> 12
  localparam fx_t DAC_SCALE_FX = real_to_fx(4096.0 / DAC_VREF); // code = Vout*this >> 2*FRAC

  // ---------------- sample timer ----------------
  logic [TMR_W-1:0] tmr;
  logic             sample_tick;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tmr         <= '0;
      sample_tick <= 1'b0;
    end else begin
      sample_tick <= (tmr == TMR_W'(SAMPLE_PERIOD - 1));
      tmr         <= (tmr == TMR_W'(SAMPLE_PERIOD - 1)) ? '0 : tmr + 1'b1;
    end
  end

  // ---------------- ADC ----------------
  logic        adc_busy, adc_done;
  logic [11:0] adc_code;
  adc_ctrl #(.CLK_DIV(ADC_CLK_DIV)) u_adc (
    .clk(clk), .rst_n(rst_n), .start(sample_tick && !adc_busy), .busy(adc_busy),
    .done(adc_done), .code(adc_code),
    .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_din(adc_din), .adc_dout(adc_dout)
  );

  fx_t vin;
  always_comb vin = sat_fx((fx_wide_t'(adc_code) * fx_wide_t'(ADC_LSB_FX)) >>> 12);

  // ---------------- ANFIS ----------------
  logic lin_ready, lin_valid, lin_no_rule;
  fx_t  lin_vout;
  anfis_linearizer u_anfis (
    .clk(clk), .rst_n(rst_n),
    .in_valid(adc_done), .in_ready(lin_ready), .vin(vin),
    .out_valid(lin_valid), .vout(lin_vout), .no_rule(lin_no_rule)
  );

  // ---------------- result to DAC code ----------------
  fx_wide_t    dac_scaled;
  logic [11:0] dac_code;
  logic        dac_over;
  always_comb begin
    dac_scaled = (fx_wide_t'(lin_vout) * fx_wide_t'(DAC_SCALE_FX)) >>> (2 * FX_FRAC);
    dac_over   = (dac_scaled < 0) || (dac_scaled > 4095);
    if (dac_scaled < 0)         dac_code = 12'd0;
    else if (dac_scaled > 4095) dac_code = 12'd4095;
    else                        dac_code = dac_scaled[11:0];
  end

  logic dac_busy;
  dac_ctrl #(.CLK_DIV(DAC_CLK_DIV)) u_dac (
    .clk(clk), .rst_n(rst_n), .start(lin_valid), .code(dac_code),
    .busy(dac_busy), .done(),
    .dac_cs_n(dac_cs_n), .dac_sck(dac_sck), .dac_sdi(dac_sdi), .dac_ldac_n(dac_ldac_n)
  );

  // ---------------- UART ----------------
  logic uart_busy;
  uart_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .NBYTES(FX_W / 8)) u_uart (
    .clk(clk), .rst_n(rst_n), .start(lin_valid && !uart_busy), .data(lin_vout),
    .busy(uart_busy), .done(), .txd(uart_txd)
  );

  // ---------------- LCD ----------------
  lcd_ctrl #(.CLK_HZ(CLK_HZ)) u_lcd (
    .clk(clk), .rst_n(rst_n),
    .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_e(lcd_e), .lcd_d(lcd_d), .ready(lcd_ready)
  );

  // ---------------- outputs ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result_valid   <= 1'b0;
      result_vout    <= '0;
      result_no_rule <= 1'b0;
      dac_clip       <= 1'b0;
      uart_skip      <= 1'b0;
    end else begin
      result_valid <= lin_valid;
      dac_clip     <= lin_valid && dac_over;
      uart_skip    <= lin_valid && uart_busy;
      if (lin_valid) begin
        result_vout    <= lin_vout;
        result_no_rule <= lin_no_rule;
      end
    end
  end

  // A conversion can only end while the linearizer is idle: it needs
  // FX_FRAC+4 clocks and a conversion several hundred.
  a_lin_ready: assert property (@(posedge clk) disable iff (!rst_n) adc_done |-> lin_ready);
  // The DAC write (about 35*DAC_CLK_DIV clocks) ends before the next result.
  a_dac_free:  assert property (@(posedge clk) disable iff (!rst_n) lin_valid |-> !dac_busy);

endmodule
