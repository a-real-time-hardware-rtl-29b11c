// tb_adc_ctrl: runs the MCP3202 SPI master against a behavioural model of the
// ADC. For random and corner codes it checks the returned code, the command
// the model received (start=1, single-ended, channel, MSB first), the number
// of SCLK periods (17), that CS_n is high between transfers, and the
// conversion time of 35*CLK_DIV clocks. A second instance reads channel 1.
module tb_adc_ctrl;
  int checks = 0, failures = 0;
  localparam int unsigned DIV = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start0 = 0, start1 = 0;
  logic        busy0, done0, busy1, done1;
  logic [11:0] code0, code1, value = '0;
  logic        cs0, sclk0, din0, dout0, cs1, sclk1, din1, dout1;
  logic [3:0]  cmd0, cmd1;
  int          nclk0, nclk1, tr0, tr1;

  adc_ctrl #(.CLK_DIV(DIV)) dut0 (.clk, .rst_n, .start(start0), .busy(busy0), .done(done0), .code(code0),
    .adc_cs_n(cs0), .adc_sclk(sclk0), .adc_din(din0), .adc_dout(dout0));
  adc_ctrl #(.CLK_DIV(DIV), .CHANNEL(1'b1)) dut1 (.clk, .rst_n, .start(start1), .busy(busy1), .done(done1), .code(code1),
    .adc_cs_n(cs1), .adc_sclk(sclk1), .adc_din(din1), .adc_dout(dout1));

  mcp3202_model adc0 (.cs_n(cs0), .sclk(sclk0), .din(din0), .dout(dout0), .value(value), .cmd(cmd0), .nclk(nclk0), .transfers(tr0));
  mcp3202_model adc1 (.cs_n(cs1), .sclk(sclk1), .din(din1), .dout(dout1), .value(value), .cmd(cmd1), .nclk(nclk1), .transfers(tr1));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(bit ch, logic [11:0] v);
    int n;
    value = v;
    @(posedge clk); #1;
    if (ch) start1 = 1; else start0 = 1;
    @(posedge clk); #1;
    start0 = 0; start1 = 0;
    n = 0;
    while (!(ch ? done1 : done0) && n < 1000) begin
      @(posedge clk); #1; n++;
    end
    checks += 5;
    if (n != 35 * DIV) begin failures++; $display("FAIL conversion time %0d", n); end
    if ((ch ? code1 : code0) != v) begin failures++; $display("FAIL ch%0d code %h expected %h", ch, ch ? code1 : code0, v); end
    if ((ch ? cmd1 : cmd0) != {1'b1, 1'b1, ch, 1'b1}) begin failures++; $display("FAIL command %b", ch ? cmd1 : cmd0); end
    if ((ch ? nclk1 : nclk0) != 17) begin failures++; $display("FAIL %0d SCLK periods", ch ? nclk1 : nclk0); end
    if (!(ch ? cs1 : cs0)) begin failures++; $display("FAIL CS_n still low"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (!cs0 || !cs1 || busy0) begin failures++; $display("FAIL idle state"); end
    convert(0, 12'h000);
    convert(0, 12'hFFF);
    convert(0, 12'hA5C);
    convert(1, 12'h3C1);
    repeat (200) convert(0, 12'($urandom));
    repeat (50)  convert(1, 12'($urandom));
    checks++;
    if (tr0 != 203 || tr1 != 51) begin failures++; $display("FAIL transfer count %0d %0d", tr0, tr1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
