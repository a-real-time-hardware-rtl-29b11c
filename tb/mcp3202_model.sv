// mcp3202_model: behavioural model of the MCP3202 12-bit SPI ADC, for
// testbenches only (not synthesizable logic of the design).
//
// With CS_n low, the first rising SCLK edge that sees DIN = 1 is the start bit;
// the next three rising edges capture SGL/DIFF, ODD/SIGN and MSBF into cmd.
// The analog value (given here directly as the 12-bit code `value`) is
// sampled on the falling edge of the third clock after the start bit. On the
// falling edge of the MSBF clock DOUT drives the null bit 0, then B11..B0 on
// the next 12 falling edges. DOUT is held at 1 while CS_n is high (the real
// pin floats). nclk counts the SCLK rising edges of the last transfer.
module mcp3202_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] value,
  output logic [3:0]  cmd,        // start, SGL/DIFF, ODD/SIGN, MSBF
  output int          nclk,
  output int          transfers
);
  logic [11:0] held;
  int          pos;               // rising edges since (and including) start bit

  initial begin
    dout = 1'b1; cmd = '0; nclk = 0; transfers = 0; pos = 0; held = '0;
  end

  always @(negedge cs_n) begin
    pos  = 0;
    nclk = 0;
    cmd  = '0;
  end

  // a transfer is counted when CS_n rises after at least one SCLK period
  always @(posedge cs_n) begin
    dout = 1'b1;
    if (nclk > 0) transfers++;
  end

  always @(posedge sclk) if (!cs_n) begin
    nclk++;
    if (pos == 0) begin
      if (din) begin pos = 1; cmd[3] = 1'b1; end
    end else begin
      pos++;
      if (pos <= 4) cmd[4 - pos] = din;
    end
  end

  always @(negedge sclk) if (!cs_n && pos > 0) begin
    if (pos == 3) held = value;
    if (pos == 4) dout = 1'b0;
    else if (pos >= 5 && pos <= 16) dout = held[16 - pos];
  end
endmodule
