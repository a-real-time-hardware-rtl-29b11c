// mcp4921_model: behavioural model of the MCP4921 12-bit SPI DAC, for
// testbenches only.
//
// While CS_n is low each rising SCK edge shifts SDI into a 16-bit register.
// When CS_n rises after exactly 16 clocks with bit 15 = 0 the word is kept in
// the input latch (otherwise it is discarded and bad_writes counts it). A low
// level on LDAC_n copies the latch to the output: code is the DAC code, and
// updates counts the output updates.
module mcp4921_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        sdi,
  input  logic        ldac_n,
  output logic [15:0] word,
  output logic [11:0] code,
  output int          updates,
  output int          bad_writes
);
  logic [15:0] shreg;
  logic [15:0] latch;
  logic        latch_full;
  int          n;

  initial begin
    word = '0; code = '0; updates = 0; bad_writes = 0;
    shreg = '0; latch = '0; latch_full = 0; n = 0;
  end

  always @(negedge cs_n) n = 0;

  always @(posedge sck) if (!cs_n) begin
    shreg = {shreg[14:0], sdi};
    n++;
  end

  always @(posedge cs_n) if (n > 0) begin   // ignore CS_n settling at power-up
    if (n == 16 && shreg[15] == 1'b0) begin
      latch      = shreg;
      latch_full = 1;
    end else begin
      bad_writes++;
    end
  end

  always @(negedge ldac_n) if (latch_full) begin
    word = latch;
    code = latch[12] ? latch[11:0] : 12'd0;   // SHDN_n = 0 turns the output off
    updates++;
    latch_full = 0;
  end
endmodule
