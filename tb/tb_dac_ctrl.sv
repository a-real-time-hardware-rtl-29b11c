// tb_dac_ctrl: runs the MCP4921 SPI master against a behavioural model of the
// DAC. For random and corner codes it checks the 16-bit word the model
// latched (write, BUF=0, gain 1, output on, code), that the model saw no
// malformed write, that the LDAC pulse moved it to the output, and the write
// time of 35*CLK_DIV clocks.
module tb_dac_ctrl;
  int checks = 0, failures = 0;
  localparam int unsigned DIV = 2;

  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] code = '0;
  logic busy, done, cs_n, sck, sdi, ldac_n;
  logic [15:0] word;
  logic [11:0] out_code;
  int updates, bad;

  always #5 clk = ~clk;

  dac_ctrl #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .start, .code, .busy, .done,
    .dac_cs_n(cs_n), .dac_sck(sck), .dac_sdi(sdi), .dac_ldac_n(ldac_n));
  mcp4921_model dac (.cs_n, .sck, .sdi, .ldac_n, .word, .code(out_code), .updates, .bad_writes(bad));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [11:0] c);
    int n, u0;
    u0 = updates;
    @(posedge clk); #1;
    code = c; start = 1;
    @(posedge clk); #1;
    start = 0; code = 12'($urandom);    // code must have been latched
    n = 0;
    while (!done && n < 1000) begin @(posedge clk); #1; n++; end
    checks += 5;
    if (n != 35 * DIV) begin failures++; $display("FAIL write time %0d", n); end
    if (word != {4'b0011, c}) begin failures++; $display("FAIL word %h for code %h", word, c); end
    if (out_code != c) begin failures++; $display("FAIL output %h for code %h", out_code, c); end
    if (updates != u0 + 1) begin failures++; $display("FAIL no LDAC update"); end
    if (bad != 0) begin failures++; $display("FAIL malformed write"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (!cs_n || !ldac_n || busy) begin failures++; $display("FAIL idle state"); end
    write(12'h000);
    write(12'hFFF);
    write(12'h800);
    write(12'h555);
    repeat (300) write(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
