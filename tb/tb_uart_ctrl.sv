// tb_uart_ctrl: sends frames of random 32-bit words and decodes the serial
// line with a behavioural receiver. Checks the marker byte, the four data
// bytes (most significant first), the absence of framing errors, the frame
// time of 50*BAUD_DIV clocks, and that a start while busy is ignored.
module tb_uart_ctrl;
  int checks = 0, failures = 0;
  localparam int unsigned CLK_HZ = 1_000_000, BAUD = 62_500;   // 16 clocks per bit
  localparam int unsigned BAUD_DIV = CLK_HZ / BAUD;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] data = '0;
  logic busy, done, txd;
  logic [7:0] rx;
  logic rx_valid;
  int ferr;

  always #5 clk = ~clk;

  uart_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .start, .data, .busy, .done, .txd);
  uart_rx_model #(.BAUD_DIV(BAUD_DIV)) rxm (.clk, .rxd(txd), .data(rx), .valid(rx_valid), .framing_errors(ferr));

  logic [7:0] got[$];
  always @(posedge rx_valid) got.push_back(rx);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [31:0] w);
    int n;
    got.delete();
    @(posedge clk); #1;
    data = w; start = 1;
    @(posedge clk); #1;
    data = ~w;                        // a new request while busy is ignored
    n = 0;
    while (!done && n < 100000) begin @(posedge clk); #1; n++; end
    start = 0;
    repeat (BAUD_DIV) @(posedge clk);
    #1;
    checks += 3;
    if (n != 50 * BAUD_DIV) begin failures++; $display("FAIL frame time %0d", n); end
    if (got.size() != 5) begin
      failures++; $display("FAIL %0d bytes received", got.size());
    end else begin
      if (got[0] != 8'hA5) begin failures++; $display("FAIL marker %h", got[0]); end
      if ({got[1], got[2], got[3], got[4]} != w) begin
        failures++; $display("FAIL data %h%h%h%h expected %h", got[1], got[2], got[3], got[4], w);
      end
    end
    checks++;
    if (ferr != 0) begin failures++; $display("FAIL framing errors %0d", ferr); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (!txd || busy) begin failures++; $display("FAIL idle line"); end
    send(32'h0000_0000);
    send(32'hFFFF_FFFF);
    send(32'h1234_5678);
    repeat (40) send($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
