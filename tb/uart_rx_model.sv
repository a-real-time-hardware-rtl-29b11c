// uart_rx_model: behavioural 8N1 serial receiver for testbenches. Waits for a
// start bit, samples each bit in its middle (BAUD_DIV clocks per bit), and
// pulses valid with the received byte. A stop bit of 0 or a start bit that is
// gone at mid-bit counts in framing_errors.
module uart_rx_model #(
  parameter int unsigned BAUD_DIV = 868
) (
  input  logic       clk,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output int         framing_errors
);
  initial begin
    data = '0; valid = 0; framing_errors = 0;
    repeat (2) @(posedge clk);     // let the line settle after power-up
    forever begin
      @(negedge rxd);
      repeat (BAUD_DIV / 2) @(posedge clk);
      if (rxd !== 1'b0) begin
        framing_errors++;
      end else begin
        for (int i = 0; i < 8; i++) begin
          repeat (BAUD_DIV) @(posedge clk);
          data[i] = rxd;
        end
        repeat (BAUD_DIV) @(posedge clk);
        if (rxd !== 1'b1) framing_errors++;
        valid = 1;
        @(posedge clk);
        valid = 0;
      end
    end
  end
endmodule
