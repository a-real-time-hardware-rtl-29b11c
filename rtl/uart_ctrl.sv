// uart_ctrl: RS-232 transmitter that reports each linearized result to the
// host PC.
//
// A report is a frame of 1 + NBYTES characters: the marker byte HEADER, then
// the NBYTES bytes of data, most significant byte first. Each character is
// 8N1: a start bit (0), eight data bits LSB first, a stop bit (1), each bit
// BAUD_DIV = CLK_HZ/BAUD clocks long. The UART link to the PC follows the
// system description; the baud rate, the marker byte and the byte order are
// this design's choices.
//
// Interface: start (one cycle, ignored while busy) latches data; txd idles
// high; done pulses at the end of the last stop bit.
// Timing: done rises 10*(1+NBYTES)*BAUD_DIV clocks after the clock edge that
// takes start; the start bit of the marker begins on that edge.
module uart_ctrl #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned NBYTES = 4,
  parameter logic [7:0]  HEADER = 8'hA5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [8*NBYTES-1:0]   data,
  output logic                  busy,
  output logic                  done,
  output logic                  txd
);

  localparam int unsigned BAUD_DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DIV_W    = $clog2(BAUD_DIV + 1);
  localparam int unsigned NCHAR    = NBYTES + 1;
  localparam int unsigned CHAR_W   = $clog2(NCHAR + 1);

  logic [DIV_W-1:0]        div_cnt;
  logic [3:0]              bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [CHAR_W-1:0]       char_left;
  logic [8*NCHAR-1:0]      frame;
  logic [9:0]              chr;       // {stop, data, start}, sent LSB first

  wire tick = (div_cnt == DIV_W'(BAUD_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      txd       <= 1'b1;
      div_cnt   <= '0;
      bit_idx   <= '0;
      char_left <= '0;
      frame     <= '0;
      chr       <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        div_cnt <= '0;
        if (start) begin
          busy      <= 1'b1;
          frame     <= {data, 8'h00};
          chr       <= {1'b1, HEADER, 1'b0};
          txd       <= 1'b0;
          bit_idx   <= '0;
          char_left <= CHAR_W'(NCHAR - 1);
        end
      end else begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          if (bit_idx == 4'd9) begin
            if (char_left == '0) begin
              busy <= 1'b0;
              done <= 1'b1;
              txd  <= 1'b1;
            end else begin
              char_left <= char_left - 1'b1;
              chr       <= {1'b1, frame[8*NCHAR-1 -: 8], 1'b0};
              frame     <= frame << 8;
              txd       <= 1'b0;
              bit_idx   <= '0;
            end
          end else begin
            bit_idx <= bit_idx + 1'b1;
            txd     <= chr[bit_idx + 1'b1];
          end
        end
      end
    end
  end

endmodule
