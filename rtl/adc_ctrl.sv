// adc_ctrl: SPI master that reads one 12-bit conversion from an MCP3202
// two-channel ADC, which digitizes the thermistor divider voltage.
//
// One transfer is 17 SCLK periods with CS_n low. On the first four rising
// edges the master presents the command bits on DIN: start (1), SGL/DIFF
// (1 = single-ended), ODD/SIGN (the channel) and MSBF (1). The ADC answers
// with a null bit and then B11..B0, each driven after a falling edge; the
// master samples DOUT on rising edges 6 to 17. DOUT passes through a
// two-flop synchronizer, which the half-period of SCLK easily covers.
// The ADC part follows the system description; the SPI sequencing follows the
// MCP3202's serial protocol, and the clock rate and channel are this design's
// choices (CLK_DIV = 50 gives a 1 MHz SCLK from 100 MHz, below the part's
// 1.8 MHz limit at 5 V).
//
// Interface: start (one cycle, ignored while busy) begins a conversion; done
// pulses for one clock with code valid (held until the next done).
// Timing: done rises 35*CLK_DIV clocks after the clock edge that takes start
// (one setup half period, 33 SCLK half periods, one hold half period).
module adc_ctrl #(
  parameter int unsigned CLK_DIV = 50,   // system clocks per SCLK half period
  parameter bit          CHANNEL = 1'b0  // MCP3202 input channel
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [11:0] code,
  // SPI to the MCP3202
  output logic        adc_cs_n,
  output logic        adc_sclk,
  output logic        adc_din,   // master out
  input  logic        adc_dout   // master in
);

  localparam int unsigned NCLK  = 17;
  localparam int unsigned DIV_W = $clog2(CLK_DIV + 1);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW, S_FINISH} state_t;
  state_t state;

  logic [DIV_W-1:0] div_cnt;
  logic [4:0]       clk_idx;    // number of the current SCLK period, 1..17
  logic [11:0]      shreg;
  logic [1:0]       dout_sync;
  logic [3:0]       cmd;        // start, SGL, ODD, MSBF

  wire tick = (div_cnt == DIV_W'(CLK_DIV - 1));

  assign cmd  = {1'b1, 1'b1, CHANNEL, 1'b1};
  assign busy = (state != S_IDLE);

  // Command bit for SCLK period n (1-based); zero after the command.
  function automatic logic cmd_bit(logic [4:0] n, logic [3:0] c);
    if (n >= 5'd1 && n <= 5'd4) return c[3 - (n - 5'd1)];
    else                        return 1'b0;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      div_cnt   <= '0;
      clk_idx   <= '0;
      shreg     <= '0;
      dout_sync <= '0;
      code      <= '0;
      done      <= 1'b0;
      adc_cs_n  <= 1'b1;
      adc_sclk  <= 1'b0;
      adc_din   <= 1'b0;
    end else begin
      dout_sync <= {dout_sync[0], adc_dout};
      done      <= 1'b0;
      div_cnt   <= (state == S_IDLE || tick) ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          adc_cs_n <= 1'b0;
          clk_idx  <= 5'd1;
          adc_din  <= cmd_bit(5'd1, cmd);
          state    <= S_SETUP;
        end
        S_SETUP, S_LOW: if (tick) begin
          adc_sclk <= 1'b1;                      // rising edge clk_idx
          if (clk_idx >= 5'd6) shreg <= {shreg[10:0], dout_sync[1]};
          state    <= S_HIGH;
        end
        S_HIGH: if (tick) begin
          adc_sclk <= 1'b0;                      // falling edge
          if (clk_idx == 5'(NCLK)) begin
            state <= S_FINISH;
          end else begin
            clk_idx <= clk_idx + 1'b1;
            adc_din <= cmd_bit(clk_idx + 1'b1, cmd);
            state   <= S_LOW;
          end
        end
        S_FINISH: if (tick) begin
          adc_cs_n <= 1'b1;
          adc_din  <= 1'b0;
          code     <= shreg;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
