// dac_ctrl: SPI master that writes a 12-bit code to an MCP4921 DAC, which
// turns the linearized result back into a voltage.
//
// A write is one 16-bit word, MSB first, with CS_n low: bit 15 = 0 (write to
// the DAC register), bit 14 = BUF (reference buffer), bit 13 = GA_n
// (1 = gain 1), bit 12 = SHDN_n (1 = output on), bits 11..0 = the code. SDI
// changes while SCK is low and the DAC latches it on each rising edge. After
// CS_n returns high and one SCK half period has passed, LDAC_n is pulsed low
// for one SCK half period to move the word to the output.
// The DAC part follows the system description; the word layout follows the
// MCP4921's serial protocol; SCK rate (CLK_DIV = 5 gives 10 MHz from
// 100 MHz, below the 20 MHz limit) and the LDAC pulse are this design's choices.
//
// Interface: start (one cycle, ignored while busy) latches code; done pulses
// once the LDAC pulse has ended.
// Timing: done rises 35*CLK_DIV clocks after the clock edge that takes start
// (one setup half period, 31 SCK half periods, CS hold, CS-to-LDAC gap,
// LDAC pulse).
module dac_ctrl #(
  parameter int unsigned CLK_DIV = 5,     // system clocks per SCK half period
  parameter bit          BUF     = 1'b0   // reference input buffer
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] code,
  output logic        busy,
  output logic        done,
  // SPI to the MCP4921
  output logic        dac_cs_n,
  output logic        dac_sck,
  output logic        dac_sdi,
  output logic        dac_ldac_n
);

  localparam int unsigned NBITS = 16;
  localparam int unsigned DIV_W = $clog2(CLK_DIV + 1);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HIGH, S_LOW, S_FINISH, S_GAP, S_LDAC} state_t;
  state_t state;

  logic [DIV_W-1:0] div_cnt;
  logic [4:0]       bit_cnt;   // bits already clocked out
  logic [15:0]      word;

  wire tick = (div_cnt == DIV_W'(CLK_DIV - 1));
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      div_cnt    <= '0;
      bit_cnt    <= '0;
      word       <= '0;
      done       <= 1'b0;
      dac_cs_n   <= 1'b1;
      dac_sck    <= 1'b0;
      dac_sdi    <= 1'b0;
      dac_ldac_n <= 1'b1;
    end else begin
      done    <= 1'b0;
      div_cnt <= (state == S_IDLE || tick) ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          word     <= {1'b0, BUF, 1'b1, 1'b1, code} << 1;
          dac_sdi  <= 1'b0;                      // bit 15: write DAC register
          dac_cs_n <= 1'b0;
          bit_cnt  <= '0;
          state    <= S_SETUP;
        end
        S_SETUP, S_LOW: if (tick) begin
          dac_sck <= 1'b1;                       // DAC latches dac_sdi
          bit_cnt <= bit_cnt + 1'b1;
          state   <= S_HIGH;
        end
        S_HIGH: if (tick) begin
          dac_sck <= 1'b0;
          if (bit_cnt == 5'(NBITS)) begin
            state <= S_FINISH;
          end else begin
            dac_sdi <= word[15];
            word    <= word << 1;
            state   <= S_LOW;
          end
        end
        S_FINISH: if (tick) begin
          dac_cs_n   <= 1'b1;
          state      <= S_GAP;
        end
        S_GAP: if (tick) begin                   // CS_n high to LDAC_n low
          dac_ldac_n <= 1'b0;
          state      <= S_LDAC;
        end
        S_LDAC: if (tick) begin
          dac_ldac_n <= 1'b1;
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
