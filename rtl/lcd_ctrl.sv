// lcd_ctrl: controller for the 16x2 character LCD of the board (an
// HD44780-compatible module on an 8-bit parallel bus).
//
// After a power-up wait it runs a fixed script of bus writes: the
// initialization sequence (function set 0x38 three times with the waits the
// controller requires, then once more, display on 0x0C, clear 0x01, entry
// mode 0x06), the address of line 1 (0x80), the first 16 characters of
// MESSAGE, the address of line 2 (0xC0) and the last 16 characters. Each write
// drives RS and D for SETUP_US, raises E for E_US, then waits the command's
// execution time before the next write. RW is held low: the controller never
// reads the busy flag and relies on the waits instead. When the script ends,
// ready rises and the bus stays idle.
// The original system has an LCD controller, and its photograph shows the two text
// lines used as the default MESSAGE; the LCD type, the 8-bit bus, the script
// and all times are this design's choices, taken from the usual HD44780
// timing with margin (40 us per command, 1.64 ms for clear).
//
// Interface: lcd_rs, lcd_rw, lcd_e, lcd_d to the module; ready out.
// Timing: ready rises after POWERUP_US + 4100 + 100 + 1640 + 38*40 us plus
// 2 us per write (41 writes); all times scale with CLK_HZ.
module lcd_ctrl #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned POWERUP_US = 40_000,
  parameter logic [8*32-1:0] MESSAGE = "Linearisation ofNonlinear Sensor"
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_d,
  output logic       ready
);

  localparam int unsigned CYC_PER_US = (CLK_HZ + 999_999) / 1_000_000;
  localparam int unsigned SETUP_US   = 1;
  localparam int unsigned E_US       = 1;
  localparam int unsigned NWRITES    = 41;

  typedef struct packed {
    logic        rs;
    logic [7:0]  data;
    logic [15:0] wait_us;   // execution time after the write
  } lcd_op_t;

  // The write script.
  function automatic lcd_op_t script(int unsigned i);
    int unsigned ch;
    case (i)
      0:  return '{1'b0, 8'h38, 16'd4100};   // function set: 8-bit, 2 lines, 5x8
      1:  return '{1'b0, 8'h38, 16'd100};
      2:  return '{1'b0, 8'h38, 16'd40};
      3:  return '{1'b0, 8'h38, 16'd40};
      4:  return '{1'b0, 8'h0C, 16'd40};     // display on, cursor off
      5:  return '{1'b0, 8'h01, 16'd1640};   // clear
      6:  return '{1'b0, 8'h06, 16'd40};     // entry mode: increment
      7:  return '{1'b0, 8'h80, 16'd40};     // line 1
      24: return '{1'b0, 8'hC0, 16'd40};     // line 2
      default: begin
        ch = (i < 24) ? i - 8 : i - 9;       // character 0..31
        return '{1'b1, MESSAGE[8*(31 - ch) +: 8], 16'd40};
      end
    endcase
  endfunction

  typedef enum logic [2:0] {S_POWERUP, S_SETUP, S_EHIGH, S_WAIT, S_DONE} state_t;
  state_t state;

  logic [31:0] cnt;        // clocks left in the current phase
  logic [5:0]  idx;        // current script entry
  lcd_op_t     op, op_next;

  always_comb begin
    op      = script(int'(idx));
    op_next = script(int'(idx) + 1);
  end

  assign lcd_rw = 1'b0;
  assign ready  = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_POWERUP;
      cnt    <= 32'(POWERUP_US * CYC_PER_US);
      idx    <= '0;
      lcd_rs <= 1'b0;
      lcd_e  <= 1'b0;
      lcd_d  <= '0;
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else begin
      unique case (state)
        S_POWERUP, S_WAIT: begin
          if (state == S_WAIT && idx == 6'(NWRITES - 1)) begin
            state <= S_DONE;
          end else begin
            // RS and D settle for SETUP_US before E rises
            if (state == S_WAIT) begin
              idx    <= idx + 1'b1;
              lcd_rs <= op_next.rs;
              lcd_d  <= op_next.data;
            end else begin
              lcd_rs <= op.rs;
              lcd_d  <= op.data;
            end
            state <= S_SETUP;
            cnt   <= 32'(SETUP_US * CYC_PER_US - 1);
          end
        end
        S_SETUP: begin
          lcd_e  <= 1'b1;
          state  <= S_EHIGH;
          cnt    <= 32'(E_US * CYC_PER_US - 1);
        end
        S_EHIGH: begin
          lcd_e <= 1'b0;                     // the LCD takes D on this edge
          state <= S_WAIT;
          cnt   <= 32'(op.wait_us) * 32'(CYC_PER_US) - 1;
        end
        S_DONE: ;
        default: state <= S_DONE;
      endcase
    end
  end

endmodule
