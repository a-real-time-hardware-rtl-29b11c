// tb_lcd_ctrl: runs the LCD controller against a behavioural HD44780 model
// with a 10 MHz clock and a shortened 15 ms power-up wait. Checks that the
// script finishes (ready), that the model saw 41 writes with no timing
// violation, that the display is on in two-line mode, that both lines hold the
// message, and that the power-up wait and total time are as specified.
module tb_lcd_ctrl;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  localparam int unsigned CLK_HZ = 10_000_000;
  localparam logic [8*32-1:0] MSG = "Linearisation ofNonlinear Sensor";

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  logic rs, rw, e, ready;
  logic [7:0] d;
  int violations, writes;
  logic display_on, two_lines;

  lcd_ctrl #(.CLK_HZ(CLK_HZ), .POWERUP_US(15_000)) dut (.clk, .rst_n, .lcd_rs(rs), .lcd_rw(rw),
    .lcd_e(e), .lcd_d(d), .ready);
  hd44780_model lcd (.rs, .rw, .e, .d, .violations, .writes, .display_on, .two_lines);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0, t_first, t_done;
  initial begin
    @(posedge e);
    t_first = $realtime;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    t0 = $realtime;
    checks++;
    if (e || rw) begin failures++; $display("FAIL bus not idle after reset"); end
    wait (ready);
    t_done = $realtime - t0;
    repeat (100) @(posedge clk);
    checks += 6;
    if (writes != 41)   begin failures++; $display("FAIL %0d writes", writes); end
    if (violations != 0) begin failures++; $display("FAIL %0d timing violations", violations); end
    if (!display_on || !two_lines) begin failures++; $display("FAIL display mode"); end
    if (rw) begin failures++; $display("FAIL RW not low"); end
    if (t_first - t0 < 15_000_000.0 || t_first - t0 > 15_010_000.0) begin
      failures++; $display("FAIL power-up wait %0t", t_first - t0);
    end
    // 15000 + 4100 + 100 + 1640 + 38*40 us + 41*2 us
    if (t_done < 22_440_000.0 || t_done > 22_450_000.0) begin
      failures++; $display("FAIL script time %0t ns", t_done);
    end
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (lcd.char_at(c / 16, c % 16) != MSG[8*(31 - c) +: 8]) begin
        failures++; $display("FAIL line %0d col %0d: '%c'", c / 16, c % 16, lcd.char_at(c / 16, c % 16));
      end
    end
    $display("LCD: \"%s\" / \"%s\"", MSG[255:128], MSG[127:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
