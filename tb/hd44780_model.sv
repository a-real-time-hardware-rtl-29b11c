// hd44780_model: behavioural model of an HD44780-compatible character LCD on
// an 8-bit bus, write-only, for testbenches. On each falling edge of E with
// RW low it executes the byte on D: RS=1 writes a character at the address
// counter and increments it; RS=0 decodes clear (0x01), entry mode (0x04..07),
// display control (0x08..0F), function set (0x20..3F) and set DDRAM address
// (0x80..FF). It checks the bus timing the controller expects of its host:
// the first write no earlier than 15 ms after power-up, E high at least
// 450 ns, RS/D stable from 40 ns before E rises, and every write after the
// previous command has finished (4.1 ms and 100 us after the first two
// function sets, 1.52 ms after clear, 37 us otherwise). Time is in ns.
module hd44780_model (
  input  logic       rs,
  input  logic       rw,
  input  logic       e,
  input  logic [7:0] d,
  output int         violations,
  output int         writes,
  output logic       display_on,
  output logic       two_lines
);
  logic [7:0] ddram [0:127];
  logic [6:0] ac;
  realtime    t_rise, t_ready, t_bus;
  int         n_fset;
  bit         rose;      // E has risen since power-up

  initial begin
    violations = 0; writes = 0; display_on = 0; two_lines = 0;
    ac = '0; n_fset = 0; t_rise = 0; t_bus = 0; rose = 0;
    t_ready = 15_000_000.0;
    for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
  end

  always @(rs or d) t_bus = $realtime;

  always @(posedge e) begin
    rose   = 1;
    t_rise = $realtime;
    if (t_rise < t_ready) begin
      violations++; $display("LCD: write at %0t ns before the previous command finished", $realtime);
    end
    if (t_rise - t_bus < 40.0) begin
      violations++; $display("LCD: RS/D changed %0t ns before E", t_rise - t_bus);
    end
  end

  always @(negedge e) if (!rw && rose) begin
    real exec;
    if ($realtime - t_rise < 450.0) begin violations++; $display("LCD: E pulse too short"); end
    writes++;
    exec = 37_000.0;
    if (rs) begin
      ddram[ac] = d;
      ac = ac + 1'b1;
    end else if (d[7]) begin
      ac = d[6:0];
    end else if (d[5]) begin
      two_lines = d[3];
      n_fset++;
      if (n_fset == 1) exec = 4_100_000.0;
      else if (n_fset == 2) exec = 100_000.0;
    end else if (d[3]) begin
      display_on = d[2];
    end else if (d[2]) begin
      ;                               // entry mode
    end else if (d[0]) begin
      for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
      ac = '0;
      exec = 1_520_000.0;
    end
    t_ready = $realtime + exec;
  end

  // Character at column c of line l (0 or 1).
  function automatic logic [7:0] char_at(int l, int c);
    return ddram[(l == 0 ? 0 : 64) + c];
  endfunction
endmodule
