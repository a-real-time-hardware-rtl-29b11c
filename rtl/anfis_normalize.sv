// anfis_normalize: Layer 3 of the ANFIS linearizer. Divides each rule firing
// strength by the sum of both, wbar_i = w_i / (w1 + w2).
//
// The two quotients share one divisor, so they are produced by two restoring
// long-division datapaths that run side by side under one bit counter. Because
// w_i <= w1 + w2, each quotient lies in [0, 1] and has exactly W_W = FX_FRAC+1
// bits (one integer bit, FX_FRAC fraction bits); one quotient bit is produced
// per clock, most significant first, and the result is truncated.
// The serial divider is this design's choice; the original design gives only the
// equation. When both weights are zero (the input lies outside every
// membership function) the ratio is undefined: both outputs are forced to 0
// and zero_sum is raised alongside out_valid.
//
// Interface: start (one cycle, accepted only while busy is low) samples w1, w2.
// Timing: out_valid pulses exactly W_W clocks after the start cycle; busy is
// high from the cycle after start until out_valid. Synchronous active-low reset.
module anfis_normalize
  import anfis_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  w_t   w1,
  input  w_t   w2,
  output logic busy,
  output logic out_valid,
  output logic zero_sum,
  output w_t   wbar1,
  output w_t   wbar2
);

  localparam int unsigned CNT_W = $clog2(W_W + 1);
  typedef logic [W_W+1:0] rem_t;   // holds 2*divisor

  rem_t               divisor, rem1, rem2;
  logic [W_W-2:0]     q1, q2;    // all quotient bits but the last
  logic [CNT_W-1:0]   cnt;
  logic               zero_q;

  // One long-division step: shift is applied before the compare except on
  // the first step, which produces the integer bit.
  function automatic logic step_bit(rem_t r, rem_t d);
    return r >= d;
  endfunction

  rem_t r1_cur, r2_cur;
  always_comb begin
    r1_cur = (cnt == CNT_W'(W_W)) ? rem1 : rem1 << 1;
    r2_cur = (cnt == CNT_W'(W_W)) ? rem2 : rem2 << 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      zero_sum  <= 1'b0;
      cnt       <= '0;
      divisor   <= '0;
      rem1      <= '0;
      rem2      <= '0;
      q1        <= '0;
      q2        <= '0;
      zero_q    <= 1'b0;
      wbar1     <= '0;
      wbar2     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          cnt     <= CNT_W'(W_W);
          divisor <= rem_t'(w1) + rem_t'(w2);
          zero_q  <= (w1 == '0) && (w2 == '0);
          rem1    <= rem_t'(w1);
          rem2    <= rem_t'(w2);
          q1      <= '0;
          q2      <= '0;
        end
      end else begin
        if (step_bit(r1_cur, divisor)) begin
          rem1 <= r1_cur - divisor;
          q1   <= {q1[W_W-3:0], 1'b1};
        end else begin
          rem1 <= r1_cur;
          q1   <= {q1[W_W-3:0], 1'b0};
        end
        if (step_bit(r2_cur, divisor)) begin
          rem2 <= r2_cur - divisor;
          q2   <= {q2[W_W-3:0], 1'b1};
        end else begin
          rem2 <= r2_cur;
          q2   <= {q2[W_W-3:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          zero_sum  <= zero_q;
          wbar1     <= zero_q ? '0 : {q1, step_bit(r1_cur, divisor)};
          wbar2     <= zero_q ? '0 : {q2, step_bit(r2_cur, divisor)};
        end
      end
    end
  end

endmodule
