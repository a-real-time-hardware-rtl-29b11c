// anfis_linearizer: single-input, two-rule Takagi-Sugeno-Kang ANFIS that
// inverts the nonlinear characteristic of the NTC thermistor divider:
//
//   Vout = (wbar1*(q1*Vin + r1) + wbar2*(q2*Vin + r2)),
//   wbar_i = Tri_i(Vin) / (Tri1(Vin) + Tri2(Vin))
//
// Structure (one module per layer of the network):
//   Layer 1  two tri_mf nodes give the firing strengths w1, w2. With a single
//            input the rule product of Layer 2 is the membership grade itself.
//   Layer 3  anfis_normalize divides both strengths by their sum.
//   Layer 4  two anfis_consequent nodes form wbar_i * (q_i*Vin + r_i).
//   Layer 5  a saturating adder sums the two rule outputs.
// The default parameters are the trained values of the network: two triangle
// input memberships and two linear output memberships.
//
// The block handles one sample at a time. Pipeline registers sit after
// Layer 1, after Layer 4 and after Layer 5; the divider of Layer 3 takes
// FX_FRAC+1 clocks. These registers, the fixed-point format and the
// valid/ready handshake are this design's choices.
//
// Interface: in_valid/in_ready handshake on vin (fx_t). vout, no_rule and
// out_valid (one-cycle pulse) give the result. no_rule is high when Vin lies
// outside both membership functions; vout is then 0.
// Timing: out_valid rises LATENCY = FX_FRAC+4 clocks after the accepting
// clock edge; in_ready is low from acceptance until out_valid.
module anfis_linearizer
  import anfis_pkg::*;
#(
  parameter real TRI1_A = -3.13,
  parameter real TRI1_B = -0.35,
  parameter real TRI1_C = 5.169,
  parameter real TRI2_A = 0.21,
  parameter real TRI2_B = 3.0,
  parameter real TRI2_C = 6.305,
  parameter real F1_Q   = 4.5,
  parameter real F1_R   = -0.03,
  parameter real F2_Q   = 1.225,
  parameter real F2_R   = 0.5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fx_t  vin,
  output logic out_valid,
  output fx_t  vout,
  output logic no_rule
);

  // ---------------- Layer 1 ----------------
  w_t w1_c, w2_c;
  tri_mf #(.A(TRI1_A), .B(TRI1_B), .C(TRI1_C)) u_tri1 (.x(vin), .grade(w1_c));
  tri_mf #(.A(TRI2_A), .B(TRI2_B), .C(TRI2_C)) u_tri2 (.x(vin), .grade(w2_c));

  logic busy;
  logic s1_valid;
  fx_t  x_r;
  w_t   w1_r, w2_r;

  assign in_ready = !busy;

  // ---------------- Layer 3 ----------------
  logic norm_busy, norm_valid, norm_zero;
  w_t   wbar1, wbar2;

  anfis_normalize u_norm (
    .clk(clk), .rst_n(rst_n),
    .start(s1_valid), .w1(w1_r), .w2(w2_r),
    .busy(norm_busy), .out_valid(norm_valid), .zero_sum(norm_zero),
    .wbar1(wbar1), .wbar2(wbar2)
  );

  // ---------------- Layer 4 ----------------
  fx_t wf1_c, wf2_c;
  anfis_consequent #(.Q(F1_Q), .R(F1_R)) u_f1 (.x(x_r), .wbar(wbar1), .wf(wf1_c));
  anfis_consequent #(.Q(F2_Q), .R(F2_R)) u_f2 (.x(x_r), .wbar(wbar2), .wf(wf2_c));

  logic s4_valid, s4_zero;
  fx_t  wf1_r, wf2_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      s1_valid  <= 1'b0;
      x_r       <= '0;
      w1_r      <= '0;
      w2_r      <= '0;
      s4_valid  <= 1'b0;
      s4_zero   <= 1'b0;
      wf1_r     <= '0;
      wf2_r     <= '0;
      out_valid <= 1'b0;
      vout      <= '0;
      no_rule   <= 1'b0;
    end else begin
      // Layer 1 register
      s1_valid <= in_valid && !busy;
      if (in_valid && !busy) begin
        busy <= 1'b1;
        x_r  <= vin;
        w1_r <= w1_c;
        w2_r <= w2_c;
      end
      // Layer 4 register
      s4_valid <= norm_valid;
      if (norm_valid) begin
        wf1_r   <= wf1_c;
        wf2_r   <= wf2_c;
        s4_zero <= norm_zero;
      end
      // Layer 5: sum of the rule outputs
      out_valid <= s4_valid;
      if (s4_valid) begin
        vout    <= sat_fx(fx_wide_t'(wf1_r) + fx_wide_t'(wf2_r));
        no_rule <= s4_zero;
        busy    <= 1'b0;
      end
    end
  end

  // The divider must be idle whenever a new sample is started.
  a_norm_idle: assert property (@(posedge clk) disable iff (!rst_n) s1_valid |-> !norm_busy);

endmodule
