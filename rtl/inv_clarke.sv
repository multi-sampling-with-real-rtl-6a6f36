// inv_clarke: alpha-beta to abc transform of the controller output into the
// three phase modulation waves, limited to the carrier range.
//
//     m_a = u_alpha
//     m_b = -u_alpha/2 + (sqrt(3)/2)*u_beta
//     m_c = -u_alpha/2 - (sqrt(3)/2)*u_beta
// sqrt(3)/2 is held with 18 fractional bits and results are rounded to
// nearest. Each wave is saturated to Q1.15 (+-1, the carrier peak and
// valley); 'sat' reports per phase whether that limit acted.
//
// Timing: one register stage, out_valid one cycle after in_valid.
// The inverse of the amplitude-invariant Clarke transform and the plain
// limit (no zero-sequence injection) are this design's choices.
module inv_clarke
  import msrtu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  mod_t              u_alpha,
  input  mod_t              u_beta,
  output logic              out_valid,
  output mod_t              m_abc [NPHASE],
  output logic [NPHASE-1:0] sat
);
  localparam int unsigned KF = 18;
  localparam logic signed [19:0] K_SQ3H = 20'sd227023;  // round(2^18*sqrt(3)/2)

  logic signed [39:0] t_a, t_b, r [NPHASE];

  always_comb begin
    t_a  = 40'(u_alpha) * (40'sd1 <<< (KF - 1));   // u_alpha/2 in 2^-18 units
    t_b  = 40'(u_beta) * 40'(K_SQ3H);
    r[0] = 40'(u_alpha);
    r[1] = (-t_a + t_b + (40'sd1 <<< (KF - 1))) >>> KF;
    r[2] = (-t_a - t_b + (40'sd1 <<< (KF - 1))) >>> KF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sat       <= '0;
      for (int i = 0; i < NPHASE; i++) m_abc[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NPHASE; i++) begin
          if (r[i] > 40'sd32767) begin
            m_abc[i] <= 16'sh7fff; sat[i] <= 1'b1;
          end else if (r[i] < -40'sd32768) begin
            m_abc[i] <= 16'sh8000; sat[i] <= 1'b1;
          end else begin
            m_abc[i] <= mod_t'(r[i]); sat[i] <= 1'b0;
          end
        end
      end
    end
  end
endmodule
