// clarke: abc to alpha-beta (Clarke) transform of the sampled voltages.
//
// The voltage loop runs in the stationary alpha-beta frame. This block uses
// the amplitude-invariant form
//     u_alpha = (2*u_a - u_b - u_c) / 3
//     u_beta  = (u_b - u_c) / sqrt(3)
// with the constants 1/3 and 1/sqrt(3) held as 18-fraction-bit integers and
// the products rounded to nearest. Results are saturated to the 16-bit
// sample range (only reachable with unbalanced inputs near full scale).
//
// Timing: one register stage; out_valid follows in_valid one cycle later.
// The alpha-beta frame is the converter's; the transform variant, the
// constants' precision and the rounding are this design's choices.
module clarke
  import msrtu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t u_abc [NPHASE],
  output logic    out_valid,
  output sample_t u_alpha,
  output sample_t u_beta
);
  localparam int unsigned KF = 18;
  localparam logic signed [19:0] K_THIRD = 20'sd87381;   // round(2^18/3)
  localparam logic signed [19:0] K_ISQ3  = 20'sd151349;  // round(2^18/sqrt(3))

  function automatic sample_t sat16(input logic signed [39:0] x);
    if (x > 40'sd32767)       return 16'sh7fff;
    else if (x < -40'sd32768) return 16'sh8000;
    else                      return sample_t'(x);
  endfunction

  logic signed [18:0] s_alpha, s_beta;
  logic signed [39:0] p_alpha, p_beta;

  always_comb begin
    s_alpha = 19'(2 * 19'(u_abc[0])) - 19'(u_abc[1]) - 19'(u_abc[2]);
    s_beta  = 19'(u_abc[1]) - 19'(u_abc[2]);
    p_alpha = (40'(s_alpha) * 40'(K_THIRD) + (40'sd1 <<< (KF - 1))) >>> KF;
    p_beta  = (40'(s_beta)  * 40'(K_ISQ3)  + (40'sd1 <<< (KF - 1))) >>> KF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      u_alpha   <= '0;
      u_beta    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u_alpha <= sat16(p_alpha);
        u_beta  <= sat16(p_beta);
      end
    end
  end
endmodule
