// resonant_ctrl: voltage error and resonant (R) controller for one axis of
// the stationary alpha-beta frame.
//
// The continuous controller Kr*s/(s^2 + w0^2) is discretised with the Tustin
// transform pre-warped at the fundamental w0, giving
//     G(z) = b * (1 - z^-2) / (1 - a*z^-1 + z^-2),
//     b = Kr*sin(w0*Tsa)/(2*w0),   a = 2*cos(w0*Tsa),
// which is evaluated every sampling period as the difference equation
//     e(k) = u_ref(k) - u_meas(k)
//     y(k) = b*(e(k) - e(k-2)) + a*y(k-1) - y(k-2).
// The gain b is a run-time input so the resonant gain Kr can be changed
// while running (the loop is tuned by sweeping Kr); a depends only on f_0
// and T_sa and is a parameter.
//
// Fixed point: e is in ADC codes, b and a have COEF_FRAC fractional bits,
// and the state y is kept with YF extra fractional bits below the Q1.15
// output LSB in an ACC_W-bit register. Products are truncated (arithmetic
// shift); the state saturates at the register range instead of wrapping.
// The output is the state rounded down to Q1.15 and saturated to +-1; 'sat'
// flags that saturation. No anti-windup is applied to the state.
//
// Timing: 'start' with u_ref/u_meas valid -> products registered (cycle 1)
// -> state update (cycle 2) -> 'y' and 'valid' (cycle 3). A new 'start'
// must not come within 2 cycles of the previous one.
// The difference equation follows the pre-warped Tustin form of the
// controller; word widths, truncation and saturation are this design's.
module resonant_ctrl
  import msrtu_pkg::*;
#(
  parameter real         F0      = F0_HZ,
  parameter real         TSA     = 1.0 / (real'(FSW_HZ) * real'(N_SAMPLE)),
  parameter coef_t       TWO_COS = rc_two_cos(F0, TSA),
  parameter int unsigned YF      = 16,
  parameter int unsigned ACC_W   = 48
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t u_ref,
  input  sample_t u_meas,
  input  coef_t   gain,     // b, COEF_FRAC fractional bits
  output mod_t    y,
  output logic    valid,
  output logic    sat
);
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam int unsigned PW = COEF_W + ACC_W;
  localparam acc_t ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam acc_t ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [SAMPLE_W:0]   e0, e1, e2;   // e(k), e(k-1), e(k-2)
  acc_t                       y1, y2;       // y(k-1), y(k-2)
  logic signed [ACC_W-YF-1:0] yk;          // y(k) at output scale
  logic signed [PW-1:0]       p_fwd, p_fb;  // registered scaled products
  logic                       st1, st2;

  logic signed [SAMPLE_W+1:0] d;
  logic signed [PW-1:0]       m_fwd, m_fb;
  logic signed [PW+1:0]       sum;
  acc_t                       y_sat;
  logic signed [ACC_W-YF-1:0] y_out;

  always_comb begin
    e0    = (SAMPLE_W+1)'(u_ref) - (SAMPLE_W+1)'(u_meas);
    d     = (SAMPLE_W+2)'(e0) - (SAMPLE_W+2)'(e2);
    m_fwd = (PW'(d) * PW'(gain)) >>> (COEF_FRAC - YF);
    m_fb  = (PW'(y1) * PW'(TWO_COS)) >>> COEF_FRAC;
    sum   = (PW+2)'(p_fwd) + (PW+2)'(p_fb) - (PW+2)'(y2);
    if (sum > (PW+2)'(ACC_MAX))      y_sat = ACC_MAX;
    else if (sum < (PW+2)'(ACC_MIN)) y_sat = ACC_MIN;
    else                             y_sat = acc_t'(sum);
    y_out = yk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0; e2 <= '0; y1 <= '0; y2 <= '0; yk <= '0;
      p_fwd <= '0; p_fb <= '0;
      st1 <= 1'b0; st2 <= 1'b0;
      y <= '0; valid <= 1'b0; sat <= 1'b0;
    end else begin
      st1   <= start;
      st2   <= st1;
      valid <= st2;
      if (start) begin
        p_fwd <= m_fwd;
        p_fb  <= m_fb;
        e2    <= e1;
        e1    <= e0;
      end
      if (st1) begin
        yk <= y_sat[ACC_W-1:YF];
        y1 <= y_sat;
        y2 <= y1;
      end
      if (st2) begin
        if (y_out > (ACC_W-YF)'(32767)) begin
          y <= 16'sh7fff; sat <= 1'b1;
        end else if (y_out < -(ACC_W-YF)'(32768)) begin
          y <= 16'sh8000; sat <= 1'b1;
        end else begin
          y <= mod_t'(y_out); sat <= 1'b0;
        end
      end
    end
  end
endmodule
