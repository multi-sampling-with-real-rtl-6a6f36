// msrtu_vsc_top: FPGA voltage controller of a three-phase voltage-source
// converter with multi-sampling and real-time-update PWM.
//
// The whole voltage loop runs in the FPGA so the time from sampling to the
// new modulation wave (the update latency) is the ADC conversion plus a few
// tens of clock cycles:
//
//   carrier_gen --sample_tick--> ads8568_if --u_abc--> clarke --u_ab-->
//   resonant_ctrl (alpha, beta; error = reference - measurement) -->
//   inv_clarke --m_abc--> rtu_pwm --> pwm[2:0] to the half-bridge legs
//
// N_SAMPLE times per switching period (8 x 10 kHz by default) the ADC is
// started; as soon as the three voltages are read, the controller computes
// the new modulation waves and rtu_pwm loads them into its comparators in
// the same cycle they appear, wherever the carrier is. latency_mon measures
// the time from each sampling instant to that update.
//
// Interface: the alpha-beta voltage reference and the controller gain b
// (derived from the resonant gain Kr) come from the supervisory processor
// and are sampled when each control cycle starts. The ADS8568 pins are
// brought out directly. The measured alpha-beta voltages and the latency
// and status signals are outputs for monitoring.
//
// Timing at the defaults (100 MHz): sampling instant -> CONVST (3 cycles)
// -> ADC conversion -> 2 cycles BUSY synchroniser -> 9 read cycles ->
// Clarke 1 -> resonant 3 -> inverse Clarke 1 -> compare load. Processing
// after the conversion takes 15 cycles (0.15 us), so with the 2 us
// converter the update latency is about 2.2 us. The structure follows the
// FPGA-side voltage control of the method; the clock, formats and the
// transform and interface details are this design's choices.
module msrtu_vsc_top
  import msrtu_pkg::*;
#(
  parameter int unsigned CLK_HZ_P   = CLK_HZ,
  parameter int unsigned FSW_HZ_P   = FSW_HZ,
  parameter int unsigned N_SAMPLE_P = N_SAMPLE,
  localparam int unsigned PERIOD    = CLK_HZ_P / FSW_HZ_P,
  localparam int unsigned CW        = $clog2(PERIOD + 1),
  localparam int unsigned IW        = (N_SAMPLE_P > 1) ? $clog2(N_SAMPLE_P) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the supervisory processor
  input  sample_t             ref_alpha,
  input  sample_t             ref_beta,
  input  coef_t               rc_gain,
  // ADS8568 parallel interface
  output logic                adc_convst,
  input  logic                adc_busy,
  output logic                adc_cs_n,
  output logic                adc_rd_n,
  input  logic [SAMPLE_W-1:0] adc_db,
  // half-bridge leg signals
  output logic [NPHASE-1:0]   pwm,
  // monitoring
  output logic [CW-1:0]       carrier,
  output logic [CW-1:0]       carrier_phase,
  output logic                carrier_up,
  output logic                period_start,
  output logic                sample_tick,
  output logic [IW-1:0]       sample_idx,
  output sample_t             meas_alpha,
  output sample_t             meas_beta,
  output mod_t                m_abc [NPHASE],
  output logic [CW-1:0]       pwm_cmp [NPHASE],
  output logic                mod_update,
  output logic [31:0]         update_cnt,
  output logic [15:0]         update_latency,
  output logic                update_latency_valid,
  output logic [15:0]         update_latency_max,
  output logic                overrun,
  output logic                adc_missed,
  output logic                adc_active,
  output logic [1:0]          rc_sat,
  output logic [NPHASE-1:0]   mod_sat
);
  localparam real TSA = 1.0 / (real'(FSW_HZ_P) * real'(N_SAMPLE_P));


  sample_t       u_abc [NPHASE];
  logic          adc_valid;
  logic          ab_valid;
  mod_t          ue_alpha, ue_beta;
  logic          rc_valid_a, rc_valid_b;
  logic          m_valid;
  logic          pwm_loaded;

  carrier_gen #(.CLK_HZ(CLK_HZ_P), .FSW_HZ(FSW_HZ_P), .N_SAMPLE(N_SAMPLE_P)) u_carrier (
    .clk, .rst_n, .carrier, .phase(carrier_phase), .carrier_up, .period_start,
    .sample_tick, .sample_idx
  );

  ads8568_if #(.NCH(NPHASE)) u_adc (
    .clk, .rst_n, .start(sample_tick),
    .convst(adc_convst), .busy(adc_busy), .cs_n(adc_cs_n), .rd_n(adc_rd_n), .db(adc_db),
    .samples(u_abc), .valid(adc_valid), .active(adc_active), .missed(adc_missed)
  );

  clarke u_clarke (
    .clk, .rst_n, .in_valid(adc_valid), .u_abc,
    .out_valid(ab_valid), .u_alpha(meas_alpha), .u_beta(meas_beta)
  );

  resonant_ctrl #(.TSA(TSA)) u_rc_alpha (
    .clk, .rst_n, .start(ab_valid), .u_ref(ref_alpha), .u_meas(meas_alpha),
    .gain(rc_gain), .y(ue_alpha), .valid(rc_valid_a), .sat(rc_sat[0])
  );

  resonant_ctrl #(.TSA(TSA)) u_rc_beta (
    .clk, .rst_n, .start(ab_valid), .u_ref(ref_beta), .u_meas(meas_beta),
    .gain(rc_gain), .y(ue_beta), .valid(rc_valid_b), .sat(rc_sat[1])
  );

  inv_clarke u_inv_clarke (
    .clk, .rst_n, .in_valid(rc_valid_a), .u_alpha(ue_alpha), .u_beta(ue_beta),
    .out_valid(m_valid), .m_abc, .sat(mod_sat)
  );

  rtu_pwm #(.CLK_HZ(CLK_HZ_P), .FSW_HZ(FSW_HZ_P)) u_pwm (
    .clk, .rst_n, .carrier, .mod_valid(m_valid), .m_abc, .pwm, .cmp(pwm_cmp),
    .update(pwm_loaded), .update_cnt
  );

  // The compare values are loaded in the cycle m_valid is high.
  assign mod_update = m_valid;

  latency_mon #(.LW(16)) u_latency (
    .clk, .rst_n, .sample_tick, .update(m_valid),
    .latency(update_latency), .latency_valid(update_latency_valid),
    .latency_max(update_latency_max), .overrun
  );

  // Both axis controllers run in lockstep, and every modulation update is
  // loaded into the comparators.
  logic m_valid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid_q <= 1'b0;
    end else begin
      m_valid_q <= m_valid;
      a_lockstep: assert (rc_valid_a == rc_valid_b) else $error("axis controllers out of step");
      a_loaded:   assert (!m_valid_q || pwm_loaded) else $error("modulation update not loaded");
    end
  end

endmodule
