// rtu_pwm: three-phase carrier-compare PWM with real-time update.
//
// Each phase compares its modulation wave with the shared triangular
// carrier: the switch-leg signal is high while the modulation value is above
// the carrier. The key point of the method is when the compare value
// changes: it is loaded in the very cycle a new modulation wave is ready
// ('mod_valid'), wherever the carrier is, instead of waiting for the next
// sampling instant or carrier peak/valley. The PWM therefore acts on the
// newest result as soon as the controller delivers it, so the computation
// delay shrinks to the update latency itself.
//
// The Q1.15 modulation m in [-1, 1) maps onto the carrier range [0, HALF] as
//     cmp = ((m + 32768) * HALF) >> 16,
// m = -1 giving cmp = 0 (leg always low). The leg output is registered:
//     pwm = (cmp > carrier),
// evaluated with the compare value of the current cycle, so a new value
// acts on the leg output one cycle after mod_valid.
// 'update' pulses with each load (for latency monitoring), 'update_cnt'
// counts loads. Dead time and gate-driver handling are left to the power
// stage. The compare rule and its direction follow the method's PWM
// waveforms; the mapping, rounding and registering are this design's.
module rtu_pwm #(
  parameter int unsigned CLK_HZ = msrtu_pkg::CLK_HZ,
  parameter int unsigned FSW_HZ = msrtu_pkg::FSW_HZ,
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ,
  localparam int unsigned HALF   = PERIOD / 2,
  localparam int unsigned CW     = $clog2(PERIOD + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     carrier,
  input  logic              mod_valid,
  input  msrtu_pkg::mod_t   m_abc [msrtu_pkg::NPHASE],
  output logic [msrtu_pkg::NPHASE-1:0] pwm,
  output logic [CW-1:0]     cmp [msrtu_pkg::NPHASE],
  output logic              update,
  output logic [31:0]       update_cnt
);
  logic [CW-1:0] cmp_new [msrtu_pkg::NPHASE];
  logic [CW-1:0] cmp_now [msrtu_pkg::NPHASE];

  always_comb begin
    for (int i = 0; i < msrtu_pkg::NPHASE; i++) begin
      cmp_new[i] = CW'(((32'(m_abc[i]) + 32'sd32768) * 32'(HALF)) >>> 16);
      cmp_now[i] = mod_valid ? cmp_new[i] : cmp[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm        <= '0;
      update     <= 1'b0;
      update_cnt <= '0;
      for (int i = 0; i < msrtu_pkg::NPHASE; i++) cmp[i] <= CW'(HALF / 2); // m = 0
    end else begin
      update <= mod_valid;
      if (mod_valid) update_cnt <= update_cnt + 1'b1;
      for (int i = 0; i < msrtu_pkg::NPHASE; i++) begin
        cmp[i] <= cmp_now[i];
        pwm[i] <= (cmp_now[i] > carrier);
      end
    end
  end
endmodule
