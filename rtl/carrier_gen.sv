// carrier_gen: triangular PWM carrier and multi-sampling instants.
//
// A phase counter runs from 0 to PERIOD-1 with PERIOD = CLK_HZ/FSW_HZ clock
// cycles (one switching period T_sw). The carrier is the symmetric triangle
// derived from it: it rises from 0 (valley, modulation -1) to HALF = PERIOD/2
// (peak, modulation +1) and falls back. A sampling instant is flagged on
// N_SAMPLE evenly spaced phases per period, so T_sa = T_sw/N_SAMPLE; the first
// one of each period coincides with the carrier valley, as in the timing
// diagrams of the method (sampling at k*T_sa with the valley at k*T_sa).
//
// Interface and timing: all outputs are registered or decoded from registers.
// After reset the phase is 0, so the first sample_tick is the cycle after
// reset is released. sample_tick is high for one cycle; sample_idx gives the
// position 0..N_SAMPLE-1 of that instant in the period; carrier_up is high
// on the rising slope.
//
// The switching frequency and sampling rate are the converter's (10 kHz, 8
// samples per period); the clock rate, counter style and valley alignment of
// the phase origin are this design's choices.
module carrier_gen #(
  parameter int unsigned CLK_HZ   = msrtu_pkg::CLK_HZ,
  parameter int unsigned FSW_HZ   = msrtu_pkg::FSW_HZ,
  parameter int unsigned N_SAMPLE = msrtu_pkg::N_SAMPLE,
  localparam int unsigned PERIOD  = CLK_HZ / FSW_HZ,
  localparam int unsigned HALF    = PERIOD / 2,
  localparam int unsigned CW      = $clog2(PERIOD + 1),
  localparam int unsigned IW      = (N_SAMPLE > 1) ? $clog2(N_SAMPLE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] carrier,      // 0 (valley) .. HALF (peak)
  output logic [CW-1:0] phase,        // 0 .. PERIOD-1
  output logic          carrier_up,   // rising slope
  output logic          period_start, // phase == 0 (carrier valley)
  output logic          sample_tick,  // sampling instant
  output logic [IW-1:0] sample_idx    // index of the instant within T_sw
);
  localparam int unsigned TSA = PERIOD / N_SAMPLE;
  localparam int unsigned SW  = $clog2(TSA + 1);

  logic [SW-1:0] sub;   // cycles since the last sampling instant

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      sub        <= '0;
      sample_idx <= '0;
    end else begin
      // The sampling instant with index 0 is always the carrier valley.
      if (sample_tick && sample_idx == '0)
        a_valley: assert (period_start) else $error("carrier_gen: sample 0 off the valley");

      if (phase == CW'(PERIOD - 1)) phase <= '0;
      else                          phase <= phase + 1'b1;

      if (sub == SW'(TSA - 1)) begin
        sub <= '0;
        if (sample_idx == IW'(N_SAMPLE - 1)) sample_idx <= '0;
        else                                 sample_idx <= sample_idx + 1'b1;
      end else begin
        sub <= sub + 1'b1;
      end
    end
  end

  always_comb begin
    carrier_up   = (phase < CW'(HALF));
    carrier      = carrier_up ? phase : CW'(PERIOD) - phase;
    period_start = (phase == '0);
    sample_tick  = (sub == '0);
  end

  // The sampling grid must divide the switching period exactly.
  initial begin
    assert (PERIOD % 2 == 0)        else $error("carrier_gen: PERIOD must be even");
    assert (PERIOD % N_SAMPLE == 0) else $error("carrier_gen: N_SAMPLE must divide PERIOD");
  end



endmodule
