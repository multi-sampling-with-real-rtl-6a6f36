// latency_mon: measures the modulation-wave update latency T_update.
//
// The delay of the whole control loop grows with the time from a sampling
// instant to the moment the new modulation wave reaches the PWM comparators
// (T_update = lambda*T_sa). This monitor counts that time in clock cycles so
// it can be read out, the way the update latency of the controller is
// monitored on the target platform.
//
// A sample_tick starts the count; the next update strobe stops it and
// publishes the count on 'latency' with 'latency_valid' high for one cycle.
// 'latency_max' keeps the largest value seen since reset. If a new sampling
// instant arrives before the update (the control cycle did not finish within
// T_sa) 'overrun' pulses and the count restarts. The count saturates at its
// maximum. All outputs are registered; counting starts in the cycle after
// the tick, so a strobe k cycles after the tick reports k.
module latency_mon #(
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_tick,
  input  logic          update,
  output logic [LW-1:0] latency,
  output logic          latency_valid,
  output logic [LW-1:0] latency_max,
  output logic          overrun
);
  logic          running;
  logic [LW-1:0] cnt;
  logic [LW-1:0] cnt_inc;

  assign cnt_inc = (cnt == '1) ? cnt : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running       <= 1'b0;
      cnt           <= '0;
      latency       <= '0;
      latency_valid <= 1'b0;
      latency_max   <= '0;
      overrun       <= 1'b0;
    end else begin
      latency_valid <= 1'b0;
      overrun       <= 1'b0;
      if (sample_tick) begin
        overrun <= running;
        running <= 1'b1;
        cnt     <= '0;
      end else if (running) begin
        if (update) begin
          running       <= 1'b0;
          latency       <= cnt_inc;
          latency_valid <= 1'b1;
          if (cnt_inc > latency_max) latency_max <= cnt_inc;
        end else begin
          cnt <= cnt_inc;
        end
      end
    end
  end
endmodule
