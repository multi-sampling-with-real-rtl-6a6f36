// msrtu_vsc_top_tb: end-to-end test of the voltage controller at its
// default parameters (100 MHz clock, 10 kHz carrier, 8 samples per period,
// 50 Hz resonant controller), with the behavioural ADS8568 model on the
// converter pins and three-phase 50 Hz voltages on its inputs.
//
// Phases:
//   1. one fundamental period (20 ms) with a small 50 Hz voltage error: the
//      controller output grows without saturating and is compared every
//      control cycle with a floating-point model of Clarke, the resonant
//      controller and the inverse Clarke transform;
//   2. 5 ms with a large error: the controller and modulation limits act;
//   3. 1 ms with a converter slower than T_sa: sampling instants are missed
//      and the latency monitor reports overruns;
//   4. 1 ms back at the normal conversion time: normal operation resumes.
// Every cycle the leg outputs are checked against (compare value > carrier);
// every update, the compare values against the modulation waves. The update
// latency must lie between the 2 us conversion and 2.2 us, and each
// switching period must carry 8 sampling instants and 8 modulation updates.
// Each mechanism (sampling, conversion, real-time update away from the
// sampling instant, controller limit, modulation limit, missed sample,
// overrun, latency report) is counted and must occur at least once.
module msrtu_vsc_top_tb;
  import msrtu_pkg::*;
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ, HALF = PERIOD / 2;
  localparam int unsigned CW = $clog2(PERIOD + 1), IW = $clog2(N_SAMPLE);
  localparam real TSA = 1.0 / (real'(FSW_HZ) * real'(N_SAMPLE));
  localparam real TCLK = 1.0 / real'(CLK_HZ);
  localparam int unsigned CONV = 200;   // 2 us conversion

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t ref_alpha = '0, ref_beta = '0;
  coef_t rc_gain;
  logic adc_convst, adc_busy, adc_cs_n, adc_rd_n;
  logic [15:0] adc_db;
  logic [NPHASE-1:0] pwm;
  logic [CW-1:0] carrier, carrier_phase;
  logic carrier_up, period_start, sample_tick;
  logic [IW-1:0] sample_idx;
  sample_t meas_alpha, meas_beta;
  mod_t m_abc [NPHASE];
  logic [CW-1:0] pwm_cmp [NPHASE];
  logic mod_update;
  logic [31:0] update_cnt;
  logic [15:0] update_latency, update_latency_max;
  logic update_latency_valid, overrun, adc_missed, adc_active;
  logic [1:0] rc_sat;
  logic [NPHASE-1:0] mod_sat;

  logic signed [15:0] ain [NPHASE];
  int unsigned conv_cyc = CONV, n_conv;

  msrtu_vsc_top dut (.*);
  ads8568_model #(.NCH(NPHASE)) adc (
    .clk, .reset(!rst_n), .convst(adc_convst), .busy(adc_busy), .cs_n(adc_cs_n),
    .rd_n(adc_rd_n), .db(adc_db), .ain, .conv_cyc, .n_conv
  );

  initial forever #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus: three-phase voltages and the alpha-beta reference ----
  real amp_meas = 9980.0, amp_ref = 10000.0;
  longint unsigned cyc = 0;
  always @(negedge clk) begin
    real th;
    cyc++;
    th = 2.0 * PI * F0_HZ * TCLK * real'(cyc);
    for (int i = 0; i < NPHASE; i++)
      ain[i] = 16'($rtoi(amp_meas * $cos(th - 2.0 * PI * i / 3.0)));
    if (sample_tick) begin
      // the supervisory processor refreshes the reference once per T_sa
      ref_alpha = 16'($rtoi(amp_ref * $cos(th)));
      ref_beta  = 16'($rtoi(amp_ref * $sin(th)));
    end
  end

  // ---- reference model of the control path ----
  real r_e1 = 0.0, r_e2 = 0.0, r_y1a = 0.0, r_y2a = 0.0, r_e1b = 0.0, r_e2b = 0.0;
  real r_y1b = 0.0, r_y2b = 0.0, r_peak = 0.0;
  logic signed [15:0] held [NPHASE];
  logic convst_q = 1'b0;

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  // counters of mechanisms
  int n_tick = 0, n_conv_seen = 0, n_update = 0, n_update_mid = 0, n_rc_sat = 0;
  int n_mod_sat = 0, n_missed = 0, n_overrun = 0, n_lat = 0;
  int ticks_in_period = 0, updates_in_period = 0, periods_checked = 0;
  bit check_period = 1'b1, check_model = 1'b1;
  int lat_min = 1 << 30, lat_max = 0;
  logic [CW-1:0] carrier_q;

  always @(posedge clk) begin
    convst_q  <= adc_convst;
    carrier_q <= carrier;
    if (adc_convst && !convst_q && !adc_busy)
      for (int i = 0; i < NPHASE; i++) held[i] <= ain[i];
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // leg outputs: registered compare of the current compare value with
      // the carrier of the previous cycle
      if (cyc > 10)
        for (int i = 0; i < NPHASE; i++)
          check(pwm[i] == (pwm_cmp[i] > carrier_q), "leg output = compare > carrier");

      if (sample_tick) n_tick++;
      if (adc_missed) n_missed++;
      if (overrun) n_overrun++;
      if (rc_sat != 0) n_rc_sat++;
      if (mod_sat != 0 && mod_update) n_mod_sat++;

      if (update_latency_valid) begin
        n_lat++;
        if (check_period) begin
          if (int'(update_latency) < lat_min) lat_min = int'(update_latency);
          if (int'(update_latency) > lat_max) lat_max = int'(update_latency);
        end
        if (conv_cyc == CONV) begin
          check(update_latency > 16'(CONV) && update_latency <= 16'd220,
                "update latency between 2.0 and 2.2 us");
        end
      end

      if (mod_update) begin
        real ea, eb, ya, yb, exp_a, exp_b, exp_m [NPHASE], b, a, tol;
        n_update++;
        if (!sample_tick) n_update_mid++;
        // Clarke of the held samples
        exp_a = (2.0 * held[0] - held[1] - held[2]) / 3.0;
        exp_b = (real'(held[1]) - real'(held[2])) / $sqrt(3.0);
        check(near(real'(meas_alpha), exp_a, 1.01), "measured alpha");
        check(near(real'(meas_beta), exp_b, 1.01), "measured beta");
        // resonant controllers, floating point
        b  = real'(rc_gain) / (2.0 ** COEF_FRAC);
        a  = 2.0 * $cos(2.0 * PI * F0_HZ * TSA);
        ea = real'(ref_alpha) - real'(meas_alpha);
        eb = real'(ref_beta) - real'(meas_beta);
        ya = b * (ea - r_e2) + a * r_y1a - r_y2a;
        yb = b * (eb - r_e2b) + a * r_y1b - r_y2b;
        r_e2 = r_e1; r_e1 = ea; r_y2a = r_y1a; r_y1a = ya;
        r_e2b = r_e1b; r_e1b = eb; r_y2b = r_y1b; r_y1b = yb;
        if (ya > r_peak) r_peak = ya;
        if (-ya > r_peak) r_peak = -ya;
        tol = 6.0 + 0.002 * r_peak;
        // the controller outputs are limited to +-1 before the transform
        if (ya > 32767.0) ya = 32767.0;
        if (ya < -32768.0) ya = -32768.0;
        if (yb > 32767.0) yb = 32767.0;
        if (yb < -32768.0) yb = -32768.0;
        exp_m[0] = ya;
        exp_m[1] = -0.5 * ya + 0.5 * $sqrt(3.0) * yb;
        exp_m[2] = -0.5 * ya - 0.5 * $sqrt(3.0) * yb;
        for (int i = 0; i < NPHASE; i++) begin
          if (exp_m[i] > 32767.0) exp_m[i] = 32767.0;
          if (exp_m[i] < -32768.0) exp_m[i] = -32768.0;
          if (check_model) check(near(real'(m_abc[i]), exp_m[i], 2.0 * tol), "modulation wave");
        end
      end
      // compare values follow the modulation waves one cycle after update
      if (cyc > 2 && $past(mod_update))
        for (int i = 0; i < NPHASE; i++)
          check(int'(pwm_cmp[i]) == ((int'(m_abc[i]) + 32768) * int'(HALF)) / 65536,
                "compare value");

      // per switching period: 8 sampling instants and 8 updates
      if (sample_tick && sample_idx == '0) begin
        if (check_period && n_tick > 1) begin
          check(ticks_in_period == N_SAMPLE, "sampling instants per period");
          check(updates_in_period == N_SAMPLE, "updates per period");
          periods_checked++;
        end
        ticks_in_period = 0;
        updates_in_period = 0;
      end
      if (sample_tick) ticks_in_period++;
      if (mod_update) updates_in_period++;
    end
  end

  initial begin
    rc_gain = rc_gain_coef(84000.0, F0_HZ, TSA, 1.0);
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: one fundamental period, small error, no limiting expected
    repeat (20 * CLK_HZ / 1000) @(negedge clk);
    check(n_rc_sat == 0, "no limiting with a small error");
    $display("phase 1: %0d updates, peak controller output %0.0f", n_update, r_peak);
    // phase 2: large error, the limits act
    amp_meas = 9000.0;
    repeat (5 * CLK_HZ / 1000) @(negedge clk);
    // phase 3: converter slower than T_sa
    check_period = 1'b0;
    check_model  = 1'b0;
    conv_cyc = PERIOD / N_SAMPLE + 50;
    repeat (CLK_HZ / 1000) @(negedge clk);
    // phase 4: normal conversion time again
    conv_cyc = CONV;
    repeat (2 * PERIOD) @(negedge clk);
    check_period = 1'b1;
    repeat (CLK_HZ / 1000 - 2 * PERIOD) @(negedge clk);

    check(periods_checked > 200, "periods checked");
    check(lat_min > int'(CONV) && lat_max <= 220 && lat_max < 400, "latency range");
    $display("mechanisms: ticks=%0d conversions=%0d updates=%0d mid-period updates=%0d",
             n_tick, n_conv, n_update, n_update_mid);
    $display("            controller-limit cycles=%0d modulation-limit updates=%0d",
             n_rc_sat, n_mod_sat);
    $display("            missed=%0d overruns=%0d latency reports=%0d (min %0d, max %0d cycles)",
             n_missed, n_overrun, n_lat, lat_min, lat_max);
    check(n_tick > 0, "sampling instants occurred");
    check(n_conv > 0, "conversions occurred");
    check(n_update > 0, "modulation updates occurred");
    check(n_update_mid > 0, "real-time updates between sampling instants");
    check(n_rc_sat > 0, "controller limit occurred");
    check(n_mod_sat > 0, "modulation limit occurred");
    check(n_missed > 0, "missed sampling instant occurred");
    check(n_overrun > 0, "overrun occurred");
    check(n_lat > 0, "latency reported");
    check(update_latency_max >= 16'(lat_max), "maximum latency register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
