// msrtu_vsc_closedloop_tb: closes the voltage loop around a switched model
// of the three-phase converter with L filter and resistive load, and checks
// the stability boundary set by the loop delay.
//
// Plant (per phase, star-connected load, floating neutral):
//     L di/dt = v_leg - v_N - R i,  u_o = R i,  v_leg = +-Udc/2 from pwm,
//     v_N = mean of the three leg voltages,
// with L = 6 mH, R = 32 Ohm, Udc = 600 V, integrated with the clock step.
// The voltage sensor is modelled as a 4 us delay in front of the converter
// model. ADC codes are scaled so that full scale equals Udc/2, which makes
// the gain coefficient scale 1.0.
//
// The total loop delay is 0.5*T_sw/N + T_update + T_sensor
// = 6.25 + 2.18 + 4 = 12.43 us. For the resonant controller on this plant
// the critical resonant gain follows from
//     Kr = 2 pi f_c sqrt(1 + (2 pi f_c L / R)^2),
//     T_d = (pi/2 - atan(2 pi f_c L / R)) / (2 pi f_c),
// giving f_c = 3.26 kHz and Kr = 81300. Eight loops with Kr from 60000
// to 100000 run side by side for 20 ms. A loop counts as stable if, in the
// last 5 ms, it tracks the 220 V (line-to-line RMS) reference within 25 %
// and stays out of the limits. Loops more than 10 % below the critical gain
// must be stable; loops more than 10 % above must be unstable, oscillating
// at 2.5-5 kHz (sign changes of the alpha error, 2-12 ms). The boundary
// between the largest stable and the smallest unstable gain must lie
// within 20 % of the prediction.
module msrtu_vsc_closedloop_tb;
  import msrtu_pkg::*;
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ;
  localparam int unsigned CW = $clog2(PERIOD + 1), IW = $clog2(N_SAMPLE);
  localparam real TSA = 1.0 / (real'(FSW_HZ) * real'(N_SAMPLE));
  localparam real TCLK = 1.0 / real'(CLK_HZ);
  localparam real L_S = 6.0e-3, R_LOAD = 32.0, UDC = 600.0;
  localparam real VPEAK = 220.0 * $sqrt(2.0) / $sqrt(3.0);   // phase peak
  localparam real CODE_PER_V = 32768.0 / (UDC / 2.0);
  localparam int unsigned SENSOR_DLY = 400;                  // 4 us
  localparam real KR_CRIT = 81300.0;                         // see above
  localparam int unsigned NCFG = 8;
  localparam real KR [NCFG] = '{60000.0, 70000.0, 76000.0, 80000.0, 82000.0, 88000.0, 94000.0, 100000.0};

  logic clk = 1'b0, rst_n = 1'b0;
  longint unsigned cyc = 0;
  int checks = 0, failures = 0;

  initial forever #5 clk = ~clk;

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

  always @(negedge clk) cyc++;

  // statistics per loop, written by the generate blocks
  real err_peak_late [NCFG];   // largest voltage error, 15-20 ms
  real err_peak_mid [NCFG];    // largest voltage error, 10-15 ms
  int  sat_late [NCFG];        // cycles in a limit, 15-20 ms
  int  sat_any [NCFG];         // cycles in a limit, whole run
  int  zc [NCFG];              // sign changes of the alpha error, 2-12 ms

  for (genvar g = 0; g < NCFG; g++) begin : g_loop
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
    int unsigned conv_cyc = 200, n_conv;

    assign rc_gain = rc_gain_coef(KR[g], F0_HZ, TSA, 1.0);

    msrtu_vsc_top dut (
      .clk, .rst_n, .ref_alpha, .ref_beta, .rc_gain, .adc_convst, .adc_busy, .adc_cs_n,
      .adc_rd_n, .adc_db, .pwm, .carrier, .carrier_phase, .carrier_up, .period_start,
      .sample_tick, .sample_idx, .meas_alpha, .meas_beta, .m_abc, .pwm_cmp, .mod_update,
      .update_cnt, .update_latency, .update_latency_valid, .update_latency_max, .overrun,
      .adc_missed, .adc_active, .rc_sat, .mod_sat
    );
    ads8568_model #(.NCH(NPHASE)) adc (
      .clk, .reset(!rst_n), .convst(adc_convst), .busy(adc_busy), .cs_n(adc_cs_n),
      .rd_n(adc_rd_n), .db(adc_db), .ain, .conv_cyc, .n_conv
    );

    // plant state
    real i_l [NPHASE];
    real dly [NPHASE][SENSOR_DLY];
    int  wp = 0;
    real ea_q = 0.0;

    initial begin
      for (int p = 0; p < NPHASE; p++) begin
        i_l[p] = 0.0;
        for (int k = 0; k < SENSOR_DLY; k++) dly[p][k] = 0.0;
      end
    end

    always @(negedge clk) begin
      real v [NPHASE], vn, th, u, ea, eb, emag, code;
      th = 2.0 * PI * F0_HZ * TCLK * real'(cyc);
      vn = 0.0;
      for (int p = 0; p < NPHASE; p++) begin
        v[p] = (rst_n && pwm[p]) ? UDC / 2.0 : -UDC / 2.0;
        vn += v[p] / 3.0;
      end
      for (int p = 0; p < NPHASE; p++) begin
        i_l[p] += (v[p] - vn - R_LOAD * i_l[p]) / L_S * TCLK;
        u = R_LOAD * i_l[p];
        code = dly[p][wp] * CODE_PER_V;       // sensor output, 4 us old
        if (code > 32767.0) code = 32767.0;
        if (code < -32768.0) code = -32768.0;
        ain[p] = 16'($rtoi(code));
        dly[p][wp] = u;
      end
      wp = (wp + 1) % SENSOR_DLY;
      if (sample_tick) begin
        ref_alpha = 16'($rtoi(VPEAK * CODE_PER_V * $cos(th)));
        ref_beta  = 16'($rtoi(VPEAK * CODE_PER_V * $sin(th)));
      end
      if (mod_update) begin
        ea = real'(ref_alpha) - real'(meas_alpha);
        eb = real'(ref_beta) - real'(meas_beta);
        if (cyc > 2 * CLK_HZ / 1000 && cyc <= 12 * CLK_HZ / 1000 && ((ea < 0.0) != (ea_q < 0.0)))
          zc[g]++;
        ea_q = ea;
        emag = $sqrt(ea * ea + eb * eb) / CODE_PER_V;   // volts
        if (cyc > 10 * CLK_HZ / 1000 && cyc <= 15 * CLK_HZ / 1000 && emag > err_peak_mid[g])
          err_peak_mid[g] = emag;
        if (cyc > 15 * CLK_HZ / 1000 && emag > err_peak_late[g]) err_peak_late[g] = emag;
      end
      if (rst_n && (rc_sat != 0 || mod_sat != 0)) begin
        sat_any[g]++;
        if (cyc > 15 * CLK_HZ / 1000) sat_late[g]++;
      end
    end
  end

  initial begin
    bit stable [NCFG];
    real last_stable, first_unstable, f_osc;
    for (int g = 0; g < NCFG; g++) begin
      err_peak_late[g] = 0.0; err_peak_mid[g] = 0.0; sat_late[g] = 0; sat_any[g] = 0;
      zc[g] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20 * CLK_HZ / 1000) @(negedge clk);

    last_stable = 0.0; first_unstable = 1.0e9;
    for (int g = 0; g < NCFG; g++) begin
      f_osc = real'(zc[g]) / 2.0 / 10.0e-3;
      stable[g] = (sat_late[g] == 0) && (err_peak_late[g] < 0.25 * VPEAK);
      $display("Kr=%0.0f: %s, peak error %0.1f V (10-15 ms) %0.1f V (15-20 ms), cycles in a limit %0d, error frequency %0.2f kHz",
               KR[g], stable[g] ? "stable" : "unstable", err_peak_mid[g], err_peak_late[g],
               sat_any[g], f_osc / 1000.0);
      if (stable[g] && KR[g] > last_stable) last_stable = KR[g];
      if (!stable[g] && KR[g] < first_unstable) first_unstable = KR[g];
      if (KR[g] < 0.9 * KR_CRIT) check(stable[g], "stable below the critical gain");
      if (KR[g] > 1.1 * KR_CRIT) begin
        check(!stable[g], "unstable above the critical gain");
        check(f_osc > 2500.0 && f_osc < 5000.0, "oscillation near the phase-crossover frequency");
      end
    end
    $display("stability boundary between Kr = %0.0f and %0.0f (predicted %0.0f)",
             last_stable, first_unstable, KR_CRIT);
    check(last_stable < first_unstable, "single stability boundary");
    check(last_stable > 0.8 * KR_CRIT && first_unstable < 1.2 * KR_CRIT,
          "boundary near the predicted critical gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
