// msrtu_vsc_nsweep_tb: runs the voltage controller at the other sampling
// rates of the method, N = 4 (the four-sampling example) and N = 2, side
// by side, each with its own behavioural ADS8568 model, for one 50 Hz
// fundamental period.
//
// For each instance the test checks N sampling instants and N modulation
// updates per switching period, an update latency between the 2 us
// conversion and 2.2 us, the leg outputs against (compare value > carrier),
// and the alpha-axis modulation wave against a floating-point resonant
// controller whose coefficients use T_sa = T_sw/N.
module msrtu_vsc_nsweep_tb;
  import msrtu_pkg::*;
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ;
  localparam int unsigned CW = $clog2(PERIOD + 1);
  localparam int unsigned NCFG = 2;
  localparam int unsigned NS [NCFG] = '{4, 2};
  localparam real TCLK = 1.0 / real'(CLK_HZ);

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
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cyc++;

  int periods [NCFG];
  int updates [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned IW = $clog2(N);
    localparam real TSA = 1.0 / (real'(FSW_HZ) * real'(N));

    sample_t ref_alpha = '0, ref_beta = '0;
    coef_t rc_gain;
    logic adc_convst, adc_busy, adc_cs_n, adc_rd_n;
    logic [15:0] adc_db;
    logic [NPHASE-1:0] pwm;
    logic [CW-1:0] carrier, carrier_q, carrier_phase;
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

    assign rc_gain = rc_gain_coef(84000.0, F0_HZ, TSA, 1.0);

    msrtu_vsc_top #(.N_SAMPLE_P(N)) dut (
      .clk, .rst_n, .ref_alpha, .ref_beta, .rc_gain, .adc_convst, .adc_busy, .adc_cs_n,
      .adc_rd_n, .adc_db, .pwm, .carrier, .carrier_phase, .carrier_up, .period_start, .sample_tick,
      .sample_idx, .meas_alpha, .meas_beta, .m_abc, .pwm_cmp, .mod_update, .update_cnt,
      .update_latency, .update_latency_valid, .update_latency_max, .overrun, .adc_missed,
      .adc_active, .rc_sat, .mod_sat
    );
    ads8568_model #(.NCH(NPHASE)) adc (
      .clk, .reset(!rst_n), .convst(adc_convst), .busy(adc_busy), .cs_n(adc_cs_n),
      .rd_n(adc_rd_n), .db(adc_db), .ain, .conv_cyc, .n_conv
    );

    real r_e1 = 0.0, r_e2 = 0.0, r_y1 = 0.0, r_y2 = 0.0, r_peak = 0.0;
    int ticks_in_period = 0, upd_in_period = 0;

    always @(posedge clk) carrier_q <= carrier;

    always @(negedge clk) begin
      real th, e, y, tol;
      th = 2.0 * PI * F0_HZ * TCLK * real'(cyc);
      for (int i = 0; i < NPHASE; i++)
        ain[i] = 16'($rtoi(9990.0 * $cos(th - 2.0 * PI * i / 3.0)));
      if (sample_tick) begin
        ref_alpha = 16'($rtoi(10000.0 * $cos(th)));
        ref_beta  = 16'($rtoi(10000.0 * $sin(th)));
      end
      if (rst_n && cyc > 10) begin
        for (int i = 0; i < NPHASE; i++)
          check(pwm[i] == (pwm_cmp[i] > carrier_q), "leg output");
        if (update_latency_valid)
          check(update_latency > 16'd200 && update_latency <= 16'd220, "update latency");
        if (mod_update) begin
          updates[g]++;
          e = real'(ref_alpha) - real'(meas_alpha);
          y = real'(rc_gain) / (2.0 ** COEF_FRAC) * (e - r_e2)
              + 2.0 * $cos(2.0 * PI * F0_HZ * TSA) * r_y1 - r_y2;
          r_e2 = r_e1; r_e1 = e; r_y2 = r_y1; r_y1 = y;
          if (y > r_peak) r_peak = y;
          if (-y > r_peak) r_peak = -y;
          tol = 6.0 + 0.002 * r_peak;
          check((real'(m_abc[0]) - y < tol) && (y - real'(m_abc[0]) < tol), "alpha modulation");
        end
        if (sample_tick && sample_idx == '0) begin
          if (periods[g] > 0) begin
            check(ticks_in_period == N, "sampling instants per period");
            check(upd_in_period == N, "updates per period");
          end
          periods[g]++;
          ticks_in_period = 0;
          upd_in_period = 0;
        end
        if (sample_tick) ticks_in_period++;
        if (mod_update) upd_in_period++;
      end
    end
  end

  initial begin
    for (int g = 0; g < NCFG; g++) begin periods[g] = 0; updates[g] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20 * CLK_HZ / 1000) @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      $display("N=%0d: %0d periods, %0d updates", NS[g], periods[g], updates[g]);
      check(periods[g] >= 199, "periods run");
      check(updates[g] >= 199 * int'(NS[g]), "updates run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
