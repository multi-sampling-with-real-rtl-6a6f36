// resonant_ctrl_tb: self-checking test of the discretised resonant
// controller.
//
// Three independent references are used:
//  * a bit-exact model of the difference equation in 128-bit arithmetic
//    (same truncation and saturation rules), compared every step;
//  * the same difference equation in floating point, compared within 4
//    output LSB plus 0.1 % of the largest output so far while the output is in range;
//  * the behaviour of the resonator itself: a 50 Hz error must make the
//    output grow until it saturates (infinite gain at f_0), while a DC
//    error gives a bounded output.
// The cycle count from 'start' to 'valid' must be 3.
module resonant_ctrl_tb;
  import msrtu_pkg::*;
  localparam real TSA = 1.0 / (real'(FSW_HZ) * real'(N_SAMPLE));
  localparam int unsigned YF = 16, ACC_W = 48;
  localparam coef_t A = rc_two_cos(F0_HZ, TSA);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  sample_t u_ref = '0, u_meas = '0;
  coef_t gain;
  mod_t y;
  logic valid, sat;
  int checks = 0, failures = 0;

  resonant_ctrl dut (.*);

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-exact reference state
  logic signed [127:0] m_e1, m_e2, m_y1, m_y2;
  // floating-point reference state
  real r_e1, r_e2, r_y1, r_y2;
  real r_peak;   // largest |y| so far, scales the tolerance

  task automatic model_reset();
    m_e1 = 0; m_e2 = 0; m_y1 = 0; m_y2 = 0;
    r_e1 = 0.0; r_e2 = 0.0; r_y1 = 0.0; r_y2 = 0.0; r_peak = 0.0;
  endtask

  // one controller step; returns the expected output and saturation flag
  task automatic step(input int r, input int m, output int exp_y, output bit exp_sat,
                      output real real_y);
    logic signed [127:0] e0, pf, pb, s, lim, yo;
    real re0, rb, ra;
    e0 = 128'(r) - 128'(m);
    pf = ((e0 - m_e2) * 128'(gain)) >>> (COEF_FRAC - YF);
    pb = (m_y1 * 128'(A)) >>> COEF_FRAC;
    s  = pf + pb - m_y2;
    lim = 128'sd1 <<< (ACC_W - 1);
    if (s > lim - 1) s = lim - 1;
    if (s < -lim) s = -lim;
    m_y2 = m_y1; m_y1 = s; m_e2 = m_e1; m_e1 = e0;
    yo = s >>> YF;
    exp_sat = (yo > 32767) || (yo < -32768);
    exp_y = (yo > 32767) ? 32767 : (yo < -32768) ? -32768 : int'(yo);
    // floating point, in output LSB
    re0 = real'(r) - real'(m);
    rb  = real'(gain) / (2.0 ** COEF_FRAC);
    ra  = 2.0 * $cos(2.0 * PI * F0_HZ * TSA);
    real_y = rb * (re0 - r_e2) + ra * r_y1 - r_y2;
    r_y2 = r_y1; r_y1 = real_y; r_e2 = r_e1; r_e1 = re0;
  endtask

  int n_sat = 0;

  task automatic run(input int r, input int m, output int out);
    int ey, lat;
    bit es, ok_r;
    real ry, dr, tol;
    step(r, m, ey, es, ry);
    @(negedge clk);
    u_ref = 16'(r); u_meas = 16'(m); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!valid && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 3, "start to valid latency 3 cycles");
    check(int'(y) == ey, "bit-exact output");
    check(sat == es, "saturation flag");
    dr = real'(int'(y)) - ry;
    // 4 LSB plus 0.1 % for the rounding of the coefficients to 29 bits
    if (ry > r_peak) r_peak = ry;
    if (-ry > r_peak) r_peak = -ry;
    tol  = 4.0 + 0.001 * r_peak;
    ok_r = (dr < tol) && (dr > -tol);
    if (!es) check(ok_r, "floating-point agreement");
    if (!es && !ok_r && failures < 5) $display("  y=%0d real=%f", y, ry);
    if (sat) n_sat++;
    out = int'(y);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int o, peak_early, peak_late, peak_dc;
    gain = rc_gain_coef(84000.0, F0_HZ, TSA, 1.0);
    model_reset();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 50 Hz error of amplitude 20 codes for one fundamental period: the
    // output envelope grows linearly (about Kr/2 * 20 codes per second)
    peak_early = 0; peak_late = 0;
    for (int k = 0; k < 1600; k++) begin
      run($rtoi(20.0 * $sin(2.0 * PI * F0_HZ * TSA * k)), 0, o);
      if (k < 400 && (o > peak_early || -o > peak_early)) peak_early = (o < 0) ? -o : o;
      if (k >= 1200 && (o > peak_late || -o > peak_late)) peak_late = (o < 0) ? -o : o;
    end
    check(peak_late > 2 * peak_early, "output grows under resonant excitation");
    check(peak_late > 10000 && peak_late < 25000, "growth rate near Kr/2");
    // a larger 50 Hz error drives the output into its +-1 limit
    for (int k = 0; k < 800; k++)
      run($rtoi(400.0 * $sin(2.0 * PI * F0_HZ * TSA * k)), 0, o);
    check(n_sat > 0, "output saturates at +-1");

    // restart and apply a DC error: bounded response
    rst_n = 1'b0; model_reset(); @(negedge clk); rst_n = 1'b1;
    peak_dc = 0;
    for (int k = 0; k < 1600; k++) begin
      run(50, 0, o);
      if (o > peak_dc || -o > peak_dc) peak_dc = (o < 0) ? -o : o;
    end
    // continuous-time peak Kr/w0 * 50 = 13369 codes
    check(peak_dc > 12000 && peak_dc < 15000, "DC error gives a bounded output");

    // random references, measurements and gains: bit-exact agreement
    rst_n = 1'b0; model_reset(); @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      if (k % 100 == 0) gain = rc_gain_coef(40000.0 + 1000.0 * ($urandom % 50), F0_HZ, TSA, 1.0);
      run($signed(16'($urandom)) / 16, $signed(16'($urandom)) / 16, o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
