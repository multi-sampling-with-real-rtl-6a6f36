// carrier_gen_tb: self-checking test of the triangular carrier and the
// multi-sampling instants at the default 100 MHz / 10 kHz / 8 samples.
//
// A reference phase counter kept by the testbench predicts the carrier
// value, slope, valley flag and sampling ticks every cycle. The test also
// counts ticks per switching period (must be N_SAMPLE), checks the spacing
// of ticks (T_sa = PERIOD/N_SAMPLE cycles) and that the carrier reaches
// exactly 0 and HALF.
module carrier_gen_tb;
  localparam int unsigned CLK_HZ = 100_000_000, FSW_HZ = 10_000, N = 8;
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ, HALF = PERIOD / 2, TSA = PERIOD / N;
  localparam int unsigned CW = $clog2(PERIOD + 1), IW = $clog2(N);
  localparam int unsigned NPER = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] carrier, phase;
  logic carrier_up, period_start, sample_tick;
  logic [IW-1:0] sample_idx;
  int checks = 0, failures = 0;

  carrier_gen dut (.*);

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_phase, exp_car, ticks_in_period, last_tick, cyc, cmax, cmin;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ref_phase = 0; ticks_in_period = 0; last_tick = 0; cmax = 0; cmin = HALF;
    for (cyc = 0; cyc < NPER * PERIOD; cyc++) begin
      if (cyc > 0) @(negedge clk);
      exp_car = (ref_phase < HALF) ? ref_phase : PERIOD - ref_phase;
      check(carrier == CW'(exp_car), "carrier value");
      check(phase == CW'(ref_phase), "phase");
      check(carrier_up == (ref_phase < HALF), "slope");
      check(period_start == (ref_phase == 0), "valley flag");
      check(sample_tick == (ref_phase % TSA == 0), "sampling instant");
      if (sample_tick) begin
        check(sample_idx == IW'(ref_phase / TSA), "sample index");
        if (cyc > 0) check(cyc - last_tick == TSA, "sampling period T_sa");
        last_tick = cyc;
        ticks_in_period++;
      end
      if (carrier > CW'(cmax)) cmax = carrier;
      if (carrier < CW'(cmin)) cmin = carrier;
      ref_phase = (ref_phase + 1) % PERIOD;
      if (ref_phase == 0) begin
        check(ticks_in_period == N, "N samples per switching period");
        ticks_in_period = 0;
      end
    end
    check(cmax == HALF, "carrier peak");
    check(cmin == 0, "carrier valley");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
