// latency_mon_tb: self-checking test of the update-latency monitor.
//
// Sampling ticks are followed by update strobes after random delays; the
// reported latency must equal the delay in cycles, the maximum must track
// the largest delay, and a tick with no update before the next tick must
// raise 'overrun'. Updates without a preceding tick must be ignored.
module latency_mon_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_tick = 1'b0, update = 1'b0;
  logic [15:0] latency, latency_max;
  logic latency_valid, overrun;
  int checks = 0, failures = 0;
  int n_valid = 0, n_overrun = 0;

  latency_mon dut (.*);

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (latency_valid) n_valid++;
    if (overrun) n_overrun++;
  end

  initial begin
    int unsigned d, dmax;
    dmax = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // stray update with no tick: ignored
    @(negedge clk); update = 1'b1; @(negedge clk); update = 1'b0;
    @(negedge clk); check(!latency_valid, "update without tick ignored");
    for (int k = 0; k < 50; k++) begin
      d = 1 + ($urandom % 300);
      @(negedge clk); sample_tick = 1'b1;
      @(negedge clk); sample_tick = 1'b0;
      repeat (d - 1) @(negedge clk);
      update = 1'b1;
      @(negedge clk); update = 1'b0;
      check(latency_valid, "latency published");
      check(latency == 16'(d), "latency equals delay");
      if (d > dmax) dmax = d;
      check(latency_max == 16'(dmax), "maximum latency");
      repeat (5) @(negedge clk);
    end
    // overrun: two ticks without an update in between
    @(negedge clk); sample_tick = 1'b1; @(negedge clk); sample_tick = 1'b0;
    repeat (10) @(negedge clk);
    sample_tick = 1'b1; @(negedge clk); sample_tick = 1'b0;
    check(overrun, "overrun flagged");
    repeat (6) @(negedge clk);
    update = 1'b1; @(negedge clk); update = 1'b0;
    check(latency == 16'd7, "count restarts at the second tick");
    @(negedge clk);
    check(n_valid == 51, "one latency per completed cycle");
    check(n_overrun == 1, "one overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
