// clarke_tb: self-checking test of the abc to alpha-beta transform.
//
// Random and balanced sinusoidal three-phase codes are transformed; the
// results are compared with the transform evaluated in floating point and
// rounded (tolerance 1 LSB). Over-range inputs must saturate. out_valid
// must follow in_valid by one cycle.
module clarke_tb;
  import msrtu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  sample_t u_abc [NPHASE];
  sample_t u_alpha, u_beta;
  int checks = 0, failures = 0;

  clarke dut (.*);

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int clip(input real x);
    int r;
    r = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b, input int c);
    int ea, eb;
    u_abc[0] = 16'(a); u_abc[1] = 16'(b); u_abc[2] = 16'(c);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    ea = clip((2.0 * a - b - c) / 3.0);
    eb = clip((real'(b) - real'(c)) / $sqrt(3.0));
    check(out_valid, "one-cycle latency");
    check(int'(u_alpha) - ea <= 1 && ea - int'(u_alpha) <= 1, "alpha");
    check(int'(u_beta) - eb <= 1 && eb - int'(u_beta) <= 1, "beta");
    @(negedge clk);
    check(!out_valid, "single valid pulse");
  endtask

  initial begin
    real th;
    for (int i = 0; i < NPHASE; i++) u_abc[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++)
      apply($signed(16'($urandom)), $signed(16'($urandom)), $signed(16'($urandom)));
    for (int k = 0; k < 100; k++) begin
      th = 2.0 * PI * k / 100.0;
      apply($rtoi(30000.0 * $cos(th)), $rtoi(30000.0 * $cos(th - 2.0 * PI / 3.0)),
            $rtoi(30000.0 * $cos(th + 2.0 * PI / 3.0)));
      // balanced input: alpha equals phase a
      check(int'(u_alpha) - $rtoi(30000.0 * $cos(th)) <= 2 &&
            $rtoi(30000.0 * $cos(th)) - int'(u_alpha) <= 2, "alpha follows phase a");
    end
    apply(32767, -32768, -32768);
    check(u_alpha == 16'sh7fff, "alpha saturates high");
    apply(-32768, 32767, 32767);
    check(u_alpha == 16'sh8000, "alpha saturates low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
