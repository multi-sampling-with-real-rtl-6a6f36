// rtu_pwm_tb: self-checking test of the real-time-update PWM comparators at
// the default 10 kHz carrier and 100 MHz clock.
//
// The testbench runs its own triangular carrier (0..HALF..0 over PERIOD
// cycles) and a reference model of the compare registers. Every cycle it
// checks each leg output against (compare value > carrier). Modulation
// updates arrive at random phases of the carrier; the compare value must
// change in the very cycle of the update, not at the next carrier peak or
// valley. With constant modulation, the number of high cycles per period
// must be 2*cmp-1, and cmp must follow ((m+32768)*HALF)>>16.
module rtu_pwm_tb;
  import msrtu_pkg::*;
  localparam int unsigned PERIOD = CLK_HZ / FSW_HZ, HALF = PERIOD / 2;
  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] carrier = '0;
  logic mod_valid = 1'b0;
  mod_t m_abc [NPHASE];
  logic [NPHASE-1:0] pwm;
  logic [CW-1:0] cmp [NPHASE];
  logic update;
  logic [31:0] update_cnt;
  int checks = 0, failures = 0;

  rtu_pwm dut (.*);

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

  function automatic int map(input int m);
    return ((m + 32768) * HALF) / 65536;
  endfunction

  // reference model, updated on the clock edge like the design
  int ref_cmp [NPHASE];
  bit ref_pwm [NPHASE];
  int phase = 0;
  int n_updates = 0, n_mid = 0;
  int high_cnt [NPHASE];
  bit counting = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NPHASE; i++) begin
        if (mod_valid) ref_cmp[i] = map(int'(m_abc[i]));
        ref_pwm[i] = (ref_cmp[i] > int'(carrier));
      end
      if (mod_valid) begin
        n_updates++;
        // an update away from the carrier peak and valley
        if (carrier != 0 && carrier != CW'(HALF)) n_mid++;
      end
    end
    phase   = (phase + 1) % PERIOD;
    carrier <= CW'((phase < HALF) ? phase : PERIOD - phase);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NPHASE; i++) begin
        check(pwm[i] == ref_pwm[i], "leg output");
        check(int'(cmp[i]) == ref_cmp[i], "compare value loaded at once");
        if (counting && pwm[i]) high_cnt[i]++;
      end
    end
  end

  task automatic set_mod(input int a, input int b, input int c);
    m_abc[0] = 16'(a); m_abc[1] = 16'(b); m_abc[2] = 16'(c);
    mod_valid = 1'b1;
    @(negedge clk);
    mod_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < NPHASE; i++) begin
      m_abc[i] = '0; ref_cmp[i] = HALF / 2; ref_pwm[i] = 1'b0; high_cnt[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // duty cycle with constant modulation, one full period counted
    for (int t = 0; t < 6; t++) begin
      int ma, mb, mc;
      ma = (t == 0) ? -32768 : $signed(16'($urandom));
      mb = (t == 1) ? 32767 : $signed(16'($urandom));
      mc = $signed(16'($urandom));
      set_mod(ma, mb, mc);
      while (phase != 0) @(negedge clk);
      for (int i = 0; i < NPHASE; i++) high_cnt[i] = 0;
      counting = 1'b1;
      repeat (PERIOD) @(negedge clk);
      counting = 1'b0;
      for (int i = 0; i < NPHASE; i++) begin
        int c;
        c = ref_cmp[i];
        check(high_cnt[i] == ((c == 0) ? 0 : 2 * c - 1), "high cycles per period");
      end
    end
    // eight updates per period at random instants, as with 8x sampling
    for (int k = 0; k < 160; k++) begin
      repeat (1 + ($urandom % (PERIOD / 8))) @(negedge clk);
      set_mod($signed(16'($urandom)), $signed(16'($urandom)), $signed(16'($urandom)));
    end
    repeat (10) @(negedge clk);
    check(update_cnt == 32'(n_updates), "update counter");
    check(n_mid > 100, "updates between peak and valley applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
