// inv_clarke_tb: self-checking test of the alpha-beta to abc transform of
// the modulation waves.
//
// Random alpha-beta values are transformed and compared with the inverse
// Clarke transform computed in floating point, rounded and limited to
// +-1 (tolerance 1 LSB). The saturation flags must match the cases where
// the limit acted, and out_valid must follow in_valid by one cycle.
module inv_clarke_tb;
  import msrtu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  mod_t u_alpha = '0, u_beta = '0;
  mod_t m_abc [NPHASE];
  logic [NPHASE-1:0] sat;
  int checks = 0, failures = 0, n_sat = 0;

  inv_clarke dut (.*);

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

  initial begin
    real ex [NPHASE];
    int  er;
    bit  es;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      u_alpha = 16'($urandom);
      u_beta  = (k < 200) ? 16'($signed(16'($urandom)) / 2) : 16'($urandom);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      ex[0] = real'(u_alpha);
      ex[1] = -0.5 * real'(u_alpha) + 0.5 * $sqrt(3.0) * real'(u_beta);
      ex[2] = -0.5 * real'(u_alpha) - 0.5 * $sqrt(3.0) * real'(u_beta);
      check(out_valid, "one-cycle latency");
      for (int i = 0; i < NPHASE; i++) begin
        es = 1'b0;
        if (ex[i] > 32767.5) begin er = 32767; es = 1'b1; end
        else if (ex[i] < -32768.5) begin er = -32768; es = 1'b1; end
        else er = $rtoi(ex[i] < 0.0 ? ex[i] - 0.5 : ex[i] + 0.5);
        check(int'(m_abc[i]) - er <= 1 && er - int'(m_abc[i]) <= 1, "modulation wave");
        if (ex[i] > 32768.5 || ex[i] < -32769.5) check(sat[i], "limit flagged");
        if (ex[i] < 32766.5 && ex[i] > -32767.5) check(!sat[i], "no false limit");
        if (sat[i]) n_sat++;
      end
      @(negedge clk);
    end
    check(n_sat > 0, "limiting exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
