// ads8568_if_tb: self-checking test of the ADS8568 conversion/read-out
// controller against the behavioural converter model.
//
// Random three-phase codes are applied to the model's inputs; after each
// start the controller must return exactly the held codes in channel order.
// The test checks the CONVST pulse width, that RD_n only pulses while CS_n
// is low, the number of RD_n pulses per read, the cycle count from the
// falling BUSY edge to 'valid' (2 synchroniser + 9 read cycles), and that a
// start during a conversion is flagged as missed and ignored.
module ads8568_if_tb;
  import msrtu_pkg::*;
  localparam int unsigned NCH = 3;
  localparam int unsigned CONV = 200;   // 2 us at 100 MHz
  localparam int unsigned EXP_TAIL = 2 + NCH * 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic convst, busy, cs_n, rd_n;
  logic [15:0] db;
  sample_t samples [NCH];
  logic valid, active, missed;
  logic signed [15:0] ain [NCH];
  int unsigned conv_cyc = CONV, n_conv;
  int checks = 0, failures = 0;

  ads8568_if dut (.*);
  ads8568_model #(.NCH(NCH)) adc (.clk, .reset(!rst_n), .convst, .busy, .cs_n, .rd_n, .db, .ain,
                                   .conv_cyc, .n_conv);

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // protocol monitors
  int convst_len = 0, rd_pulses = 0, n_missed = 0;
  logic rd_n_q = 1'b1, busy_q = 1'b0;
  int unsigned since_busy_fall = 0;
  always @(posedge clk) begin
    rd_n_q <= rd_n;
    busy_q <= busy;
    if (convst) convst_len <= convst_len + 1;
    if (!rd_n && rd_n_q) rd_pulses <= rd_pulses + 1;
    if (rst_n && !rd_n) begin
      checks++;
      if (cs_n) begin failures++; $display("FAIL RD_n low with CS_n high"); end
    end
    if (busy_q && !busy) since_busy_fall <= 1;
    else since_busy_fall <= since_busy_fall + 1;
    if (missed) n_missed <= n_missed + 1;
  end

  initial begin
    logic signed [15:0] exp [NCH];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < NCH; i++) begin
        ain[i] = 16'($urandom);
        exp[i] = ain[i];
      end
      convst_len = 0; rd_pulses = 0;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      // change the analog inputs after the sampling edge: must not matter
      repeat (5) @(negedge clk);
      for (int i = 0; i < NCH; i++) ain[i] = 16'($urandom);
      if (k == 3) begin
        // start during the conversion: ignored and flagged
        start = 1'b1; @(negedge clk); start = 1'b0;
      end
      while (!valid) @(negedge clk);
      for (int i = 0; i < NCH; i++) begin
        check(samples[i] == exp[i], "channel data");
        if (samples[i] != exp[i]) $display("  ch%0d got %h exp %h", i, samples[i], exp[i]);
      end
      check(convst_len == 3, "CONVST width");
      check(rd_pulses == NCH, "one RD_n pulse per channel");
      check(since_busy_fall == EXP_TAIL, "cycles from BUSY fall to valid");
      check(cs_n && rd_n, "bus released");
      repeat (20) @(negedge clk);
    end
    check(n_missed == 1, "missed start flagged once");
    check(n_conv == 40, "one conversion per accepted start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
