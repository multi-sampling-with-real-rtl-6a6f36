// ads8568_model: behavioural model of the ADS8568 converter's parallel
// interface, for simulation only (not synthesizable intent).
//
// 'reset' (the converter's RESET pin, active high) clears the model.
// A rising CONVST edge (seen on the clock) samples the 'ain' inputs into the
// hold registers and raises BUSY for 'conv_cyc' clock cycles. With CS_n low,
// every falling RD_n edge puts the next held channel on DB, starting with
// channel 0; raising CS_n resets the channel pointer. The model counts the
// conversions it performed.
module ads8568_model #(
  parameter int unsigned NCH = 3
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              convst,
  output logic              busy,
  input  logic              cs_n,
  input  logic              rd_n,
  output logic [15:0]       db,
  input  logic signed [15:0] ain [NCH],
  input  int unsigned       conv_cyc,
  output int unsigned       n_conv
);
  logic signed [15:0] held [NCH];
  logic convst_q = 1'b0, rd_n_q = 1'b1;
  int unsigned cnt = 0;
  int unsigned ptr = 0;

  initial begin
    busy   = 1'b0;
    db     = '0;
    n_conv = 0;
    for (int i = 0; i < NCH; i++) held[i] = '0;
  end

  always @(posedge clk) begin
    if (reset) begin
      convst_q <= 1'b0;
      rd_n_q   <= 1'b1;
      busy     <= 1'b0;
      cnt      <= 0;
      ptr      <= 0;
    end else begin
      convst_q <= convst;
      rd_n_q   <= rd_n;
      if (convst && !convst_q && !busy) begin
        for (int i = 0; i < NCH; i++) held[i] <= ain[i];
        busy   <= 1'b1;
        cnt    <= conv_cyc;
        n_conv <= n_conv + 1;
      end else if (busy) begin
        if (cnt <= 1) busy <= 1'b0;
        cnt <= cnt - 1;
      end
      if (cs_n) ptr <= 0;
      else if (!rd_n && rd_n_q) begin
        db  <= (ptr < NCH) ? held[ptr] : 16'h0000;
        ptr <= ptr + 1;
      end
    end
  end
endmodule
