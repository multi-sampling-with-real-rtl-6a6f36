// ads8568_if: conversion and parallel read-out controller for the ADS8568
// analog-to-digital converter that digitises the three output voltages.
//
// On 'start' (a sampling instant) the controller raises CONVST for
// CONVST_CYC cycles, which makes the converter sample and hold all used
// channels at once. It then waits for the converter's BUSY output to rise
// and fall again (the conversion, about 2 us), and reads NCH channels over
// the 16-bit parallel bus: with CS_n held low, each low pulse of RD_n makes
// the converter drive the next channel, which is latched on the last cycle
// of the pulse. When the last channel is in, 'samples' is updated and
// 'valid' pulses for one cycle.
//
// BUSY is asynchronous and passes through a two-flop synchroniser. If BUSY
// has not risen BUSY_RISE_CYC cycles after CONVST, the controller waits for
// it to be low and reads anyway (no conversion pending). A 'start' that
// arrives while a conversion is still in progress is ignored and flagged
// on 'missed'.
//
// Timing at the defaults (100 MHz): CONVST 3 cycles, then conversion, then
// 2 synchroniser cycles and NCH*(RD_LO_CYC+RD_HI_CYC) = 9 read cycles.
// The converter type and its 2 us conversion time are those of the target
// board; the bus protocol details, pulse widths and channel assignment are
// this design's choices.
module ads8568_if
  import msrtu_pkg::*;
#(
  parameter int unsigned NCH           = NPHASE,
  parameter int unsigned CONVST_CYC    = 3,
  parameter int unsigned RD_LO_CYC     = 2,
  parameter int unsigned RD_HI_CYC     = 1,
  parameter int unsigned BUSY_RISE_CYC = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  // converter pins
  output logic                convst,
  input  logic                busy,
  output logic                cs_n,
  output logic                rd_n,
  input  logic [SAMPLE_W-1:0] db,
  // results
  output sample_t             samples [NCH],
  output logic                valid,
  output logic                active,
  output logic                missed
);
  typedef enum logic [2:0] {S_IDLE, S_CONVST, S_WAIT_HI, S_WAIT_LO, S_RD_LO, S_RD_HI} state_t;

  localparam int unsigned TW = $clog2(BUSY_RISE_CYC + CONVST_CYC + RD_LO_CYC + RD_HI_CYC + 1);
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;

  state_t         state;
  logic [TW-1:0]  tmr;
  logic [CHW-1:0] ch;
  logic [1:0]     busy_sync;
  logic           busy_s;
  sample_t        shadow [NCH];

  assign busy_s = busy_sync[1];
  assign active = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], busy};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tmr    <= '0;
      ch     <= '0;
      convst <= 1'b0;
      cs_n   <= 1'b1;
      rd_n   <= 1'b1;
      valid  <= 1'b0;
      missed <= 1'b0;
      for (int i = 0; i < NCH; i++) begin
        samples[i] <= '0;
        shadow[i]  <= '0;
      end
    end else begin
      valid  <= 1'b0;
      missed <= start && (state != S_IDLE);
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_CONVST;
          convst <= 1'b1;
          tmr    <= TW'(CONVST_CYC - 1);
        end
        S_CONVST: begin
          if (tmr == '0) begin
            convst <= 1'b0;
            state  <= S_WAIT_HI;
            tmr    <= TW'(BUSY_RISE_CYC);
          end else tmr <= tmr - 1'b1;
        end
        S_WAIT_HI: begin
          if (busy_s || tmr == '0) state <= S_WAIT_LO;
          else                     tmr   <= tmr - 1'b1;
        end
        S_WAIT_LO: if (!busy_s) begin
          state <= S_RD_LO;
          cs_n  <= 1'b0;
          rd_n  <= 1'b0;
          ch    <= '0;
          tmr   <= TW'(RD_LO_CYC - 1);
        end
        S_RD_LO: begin
          if (tmr == '0) begin
            shadow[ch] <= sample_t'(db);
            rd_n       <= 1'b1;
            if (ch == CHW'(NCH - 1)) begin
              cs_n  <= 1'b1;
              state <= S_IDLE;
              valid <= 1'b1;
              for (int i = 0; i < NCH; i++)
                samples[i] <= (i == NCH - 1) ? sample_t'(db) : shadow[i];
            end else begin
              state <= S_RD_HI;
              tmr   <= TW'(RD_HI_CYC - 1);
            end
          end else tmr <= tmr - 1'b1;
        end
        S_RD_HI: begin
          if (tmr == '0) begin
            rd_n  <= 1'b0;
            ch    <= ch + 1'b1;
            state <= S_RD_LO;
            tmr   <= TW'(RD_LO_CYC - 1);
          end else tmr <= tmr - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
