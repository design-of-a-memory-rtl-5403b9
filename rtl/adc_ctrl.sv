// Control of the LTC1282 12-bit A/D converter at a fixed sample rate.
//
// A clock divider issues one conversion every CLK_HZ/FS clocks (48828 at
// 25 MHz for 512 samples/s, i.e. 512.001 Hz). For each conversion the
// controller holds HBEN low (all 12 bits on D11..D0 at once, the slow
// memory mode), pulls CS and RD low to start the conversion, waits for
// BUSY to fall and rise again (BUSY is synchronised by two flip-flops),
// latches D11..D0 one clock later and releases CS and RD. The sample
// leaves on smp with a one-clock smp_valid pulse. If BUSY does not
// answer within TIMEOUT clocks the conversion is abandoned, no sample is
// produced and err_cnt counts it. The pin protocol follows the
// converter's behaviour as described; the timeout and the error counter
// are this design's own.
module adc_ctrl
  import hr_pkg::*;
#(
  parameter int unsigned CLK_HZ  = CLK_HZ_DEF,
  parameter int unsigned FS      = FS_DEF,
  parameter int unsigned TIMEOUT = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  // converter pins
  input  logic              busy_n,
  input  logic [ADC_W-1:0]  d,
  output logic              cs_n,
  output logic              rd_n,
  output logic              hben,
  // sample stream
  output logic              smp_valid,
  output logic [ADC_W-1:0]  smp,
  output logic [7:0]        err_cnt
);
  localparam int unsigned DIV = CLK_HZ / FS;
  localparam int unsigned CW  = $clog2(DIV + 1);

  typedef enum logic [2:0] {A_WAIT, A_START, A_CONV, A_READ, A_RELEASE} state_t;
  state_t state;

  logic [CW-1:0] tick_cnt;
  logic [15:0]   to_cnt;
  logic [1:0]    busy_sync;
  logic          busy_s;

  assign hben   = 1'b0;
  assign busy_s = busy_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_WAIT; tick_cnt <= '0; to_cnt <= '0; busy_sync <= 2'b11;
      cs_n <= 1'b1; rd_n <= 1'b1; smp_valid <= 1'b0; smp <= '0; err_cnt <= '0;
    end else begin
      busy_sync <= {busy_sync[0], busy_n};
      smp_valid <= 1'b0;
      tick_cnt  <= (tick_cnt == CW'(DIV - 1)) ? '0 : tick_cnt + 1'b1;
      unique case (state)
        A_WAIT: if (tick_cnt == '0) begin
          cs_n <= 1'b0; rd_n <= 1'b0; to_cnt <= '0; state <= A_START;
        end
        A_START: begin            // wait for BUSY to go low: conversion running
          to_cnt <= to_cnt + 1'b1;
          if (!busy_s) begin to_cnt <= '0; state <= A_CONV; end
          else if (to_cnt == 16'(TIMEOUT)) state <= A_RELEASE;
        end
        A_CONV: begin             // wait for BUSY to return high: data valid
          to_cnt <= to_cnt + 1'b1;
          if (busy_s) state <= A_READ;
          else if (to_cnt == 16'(TIMEOUT)) state <= A_RELEASE;
        end
        A_READ: begin
          smp       <= d;
          smp_valid <= 1'b1;
          to_cnt    <= '0;
          cs_n <= 1'b1; rd_n <= 1'b1;
          state <= A_WAIT;
        end
        A_RELEASE: begin
          cs_n <= 1'b1; rd_n <= 1'b1;
          if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
          state <= A_WAIT;
        end
        default: state <= A_WAIT;
      endcase
    end
  end
endmodule
