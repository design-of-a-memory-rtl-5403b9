// Real-time heart-rate estimation system (digital part).
//
// Chain: LTC1282 converter control (512 samples/s) -> baseline wander
// removal (rank-one adaptive subspace, 40-sample window) -> absolute value
// and 2048-sample window -> autocorrelation through the 4096-point
// memory-based radix-4 FFT -> R-R interval search -> heart rate and
// quality indicator -> six seven-segment digits. The analog front end
// (instrumentation amplifier, notch, band-pass filters, output amplifier)
// and the converter itself are outside: the converter pins are ports.
// Everything runs in one 25 MHz clock domain with an active-low
// asynchronous reset; only the converter's BUSY is resynchronised.
// A new estimate appears about once a second (every 512 samples) once
// the first 4 s of signal are in: hr_valid pulses, hr_bpm and q_pct
// (quality in hundredths, 100 = 1.00) update and the display follows.
module heart_rate_top
  import hr_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEF,
  parameter int unsigned FS     = FS_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // LTC1282 pins
  input  logic             adc_busy_n,
  input  logic [ADC_W-1:0] adc_d,
  output logic             adc_cs_n,
  output logic             adc_rd_n,
  output logic             adc_hben,
  // display and results
  output logic [5:0][6:0]  hex,
  output logic             hr_valid,
  output logic [9:0]       hr_bpm,
  output logic [9:0]       q_pct,
  output logic [7:0]       adc_err
);
  logic             smp_valid;
  logic [ADC_W-1:0] smp;
  logic             y_valid, bwr_busy_unused, fft_busy_unused;
  logic signed [15:0] y;
  logic [11:0]      pos1_unused, pos2_unused;

  adc_ctrl #(.CLK_HZ(CLK_HZ), .FS(FS)) u_adc (
    .clk, .rst_n, .busy_n(adc_busy_n), .d(adc_d), .cs_n(adc_cs_n), .rd_n(adc_rd_n),
    .hben(adc_hben), .smp_valid, .smp, .err_cnt(adc_err));

  bwr u_bwr (
    .clk, .rst_n, .in_valid(smp_valid), .in_sample(smp),
    .out_valid(y_valid), .out_y(y), .busy(bwr_busy_unused));

  hr_estimator #(.FS(FS)) u_hre (
    .clk, .rst_n, .smp_valid(y_valid), .smp(y), .hr_valid, .hr_bpm, .q_pct,
    .pos1(pos1_unused), .pos2(pos2_unused), .fft_busy(fft_busy_unused));

  seg7_display u_disp (.clk, .rst_n, .upd(hr_valid), .hr_bpm, .q_pct, .hex);
endmodule
