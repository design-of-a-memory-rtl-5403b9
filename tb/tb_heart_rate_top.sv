// End-to-end testbench of the heart-rate system at its default size
// (25 MHz clock, 512 samples/s, 4096-point FFT).
//
// A converter model is fed a synthetic ECG code per conversion: a 1800
// offset, a 0.3 Hz baseline wander of 300 codes, an R wave of 700 codes
// with a small S wave every 420 samples (73.1 beats/min), and noise.
// Checks: the estimates report 73 +- 2 beats/min and a quality between
// 0.90 and 1.10 once the baseline tracker has settled; the display shows
// the same numbers; samples arrive every 48828 clocks. For a short time
// the converter stops answering, which must be counted by the timeout.
// Every mechanism is counted and must have occurred: conversions,
// converter timeouts, baseline-removal outputs, FFT forward transforms,
// power passes, second (correlation) transforms, replays, estimates and
// display updates.
`timescale 1ns/1ps
module tb_heart_rate_top;
  localparam int PERIOD = 420;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;                       // 25 MHz
  int checks = 0, failures = 0;

  logic adc_busy_n, adc_cs_n, adc_rd_n, adc_hben, hr_valid, dead = 0;
  logic [11:0] adc_d, ain = 0;
  logic [5:0][6:0] hex;
  logic [9:0] hr_bpm, q_pct;
  logic [7:0] adc_err;
  int conversions;

  heart_rate_top dut (.clk, .rst_n, .adc_busy_n, .adc_d, .adc_cs_n, .adc_rd_n, .adc_hben,
                      .hex, .hr_valid, .hr_bpm, .q_pct, .adc_err);
  ltc1282_model adc (.cs_n(adc_cs_n), .rd_n(adc_rd_n), .hben(adc_hben), .ain, .dead,
                     .busy_n(adc_busy_n), .d(adc_d), .conversions);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // synthetic ECG code for sample k
  int k = 0;
  function automatic int ecg_code(input int n);
    int ph, v;
    real t;
    t = real'(n) / 512.0;
    v = 1800 + int'(300.0 * $sin(2.0 * 3.14159265 * 0.3 * t));
    ph = n % PERIOD;
    if (ph < 8)       v += 700 - 87 * ph;
    else if (ph < 14) v += -150 + 25 * (ph - 8);
    v += int'($urandom_range(0, 16)) - 8;
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return v;
  endfunction
  always @(negedge adc_rd_n) begin ain = 12'(ecg_code(k)); k++; end

  // mechanism counters
  int n_smp = 0, n_bwr = 0, n_fwd = 0, n_pwr = 0, n_inv = 0, n_replay = 0, n_est = 0, n_disp = 0;
  longint t_prev = -1;
  int bad_interval = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.smp_valid) begin
      longint t;
      t = $time / 40;
      if (t_prev >= 0 && (t - t_prev) % 48828 != 0) bad_interval++;
      t_prev = t;
      n_smp++;
    end
    if (dut.y_valid) n_bwr++;
    if (dut.u_hre.u_fft.state == 3'd2 && dut.u_hre.u_fft.stage == 0 && dut.u_hre.u_fft.bidx == 0 &&
        dut.u_hre.u_fft.ph == 0 && !dut.u_hre.u_fft.pass) n_fwd++;
    if (dut.u_hre.u_fft.state == 3'd3 && dut.u_hre.u_fft.cnt == 0 && !dut.u_hre.u_fft.rd_pend) n_pwr++;
    if (dut.u_hre.f_replay) n_replay++;
  end
  // the transposed pass starts at the last stage
  always @(posedge clk) if (rst_n && dut.u_hre.u_fft.state == 3'd2 && dut.u_hre.u_fft.pass &&
                              dut.u_hre.u_fft.stage == 5 && dut.u_hre.u_fft.bidx == 0 &&
                              dut.u_hre.u_fft.ph == 0) n_inv++;

  function automatic int seg_digit(input logic [6:0] s);
    case (~s)
      7'h3f: return 0;  7'h06: return 1;  7'h5b: return 2;  7'h4f: return 3;
      7'h66: return 4;  7'h6d: return 5;  7'h7d: return 6;  7'h07: return 7;
      7'h7f: return 8;  7'h6f: return 9;
      default: return -100000;
    endcase
  endfunction

  always @(posedge clk) if (hr_valid) begin
    n_est++;
    $display("estimate %0d at sample %0d: hr=%0d bpm q=%0d/100 (pos1=%0d pos2=%0d)",
             n_est, n_smp, hr_bpm, q_pct, dut.u_hre.pos1, dut.u_hre.pos2);
    chk(hr_bpm >= 71 && hr_bpm <= 75, "heart rate 73 +- 2");
    chk(q_pct >= 90 && q_pct <= 110, "quality near 1.00");
    repeat (2) @(posedge clk);
    n_disp++;
    chk(seg_digit(hex[2]) * 100 + seg_digit(hex[1]) * 10 + seg_digit(hex[0]) == int'(hr_bpm),
        "display shows heart rate");
    chk(seg_digit(hex[5]) * 100 + seg_digit(hex[4]) * 10 + seg_digit(hex[3]) == int'(q_pct),
        "display shows quality");
  end

  localparam longint MAX_CYCLES = 200_000_000;
  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // 2048 samples fill the window; two estimates follow (2048, 2560)
    wait (n_smp == 600);
    dead = 1;                              // converter silent for two sample periods
    repeat (2 * 48828) @(posedge clk);
    dead = 0;
    wait (n_est == 2);
    repeat (10) @(posedge clk);
    $display("samples %0d, bwr %0d, fwd %0d, power %0d, inv %0d, replay %0d, est %0d, disp %0d, adc timeouts %0d",
             n_smp, n_bwr, n_fwd, n_pwr, n_inv, n_replay, n_est, n_disp, adc_err);
    chk(conversions == n_smp, "every conversion produced a sample");
    chk(bad_interval == 0, "sample interval 48828 clocks");
    chk(adc_err > 0, "converter timeout happened");
    chk(n_bwr > 0 && n_bwr == n_smp, "baseline removal ran per sample");
    chk(n_fwd == 2, "forward transforms");
    chk(n_pwr == 2, "power passes");
    chk(n_inv == 2, "correlation transforms");
    chk(n_replay == 2, "replays");
    chk(n_est == 2 && n_disp == 2, "estimates and display updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
