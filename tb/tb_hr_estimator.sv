// Self-checking testbench of the heart-rate estimator, at full size.
//
// Synthetic baseline-free ECG: an R wave (triangle, 800 high) followed by
// a smaller negative S wave every P samples, plus noise. For every
// estimate the testbench recomputes, in floating point from the same
// clipped absolute values, the autocorrelation of the window and its
// peak in the same lag range, and expects pos1 within one lag of it;
// hr_bpm and q_pct must follow from pos1 / pos2 by the two formulas;
// the heart rate must match 60*512/P within 1 beat/min and the quality
// be near 1.00. Two rhythms are run (P = 400 and P = 250 samples). The
// time from the sample that completes a window to hr_valid must stay
// under 130,000 clocks.
`timescale 1ns/1ps
module tb_hr_estimator;
  localparam int WIN = 2048, GAP = 300;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  logic smp_valid = 0, hr_valid, fft_busy;
  logic signed [15:0] smp = 0;
  logic [9:0] hr_bpm, q_pct;
  logic [11:0] pos1, pos2;
  hr_estimator dut (.clk, .rst_n, .smp_valid, .smp, .hr_valid, .hr_bpm, .q_pct,
                    .pos1, .pos2, .fft_busy);

  int hist[$];          // clipped absolute values fed so far
  int n_est = 0;
  int period;
  int phase_start = 0;  // first sample of the current rhythm
  int trig_size;        // samples fed when the running estimate was triggered
  longint t_trig;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ecg(input int n, input int p);
    int ph, v;
    ph = n % p;
    v = 0;
    if (ph < 8)       v = 800 - 100 * ph;
    else if (ph < 14) v = -200 + 30 * (ph - 8);
    return v;
  endfunction

  // floating-point reference of the first peak
  function automatic int ref_peak(input int lo, input int hi);
    real best, c;
    int  bl, base;
    base = hist.size() - WIN;
    best = -1.0; bl = lo;
    for (int l = lo; l <= hi; l++) begin
      c = 0;
      for (int n = 0; n + l < WIN; n++) c += real'(hist[base + n]) * real'(hist[base + n + l]);
      if (c > best) begin best = c; bl = l; end
    end
    return bl;
  endfunction

  always @(posedge clk) if (hr_valid) begin
    int rp, lat, hr_exp;
    lat = int'($time / 40 - t_trig);
    rp = ref_peak(153, 1024);
    hr_exp = (30720 + period / 2) / period;
    $display("estimate %0d: pos1=%0d (ref %0d) pos2=%0d hr=%0d q=%0d latency=%0d", n_est, pos1, rp, pos2, hr_bpm, q_pct, lat);
    chk(int'(pos1) >= rp - 1 && int'(pos1) <= rp + 1, "pos1 vs reference");
    chk(int'(hr_bpm) == (30720 + int'(pos1) / 2) / int'(pos1), "hr formula");
    chk(int'(q_pct) == ((int'(pos2) - int'(pos1)) * 100 + int'(pos1) / 2) / int'(pos1), "q formula");
    if (trig_size - WIN >= phase_start) begin   // window holds one rhythm only
      chk(int'(hr_bpm) >= hr_exp - 1 && int'(hr_bpm) <= hr_exp + 1, "heart rate");
      chk(q_pct >= 97 && q_pct <= 103, "quality");
    end
    chk(lat < 130_000, "estimate latency");
    n_est++;
  end

  task automatic feed(input int count, input int p);
    for (int i = 0; i < count; i++) begin
      int v, a;
      v = ecg(hist.size(), p) + int'($urandom_range(0, 30)) - 15;
      a = (v < 0) ? -v : v;
      if (a > 2047) a = 2047;
      @(posedge clk);
      smp_valid <= 1; smp <= 16'(v);
      @(posedge clk);
      smp_valid <= 0;
      hist.push_back(a);
      if (hist.size() >= WIN && (hist.size() - WIN) % 512 == 0) begin
        t_trig = $time / 40; trig_size = hist.size();
      end
      repeat (GAP - 2) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    period = 400;
    feed(WIN + 2 * 512 + 10, 400);
    repeat (150_000) @(posedge clk);
    chk(n_est == 3, $sformatf("estimates after first rhythm: %0d", n_est));
    period = 250;
    n_est = 0;
    phase_start = hist.size();
    feed(WIN + 512, 250);
    repeat (150_000) @(posedge clk);
    chk(n_est == 5, $sformatf("estimates after second rhythm: %0d", n_est));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
