// Self-checking testbench of the baseline wander removal block.
//
// A fixed-point reference model written here with 64-bit integers (same
// equations and word lengths, computed directly rather than through the
// shared multiplier, square root and divider) predicts every output
// sample. The stimulus is a synthetic ECG: a 2048 offset, a slow 0.3 Hz
// baseline sine, narrow R-wave pulses and noise, at 512 samples/s. A
// second phase feeds a constant level and expects the output to settle
// near zero (the whole level is baseline). The latency from in_valid to
// out_valid must stay within one 512 Hz sample period at 25 MHz.
`timescale 1ns/1ps
module tb_bwr;
  localparam int L = 40;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid, busy;
  logic [11:0] in_sample = 0;
  logic signed [15:0] out_y;
  bwr dut (.clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_y, .busy);

  // reference state
  longint ri[L], rs[L], rz[L];

  function automatic longint isqrt(input longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint ref_step(input longint x);
    longint acc, p, n2, nrm, q, b;
    for (int j = 0; j < L - 1; j++) ri[j] = ri[j+1];
    ri[L-1] = x;
    acc = 0;
    for (int j = 0; j < L; j++) acc += ri[j] * rz[j];
    p = acc >>> 10;
    for (int j = 0; j < L; j++) begin
      longint v;
      v = (4055 * rs[j] + 41 * (p * ri[j])) >>> 12;
      if (v > 33554431) v = 33554431;
      if (v < -33554432) v = -33554432;
      rs[j] = v;
    end
    n2 = 0;
    for (int j = 0; j < L; j++) n2 += rs[j] * rs[j];
    nrm = isqrt(n2);
    if (nrm != 0)
      for (int j = 0; j < L; j++) begin
        longint zz;
        zz = (rs[j] < 0) ? 0 : (rs[j] * 1024) / nrm;
        rz[j] = (zz > 1023) ? 1023 : zz;
      end
    acc = 0;
    for (int j = 0; j < L; j++) acc += ri[j] * rz[j];
    q = acc >>> 10;
    b = (q * rz[L-1]) >>> 10;
    return ri[L-1] - b;
  endfunction

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int x, output int y, output int lat);
    int c;
    in_valid <= 1; in_sample <= 12'(x);
    @(posedge clk);
    in_valid <= 0;
    c = 1;
    while (!out_valid) begin @(posedge clk); c++; end
    y = out_y; lat = c;
    @(posedge clk);
  endtask

  initial begin
    int y, lat, maxlat, exp_y, last_abs;
    for (int j = 0; j < L; j++) begin ri[j] = 0; rs[j] = 0; rz[j] = 162; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    maxlat = 0;
    for (int n = 0; n < 1200; n++) begin
      int x;
      x = 2048 + int'(300.0 * $sin(2.0 * 3.14159265 * 0.3 * n / 512.0));
      if (n % 400 < 8) x += 600 - 70 * (n % 400);
      x += int'($urandom_range(0, 20)) - 10;
      send(x, y, lat);
      exp_y = int'(ref_step(longint'(x)));
      checks++;
      if (y != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%0d y=%0d expected %0d", n, x, y, exp_y);
      end
      if (lat > maxlat) maxlat = lat;
    end
    $display("BWR latency max %0d clocks", maxlat);
    checks++;
    if (maxlat >= 48828) begin failures++; $display("FAIL latency %0d", maxlat); end
    // constant level: all of it is baseline
    for (int n = 0; n < 300; n++) begin
      send(1500, y, lat);
      exp_y = int'(ref_step(1500));
      checks++;
      if (y != exp_y) failures++;
    end
    last_abs = (y < 0) ? -y : y;
    checks++;
    if (last_abs > 60) begin failures++; $display("FAIL constant level not removed: y=%0d", y); end
    $display("constant input residual %0d", y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
