// Self-checking testbench of the memory-based radix-4 FFT.
//
// Instance A (full 4096 points) transforms a sum of tones and is compared
// bin by bin with a double-precision DFT computed here (scaled by 1/N);
// the clocks from the last input word to the first output word must be
// 2*N*LOG4N + 2 (8 clocks per butterfly). Instance B (64 points) checks a
// random complex input, then the correlation mode against a directly
// summed circular autocorrelation, then replay of the stored result.
`timescale 1ns/1ps
module tb_fft_r4_mem;
  import hr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---------------- instance A: 4096 points ----------------
  localparam int LA = 6, NA = 4096;
  logic a_in_valid = 0, a_out_valid, a_busy, a_done;
  logic signed [15:0] a_in_re = 0, a_in_im = 0, a_out_re, a_out_im;
  logic [11:0] a_out_idx;
  fft_r4_mem #(.LOG4N(LA)) dutA (
    .clk, .rst_n, .in_valid(a_in_valid), .in_re(a_in_re), .in_im(a_in_im),
    .corr_mode(1'b0), .scale_fwd('1), .scale_inv('1), .replay(1'b0),
    .out_valid(a_out_valid), .out_idx(a_out_idx), .out_re(a_out_re), .out_im(a_out_im),
    .busy(a_busy), .done(a_done));

  // ---------------- instance B: 64 points ----------------
  localparam int LB = 3, NB = 64;
  logic b_in_valid = 0, b_out_valid, b_busy, b_done, b_corr = 0, b_replay = 0;
  logic [2:0] b_sinv = '1;
  logic signed [15:0] b_in_re = 0, b_in_im = 0, b_out_re, b_out_im;
  logic [5:0] b_out_idx;
  fft_r4_mem #(.LOG4N(LB), .PWR_SHIFT(2)) dutB (
    .clk, .rst_n, .in_valid(b_in_valid), .in_re(b_in_re), .in_im(b_in_im),
    .corr_mode(b_corr), .scale_fwd('1), .scale_inv(b_sinv), .replay(b_replay),
    .out_valid(b_out_valid), .out_idx(b_out_idx), .out_re(b_out_re), .out_im(b_out_im),
    .busy(b_busy), .done(b_done));

  real xa_re[], xa_im[], ref_re[NA], ref_im[NA], ctab[NA], stab[NA];
  real xb_re[], xb_im[];
  int  got_re[NA], got_im[NA];
  int  nout;

  function automatic real rabs(input real v); return v < 0 ? -v : v; endfunction

  task automatic dft(input int n, input int stride, ref real xr[], ref real xi[]);
    for (int k = 0; k < n; k++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int m = 0; m < n; m++) begin
        int e;
        e = ((m * k) % n) * stride;
        sr += xr[m] * ctab[e] + xi[m] * stab[e];
        si += xi[m] * ctab[e] - xr[m] * stab[e];
      end
      ref_re[k] = sr / n; ref_im[k] = si / n;
    end
  endtask

  // collect outputs of instance A
  always @(posedge clk) if (a_out_valid) begin
    got_re[a_out_idx] = a_out_re; got_im[a_out_idx] = a_out_im; nout++;
  end
  int b_re[NB];
  int nb;
  always @(posedge clk) if (b_out_valid) begin b_re[b_out_idx] = b_out_re; got_im[b_out_idx] = b_out_im; nb++; end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_last, t_first;
    int maxerr;
    xa_re = new[NA]; xa_im = new[NA]; xb_re = new[NB]; xb_im = new[NB];
    for (int e = 0; e < NA; e++) begin
      ctab[e] = $cos(2.0 * 3.141592653589793 * e / NA);
      stab[e] = $sin(2.0 * 3.141592653589793 * e / NA);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---- A: tones, full size ----
    for (int n = 0; n < NA; n++) begin
      xa_re[n] = $floor(8000.0 * ctab[(5 * n) % NA] + 6000.0 * stab[(300 * n) % NA] + 0.5);
      xa_im[n] = $floor(4000.0 * ctab[(1234 * n) % NA] + 0.5);
    end
    dft(NA, 1, xa_re, xa_im);
    nout = 0;
    for (int n = 0; n < NA; n++) begin
      a_in_valid <= 1; a_in_re <= 16'(int'(xa_re[n])); a_in_im <= 16'(int'(xa_im[n]));
      @(posedge clk);
    end
    a_in_valid <= 0;
    t_last = $time / 10;
    chk(a_busy, "busy after input");
    wait (a_out_valid);
    t_first = $time / 10;
    chk((t_first - t_last) == 2 * NA * LA + 1, $sformatf("latency %0d", t_first - t_last));
    $display("FFT4096 latency last-in to first-out = %0d clocks", t_first - t_last + 1);
    wait (a_done);
    @(posedge clk);
    chk(nout == NA, "output count");
    maxerr = 0;
    for (int k = 0; k < NA; k++) begin
      int er, ei;
      er = got_re[k] - int'(ref_re[k]); ei = got_im[k] - int'(ref_im[k]);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      chk(er <= 4 && ei <= 4, $sformatf("A bin %0d got %0d,%0d ref %f,%f", k, got_re[k], got_im[k], ref_re[k], ref_im[k]));
    end
    $display("FFT4096 max error %0d LSB", maxerr);
    chk(got_re[5] > 3900 && got_re[5] < 4100, "tone bin 5");

    // ---- B: random complex, 64 points ----
    for (int n = 0; n < NB; n++) begin
      xb_re[n] = real'($signed($urandom_range(0, 40000)) - 20000);
      xb_im[n] = real'($signed($urandom_range(0, 40000)) - 20000);
    end
    dft(NB, NA / NB, xb_re, xb_im);
    nb = 0;
    for (int n = 0; n < NB; n++) begin
      b_in_valid <= 1; b_in_re <= 16'(int'(xb_re[n])); b_in_im <= 16'(int'(xb_im[n]));
      @(posedge clk);
    end
    b_in_valid <= 0;
    wait (b_done); @(posedge clk);
    chk(nb == NB, "B output count");
    for (int k = 0; k < NB; k++) begin
      chk(b_re[k] - int'(ref_re[k]) <= 3 && int'(ref_re[k]) - b_re[k] <= 3 &&
          got_im[k] - int'(ref_im[k]) <= 3 && int'(ref_im[k]) - got_im[k] <= 3,
          $sformatf("B bin %0d got %0d,%0d ref %f,%f", k, b_re[k], got_im[k], ref_re[k], ref_im[k]));
    end

    // ---- B: correlation mode ----
    // pulses in the first half, zero padding in the second half
    for (int n = 0; n < NB; n++) xb_re[n] = 0;
    xb_re[3] = 4000; xb_re[13] = 4000; xb_re[23] = 3000; xb_re[24] = 1000;
    b_sinv <= 3'b011;  // two stages scaled in the second transform
    b_corr <= 1;
    nb = 0;
    for (int n = 0; n < NB; n++) begin
      b_in_valid <= 1; b_in_re <= 16'(int'(xb_re[n])); b_in_im <= 0;
      @(posedge clk);
    end
    b_in_valid <= 0; b_corr <= 0;
    wait (b_done); @(posedge clk);
    chk(nb == NB, "corr output count");
    // expected: c(l) / N / 2^PWR_SHIFT / 4^2
    for (int l = 0; l < NB; l++) begin
      real c, e;
      c = 0;
      for (int n = 0; n < NB; n++) c += xb_re[n] * xb_re[(n + l) % NB];
      e = c / NB / 4.0 / 16.0;
      chk(rabs(real'(b_re[l]) - e) <= 0.02 * rabs(e) + 24 && got_im[l] >= -24 && got_im[l] <= 24,
          $sformatf("corr lag %0d got %0d exp %f", l, b_re[l], e));
    end
    chk(b_re[10] > b_re[20] && b_re[20] > b_re[30], "corr peaks ordered");

    // ---- B: replay gives the same words again ----
    begin
      int keep[NB];
      keep = b_re;
      nb = 0;
      b_replay <= 1; @(posedge clk); b_replay <= 0;
      wait (b_done); @(posedge clk);
      chk(nb == NB && keep == b_re, "replay");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
