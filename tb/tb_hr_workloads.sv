// Workload testbench of the heart-rate estimator: the rhythms the design
// is evaluated on, each in its own estimator instance fed in parallel.
//   A: off-line record rate, 200 samples/s, R-R interval 181 samples
//      -> 60*200/181 = 66.3, reported as 66 beats/min
//   B: board demonstration, 512 samples/s, 74 beats/min (R-R 415)
//   C: lowest supported rate, 512 samples/s, R-R 1022 (30.1 beats/min)
//   D: highest search rate, 512 samples/s, R-R 154 (199.5 beats/min)
// Every instance must report its rate within 1 beat/min; A, B and D must
// report a quality between 0.95 and 1.05 (C's second peak lies at the end
// of the window, where the overlap is a few samples, so Q is not checked).
`timescale 1ns/1ps
module tb_hr_workloads;
  localparam int GAP = 300;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 4;
  localparam int PER [NI] = '{181, 415, 1022, 154};
  localparam int EXP [NI] = '{66, 74, 30, 199};
  logic smp_valid = 0;
  logic signed [15:0] smp [NI];
  logic hr_valid [NI];
  logic [9:0] hr_bpm [NI], q_pct [NI];
  logic [11:0] pos1 [NI], pos2 [NI];
  logic busy [NI];
  int got [NI];

  hr_estimator #(.FS(200)) uA (.clk, .rst_n, .smp_valid, .smp(smp[0]), .hr_valid(hr_valid[0]),
    .hr_bpm(hr_bpm[0]), .q_pct(q_pct[0]), .pos1(pos1[0]), .pos2(pos2[0]), .fft_busy(busy[0]));
  hr_estimator uB (.clk, .rst_n, .smp_valid, .smp(smp[1]), .hr_valid(hr_valid[1]),
    .hr_bpm(hr_bpm[1]), .q_pct(q_pct[1]), .pos1(pos1[1]), .pos2(pos2[1]), .fft_busy(busy[1]));
  hr_estimator uC (.clk, .rst_n, .smp_valid, .smp(smp[2]), .hr_valid(hr_valid[2]),
    .hr_bpm(hr_bpm[2]), .q_pct(q_pct[2]), .pos1(pos1[2]), .pos2(pos2[2]), .fft_busy(busy[2]));
  hr_estimator uD (.clk, .rst_n, .smp_valid, .smp(smp[3]), .hr_valid(hr_valid[3]),
    .hr_bpm(hr_bpm[3]), .q_pct(q_pct[3]), .pos1(pos1[3]), .pos2(pos2[3]), .fft_busy(busy[3]));

  function automatic int ecg(input int n, input int p);
    int ph;
    ph = n % p;
    if (ph < 8)  return 800 - 100 * ph;
    if (ph < 14) return -200 + 30 * (ph - 8);
    return 0;
  endfunction

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NI; g++) begin : g_mon
    always @(posedge clk) if (hr_valid[g]) begin
      got[g]++;
      $display("workload %0d: R-R %0d -> pos1=%0d pos2=%0d hr=%0d q=%0d", g, PER[g], pos1[g], pos2[g],
               hr_bpm[g], q_pct[g]);
      checks++;
      if (int'(hr_bpm[g]) < EXP[g] - 1 || int'(hr_bpm[g]) > EXP[g] + 1) begin
        failures++; $display("FAIL workload %0d heart rate", g);
      end
      if (g != 2) begin
        checks++;
        if (q_pct[g] < 95 || q_pct[g] > 105) begin failures++; $display("FAIL workload %0d quality", g); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2048 + 512; n++) begin
      @(posedge clk);
      for (int i = 0; i < NI; i++) smp[i] <= 16'(ecg(n + 37, PER[i]) + int'($urandom_range(0, 30)) - 15);
      smp_valid <= 1;
      @(posedge clk);
      smp_valid <= 0;
      repeat (GAP - 2) @(posedge clk);
    end
    repeat (150_000) @(posedge clk);
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (got[i] != 2) begin failures++; $display("FAIL workload %0d: %0d estimates", i, got[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
