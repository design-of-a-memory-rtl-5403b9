// Self-checking testbench of the A/D converter controller.
//
// The converter model returns a new random code for every conversion.
// Each smp_valid must carry exactly the code converted, the interval
// between samples must be CLK_HZ/FS clocks (here a 1 MHz clock and
// 512 Hz: 1953 clocks), HBEN must stay low, and a converter that never
// answers must raise err_cnt and produce no sample.
`timescale 1ns/1ps
module tb_adc_ctrl;
  logic clk = 0, rst_n = 0;
  always #500 clk = ~clk;                  // 1 MHz
  int checks = 0, failures = 0;

  logic busy_n, cs_n, rd_n, hben, smp_valid, dead = 0;
  logic [11:0] d, smp, ain = 0;
  logic [7:0] err_cnt;
  int conversions;

  adc_ctrl #(.CLK_HZ(1_000_000), .FS(512), .TIMEOUT(100)) dut (
    .clk, .rst_n, .busy_n, .d, .cs_n, .rd_n, .hben, .smp_valid, .smp, .err_cnt);
  ltc1282_model adc (.cs_n, .rd_n, .hben, .ain, .dead, .busy_n, .d, .conversions);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && hben) begin failures++; $display("FAIL hben high"); end

  initial begin
    longint last_t, t;
    int n;
    ain = 12'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_t = -1;
    n = 0;
    while (n < 20) begin
      @(posedge clk);
      if (smp_valid) begin
        t = $time / 1000;
        checks++;
        if (smp != ain) begin failures++; $display("FAIL sample %0d got %h expected %h", n, smp, ain); end
        if (last_t >= 0) begin
          checks++;
          if (t - last_t != 1953) begin failures++; $display("FAIL interval %0d", t - last_t); end
        end
        last_t = t;
        ain = 12'($urandom);
        n++;
      end
    end
    checks++;
    if (conversions != 20 || err_cnt != 0) begin failures++; $display("FAIL conversions %0d err %0d", conversions, err_cnt); end
    // dead converter: timeout, no samples
    dead = 1;
    n = 0;
    repeat (3 * 1953) begin @(posedge clk); if (smp_valid) n++; end
    checks++;
    if (n != 0 || err_cnt < 2) begin failures++; $display("FAIL timeout n=%0d err=%0d", n, err_cnt); end
    dead = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
