// Self-checking testbench of the one-octant twiddle ROM.
//
// For every exponent 0..4095 the ROM output, one clock after the
// exponent, must equal round(16384*cos(2*pi*e/4096)) and
// -round(16384*sin(2*pi*e/4096)) computed here in floating point, within
// one LSB. This covers all eight octants formed from the stored zone.
`timescale 1ns/1ps
module tb_twiddle_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] exp_i = 0;
  logic signed [15:0] wr, wi;
  twiddle_rom dut (.clk, .exp_i, .wr, .wi);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 4096; e++) begin
      int c, s;
      @(negedge clk); exp_i = 12'(e);
      @(negedge clk);
      c = int'($floor(16384.0 * $cos(2.0 * 3.141592653589793 * e / 4096.0) + 0.5));
      s = int'($floor(16384.0 * $sin(2.0 * 3.141592653589793 * e / 4096.0) + 0.5));
      checks++;
      if (int'(wr) - c > 1 || c - int'(wr) > 1 || int'(wi) + s > 1 || -s - int'(wi) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d got %0d,%0d expected %0d,%0d", e, wr, wi, c, -s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
