// Self-checking testbench of the single-port FFT data memory.
//
// Writes random words to every address of the full 4096 x 32 array, then
// reads them back in a shuffled order and checks one-clock read latency
// and read-before-write behaviour on a simultaneous write.
`timescale 1ns/1ps
module tb_fft_ram;
  localparam int AW = 12, D = 1 << AW;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [AW-1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  fft_ram #(.AW(AW), .W(32)) dut (.clk, .we, .addr, .wdata, .rdata);

  logic [31:0] shadow [D];

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      shadow[a] = $urandom;
      @(negedge clk); we = 1; addr = AW'(a); wdata = shadow[a];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      int a;
      a = (i * 1237 + 91) % D;
      @(negedge clk); addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h expected %h", a, rdata, shadow[a]);
      end
    end
    // write and read the same address in one clock: old word comes out
    @(negedge clk); we = 1; addr = 12'd77; wdata = ~shadow[77];
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== shadow[77]) begin failures++; $display("FAIL read-before-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== ~shadow[77]) begin failures++; $display("FAIL written word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
