// Self-checking testbench of the seven-segment display driver.
//
// Drives random quality and heart-rate values (including values above
// 999) and decodes the six segment patterns back to digits with a table
// written here from the segment drawing of each numeral; the decoded
// number must equal the value (or 999). Also checks the reset pattern
// (dashes) and that outputs hold while upd is low.
`timescale 1ns/1ps
module tb_seg7_display;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic upd = 0;
  logic [9:0] hr_bpm = 0, q_pct = 0;
  logic [5:0][6:0] hex;
  seg7_display dut (.clk, .rst_n, .upd, .hr_bpm, .q_pct, .hex);

  // lit segments (active high) of each numeral, gfedcba
  function automatic int digit_of(input logic [6:0] s);
    logic [6:0] lit;
    lit = ~s;
    case (lit)
      7'h3f: return 0;  7'h06: return 1;  7'h5b: return 2;  7'h4f: return 3;
      7'h66: return 4;  7'h6d: return 5;  7'h7d: return 6;  7'h07: return 7;
      7'h7f: return 8;  7'h6f: return 9;
      default: return -100000;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (hex != {6{7'b0111111}}) failures++;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int h, q, eh, eq, gh, gq;
      h = (t == 0) ? 74 : (t == 1) ? 1023 : int'($urandom_range(0, 1023));
      q = (t == 0) ? 94 : (t == 1) ? 0 : int'($urandom_range(0, 1023));
      @(posedge clk);
      upd <= 1; hr_bpm <= 10'(h); q_pct <= 10'(q);
      @(posedge clk);
      upd <= 0; hr_bpm <= 10'($urandom); q_pct <= 10'($urandom);
      @(posedge clk);
      @(posedge clk);
      eh = (h > 999) ? 999 : h;
      eq = (q > 999) ? 999 : q;
      gq = digit_of(hex[5]) * 100 + digit_of(hex[4]) * 10 + digit_of(hex[3]);
      gh = digit_of(hex[2]) * 100 + digit_of(hex[1]) * 10 + digit_of(hex[0]);
      checks++;
      if (gh != eh || gq != eq) begin
        failures++;
        if (failures < 10) $display("FAIL hr %0d shown %0d, q %0d shown %0d", eh, gh, eq, gq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
