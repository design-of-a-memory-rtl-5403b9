// Self-checking testbench of the radix-4 butterfly.
//
// Random complex inputs; expected outputs are the 4-point DFT
// y_k = sum_m x_m * (-j)^(m*k) computed here with integers, then divided
// by 4 with rounding (scale on) or saturated to 16 bits (scale off).
`timescale 1ns/1ps
module tb_r4_butterfly;
  import hr_pkg::*;
  int checks = 0, failures = 0;
  cplx_t x0, x1, x2, x3, y0, y1, y2, y3;
  logic scale;
  r4_butterfly dut (.x0, .x1, .x2, .x3, .scale, .y0, .y1, .y2, .y3);

  function automatic int fin(input int v, input bit sc);
    if (sc) return (v + 2) >>> 2;
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int xr[4], xi[4], er, ei;
      cplx_t y[4];
      for (int m = 0; m < 4; m++) begin
        xr[m] = (t < 10) ? 32767 - t : int'($urandom_range(0, 65535)) - 32768;
        xi[m] = (t < 10) ? -32768 + t : int'($urandom_range(0, 65535)) - 32768;
      end
      x0 = {16'(xr[0]), 16'(xi[0])}; x1 = {16'(xr[1]), 16'(xi[1])};
      x2 = {16'(xr[2]), 16'(xi[2])}; x3 = {16'(xr[3]), 16'(xi[3])};
      scale = (t % 3 != 0);
      #1;
      y[0] = y0; y[1] = y1; y[2] = y2; y[3] = y3;
      for (int k = 0; k < 4; k++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int m = 0; m < 4; m++) begin
          case ((m * k) % 4)           // multiply by (-j)^(m*k)
            0: begin sr += xr[m]; si += xi[m]; end
            1: begin sr += xi[m]; si -= xr[m]; end
            2: begin sr -= xr[m]; si -= xi[m]; end
            default: begin sr -= xi[m]; si += xr[m]; end
          endcase
        end
        er = fin(sr, scale); ei = fin(si, scale);
        checks++;
        if (int'(y[k].re) != er || int'(y[k].im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d got %0d,%0d expected %0d,%0d", t, k, y[k].re, y[k].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
