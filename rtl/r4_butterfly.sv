// Radix-4 decimation-in-frequency butterfly (the FFT processing element).
//
// From four inputs x0..x3 (legs spaced N/4 apart) it forms
//   y0 = x0 +   x1 + x2 +   x3
//   y1 = x0 - j*x1 - x2 + j*x3
//   y2 = x0 -   x1 + x2 -   x3
//   y3 = x0 + j*x1 - x2 - j*x3
// using only adders (multiplying by -j or +j swaps and negates parts).
// When scale is set every output is divided by 4 with rounding, which
// keeps a full-scale stage from overflowing; otherwise outputs saturate
// to 16 bits. The twiddle multiplication of y1..y3 is done by cmul_q14
// afterwards. Purely combinational. The butterfly equations are those of
// radix-4 DIF; the rounding and saturation are this design's choice.
module r4_butterfly
  import hr_pkg::*;
(
  input  cplx_t x0, x1, x2, x3,
  input  logic  scale,
  output cplx_t y0, y1, y2, y3
);
  logic signed [DW+1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;

  function automatic logic signed [DW-1:0] fin(input logic signed [DW+1:0] v, input logic sc);
    logic signed [DW+1:0] t;
    if (sc) begin
      t = (v + 18'sd2) >>> 2;
      return t[DW-1:0];
    end
    return sat_dw(40'(v));
  endfunction

  always_comb begin
    // first level: sums and differences of legs 0/2 and 1/3
    a_re = 18'(x0.re) + 18'(x2.re);  a_im = 18'(x0.im) + 18'(x2.im);
    b_re = 18'(x0.re) - 18'(x2.re);  b_im = 18'(x0.im) - 18'(x2.im);
    c_re = 18'(x1.re) + 18'(x3.re);  c_im = 18'(x1.im) + 18'(x3.im);
    d_re = 18'(x1.re) - 18'(x3.re);  d_im = 18'(x1.im) - 18'(x3.im);
    // second level; -j*(d_re + j d_im) = d_im - j d_re
    y0.re = fin(a_re + c_re, scale);  y0.im = fin(a_im + c_im, scale);
    y1.re = fin(b_re + d_im, scale);  y1.im = fin(b_im - d_re, scale);
    y2.re = fin(a_re - c_re, scale);  y2.im = fin(a_im - c_im, scale);
    y3.re = fin(b_re - d_im, scale);  y3.im = fin(b_im + d_re, scale);
  end
endmodule
