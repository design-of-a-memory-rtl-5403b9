// Complex multiplier of the FFT processing element.
//
// p = a * w where w is a Q1.14 twiddle factor: four real multipliers and
// two adders, (ar*wr - ai*wi) + j(ar*wi + ai*wr), rounded to nearest and
// saturated back to 16 bits. Purely combinational. The four multipliers
// follow the design description; the number format is this design's own.
module cmul_q14
  import hr_pkg::*;
(
  input  cplx_t                a,
  input  logic signed [DW-1:0] wr,
  input  logic signed [DW-1:0] wi,
  output cplx_t                p
);
  logic signed [2*DW:0] pr, pi;

  always_comb begin
    pr = (2*DW+1)'(a.re * wr) - (2*DW+1)'(a.im * wi) + (2*DW+1)'(1 <<< (TW_FRAC-1));
    pi = (2*DW+1)'(a.re * wi) + (2*DW+1)'(a.im * wr) + (2*DW+1)'(1 <<< (TW_FRAC-1));
    p.re = sat_dw(40'(pr >>> TW_FRAC));
    p.im = sat_dw(40'(pi >>> TW_FRAC));
  end
endmodule
