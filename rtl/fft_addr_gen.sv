// Counter-based address generator of the memory-based radix-4 FFT.
//
// The FFT of N = 4^LOG4N points runs LOG4N radix-4 stages in place. A
// counter cnt = {butterfly b, leg} walks every stage; its two low bits
// are the butterfly leg (0..3) and change fastest. The RAM address of a
// leg is the counter rotated right by 2*(stage+1) bits ("group sliding"):
// in stage 0 the legs sit in the top base-4 digit (x[n + k*N/4]); each
// later stage moves the leg one digit lower, so the digits already
// transformed sit above it. No arithmetic is needed for the RAM address.
// The twiddle exponent of a leg is leg * (b >> 2*stage) * 4^stage in units
// of N, scaled to the 4096-entry circle of the twiddle ROM. The
// out_addr output gives the digit-reversed ("group reversed") location
// of natural-order result index out_idx.
// Purely combinational. As in the original design: rotation of the counter
// by two bits per stage; the exact bit order of the counter is this
// design's own.
module fft_addr_gen
  import hr_pkg::*;
#(
  parameter int unsigned LOG4N = 6
) (
  input  logic [2:0]           stage,
  input  logic [2*LOG4N-1:0]   cnt,
  input  logic [2*LOG4N-1:0]   out_idx,
  output logic [2*LOG4N-1:0]   ram_addr,
  output logic [TW_LOG2N-1:0]  tw_exp,
  output logic [2*LOG4N-1:0]   out_addr
);
  localparam int unsigned AW = 2 * LOG4N;

  logic [2*AW-1:0]   dbl;
  logic [4:0]        sh;
  logic [AW-3:0]     b;
  logic [1:0]        leg;
  logic [AW-3:0]     nlow;
  logic [TW_LOG2N+1:0] prod;

  assign b   = cnt[AW-1:2];
  assign leg = cnt[1:0];
  assign dbl = {cnt, cnt};
  assign sh  = 5'(2 * (int'(stage) + 1));

  always_comb begin
    logic [2*AW-1:0] rot;
    rot      = dbl >> sh;
    ram_addr = rot[AW-1:0];
  end

  assign nlow   = b >> (2 * stage);
  assign prod   = (TW_LOG2N+2)'(nlow) * (TW_LOG2N+2)'(leg);
  assign tw_exp = TW_LOG2N'(prod << (2 * int'(stage) + TW_LOG2N - AW));

  always_comb begin
    for (int d = 0; d < LOG4N; d++)
      out_addr[2*d +: 2] = out_idx[2*(LOG4N-1-d) +: 2];
  end
endmodule
