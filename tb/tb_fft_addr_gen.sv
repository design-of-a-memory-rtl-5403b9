// Self-checking testbench of the FFT address generator (4096 points).
//
// For every stage and counter value the RAM address and twiddle exponent
// must match an independent derivation from the radix-4 DIF index
// mapping: butterfly b of stage s has untransformed lower index
// nl = b / 4^s and already transformed digits kh = b mod 4^s; leg m sits at
// kh*4^(6-s) + m*4^(5-s) + nl and uses twiddle exponent nl*m*4^s. Each
// stage must visit every address exactly once, and the output address
// must be the base-4 digit reversal of the index.
`timescale 1ns/1ps
module tb_fft_addr_gen;
  localparam int L = 6, N = 4096;
  int checks = 0, failures = 0;
  logic [2:0] stage;
  logic [11:0] cnt, out_idx, ram_addr, out_addr;
  logic [11:0] tw_exp;
  fft_addr_gen #(.LOG4N(L)) dut (.stage, .cnt, .out_idx, .ram_addr, .tw_exp, .out_addr);

  bit seen [N];

  initial begin
    for (int s = 0; s < L; s++) begin
      int span;
      span = 1 << (2 * (L - 1 - s));       // 4^(5-s)
      foreach (seen[i]) seen[i] = 0;
      for (int c = 0; c < N; c++) begin
        int b, m, nl, kh, ea, ee;
        stage = 3'(s); cnt = 12'(c); out_idx = 12'(c);
        #1;
        b = c >> 2; m = c & 3;
        nl = b >> (2 * s); kh = b % (1 << (2 * s));
        ea = kh * span * 4 + m * span + nl;
        ee = (nl * m * (1 << (2 * s))) % N;
        checks++;
        if (int'(ram_addr) != ea || int'(tw_exp) != ee) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d c=%0d addr %0d/%0d exp %0d/%0d", s, c, ram_addr, ea, tw_exp, ee);
        end
        seen[ram_addr] = 1;
      end
      checks++;
      foreach (seen[i]) if (!seen[i]) begin failures++; break; end
    end
    for (int k = 0; k < N; k++) begin
      int r;
      out_idx = 12'(k); #1;
      r = 0;
      for (int d = 0; d < L; d++) r = r * 4 + ((k >> (2 * d)) & 3);
      checks++;
      if (int'(out_addr) != r) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
