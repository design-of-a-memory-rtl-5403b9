// Sequential integer square root (digit by digit, one root bit per clock).
//
// A start pulse loads a W-bit radicand (W even); W/2 clocks later done
// pulses and root = floor(sqrt(radicand)) holds until the next start.
// Used to form the norm of the baseline-removal vector s(n); the
// algorithm is this design's choice.
module seq_sqrt #(
  parameter int unsigned W = 56
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic [W/2-1:0] root,
  output logic           busy,
  output logic           done
);
  logic [W-1:0]           x;      // radicand bits not yet consumed
  logic [W/2+1:0]         rem;    // partial remainder
  logic [W/2-1:0]         q;
  logic [$clog2(W)-1:0]   n;
  logic [W/2+1:0]         cand, trial;

  assign cand  = {rem[W/2-1:0], x[W-1:W-2]};
  assign trial = cand - {q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; rem <= '0; q <= '0; n <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x <= radicand; rem <= '0; q <= '0; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        x <= x << 2;
        if (!trial[W/2+1]) begin rem <= trial; q <= {q[W/2-2:0], 1'b1}; end
        else               begin rem <= cand;  q <= {q[W/2-2:0], 1'b0}; end
        n <= n + 1'b1;
        if (n == ($clog2(W))'(W/2 - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
  assign root = q;
endmodule
