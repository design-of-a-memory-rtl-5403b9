// Sequential unsigned divider (restoring, one quotient bit per clock).
//
// A start pulse loads dividend and divisor; W clocks later done pulses
// and quotient / remainder hold the result until the next start. A zero
// divisor gives an all-ones quotient. Used for the normalisation of the
// baseline-removal eigenvector and for the heart-rate and quality
// divisions; the algorithm is this design's choice.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         busy,
  output logic         done
);
  logic [W-1:0]         q, d;
  logic [W:0]           r;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]           trial;

  assign trial = {r[W-1:0], q[W-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; n <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= dividend; d <= divisor; r <= '0; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W]) r <= trial;
        else           r <= {r[W-1:0], q[W-1]};
        q <= {q[W-2:0], ~trial[W]};
        n <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
  assign quotient  = q;
  assign remainder = r[W-1:0];
endmodule
