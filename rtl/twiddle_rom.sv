// Twiddle-factor ROM using one-eighth symmetry.
//
// Returns W = exp(-j*2*pi*e/4096) = cos - j*sin for an exponent e in
// 0..4095, in Q1.14 (16384 = 1.0). Only the first octant of the circle
// (e = 0..512, "zone 0") is stored: rtl/twiddle_rom.hex holds, for
// m = 0..512, the word {round(16384*cos(2*pi*m/4096)),
// round(16384*sin(2*pi*m/4096))}. The other seven octants are formed from
// zone 0 by mirroring the index (m = 512 - r) and by swapping and negating
// cosine and sine, as the symmetry of the unit circle allows.
// Timing: the table is read synchronously; wr/wi are valid one clock after
// exp is applied (the octant is delayed to match).
module twiddle_rom
  import hr_pkg::*;
(
  input  logic                       clk,
  input  logic [TW_LOG2N-1:0]        exp_i,
  output logic signed [DW-1:0]       wr,
  output logic signed [DW-1:0]       wi
);
  logic [31:0] zone0 [513];
  initial $readmemh("rtl/twiddle_rom.hex", zone0);

  logic [2:0] oct, oct_q;
  logic [8:0] r;
  logic [9:0] m;
  logic [31:0] word_q;
  logic signed [DW-1:0] c, s, cosv, sinv;

  assign oct = exp_i[11:9];
  assign r   = exp_i[8:0];
  // odd octants run backwards through zone 0
  assign m   = oct[0] ? (10'd512 - {1'b0, r}) : {1'b0, r};

  always_ff @(posedge clk) begin
    word_q <= zone0[m];
    oct_q  <= oct;
  end

  assign c = word_q[31:16];
  assign s = word_q[15:0];

  always_comb begin
    unique case (oct_q)
      3'd0: begin cosv =  c; sinv =  s; end
      3'd1: begin cosv =  s; sinv =  c; end
      3'd2: begin cosv = -s; sinv =  c; end
      3'd3: begin cosv = -c; sinv =  s; end
      3'd4: begin cosv = -c; sinv = -s; end
      3'd5: begin cosv = -s; sinv = -c; end
      3'd6: begin cosv =  s; sinv = -c; end
      default: begin cosv =  c; sinv = -s; end
    endcase
  end

  assign wr = cosv;
  assign wi = -sinv;
endmodule
