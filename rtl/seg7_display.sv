// Six-digit seven-segment display of the quality indicator and heart rate.
//
// The three left digits show the quality indicator in hundredths (q_pct
// = 94 is shown 0 9 4, i.e. 0.94, with 1.00 the best value), the three
// right digits the heart rate in beats per minute. Both values are
// latched on upd (the estimator's hr_valid) and limited to 999. Binary
// values are split into decimal digits by constant division, and each
// digit drives segments a..g (bit 0 = a ... bit 6 = g), active low as on
// common-anode displays. hex[5] is the leftmost digit. The digit layout
// follows the board display described for the design; the segment
// polarity and bit order are this design's choice. Outputs are
// registered: they change one clock after upd.
module seg7_display (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,
  input  logic [9:0]       hr_bpm,
  input  logic [9:0]       q_pct,
  output logic [5:0][6:0]  hex
);
  function automatic logic [6:0] seg(input logic [3:0] v);
    unique case (v)
      4'd0: return 7'b1000000;
      4'd1: return 7'b1111001;
      4'd2: return 7'b0100100;
      4'd3: return 7'b0110000;
      4'd4: return 7'b0011001;
      4'd5: return 7'b0010010;
      4'd6: return 7'b0000010;
      4'd7: return 7'b1111000;
      4'd8: return 7'b0000000;
      4'd9: return 7'b0010000;
      default: return 7'b1111111;     // blank
    endcase
  endfunction

  function automatic logic [11:0] bcd3(input logic [9:0] v);
    logic [9:0] x;
    x = (v > 10'd999) ? 10'd999 : v;
    return {4'(x / 10'd100), 4'((x / 10'd10) % 10'd10), 4'(x % 10'd10)};
  endfunction

  logic [11:0] q_d, h_d;
  always_comb begin
    q_d = bcd3(q_pct);
    h_d = bcd3(hr_bpm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hex <= {6{7'b0111111}};            // dashes until the first estimate
    end else if (upd) begin
      hex[5] <= seg(q_d[11:8]);
      hex[4] <= seg(q_d[7:4]);
      hex[3] <= seg(q_d[3:0]);
      hex[2] <= seg(h_d[11:8]);
      hex[1] <= seg(h_d[7:4]);
      hex[0] <= seg(h_d[3:0]);
    end
  end
endmodule
