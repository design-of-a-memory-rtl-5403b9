// Baseline wander removal by rank-one adaptive subspace tracking.
//
// Each new ECG sample x(n) is shifted into a 40-sample window i(n). The
// dominant eigenvector of the slowly updated data correlation matrix is
// tracked by one power-method step per sample, without forming the
// matrix:
//   s(n) = alpha*s(n-1) + (1-alpha) * i(n) * (i(n)^T z(n-1))
//   z(n) = s(n) / ||s(n)||
//   b(n) = (i(n)^T z(n)) * z(n)          baseline estimate
//   y    = x(n) - b_last(n)              output sample
// Storage follows the design description: i (12-bit), s (26-bit signed)
// and z (10-bit) vectors of length 40; alpha and 1-alpha are in units of
// 2^-12 (4055 and 41 for alpha = 0.99); z is in units of 2^-10. One
// multiplier with one accumulator does every product and inner product in
// turn, a sequential square root forms ||s|| and a sequential divider
// forms z. A Mealy FSM with the states idle, BWR_in, BWR_com and BWR_out
// sequences the work.
//
// This design's own choices: the output is the newest window element
// only (one output word per input word); z is kept non-negative, since
// the dominant eigenvector of a correlation matrix of positive ADC codes
// has positive entries; s starts at zero and z at 1/sqrt(40) in every
// element; if ||s|| is zero, z is left unchanged.
//
// Interface and timing: in_valid is a one-clock pulse with in_sample,
// accepted only while idle (busy low). About 1700 clocks later out_valid
// pulses for one clock with out_y, a signed sample. At 25 MHz and 512
// samples/s this uses under 4 % of the sample period.
module bwr
  import hr_pkg::*;
#(
  parameter int unsigned L        = 40,
  parameter int unsigned IW       = 12,
  parameter int unsigned SW       = 26,
  parameter int unsigned ZW       = 10,
  parameter int unsigned ALPHA_Q  = 4055,   // alpha * 2^12
  parameter int unsigned OMA_Q    = 41,     // (1 - alpha) * 2^12
  parameter int unsigned Z_INIT   = 162     // 2^10 / sqrt(40)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IW-1:0]        in_sample,
  output logic                 out_valid,
  output logic signed [15:0]   out_y,
  output logic                 busy
);
  localparam int unsigned KW  = $clog2(L);
  localparam int unsigned NW  = 56;           // width of ||s||^2
  localparam int unsigned DVW = SW + ZW;      // divider width

  typedef enum logic [1:0] {S_IDLE, S_BWR_IN, S_BWR_COM, S_BWR_OUT} state_t;
  typedef enum logic [2:0] {P_DOT1, P_SUPD, P_NORM, P_SQRT, P_DIV, P_DOT2, P_BASE} step_t;
  state_t state;
  step_t  step;

  logic [IW-1:0]        i_vec [L];
  logic signed [SW-1:0] s_vec [L];
  logic [ZW-1:0]        z_vec [L];

  logic [KW-1:0]        k;
  logic [1:0]           sub;
  logic                 div_issued;

  // the one multiplier and its accumulator
  logic signed [35:0]   mul_a;
  logic signed [26:0]   mul_b;
  logic signed [62:0]   prod;
  logic signed [63:0]   acc;
  assign prod = mul_a * mul_b;

  logic signed [35:0]   p_dot;      // i^T z(n-1)
  logic signed [62:0]   t_q, u_q;   // partial products of the s update
  logic [NW/2-1:0]      norm;

  // square root
  logic sq_start, sq_done, sq_busy_unused;
  logic [NW/2-1:0] sq_root;
  seq_sqrt #(.W(NW)) u_sqrt (.clk, .rst_n, .start(sq_start), .radicand(acc[NW-1:0]),
                             .root(sq_root), .busy(sq_busy_unused), .done(sq_done));

  // divider: |s_k| * 2^10 / ||s||
  logic dv_start, dv_done, dv_busy_unused;
  logic [DVW-1:0] dv_q, dv_r_unused, dv_num;
  logic signed [SW-1:0] s_k;
  assign s_k    = s_vec[k];
  assign dv_num = DVW'(s_k[SW-1] ? 36'sd0 : 36'(s_k)) << ZW;
  seq_divider #(.W(DVW)) u_div (.clk, .rst_n, .start(dv_start), .dividend(dv_num),
                                .divisor(DVW'(norm)), .quotient(dv_q), .remainder(dv_r_unused),
                                .busy(dv_busy_unused), .done(dv_done));

  // operand selection for the shared multiplier
  always_comb begin
    mul_a = '0;
    mul_b = '0;
    unique case (step)
      P_DOT1, P_DOT2: begin mul_a = 36'(i_vec[k]); mul_b = 27'(z_vec[k]); end
      P_SUPD: begin
        unique case (sub)
          2'd0:    begin mul_a = p_dot;               mul_b = 27'(i_vec[k]); end
          2'd1:    begin mul_a = 36'(s_k);            mul_b = 27'(ALPHA_Q);  end
          default: begin mul_a = t_q[35:0];           mul_b = 27'(OMA_Q);    end
        endcase
      end
      P_NORM: begin mul_a = 36'(s_k); mul_b = 27'(s_k); end
      P_BASE: begin mul_a = p_dot;    mul_b = 27'(z_vec[L-1]); end
      default: ;
    endcase
  end

  function automatic logic signed [SW-1:0] sat_s(input logic signed [62:0] v);
    if (v > 63'sd33554431)       return 26'sh1ffffff;
    else if (v < -63'sd33554432) return 26'sh2000000;
    else                         return v[SW-1:0];
  endfunction

  assign sq_start = (state == S_BWR_COM) && (step == P_SQRT) && (sub == 2'd0);
  assign dv_start = (state == S_BWR_COM) && (step == P_DIV) && !div_issued;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= P_DOT1; k <= '0; sub <= '0; acc <= '0; div_issued <= 1'b0;
      p_dot <= '0; t_q <= '0; u_q <= '0; norm <= '0; out_valid <= 1'b0; out_y <= '0;
      for (int j = 0; j < L; j++) begin
        i_vec[j] <= '0; s_vec[j] <= '0; z_vec[j] <= ZW'(Z_INIT);
      end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          // shift the FIFO window: element L-1 is the newest
          for (int j = 0; j < L - 1; j++) i_vec[j] <= i_vec[j+1];
          i_vec[L-1] <= in_sample;
          state <= S_BWR_IN;
        end
        S_BWR_IN: begin
          state <= S_BWR_COM; step <= P_DOT1; k <= '0; sub <= '0; acc <= '0;
        end
        S_BWR_COM: begin
          unique case (step)
            P_DOT1, P_DOT2: begin
              acc <= acc + 64'(prod);
              k   <= k + 1'b1;
              if (k == KW'(L - 1)) begin
                p_dot <= 36'((acc + 64'(prod)) >>> ZW);
                k     <= '0;
                acc   <= '0;
                step  <= (step == P_DOT1) ? P_SUPD : P_BASE;
              end
            end
            P_SUPD: begin
              sub <= sub + 1'b1;
              if (sub == 2'd0) t_q <= prod;
              if (sub == 2'd1) u_q <= prod;
              if (sub == 2'd2) begin
                s_vec[k] <= sat_s((u_q + prod) >>> 12);
                sub <= '0;
                k   <= k + 1'b1;
                if (k == KW'(L - 1)) begin k <= '0; step <= P_NORM; end
              end
            end
            P_NORM: begin
              acc <= acc + 64'(prod);
              k   <= k + 1'b1;
              if (k == KW'(L - 1)) begin
                acc  <= acc + 64'(prod);
                k    <= '0;
                sub  <= '0;
                step <= P_SQRT;
              end
            end
            P_SQRT: begin
              sub <= 2'd1;                 // start issued in sub 0
              if (sq_done) begin
                norm <= sq_root;
                acc  <= '0;
                sub  <= '0;
                k    <= '0;
                div_issued <= 1'b0;
                step <= (sq_root == '0) ? P_DOT2 : P_DIV;
              end
            end
            P_DIV: begin
              div_issued <= 1'b1;
              if (dv_done) begin
                z_vec[k]   <= (dv_q > DVW'(2**ZW - 1)) ? ZW'(2**ZW - 1) : dv_q[ZW-1:0];
                div_issued <= 1'b0;
                k          <= k + 1'b1;
                if (k == KW'(L - 1)) begin k <= '0; acc <= '0; step <= P_DOT2; end
              end
            end
            P_BASE: begin
              out_y <= 16'(signed'({4'b0, i_vec[L-1]}) - 16'(prod >>> ZW));
              state <= S_BWR_OUT;
            end
            default: step <= P_DOT1;
          endcase
        end
        S_BWR_OUT: begin
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // samples must only be offered while the block is idle
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> state == S_IDLE);
endmodule
