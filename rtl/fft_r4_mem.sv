// Memory-based radix-4 FFT processor with one single-port RAM.
//
// N = 4^LOG4N points (4096 by default). A four-state controller (idle,
// input, compute, output) runs it. In the input state, when in_valid is
// high, one complex sample per clock is written to the RAM in natural
// order. The compute state then runs LOG4N radix-4 DIF stages in place:
// each butterfly takes 4 clocks to read its four legs through the single
// RAM port and 4 clocks to write its results back, so one stage costs
// 2*N clocks and a 4096-point FFT 49152 clocks. The address generator
// forms the RAM addresses and twiddle exponents from a counter alone;
// the twiddle ROM stores one octant. Results sit in the RAM in
// digit-reversed order; the output state reads them back so that out_re /
// out_im appear in natural order, one per clock, with out_idx = k.
//
// Stage s divides by 4 (with rounding) when scale_fwd[s] is set, so the
// all-ones default gives X[k]/N and cannot overflow.
//
// Correlation mode (this design's own extension of the controller, used
// by the heart-rate estimator to keep a single data memory): if corr_mode
// is high when the first input word arrives, after the forward transform
// a power pass replaces every word by (|X[k]|^2 >> PWR_SHIFT, 0),
// saturated to 16 bits (2 clocks per word through the one port), and a
// second transform runs with scale_inv. The power words still lie in
// digit-reversed order, so the second transform is the transposed flow
// graph of the first: stages in reverse order, the same addresses, and
// each butterfly multiplies legs 1..3 by their twiddles as they are read
// and then forms the four sums. It takes digit-reversed input to a
// natural-order result with the same 8 clocks per butterfly. Because
// the power spectrum of a real sequence is real and even, this forward
// transform equals the inverse transform up to the factor N, giving the
// circular autocorrelation. The
// replay input, pulsed while idle, streams the RAM contents out again
// without recomputing.
//
// Interface: busy is high outside idle; done pulses for one clock after
// the last output word. A compute pass writes every RAM word before the
// output state reads it.
module fft_r4_mem
  import hr_pkg::*;
#(
  parameter int unsigned LOG4N     = 6,
  parameter int unsigned PWR_SHIFT = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DW-1:0]     in_re,
  input  logic signed [DW-1:0]     in_im,
  input  logic                     corr_mode,
  input  logic [LOG4N-1:0]         scale_fwd,
  input  logic [LOG4N-1:0]         scale_inv,
  input  logic                     replay,
  output logic                     out_valid,
  output logic [2*LOG4N-1:0]       out_idx,
  output logic signed [DW-1:0]     out_re,
  output logic signed [DW-1:0]     out_im,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned AW = 2 * LOG4N;
  localparam int unsigned N  = 1 << AW;

  typedef enum logic [2:0] {S_IDLE, S_INPUT, S_COMPUTE, S_POWER, S_OUTPUT} state_t;
  state_t state;

  logic [AW-1:0] cnt;        // input / power / output word counter
  logic [AW-3:0] bidx;       // butterfly index within a stage
  logic [2:0]    ph;         // butterfly phase: 0-3 read, 4-7 write
  logic [2:0]    stage;
  logic          pass;       // 0: forward transform, 1: correlation transform
  logic          corr_q;
  logic          rd_pend;    // output / power read issued last cycle
  logic [AW-1:0] rd_idx;
  logic          nat_q;      // RAM holds its result in natural order

  // RAM port
  logic          ram_we;
  logic [AW-1:0] ram_addr;
  logic [31:0]   ram_wdata, ram_rdata;

  fft_ram #(.AW(AW), .W(32)) u_ram (
    .clk(clk), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  // address generators: one for the RAM leg, one for the twiddle fetched a cycle ahead
  logic [AW-1:0]       ag_addr, ag_out_addr, tw_addr_unused, tw_out_unused;
  logic [TW_LOG2N-1:0] ag_exp_unused, tw_exp;
  logic [1:0]          tw_leg;

  fft_addr_gen #(.LOG4N(LOG4N)) u_ag (
    .stage(stage), .cnt({bidx, ph[1:0]}), .out_idx(cnt),
    .ram_addr(ag_addr), .tw_exp(ag_exp_unused), .out_addr(ag_out_addr));

  // forward flow: twiddle of leg 1..3 needed at ph 5..7, fetched at ph 4..6;
  // transposed flow: needed at ph 2..4 (on the read data), fetched at ph 1..3
  assign tw_leg = pass ? ph[1:0] : ph[1:0] - 2'd3;
  fft_addr_gen #(.LOG4N(LOG4N)) u_ag_tw (
    .stage(stage), .cnt({bidx, tw_leg}), .out_idx(cnt),
    .ram_addr(tw_addr_unused), .tw_exp(tw_exp), .out_addr(tw_out_unused));

  logic signed [DW-1:0] wr, wi;
  twiddle_rom u_rom (.clk(clk), .exp_i(tw_exp), .wr(wr), .wi(wi));

  // processing element
  cplx_t x0, x1, x2, x3, y0, y1, y2, y3, y1_q, y2_q, y3_q, ymul_in, ymul;
  logic  sc;
  assign x3 = pass ? ymul : ram_rdata;
  assign sc = pass ? scale_inv[stage] : scale_fwd[stage];

  r4_butterfly u_bf (.x0(x0), .x1(x1), .x2(x2), .x3(x3), .scale(sc),
                     .y0(y0), .y1(y1), .y2(y2), .y3(y3));

  always_comb begin
    unique case (ph[1:0])
      2'd1:    ymul_in = y1_q;
      2'd2:    ymul_in = y2_q;
      default: ymul_in = y3_q;
    endcase
    if (pass) ymul_in = ram_rdata;   // transposed flow: twiddle on the way in
  end
  cmul_q14 u_mul (.a(ymul_in), .wr(wr), .wi(wi), .p(ymul));

  // power of the word read in the power pass
  cplx_t                pw_in;
  logic [2*DW:0]        pw;
  logic signed [DW-1:0] pw_sat;
  assign pw_in  = ram_rdata;
  assign pw     = (2*DW+1)'(pw_in.re * pw_in.re) + (2*DW+1)'(pw_in.im * pw_in.im);
  always_comb begin
    logic [2*DW:0] t;
    t      = pw >> PWR_SHIFT;
    pw_sat = (t > (2*DW+1)'(32767)) ? 16'sh7fff : DW'(t);
  end

  // RAM port multiplexing
  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = cnt;
    ram_wdata = {in_re, in_im};
    unique case (state)
      S_IDLE:  begin ram_we = in_valid; ram_addr = '0; end
      S_INPUT: begin ram_we = in_valid; ram_addr = cnt; end
      S_COMPUTE: begin
        ram_addr = ag_addr;
        if (ph[2]) begin
          ram_we    = 1'b1;
          if (ph == 3'd4)  ram_wdata = y0;
          else if (pass)   ram_wdata = (ph == 3'd5) ? y1_q : (ph == 3'd6) ? y2_q : y3_q;
          else             ram_wdata = ymul;
        end
      end
      S_POWER: begin
        ram_addr  = rd_pend ? rd_idx : cnt;
        ram_we    = rd_pend;
        ram_wdata = {pw_sat, 16'sd0};
      end
      S_OUTPUT: ram_addr = nat_q ? cnt : ag_out_addr;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; bidx <= '0; ph <= '0; stage <= '0; pass <= 1'b0;
      corr_q <= 1'b0; nat_q <= 1'b0; rd_pend <= 1'b0; rd_idx <= '0; out_valid <= 1'b0; out_idx <= '0;
      done <= 1'b0; x0 <= '0; x1 <= '0; x2 <= '0; y1_q <= '0; y2_q <= '0; y3_q <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          rd_pend <= 1'b0;
          if (in_valid) begin
            corr_q <= corr_mode;
            cnt    <= AW'(1);
            state  <= S_INPUT;
          end else if (replay) begin
            cnt   <= '0;
            state <= S_OUTPUT;
          end
        end
        S_INPUT: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            state <= S_COMPUTE; stage <= '0; bidx <= '0; ph <= '0; pass <= 1'b0;
          end
        end
        S_COMPUTE: begin
          // capture legs 0..2 one clock after their read; leg 3 is used straight from the RAM
          if (ph == 3'd1) x0 <= ram_rdata;
          if (ph == 3'd2) x1 <= pass ? ymul : ram_rdata;
          if (ph == 3'd3) x2 <= pass ? ymul : ram_rdata;
          if (ph == 3'd4) begin y1_q <= y1; y2_q <= y2; y3_q <= y3; end
          ph <= ph + 1'b1;
          if (ph == 3'd7) begin
            bidx <= bidx + 1'b1;
            if (bidx == '1) begin
              if (!pass && stage == 3'(LOG4N - 1)) begin
                cnt   <= '0;
                nat_q <= 1'b0;
                if (corr_q) state <= S_POWER;
                else        state <= S_OUTPUT;
              end else if (pass && stage == 3'd0) begin
                cnt   <= '0;
                nat_q <= 1'b1;
                state <= S_OUTPUT;
              end else if (pass) begin
                stage <= stage - 1'b1;
              end else begin
                stage <= stage + 1'b1;
              end
            end
          end
        end
        S_POWER: begin
          // alternate: read word cnt, then write its power back
          if (!rd_pend) begin
            rd_pend <= 1'b1;
            rd_idx  <= cnt;
          end else begin
            rd_pend <= 1'b0;
            cnt     <= cnt + 1'b1;
            if (rd_idx == AW'(N - 1)) begin
              pass  <= 1'b1;
              state <= S_COMPUTE; stage <= 3'(LOG4N - 1); bidx <= '0; ph <= '0;
            end
          end
        end
        S_OUTPUT: begin
          out_valid <= 1'b1;
          out_idx   <= cnt;
          cnt       <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            state <= S_IDLE;
            cnt   <= '0;
            pass  <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (out_valid && out_idx == AW'(N - 1)) done <= 1'b1;
    end
  end

  cplx_t out_word;
  assign out_word = ram_rdata;
  assign out_re   = out_word.re;
  assign out_im   = out_word.im;
  assign busy     = (state != S_IDLE);

  // a data word is never written in the input state without in_valid
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_INPUT && !in_valid) |-> !ram_we);
endmodule
