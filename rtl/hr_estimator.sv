// Heart-rate estimator: autocorrelation through the memory-based FFT.
//
// Baseline-free ECG samples arrive one at a time; their absolute values
// (clipped to 11 bits) go into a circular window buffer of WIN = 2048
// samples (4 s at 512 Hz, enough for two R waves at the lowest rate of
// 30 beats/min). Once the buffer is full and then every HOP = 512 new
// samples (about once a second) an estimate runs:
//  1. the window, oldest sample first and shifted left by IN_SHIFT, and
//     then 2048 zeros (zero padding, so that the circular correlation
//     equals the linear one) are fed to the 4096-point FFT in correlation
//     mode, which returns c(l), the autocorrelation, in natural order;
//  2. first pass over c(l): the first R-R interval pos1 is the lag of the
//     largest c(l) for LAG_MIN <= l <= LAG_MAX (200 down to 30 beats/min);
//  3. the FFT replays c(l); the second peak pos2 is the lag of the largest
//     c(l) for 1.5*pos1 <= l <= min(2.5*pos1, WIN-1);
//  4. a sequential divider forms
//       hr_bpm = round(60*FS / pos1)
//       q_pct  = round(100 * (pos2 - pos1) / pos1)   (quality, 100 = 1.00)
//     and hr_valid pulses for one clock.
// The window length, the update interval, the absolute value, the zero
// padding, the FFT/|.|^2/IFFT procedure and both formulas follow the
// design description. The lag search ranges, the input shift, the
// scaling of the transforms, the clipping and the rounding are this
// design's own choices. One estimate takes about 125,000 clocks (5 ms at
// 25 MHz); samples keep being buffered meanwhile (smp_valid may come at
// any time, at most once per clock).
module hr_estimator
  import hr_pkg::*;
#(
  parameter int unsigned FS        = FS_DEF,
  parameter int unsigned WIN_LOG2  = 11,
  parameter int unsigned HOP       = 512,
  parameter int unsigned LOG4N     = 6,
  parameter int unsigned LAG_MIN   = 60 * FS / 200,   // 200 beats/min: 153 at 512 Hz
  parameter int unsigned LAG_MAX   = 60 * FS / 30,    // 30 beats/min: 1024 at 512 Hz
  parameter int unsigned IN_SHIFT  = 4,
  parameter int unsigned PWR_SHIFT = 6,
  parameter logic [5:0]  SCALE_FWD = 6'b111111,
  parameter logic [5:0]  SCALE_INV = 6'b000111
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               smp_valid,
  input  logic signed [15:0] smp,
  output logic               hr_valid,
  output logic [9:0]         hr_bpm,
  output logic [9:0]         q_pct,
  output logic [11:0]        pos1,
  output logic [11:0]        pos2,
  output logic               fft_busy
);
  localparam int unsigned WIN = 1 << WIN_LOG2;
  localparam int unsigned AW  = 2 * LOG4N;
  localparam int unsigned N   = 1 << AW;

  typedef enum logic [2:0] {H_IDLE, H_FEED, H_PASS1, H_REPLAY, H_PASS2, H_DIV_HR, H_DIV_Q, H_OUT}
    state_t;
  state_t state;

  // ---------------- absolute value and window buffer ----------------
  logic [10:0]         win_buf [WIN];
  logic [WIN_LOG2-1:0] wp;
  logic [WIN_LOG2:0]   filled;
  logic [$clog2(HOP+1)-1:0] hop_cnt;
  logic                pending;
  logic [15:0]         mag;
  logic [10:0]         mag_clip;

  assign mag      = smp[15] ? 16'(-smp) : 16'(smp);
  assign mag_clip = (mag > 16'd2047) ? 11'd2047 : mag[10:0];

  logic [WIN_LOG2-1:0] rp;
  logic [10:0]         rdata;
  always_ff @(posedge clk) begin
    if (smp_valid) win_buf[wp] <= mag_clip;
    rdata <= win_buf[rp];
  end

  // ---------------- FFT ----------------
  logic                 f_in_valid, f_out_valid, f_done, f_replay;
  logic signed [DW-1:0] f_in_re, f_out_re, f_out_im_unused;
  logic [AW-1:0]        f_out_idx;

  fft_r4_mem #(.LOG4N(LOG4N), .PWR_SHIFT(PWR_SHIFT)) u_fft (
    .clk, .rst_n, .in_valid(f_in_valid), .in_re(f_in_re), .in_im('0),
    .corr_mode(1'b1), .scale_fwd(SCALE_FWD[LOG4N-1:0]), .scale_inv(SCALE_INV[LOG4N-1:0]),
    .replay(f_replay), .out_valid(f_out_valid), .out_idx(f_out_idx), .out_re(f_out_re),
    .out_im(f_out_im_unused), .busy(fft_busy), .done(f_done));

  // ---------------- feeding ----------------
  logic [AW:0] feed_cnt;
  logic [AW:0] feed_idx;
  assign feed_idx   = feed_cnt - 1'b1;
  assign f_in_valid = (state == H_FEED) && (feed_cnt != '0);
  assign f_in_re    = (feed_idx < (AW+1)'(WIN)) ? DW'({rdata, IN_SHIFT'(0)}) : '0;
  assign f_replay   = (state == H_REPLAY);

  // ---------------- peak search ----------------
  logic signed [DW-1:0] best;
  logic [AW-1:0]        lo, hi;
  logic                 in_range;
  assign in_range = f_out_valid && (f_out_idx >= lo) && (f_out_idx <= hi);

  // ---------------- divider ----------------
  logic        dv_start, dv_done, dv_busy_unused;
  logic [19:0] dv_num, dv_den, dv_q, dv_r_unused;
  seq_divider #(.W(20)) u_div (.clk, .rst_n, .start(dv_start), .dividend(dv_num),
                               .divisor(dv_den), .quotient(dv_q), .remainder(dv_r_unused),
                               .busy(dv_busy_unused), .done(dv_done));
  logic dv_issued;
  assign dv_start = (state == H_DIV_HR || state == H_DIV_Q) && !dv_issued;
  assign dv_den   = 20'(pos1);
  assign dv_num   = (state == H_DIV_HR) ? 20'(60 * FS) + 20'(pos1 >> 1)
                                        : 20'(pos2 - pos1) * 20'd100 + 20'(pos1 >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_IDLE; wp <= '0; filled <= '0; hop_cnt <= '0; pending <= 1'b0; rp <= '0;
      feed_cnt <= '0; best <= '0; lo <= '0; hi <= '0; pos1 <= '0; pos2 <= '0;
      hr_valid <= 1'b0; hr_bpm <= '0; q_pct <= '0; dv_issued <= 1'b0;
    end else begin
      hr_valid <= 1'b0;
      // sample intake runs independently of the estimate
      if (smp_valid) begin
        wp <= wp + 1'b1;
        if (filled != (WIN_LOG2+1)'(WIN)) filled <= filled + 1'b1;
        hop_cnt <= hop_cnt + 1'b1;
        if (filled == (WIN_LOG2+1)'(WIN) && hop_cnt >= ($clog2(HOP+1))'(HOP - 1)) begin
          hop_cnt <= '0;
          pending <= 1'b1;
        end else if (filled == (WIN_LOG2+1)'(WIN - 1)) begin
          hop_cnt <= '0;
          pending <= 1'b1;        // first estimate as soon as the window is full
        end
      end
      unique case (state)
        H_IDLE: if (pending && !fft_busy) begin
          pending  <= 1'b0;
          rp       <= smp_valid ? wp + 1'b1 : wp;    // oldest sample
          feed_cnt <= '0;
          state    <= H_FEED;
        end
        H_FEED: begin
          rp       <= rp + 1'b1;
          feed_cnt <= feed_cnt + 1'b1;
          if (feed_cnt == (AW+1)'(N)) begin
            best <= 16'sh8000; lo <= AW'(LAG_MIN); hi <= AW'(LAG_MAX); pos1 <= 12'(LAG_MIN);
            state <= H_PASS1;
          end
        end
        H_PASS1: begin
          if (in_range && f_out_re > best) begin best <= f_out_re; pos1 <= 12'(f_out_idx); end
          if (f_done) state <= H_REPLAY;
        end
        H_REPLAY: begin
          best  <= 16'sh8000;
          lo    <= AW'(pos1 + (pos1 >> 1));
          hi    <= ((pos1 << 1) + (pos1 >> 1) > 12'(WIN - 1)) ? AW'(WIN - 1)
                                                             : AW'((pos1 << 1) + (pos1 >> 1));
          pos2  <= pos1 + (pos1 >> 1);
          state <= H_PASS2;
        end
        H_PASS2: begin
          if (in_range && f_out_re > best) begin best <= f_out_re; pos2 <= 12'(f_out_idx); end
          if (f_done) begin dv_issued <= 1'b0; state <= H_DIV_HR; end
        end
        H_DIV_HR: begin
          dv_issued <= 1'b1;
          if (dv_done) begin
            hr_bpm    <= (dv_q > 20'd999) ? 10'd999 : dv_q[9:0];
            dv_issued <= 1'b0;
            state     <= H_DIV_Q;
          end
        end
        H_DIV_Q: begin
          dv_issued <= 1'b1;
          if (dv_done) begin
            q_pct <= (dv_q > 20'd999) ? 10'd999 : dv_q[9:0];
            state <= H_OUT;
          end
        end
        H_OUT: begin
          hr_valid <= 1'b1;
          state    <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
