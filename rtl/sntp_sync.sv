// sntp_sync: synchronization module - local clock and clock discipline.
//
// The local clock is a phase accumulator {seconds[31:0], fraction[21:0],
// sub-fraction[ACC_W-1:0]} advanced every system clock cycle by an increment
// word. The increment is the nominal value 2^(22+ACC_W)/CLK_HZ plus a
// configured frequency trim, a learned frequency correction and a temporary
// phase-slew term, so time is corrected by slight frequency variations of the
// clock counter rather than by jumps.
//
// A measurement arrives as four timestamps t1..t4 (meas_valid, one cycle).
// Offset and round-trip delay follow the on-wire equations:
//   delay  = (t4 - t1) - (t3 - t2)
//   offset = ((t2 - t1) + (t3 - t4)) / 2
// The server feeds t1 = t4 = local time at the GPS PPS edge and t2 = t3 =
// the GPS time, so that offset = GPS - local and delay = 0.
//
// Discipline (a proportional-integral loop parameterised by the poll
// exponent p and attenuation q):
//   |offset| > STEP_LIMIT : the clock is stepped by offset at once.
//   otherwise             : offset/2^q is slewed out over the next 2^p
//                           seconds, and offset/2^(2p+q+FREQ_SH) seconds per
//                           second is added to the frequency correction.
// The slew ends after 2^p seconds (CLK_HZ * 2^p cycles) even if no new
// measurement arrives.
// 'locked' is set while the last |offset| is at most LOCK_LIMIT.
//
// Timing: offset_valid rises 2 cycles after meas_valid; the correction is
// applied at the end of the cycle after offset_valid.
//
// From the source design: 22-bit fraction, eq. (1), correction by frequency
// variation, p and q with nominal p = 0, q = 2. The discipline law itself,
// the step limit, the accumulator width and the lock limit are this design's
// own choices.
module sntp_sync
  import sntp_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned ACC_W      = 32,
  parameter int unsigned STEP_LIMIT = 536_871,  // 128 ms in 2^-22 s units
  parameter int unsigned LOCK_LIMIT = 42,       // 10 us in 2^-22 s units
  parameter int unsigned FREQ_SH    = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic [3:0]         poll_exp,
  input  logic [3:0]         q,
  input  logic signed [31:0] freq_trim,
  // measurement
  input  logic               meas_valid,
  input  ts_t                t1,
  input  ts_t                t2,
  input  ts_t                t3,
  input  ts_t                t4,
  // local clock
  output ts_t                now,
  output logic               sec_tick,     // one cycle when the seconds field rolls over
  // status
  output logic               offset_valid,
  output ofs_t               offset,
  output ofs_t               delay,
  output logic               stepped,      // one cycle: last correction was a step
  output logic               locked,
  output logic signed [47:0] freq_corr,
  output logic signed [47:0] slew
);

  localparam int unsigned CLK_W = TS_W + ACC_W;
  localparam longint unsigned INC_NOM = (64'd1 << (FRAC_W + ACC_W)) / 64'(CLK_HZ);
  // K converts an offset in 2^-22 s into an increment in 2^-(22+ACC_W) s per
  // cycle per second: K = 2^(ACC_W+KSH)/CLK_HZ, product shifted right by KSH.
  localparam int unsigned KSH = 24;
  localparam longint unsigned K = (64'd1 << (ACC_W + KSH)) / 64'(CLK_HZ);

  logic [CLK_W-1:0] clk_acc;
  logic signed [47:0] inc;

  assign inc = 48'(INC_NOM) + 48'(freq_trim) + freq_corr + slew;
  assign now = clk_acc[CLK_W-1 -: TS_W];

  // ---------------- offset / delay datapath ----------------
  ofs_t d21, d34, d41, d32;
  logic [2:0] pipe;

  function automatic ofs_t sdiff(ts_t a, ts_t b);
    ts_t d;
    d = a - b;                       // modular difference
    return ofs_t'(signed'(d));       // sign-extend
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d21 <= '0; d34 <= '0; d41 <= '0; d32 <= '0;
      offset <= '0; delay <= '0;
      pipe <= '0;
    end else begin
      pipe <= {pipe[1:0], meas_valid};
      if (meas_valid) begin
        d21 <= sdiff(t2, t1);
        d34 <= sdiff(t3, t4);
        d41 <= sdiff(t4, t1);
        d32 <= sdiff(t3, t2);
      end
      if (pipe[0]) begin
        offset <= (d21 + d34) >>> 1;
        delay  <= d41 - d32;
      end
    end
  end

  assign offset_valid = pipe[1];

  // ---------------- discipline ----------------
  ofs_t abs_off;
  assign abs_off = offset[OFS_W-1] ? -offset : offset;

  logic signed [95:0] prod;
  assign prod = 96'(offset) * $signed({32'b0, 64'(K)});

  logic [47:0] slew_cnt;    // cycles of slew left
  logic [5:0]  sh_phase, sh_freq;
  assign sh_phase = 6'(KSH) + 6'(poll_exp) + 6'(q);
  assign sh_freq  = 6'(KSH) + 6'(2 * poll_exp) + 6'(q) + 6'(FREQ_SH);

  logic do_step;
  assign do_step = pipe[2] && (abs_off > ofs_t'(STEP_LIMIT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_acc   <= '0;
      sec_tick  <= 1'b0;
      freq_corr <= '0;
      slew      <= '0;
      slew_cnt  <= '0;
      stepped   <= 1'b0;
      locked    <= 1'b0;
    end else begin
      stepped  <= 1'b0;
      sec_tick <= 1'b0;
      if (do_step) begin
        clk_acc <= clk_acc + {CLK_W'(offset[TS_W-1:0]) << ACC_W} + CLK_W'(inc);
        slew      <= '0;
        slew_cnt  <= '0;
        stepped   <= 1'b1;
        locked    <= 1'b0;
      end else begin
        logic [CLK_W-1:0] nxt;
        nxt = clk_acc + CLK_W'(inc);
        if (nxt[CLK_W-1 -: SEC_W] != clk_acc[CLK_W-1 -: SEC_W]) sec_tick <= 1'b1;
        if (slew_cnt == 48'd1) slew <= '0;
        if (slew_cnt != '0)    slew_cnt <= slew_cnt - 48'd1;
        clk_acc <= nxt;
        if (pipe[2]) begin
          slew      <= 48'(prod >>> sh_phase);
          slew_cnt  <= 48'(CLK_HZ) << poll_exp;
          freq_corr <= freq_corr + 48'(prod >>> sh_freq);
          locked    <= (abs_off <= ofs_t'(LOCK_LIMIT));
        end
      end
    end
  end

endmodule
