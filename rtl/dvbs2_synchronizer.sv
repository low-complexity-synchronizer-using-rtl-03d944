// dvbs2_synchronizer -- DVB-S2 frame and carrier-frequency synchronizer
// built around one common autocorrelator.
//
// Symbol-rate samples from the matched filter and symbol sampler pass
// through the frequency compensator.  The compensated stream feeds the
// common autocorrelator, which forms the span-1 and span-2 SOF
// autocorrelations R(1), R(2) for every 26-symbol window.  Both
// synchronizers use these same values, in parallel:
//   * the frame synchronizer detects the SOF from |R(1)| + |R(2)| against a
//     threshold that follows the noise power from the SNR estimator;
//   * at each detected SOF the M&M frequency synchronizer turns the same
//     R(1), R(2) into a residual frequency estimate, which the compensator
//     adds to its NCO word.
// The loop removes the carrier offset over successive frames, improving the
// conditions seen by the frame synchronizer, while the differential metric
// lets the SOF be found even before any offset has been removed.
//
// Interface: in_valid/in_i/in_q, one complex symbol per in_valid (gaps
// allowed).  out_valid/out_i/out_q is the frequency-compensated stream,
// ITERS+2 = 16 clocks behind the input.  sof pulses once per detected SOF,
// four clocks after the compensated last SOF symbol leaves out_*, provided
// the next symbol has arrived (the peak test needs one symbol after the
// SOF).  freq_est_valid/freq_est report each new residual estimate (a
// fraction of a turn per symbol, 2^16 = 2*pi), freq_word the total offset
// being removed (2^24 = 2*pi per symbol).  The other outputs expose the
// metric, threshold and power estimates for monitoring.
module dvbs2_synchronizer
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned W          = SYM_W,
  parameter int unsigned LOOP_SHIFT = 0,
  parameter int unsigned AVG_LOG2   = 8,
  parameter int unsigned THR_P      = 34,
  parameter int unsigned THR_N      = 6,
  localparam int unsigned RW        = 2 * W + 1 + $clog2(LSOF),
  localparam int unsigned MW        = RW + 1,
  localparam int unsigned TW        = RW + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     in_i,
  input  logic signed [W-1:0]     in_q,
  output logic                    out_valid,
  output logic signed [W-1:0]     out_i,
  output logic signed [W-1:0]     out_q,
  output logic                    sof,
  output logic                    freq_est_valid,
  output logic signed [ANG_W-1:0] freq_est,
  output logic signed [PH_W-1:0]  freq_word,
  output logic [MW-1:0]           metric,
  output logic [MW-1:0]           sof_metric,
  output logic [TW-1:0]           threshold,
  output logic                    snr_ready,
  output logic                    freq_busy,
  output logic [2*W-1:0]          total_pow,
  output logic [2*W-1:0]          sig_pow,
  output logic [2*W-1:0]          noise_pow
);

  logic signed [RW-1:0] r_re   [NSPAN];
  logic signed [RW-1:0] r_im   [NSPAN];
  logic signed [RW-1:0] pk_re  [NSPAN];
  logic signed [RW-1:0] pk_im  [NSPAN];
  logic                 corr_valid;

  freq_compensator #(
    .W(W), .LOOP_SHIFT(LOOP_SHIFT)
  ) u_comp (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_i     (in_i),
    .in_q     (in_q),
    .est_valid(freq_est_valid),
    .est      (freq_est),
    .freq_word(freq_word),
    .out_valid(out_valid),
    .out_i    (out_i),
    .out_q    (out_q)
  );

  common_autocorrelator #(
    .W(W), .L(LSOF), .NS(NSPAN), .RW(RW)
  ) u_acorr (
    .clk, .rst_n,
    .in_valid (out_valid),
    .in_i     (out_i),
    .in_q     (out_q),
    .out_valid(corr_valid),
    .r_re     (r_re),
    .r_im     (r_im)
  );

  frame_synchronizer #(
    .RW(RW), .NS(NSPAN)
  ) u_frame (
    .clk, .rst_n,
    .enable     (snr_ready),
    .threshold  (threshold),
    .corr_valid (corr_valid),
    .r_re       (r_re),
    .r_im       (r_im),
    .metric     (metric),
    .sof        (sof),
    .peak_re    (pk_re),
    .peak_im    (pk_im),
    .peak_metric(sof_metric)
  );

  frequency_synchronizer #(
    .RW(RW), .NS(NSPAN), .LP(LSOF)
  ) u_freq (
    .clk, .rst_n,
    .sof      (sof),
    .r_re     (pk_re),
    .r_im     (pk_im),
    .busy     (freq_busy),
    .est_valid(freq_est_valid),
    .est      (freq_est)
  );

  snr_estimator #(
    .W(W), .RW(RW), .AVG_LOG2(AVG_LOG2), .THR_P(THR_P), .THR_N(THR_N)
  ) u_snr (
    .clk, .rst_n,
    .in_valid (out_valid),
    .in_i     (out_i),
    .in_q     (out_q),
    .sof      (sof),
    .peak_metric(sof_metric),
    .ready    (snr_ready),
    .pow_est  (total_pow),
    .sig_est  (sig_pow),
    .noise_est(noise_pow),
    .threshold(threshold)
  );

endmodule
