// tb_sync_low_snr -- workload test of the synchronizer at its default
// parameters under the worst channel: SNR -2.35 dB (the quasi-error-free
// limit of the strongest LDPC code) and a carrier offset of 20 % of the
// symbol rate.
//
// Sends 12 frames (26-symbol SOF, 64-symbol pi/2-BPSK header code, 600 QPSK
// symbols) with random gaps in in_valid.  The SOF positions are known, so
// every window of the common autocorrelator is classed as a SOF window or
// another window.  Measured and printed:
//   * the mean metric |R(1)| + |R(2)| at the SOF windows and at the other
//     windows, and their ratio (the quantity plotted against SNR to show
//     how far the SOF stands out);
//   * the SOF detections, misses and false alarms at the default threshold.
// Checks:
//   * the mean SOF metric exceeds the mean of the other windows by more than
//     10 %: the differential metric still responds to the SOF at the full
//     offset and this SNR;
//   * the mean SOF metric lies between 0.75 and 1.5 times 49 S times the
//     1.04 bias of the magnitude estimate (S = signal power per symbol); the
//     upper margin is wide because noise raises the mean of a magnitude and
//     12 SOFs still scatter;
//   * the total power estimate (one 256-symbol block, so a few percent of
//     spread) is within 20 % of S + N, and the threshold
//     is 34 P + 6 N, so the threshold sits above the noise-only windows.
// Detection counts are reported, not checked.  At this SNR the SOF windows
// average about 52 S and the other windows about 24 S, but the largest of
// the ~690 other windows of a frame is comparable with the SOF window, and
// the default threshold (34 P + 6 N, about 100 S here) lies above both, so
// a single 26-symbol window does not give reliable detection.
module tb_sync_low_snr;
  import dvbs2_sync_pkg::*;

  localparam int  W = SYM_W;
  localparam real PI = 3.14159265358979;
  localparam int  DATA_LEN = 600;
  localparam int  NFRAMES = 12;
  localparam real A = 120.0;           // component amplitude, S = 2 A^2
  localparam real SNR_DB = -2.35;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [W-1:0] out_i, out_q;
  logic sof;
  logic freq_est_valid;
  logic signed [ANG_W-1:0] freq_est;
  logic signed [PH_W-1:0] freq_word;
  logic [2*W+1+$clog2(LSOF):0] metric, sof_metric;
  logic [2*W+4+$clog2(LSOF):0] threshold;
  logic snr_ready;
  logic freq_busy;
  logic [2*W-1:0] total_pow, sig_pow, noise_pow;

  dvbs2_synchronizer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  real s_pow = 2.0 * A * A;
  real n_pow;
  real sigma;
  real f_true = 0.2;
  real phase = 0.0;
  int  n_in = 0, n_gaps = 0;
  bit  is_sof_end [int];             // indices of last SOF symbols

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 4; k++) s += (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0;
    return s * 0.8660254;
  endfunction

  task automatic send_sym(input real re, input real im);
    real c, s, a, b;
    int ia, ib;
    c = $cos(2.0 * PI * phase);
    s = $sin(2.0 * PI * phase);
    a = re * c - im * s + sigma * gauss();
    b = re * s + im * c + sigma * gauss();
    ia = $rtoi(a);
    ib = $rtoi(b);
    if (ia > 511) ia = 511;
    if (ia < -512) ia = -512;
    if (ib > 511) ib = 511;
    if (ib < -512) ib = -512;
    phase = phase + f_true;
    phase = phase - $floor(phase);
    in_valid <= 1'b1;
    in_i <= W'(ia);
    in_q <= W'(ib);
    n_in++;
    @(posedge clk);
    if ($urandom_range(0, 7) == 0) begin
      n_gaps++;
      in_valid <= 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
  endtask

  task automatic send_pi2(input int i, input real s);
    if (i % 2 == 0) send_sym(s, s);
    else            send_sym(-s, s);
  endtask

  task automatic send_frame();
    for (int i = 0; i < 26; i++)
      send_pi2(i, ((32'h18D2E82 >> (25 - i)) & 1) ? -A : A);
    is_sof_end[n_in - 1] = 1;
    for (int i = 0; i < 64; i++)
      send_pi2(i, $urandom_range(0, 1) ? -A : A);
    for (int i = 0; i < DATA_LEN; i++)
      send_sym($urandom_range(0, 1) ? -A : A, $urandom_range(0, 1) ? -A : A);
  endtask

  // --- monitors ----------------------------------------------------------
  int  n_corr = 0;
  real sum_sof = 0.0, sum_other = 0.0;
  int  cnt_sof = 0, cnt_other = 0;
  int  n_det = 0, n_false = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (sof) begin
        if (is_sof_end.exists(n_corr - 2 + LSOF - 1)) n_det++;
        else n_false++;
      end
      if (dut.corr_valid) begin
        // this window ends on symbol n_corr + LSOF - 1
        if (is_sof_end.exists(n_corr + LSOF - 1)) begin
          sum_sof += real'(metric);
          cnt_sof++;
        end else begin
          sum_other += real'(metric);
          cnt_other++;
        end
        n_corr++;
      end
    end
  end

  initial begin
    real m_sof, m_other, ratio, p_meas, expect_sof;
    n_pow = s_pow / (10.0 ** (SNR_DB / 10.0));
    sigma = $sqrt(n_pow / 2.0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NFRAMES; k++) send_frame();
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);

    m_sof = sum_sof / real'(cnt_sof > 0 ? cnt_sof : 1);
    m_other = sum_other / real'(cnt_other > 0 ? cnt_other : 1);
    ratio = m_sof / (m_other > 0.0 ? m_other : 1.0);
    expect_sof = 49.0 * 1.04 * s_pow;
    p_meas = real'(total_pow);
    $display("SNR %0.2f dB, offset %0.2f turn/symbol: S %0.0f, N %0.0f", SNR_DB, f_true,
             s_pow, n_pow);
    $display("mean metric: SOF windows %0.0f (%0d, %0.1f S), other windows %0.0f (%0d, %0.1f S), ratio %0.3f",
             m_sof, cnt_sof, m_sof / s_pow, m_other, cnt_other, m_other / s_pow, ratio);
    $display("threshold %0d (%0.1f S), P %0d, N estimate %0d", threshold,
             real'(threshold) / s_pow, total_pow, noise_pow);
    $display("SOFs sent %0d, detected %0d, false alarms %0d, gaps %0d",
             NFRAMES, n_det, n_false, n_gaps);

    checks++;
    if (cnt_sof != NFRAMES || cnt_other == 0) begin
      failures++;
      $display("FAIL: %0d SOF windows seen, %0d expected", cnt_sof, NFRAMES);
    end
    checks++;
    if (ratio <= 1.1) begin
      failures++;
      $display("FAIL: SOF windows do not stand out (ratio %f)", ratio);
    end
    checks++;
    if (m_sof < 0.75 * expect_sof || m_sof > 1.5 * expect_sof) begin
      failures++;
      $display("FAIL: mean SOF metric %0.0f, expected about %0.0f", m_sof, expect_sof);
    end
    checks++;
    if (p_meas < 0.8 * (s_pow + n_pow) || p_meas > 1.2 * (s_pow + n_pow)) begin
      failures++;
      $display("FAIL: power estimate %0.0f, expected about %0.0f", p_meas, s_pow + n_pow);
    end
    checks++;
    if (longint'(threshold) != 34 * longint'(total_pow) + 6 * longint'(noise_pow) ||
        real'(threshold) <= m_other) begin
      failures++;
      $display("FAIL: threshold %0d", threshold);
    end
    checks++;
    if (n_gaps == 0 || !snr_ready) begin
      failures++;
      $display("FAIL: mechanisms: gaps %0d, ready %0d", n_gaps, snr_ready);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
