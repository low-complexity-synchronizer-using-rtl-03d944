// tb_dvbs2_synchronizer -- end-to-end test of the synchronizer at its
// default parameters.
//
// Generates a symbol-rate DVB-S2-like stream: frames of a 26-symbol SOF, a
// 64-symbol pi/2-BPSK header code and random QPSK data, with a carrier
// frequency offset, complex Gaussian-like noise and random gaps in in_valid.
// The offset starts at +20 % of the symbol rate (the largest offset the
// frame synchronizer must handle); halfway it jumps to another value, and
// the noise level is raised.
//
// Checks:
//   * every SOF that arrives after the power estimator is ready is detected,
//     at exactly the window that ends on the last SOF symbol, and nothing
//     else is reported as a SOF;
//   * after two estimates following each change, the frequency word removed
//     by the compensator is within 0.008 turn/symbol of the true offset;
//   * the threshold is 34 P + 6 N and follows the measured noise: averaged
//     over the second half of each noise period, the noise estimate and the
//     threshold both rise when the noise is raised;
//   * each mechanism happened: SNR ready, SOF detections, frequency updates,
//     input gaps, an offset change, detection before the offset was removed
//     (first SOF at the full offset).
module tb_dvbs2_synchronizer;
  import dvbs2_sync_pkg::*;

  localparam int  W = SYM_W;
  localparam real PI = 3.14159265358979;
  localparam int  DATA_LEN = 600;
  localparam int  NFRAMES = 16;

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

  // --- stimulus bookkeeping --------------------------------------------
  int  n_in = 0;                 // symbols sent
  int  sof_end [$];              // index of each last SOF symbol sent
  real f_true = 0.2;             // turns per symbol
  real phase = 0.0;
  real sigma = 30.0;             // noise std per component
  int  n_gaps = 0;

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 4; k++) s += (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0;
    return s * 0.8660254;        // variance 1
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

  localparam real A = 200.0;     // QPSK component amplitude

  task automatic send_frame();
    // SOF, pi/2-BPSK, bits 0x18D2E82
    for (int i = 0; i < 26; i++) begin
      real s;
      s = ((32'h18D2E82 >> (25 - i)) & 1) ? -A : A;
      if (i % 2 == 0) send_sym(s, s);
      else            send_sym(-s, s);
    end
    sof_end.push_back(n_in - 1);
    // 64 header-code symbols, pi/2-BPSK with random bits
    for (int i = 0; i < 64; i++) begin
      real s;
      s = $urandom_range(0, 1) ? -A : A;
      if (i % 2 == 0) send_sym(s, s);
      else            send_sym(-s, s);
    end
    for (int i = 0; i < DATA_LEN; i++)
      send_sym($urandom_range(0, 1) ? -A : A, $urandom_range(0, 1) ? -A : A);
  endtask

  // --- monitors ----------------------------------------------------------
  int  n_corr = 0;               // windows seen by the frame synchronizer
  int  n_sof = 0, n_false = 0, n_est = 0;
  int  det_windows [$];
  bit  first_at_full_offset = 0;
  int  est_after_change = 0;
  int  n_freq_ok = 0;
  longint thr_seen_lo = 0, thr_seen_hi = 0;
  bit  noise_seen = 0;
  longint nsum = 0, tsum = 0;
  int  nsamp = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (sof) begin
        // the peak window is the one before the latest window
        det_windows.push_back(n_corr - 2 + LSOF - 1);
        n_sof++;
        nsum += longint'(noise_pow);
        tsum += longint'(threshold);
        nsamp++;
        if (n_sof == 1 && freq_word == 0) first_at_full_offset = 1;
      end
      if (freq_est_valid) begin
        n_est++;
        est_after_change++;
      end
      if (snr_ready && noise_pow != 0) noise_seen = 1;
      if (dut.corr_valid) n_corr++;
    end
  end

  // check the frequency word some time after each estimate
  always @(posedge clk) begin
    if (rst_n && freq_est_valid && est_after_change >= 2) begin
      real fw, err;
      repeat (2) @(posedge clk);
      fw = real'(freq_word) / 16777216.0;
      err = fw - f_true;
      err = err - $floor(err + 0.5);
      checks++;
      if (err > 0.008 || err < -0.008) begin
        failures++;
        $display("FAIL: frequency word %f turn, true offset %f", fw, f_true);
      end else n_freq_ok++;
    end
  end

  initial begin
    longint thr_a, thr_b, n_a, n_b;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES / 2; f++) begin
      if (f == NFRAMES / 4) begin nsum = 0; tsum = 0; nsamp = 0; end
      send_frame();
    end
    n_a = nsum / (nsamp > 0 ? nsamp : 1);
    thr_a = tsum / (nsamp > 0 ? nsamp : 1);
    // channel change: new offset, more noise
    f_true = 0.05;
    sigma = 50.0;
    est_after_change = 0;
    for (int f = 0; f < NFRAMES / 2; f++) begin
      if (f == NFRAMES / 4) begin nsum = 0; tsum = 0; nsamp = 0; end
      send_frame();
    end
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);
    n_b = nsum / (nsamp > 0 ? nsamp : 1);
    thr_b = tsum / (nsamp > 0 ? nsamp : 1);
    checks++;
    if (longint'(threshold) != 34 * longint'(total_pow) + 6 * longint'(noise_pow)) begin
      failures++;
      $display("FAIL: threshold %0d is not 34 P + 6 N", threshold);
    end

    // every SOF after the first power block must have been found, exactly
    begin
      int found, k;
      found = 0;
      for (int s = 0; s < sof_end.size(); s++) begin
        bit hit;
        hit = 0;
        for (k = 0; k < det_windows.size(); k++)
          if (det_windows[k] == sof_end[s]) hit = 1;
        if (sof_end[s] >= 256 + 30) begin
          checks++;
          if (!hit) begin
            failures++;
            $display("FAIL: SOF ending at symbol %0d not detected", sof_end[s]);
          end
        end
        if (hit) found++;
      end
      checks++;
      if (found != det_windows.size()) begin
        failures++;
        $display("FAIL: %0d detections, %0d of them at SOFs", det_windows.size(), found);
        foreach (det_windows[i]) $display("  detection at window ending %0d", det_windows[i]);
        foreach (sof_end[i]) $display("  SOF ending %0d", sof_end[i]);
      end
    end
    // mechanisms
    checks++;
    if (!snr_ready) begin failures++; $display("FAIL: SNR estimator never ready"); end
    checks++;
    if (n_sof < NFRAMES - 1) begin failures++; $display("FAIL: only %0d SOFs", n_sof); end
    checks++;
    if (n_est < NFRAMES - 1) begin failures++; $display("FAIL: only %0d estimates", n_est); end
    checks++;
    if (n_freq_ok < NFRAMES - 6) begin failures++; $display("FAIL: %0d frequency checks", n_freq_ok); end
    checks++;
    if (n_gaps == 0) begin failures++; $display("FAIL: no input gaps"); end
    checks++;
    if (!first_at_full_offset) begin failures++; $display("FAIL: first SOF not at full offset"); end
    checks++;
    if (!noise_seen || n_b <= n_a || thr_b <= thr_a) begin
      failures++;
      $display("FAIL: threshold did not follow the noise (noise %0d -> %0d, threshold %0d -> %0d)",
               n_a, n_b, thr_a, thr_b);
    end
    $display("frames %0d, SOF detected %0d, estimates %0d, frequency checks %0d, gaps %0d",
             NFRAMES, n_sof, n_est, n_freq_ok, n_gaps);
    $display("noise %0d -> %0d, threshold %0d -> %0d, signal %0d", n_a, n_b, thr_a, thr_b, sig_pow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
