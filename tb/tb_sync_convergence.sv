// tb_sync_convergence -- workload test of the synchronizer at its default
// parameters: acquisition and convergence of the carrier frequency loop at
// the largest offset, 20 % of the symbol rate (5 MHz at 25 Mbaud).
//
// Two acquisitions are run, one at +0.2 and one at -0.2 turn/symbol, with a
// reset of the synchronizer between them.  Each sends 7 frames (26-symbol
// SOF, 64-symbol pi/2-BPSK header code, 600 QPSK symbols) at about 14 dB SNR
// with random gaps in in_valid.  The first frame falls inside the first
// power block, before detection is enabled, so frame 2 is the first one the
// loop can use.
//
// Checks, for each acquisition:
//   * every SOF after the first frame is detected at its exact window, the
//     first of them with the full offset still present;
//   * from the 4th estimate taken at a true SOF on, the residual offset
//     (true offset minus the compensator's frequency word) is below
//     0.004 turn/symbol, i.e. 100 kHz at 25 Mbaud;
//   * at most one false alarm.  The metric cannot tell a SOF from a stretch
//     of pi/2-BPSK header that matches the SOF with every other symbol
//     inverted (a SOF at half a turn per symbol), so a random header gives
//     an occasional false alarm; its estimate is wrong and the next true SOF
//     corrects the loop.  Estimates taken at false alarms are not checked;
//   * the SOF window's metric stands clear of the other windows of the same
//     frame (those not reported as SOFs): peak / largest other exceeds 1.3.
// The residual after each estimate and the smallest peak ratio are printed.
// Mechanisms counted: detections, estimates, input gaps, resets.
module tb_sync_convergence;
  import dvbs2_sync_pkg::*;

  localparam int  W = SYM_W;
  localparam real PI = 3.14159265358979;
  localparam int  DATA_LEN = 600;
  localparam int  NFRAMES = 7;
  localparam real A = 200.0;           // QPSK component amplitude
  localparam real RES_MAX = 0.004;     // 100 kHz / 25 Mbaud
  localparam real RATIO_MIN = 1.3;

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

  real f_true = 0.2;
  real phase = 0.0;
  real sigma = 40.0;                   // 2 A^2 / (2 sigma^2) = 25 (14 dB)
  int  n_gaps = 0, n_resets = 0;
  int  n_in = 0;                       // symbols sent since the last reset
  int  sof_end [$];                    // index of each last SOF symbol sent

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
    sof_end.push_back(n_in - 1);
    for (int i = 0; i < 64; i++)
      send_pi2(i, $urandom_range(0, 1) ? -A : A);
    for (int i = 0; i < DATA_LEN; i++)
      send_sym($urandom_range(0, 1) ? -A : A, $urandom_range(0, 1) ? -A : A);
  endtask

  // --- monitors ----------------------------------------------------------
  int  n_sof = 0, n_est = 0, n_sof_total = 0, n_est_total = 0;
  int  n_corr = 0, n_false = 0, n_false_total = 0;
  bit  last_true = 0;                  // latest detection was at a SOF
  bit  first_at_full = 0;
  longint other_max = 0;               // largest metric of non-peak windows
  longint cur_metric = 0, prev_metric = 0;
  real min_ratio = 1.0e9;

  always @(posedge clk) begin
    if (rst_n) begin
      if (sof) begin
        // sof follows the window after the peak: prev_metric is the peak,
        // cur_metric the window after it
        real r;
        longint other;
        // the peak window ends on symbol n_corr - 2 + LSOF - 1
        last_true = 0;
        foreach (sof_end[k]) if (sof_end[k] == n_corr - 2 + LSOF - 1) last_true = 1;
        if (last_true) begin
          n_sof++;
          n_sof_total++;
          if (n_sof == 1 && freq_word == 0) first_at_full = 1;
        end else begin
          n_false++;
          n_false_total++;
          $display("  false alarm at the window ending on symbol %0d", n_corr - 2 + LSOF - 1);
        end
        // the ratio compares a SOF with the windows not reported as SOFs
        if (last_true) begin
          other = (cur_metric > other_max) ? cur_metric : other_max;
          if (other > 0) begin
            r = real'(sof_metric) / real'(other);
            if (r < min_ratio) min_ratio = r;
          end
          other_max = 0;
        end
        prev_metric = 0;
      end
      if (dut.corr_valid) n_corr++;
      if (dut.corr_valid) begin
        // prev_metric has left the peak comparison without being a SOF
        if (prev_metric > other_max && snr_ready) other_max = prev_metric;
        prev_metric = cur_metric;
        cur_metric = longint'(metric);
      end
    end
  end

  // residual offset two clocks after each estimate
  always @(posedge clk) begin
    if (rst_n && freq_est_valid) begin
      real fw, res;
      bit  at_sof;
      at_sof = last_true;
      if (at_sof) n_est++;
      n_est_total++;
      repeat (2) @(posedge clk);
      fw = real'(freq_word) / 16777216.0;
      res = f_true - fw;
      res = res - $floor(res + 0.5);
      $display("  offset %f: %s estimate %0d, residual %f turn/symbol (%0.1f kHz at 25 Mbaud)",
               f_true, at_sof ? "SOF" : "false-alarm", n_est, res, res * 25000.0);
      if (at_sof && n_est >= 4) begin
        checks++;
        if (res > RES_MAX || res < -RES_MAX) begin
          failures++;
          $display("FAIL: residual %f after %0d estimates", res, n_est);
        end
      end
    end
  end

  task automatic acquisition(input real f);
    rst_n <= 1'b0;
    n_resets++;
    repeat (3) @(posedge clk);
    f_true = f;
    n_sof = 0;
    n_est = 0;
    n_false = 0;
    n_in = 0;
    n_corr = 0;
    sof_end.delete();
    first_at_full = 0;
    other_max = 0;
    cur_metric = 0;
    prev_metric = 0;
    min_ratio = 1.0e9;
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NFRAMES; k++) send_frame();
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);
    checks++;
    if (!first_at_full) begin
      failures++;
      $display("FAIL: offset %f: first SOF not detected at the full offset", f);
    end
    checks++;
    if (n_est < 4) begin
      failures++;
      $display("FAIL: offset %f: only %0d estimates", f, n_est);
    end
    checks++;
    if (n_sof != NFRAMES - 1) begin
      failures++;
      $display("FAIL: offset %f: %0d SOFs detected, %0d expected", f, n_sof, NFRAMES - 1);
    end
    checks++;
    if (n_false > 1) begin
      failures++;
      $display("FAIL: offset %f: %0d false alarms", f, n_false);
    end
    checks++;
    if (min_ratio < RATIO_MIN) begin
      failures++;
      $display("FAIL: offset %f: SOF metric only %f times the largest other window", f, min_ratio);
    end
    $display("offset %f: %0d SOFs, %0d estimates at SOFs, %0d false alarms, smallest peak ratio %f",
             f, n_sof, n_est, n_false, min_ratio);
  endtask

  initial begin
    acquisition(0.2);
    acquisition(-0.2);
    checks++;
    if (n_gaps == 0 || n_resets != 2 || n_sof_total == 0 || n_est_total == 0) begin
      failures++;
      $display("FAIL: mechanisms: gaps %0d resets %0d sofs %0d estimates %0d",
               n_gaps, n_resets, n_sof_total, n_est_total);
    end
    $display("gaps %0d, resets %0d, SOFs %0d, false alarms %0d, estimates %0d", n_gaps, n_resets,
             n_sof_total, n_false_total, n_est_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
