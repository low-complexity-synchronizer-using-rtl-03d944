// tb_snr_estimator -- self-checking test of the power / noise estimator and
// the adaptive threshold.
//
// Streams blocks of random symbols (with gaps in in_valid) and checks that,
// after every 256-symbol block, pow_est is the floor of the block's mean
// |r|^2 and ready is set.  Pulses sof with chosen SOF metric values and
// checks the signal estimate (first value loaded, then smoothed with gain
// 1/8, S_inst = floor(metric * 20 / 1024)), the noise estimate max(P - S, 0) and
// threshold = 34 P + 6 N.  The power blocks use different amplitudes so
// that the threshold rises and falls with the noise.
module tb_snr_estimator;
  import dvbs2_sync_pkg::*;

  localparam int W  = SYM_W;
  localparam int RW = 26;
  localparam int TW = RW + 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_i = '0, in_q = '0;
  logic sof = 0;
  logic [RW:0] peak_metric = '0;
  logic ready;
  logic [2*W-1:0] pow_est, sig_est, noise_est;
  logic [TW-1:0] threshold;

  int checks = 0, failures = 0;

  snr_estimator dut (.*);

  always #5 clk = ~clk;

  longint exp_p = 0, exp_s = 0;
  bit     s_loaded = 0;

  task automatic check_outputs(input string what);
    longint n, t;
    n = exp_p > exp_s ? exp_p - exp_s : 0;
    t = 34 * exp_p + 6 * n;
    checks++;
    if (longint'(pow_est) != exp_p || longint'(sig_est) != exp_s ||
        longint'(noise_est) != n || longint'(threshold) != t || !ready) begin
      failures++;
      $display("FAIL %s: P=%0d/%0d S=%0d/%0d N=%0d/%0d thr=%0d/%0d ready=%0d", what,
               pow_est, exp_p, sig_est, exp_s, noise_est, n, threshold, t, ready);
    end
  endtask

  task automatic block(input int amp);
    longint sum = 0;
    for (int n = 0; n < 256; n++) begin
      int a, b;
      a = int'($urandom_range(0, 2 * amp)) - amp;
      b = int'($urandom_range(0, 2 * amp)) - amp;
      sum += a * a + b * b;
      in_valid <= 1'b1;
      in_i <= W'(a);
      in_q <= W'(b);
      @(posedge clk);
      if ($urandom_range(0, 5) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    exp_p = sum / 256;
    check_outputs("block");
  endtask

  task automatic pulse_sof(input longint mag1);
    longint si;
    si = (mag1 * 20) / 1024;
    if (!s_loaded) exp_s = si;
    else if (si >= exp_s) exp_s = exp_s + (si - exp_s) / 8;
    else exp_s = exp_s - (exp_s - si) / 8;
    s_loaded = 1;
    sof <= 1'b1;
    peak_metric <= (RW+1)'(mag1);
    @(posedge clk);
    sof <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    check_outputs("sof");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (ready) begin
      failures++;
      $display("FAIL: ready before the first block");
    end
    block(300);
    block(300);
    pulse_sof(51 * 40000);
    pulse_sof(51 * 50000);
    pulse_sof(51 * 20000);
    block(150);          // less power than the signal estimate: N = 0
    block(500);
    pulse_sof(51 * 60000);
    block(511);
    pulse_sof(3);
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
