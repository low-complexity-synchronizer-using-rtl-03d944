// tb_frame_synchronizer -- self-checking test of the SOF detector.
//
// Drives the autocorrelator-side inputs directly: a stream of random R(1),
// R(2) values (background) with occasional large ones (SOF-like peaks, some
// below the threshold, some as plateaus of equal metric), gaps in
// corr_valid, a changing threshold and a period with the detector disabled.
// The reference computes |z| ~= max + 3/8 min of each value, the metric
// |R(1)| + |R(2)|, and declares a SOF at window m-1 when it exceeds the
// threshold and is a local maximum (>= the window before, > the window
// after).  Every sof pulse, its timing (one clock after the following
// corr_valid) and its reported R and metric are compared.
module tb_frame_synchronizer;
  import dvbs2_sync_pkg::*;

  localparam int RW = 26;
  localparam int NS = NSPAN;
  localparam int MW = RW + 1;
  localparam int TW = RW + 4;

  logic clk = 0, rst_n = 0;
  logic enable = 0;
  logic [TW-1:0] threshold = '0;
  logic corr_valid = 0;
  logic signed [RW-1:0] r_re [NS];
  logic signed [RW-1:0] r_im [NS];
  logic [MW-1:0] metric;
  logic sof;
  logic signed [RW-1:0] peak_re [NS];
  logic signed [RW-1:0] peak_im [NS];
  logic [MW-1:0] peak_metric;

  int checks = 0, failures = 0;

  frame_synchronizer dut (.*);

  always #5 clk = ~clk;

  function automatic longint amag(input longint re, input longint im);
    longint a, b, mx, mn;
    a = re < 0 ? -re : re;
    b = im < 0 ? -im : im;
    mx = a > b ? a : b;
    mn = a > b ? b : a;
    return mx + mn / 4 + mn / 8;
  endfunction

  // reference model, evaluated on the values the DUT samples at each edge
  longint m_c, m_p, re_c [NS], im_c [NS];
  int     seen = 0;
  bit     exp_sof = 0;          // sof expected after this edge
  longint exp_re [NS], exp_im [NS], exp_metric;
  int     n_sof = 0, n_exp = 0, n_below = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // output produced by the previous edge
      checks++;
      if (sof != exp_sof) begin
        failures++;
        $display("FAIL: sof=%0d expected %0d", sof, exp_sof);
      end else if (sof) begin
        n_sof++;
        checks++;
        if (longint'(peak_metric) != exp_metric ||
            longint'(peak_re[0]) != exp_re[0] || longint'(peak_im[0]) != exp_im[0] ||
            longint'(peak_re[1]) != exp_re[1] || longint'(peak_im[1]) != exp_im[1]) begin
          failures++;
          $display("FAIL: peak metric %0d expected %0d", peak_metric, exp_metric);
        end
      end
      // expectation for this edge
      exp_sof = 0;
      if (corr_valid) begin
        longint mnow;
        mnow = amag(r_re[0], r_im[0]) + amag(r_re[1], r_im[1]);
        if (m_c >= m_p && m_c > mnow && seen == 2) begin
          if (enable && m_c > longint'(threshold)) begin
            exp_sof = 1;
            n_exp++;
            exp_metric = m_c;
            exp_re = re_c;
            exp_im = im_c;
          end else if (m_c > 1000) n_below++;
        end
        m_p = m_c;
        m_c = mnow;
        for (int k = 0; k < NS; k++) begin re_c[k] = r_re[k]; im_c[k] = r_im[k]; end
        if (seen < 2) seen++;
      end
    end
  end

  task automatic window(input longint a1, input longint b1, input longint a2, input longint b2);
    r_re[0] <= RW'(a1); r_im[0] <= RW'(b1);
    r_re[1] <= RW'(a2); r_im[1] <= RW'(b2);
    corr_valid <= 1'b1;
    @(posedge clk);
    if ($urandom_range(0, 3) == 0) begin
      corr_valid <= 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
  endtask

  task automatic background();
    window(longint'($urandom_range(0, 2000)) - 1000, longint'($urandom_range(0, 2000)) - 1000,
           longint'($urandom_range(0, 2000)) - 1000, longint'($urandom_range(0, 2000)) - 1000);
  endtask

  initial begin
    for (int k = 0; k < NS; k++) begin r_re[k] = '0; r_im[k] = '0; end
    m_c = 0; m_p = 0;
    for (int k = 0; k < NS; k++) begin re_c[k] = 0; im_c[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    threshold <= TW'(5000);
    enable <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      int amp;
      repeat ($urandom_range(5, 30)) background();
      amp = (f % 4 == 3) ? 1500 : 20000 + int'($urandom_range(0, 200000));
      if (f % 5 == 2) begin
        // plateau: two equal windows, the first is the peak
        window(amp, -amp / 3, -amp / 2, amp);
        window(amp, -amp / 3, -amp / 2, amp);
      end else begin
        window(amp / 2, amp / 5, amp / 3, -amp / 4);
        window(-amp, amp / 7, amp / 2, amp);
        window(amp / 3, amp / 5, amp / 4, amp / 4);
      end
      if (f == 20) begin threshold <= TW'(60000); end
      if (f == 30) begin enable <= 1'b0; end
      if (f == 35) begin enable <= 1'b1; threshold <= TW'(5000); end
    end
    repeat (5) background();
    corr_valid <= 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (n_sof != n_exp || n_sof < 15) begin
      failures++;
      $display("FAIL: %0d SOFs, expected %0d", n_sof, n_exp);
    end
    $display("SOF detected %0d, peaks below threshold %0d", n_sof, n_below);
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
