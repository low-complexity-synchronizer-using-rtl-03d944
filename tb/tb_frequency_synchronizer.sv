// tb_frequency_synchronizer -- self-checking test of the Mengali & Morelli
// frequency estimator.
//
// Presents R(1) = A1 e^(j w1) and R(2) = A2 e^(j w2) for many random
// frequencies (|w| up to 0.45 turn per symbol for R(1)) and amplitudes, with
// the two arguments perturbed independently, pulses sof and compares est
// with the floating-point value
//     l1 * arg R(1) + l2 * wrap(arg R(2) - arg R(1)),
// the weights computed here from the M&M formula for Lp = 26, M = 2.  The
// result must be within 3 LSB of the 16-bit angle word.  Also checks the
// sof-to-est_valid latency and that a sof while busy is ignored.
module tb_frequency_synchronizer;
  import dvbs2_sync_pkg::*;

  localparam int RW = 26;
  localparam int NS = NSPAN;
  localparam real PI = 3.14159265358979;
  localparam int LATENCY = 37;

  logic clk = 0, rst_n = 0;
  logic sof = 0;
  logic signed [RW-1:0] r_re [NS];
  logic signed [RW-1:0] r_im [NS];
  logic busy, est_valid;
  logic signed [ANG_W-1:0] est;

  int checks = 0, failures = 0;
  int cycle = 0;

  frequency_synchronizer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real wrap(input real a);   // to [-0.5, 0.5) turn
    return a - $floor(a + 0.5);
  endfunction

  real l1, l2;
  int  n_est = 0;

  task automatic one(input real w, input real a1, input real a2, input real dph);
    real ang1, ang2, expv, d;
    int  t0, got;
    ang1 = wrap(w);
    ang2 = wrap(2.0 * w + dph);
    r_re[0] <= RW'($rtoi(a1 * $cos(2.0 * PI * ang1)));
    r_im[0] <= RW'($rtoi(a1 * $sin(2.0 * PI * ang1)));
    r_re[1] <= RW'($rtoi(a2 * $cos(2.0 * PI * ang2)));
    r_im[1] <= RW'($rtoi(a2 * $sin(2.0 * PI * ang2)));
    sof <= 1'b1;
    @(posedge clk);
    t0 = cycle;
    sof <= 1'b0;
    // a second sof while busy must be ignored
    @(posedge clk);
    sof <= 1'b1;
    r_re[0] <= '0;
    r_im[0] <= RW'(1000);
    @(posedge clk);
    sof <= 1'b0;
    while (!est_valid) @(posedge clk);
    got = int'(est);
    expv = (l1 * ang1 + l2 * wrap(ang2 - ang1)) * 65536.0;
    d = real'(got) - expv;
    checks++;
    n_est++;
    if (d > 3.0 || d < -3.0 || cycle - t0 != LATENCY) begin
      failures++;
      if (failures < 10)
        $display("FAIL: w=%f est=%0d expected %f latency %0d", w, got, expv, cycle - t0);
    end
    @(posedge clk);
    checks++;
    if (busy || est_valid) begin
      failures++;
      $display("FAIL: still busy after estimate");
    end
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    int lp = 26, m = 2;
    real den;
    den = m * (4.0 * m * m - 6.0 * m * lp + 3.0 * lp * lp - 1.0);
    l1 = 3.0 * ((lp - 1) * (lp - 1 + 1) - m * (lp - m)) / den;
    l2 = 3.0 * ((lp - 2) * (lp - 2 + 1) - m * (lp - m)) / den;
    for (int k = 0; k < NS; k++) begin
      r_re[k] = '0;
      r_im[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // zero offset and the +-20 % of the symbol rate extremes
    one(0.0, 3.0e6, 2.9e6, 0.0);
    one(0.2, 3.0e6, 2.9e6, 0.0);
    one(-0.2, 3.0e6, 2.9e6, 0.0);
    // R(1) in the left half-plane, with a large (wrapping) R(2) argument
    one(0.45, 1.0e5, 1.2e5, 0.0);
    one(-0.3, 5.0e4, 4.0e4, 0.01);
    for (int n = 0; n < 60; n++) begin
      real w, a;
      w = (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0 * 0.24;
      a = real'($urandom_range(2000, 30000000));
      one(w, a, a * 0.9, (real'($urandom_range(0, 200)) - 100.0) / 2000.0);
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
