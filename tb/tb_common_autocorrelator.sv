// tb_common_autocorrelator -- self-checking test of the shared SOF
// autocorrelator.
//
// Streams random QPSK-like symbols with the 26-symbol SOF embedded (twice,
// once rotated by a carrier offset) and random gaps in in_valid.  For every
// window the reference computes x_i = r_i * conj(c_i) with the SOF symbols
// written out from the DVB-S2 definition ((1-2b)(1+j) for even positions,
// (1-2b)(-1+j) for odd ones, scaled by sqrt(2)) and forms
// R_k = sum_{i>=k} x_i conj(x_(i-k)) / 2 by plain complex arithmetic, then
// compares it with the block output.  It also checks the two-clock latency
// and that every window is reported exactly once.
module tb_common_autocorrelator;
  import dvbs2_sync_pkg::*;

  localparam int W  = SYM_W;
  localparam int NS = NSPAN;
  localparam int L  = LSOF;
  localparam int RW = 2 * W + 1 + $clog2(L);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [RW-1:0] r_re [NS];
  logic signed [RW-1:0] r_im [NS];

  int checks = 0, failures = 0;

  common_autocorrelator dut (.*);

  always #5 clk = ~clk;

  // reference state
  longint hi [$], hq [$];                  // received symbols so far
  typedef struct {
    longint re [NS];
    longint im [NS];
    int     cyc;
  } exp_t;
  exp_t   expq [$];
  int     cycle = 0;
  int     n_windows = 0;

  function automatic void sof_sym(input int i, output longint cr, output longint ci);
    int b;
    b = (32'h18D2E82 >> (25 - i)) & 1;
    if (i % 2 == 0) begin cr = 1 - 2 * b;       ci = 1 - 2 * b; end
    else            begin cr = -(1 - 2 * b);    ci = 1 - 2 * b; end
  endfunction

  // queue expected outputs for the window ending at the newest symbol
  task automatic push_expected();
    longint xr [L], xi [L];
    longint er [NS], ei [NS];
    int n;
    n = hi.size();
    if (n < L) return;
    for (int i = 0; i < L; i++) begin
      longint cr, ci, rr, ri;
      sof_sym(i, cr, ci);
      rr = hi[n - L + i];
      ri = hq[n - L + i];
      // r * conj(c)
      xr[i] = rr * cr + ri * ci;
      xi[i] = ri * cr - rr * ci;
    end
    for (int k = 1; k <= NS; k++) begin
      longint sr = 0, si = 0;
      for (int i = k; i < L; i++) begin
        sr += xr[i] * xr[i-k] + xi[i] * xi[i-k];
        si += xi[i] * xr[i-k] - xr[i] * xi[i-k];
      end
      er[k-1] = sr / 2;
      ei[k-1] = si / 2;
    end
    begin
      exp_t e;
      e.re = er;
      e.im = ei;
      e.cyc = cycle;
      expq.push_back(e);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = expq[0];
        expq.delete(0);
        n_windows++;
        checks++;
        // symbol driven after edge n, taken at n+1, R registered at n+2,
        // sampled here at n+3
        if (cycle - e.cyc != 3) begin
          failures++;
          $display("FAIL: latency %0d, expected 3", cycle - e.cyc);
        end
        for (int k = 0; k < NS; k++) begin
          checks++;
          if (longint'(r_re[k]) != e.re[k] || longint'(r_im[k]) != e.im[k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: span %0d got (%0d,%0d) expected (%0d,%0d)",
                       k + 1, r_re[k], r_im[k], e.re[k], e.im[k]);
          end
        end
      end
    end
  end

  task automatic send(input longint a, input longint b);
    in_valid <= 1'b1;
    in_i <= W'(a);
    in_q <= W'(b);
    hi.push_back(a);
    hq.push_back(b);
    push_expected();
    @(posedge clk);
    // random gap
    if ($urandom_range(0, 3) == 0) begin
      in_valid <= 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
  endtask

  task automatic send_sof(input real w, input int amp);
    for (int i = 0; i < L; i++) begin
      longint cr, ci;
      real ph, re, im;
      sof_sym(i, cr, ci);
      ph = w * i;
      re = amp * (cr * $cos(ph) - ci * $sin(ph));
      im = amp * (cr * $sin(ph) + ci * $cos(ph));
      send(longint'($rtoi(re)), longint'($rtoi(im)));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 60; n++)
      send($urandom_range(0, 1) ? 200 : -200, $urandom_range(0, 1) ? 200 : -200);
    send_sof(0.0, 300);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++)
      send(longint'($urandom_range(0, 1022)) - 511, longint'($urandom_range(0, 1022)) - 511);
    send_sof(1.2566, 250);   // 20 % of the symbol rate
    for (int n = 0; n < 40; n++)
      send(longint'($urandom_range(0, 1022)) - 512, longint'($urandom_range(0, 1022)) - 512);
    // full-scale corners exercise the widest products
    for (int n = 0; n < 40; n++)
      send($urandom_range(0, 1) ? 511 : -512, $urandom_range(0, 1) ? 511 : -512);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_windows < 200) begin
      failures++;
      $display("FAIL: %0d windows checked, %0d left", n_windows, expq.size());
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
