// tb_freq_compensator -- self-checking test of the NCO + CORDIC frequency
// compensator.
//
// Loads a frequency estimate, streams random complex symbols (with gaps in
// in_valid), then loads a second estimate that is added to the first.  For
// every symbol the reference computes r_m * e^(-j theta_m) in floating point,
// theta_m being the running sum of the frequency word, and the output must be
// within 2 LSB.  Also checks the accumulated frequency word and the 16-clock
// latency.
module tb_freq_compensator;
  import dvbs2_sync_pkg::*;

  localparam int W = SYM_W;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_i = '0, in_q = '0;
  logic est_valid = 0;
  logic signed [ANG_W-1:0] est = '0;
  logic signed [PH_W-1:0] freq_word;
  logic out_valid;
  logic signed [W-1:0] out_i, out_q;

  int checks = 0, failures = 0;
  int cycle = 0;

  freq_compensator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real re; real im; int cyc; } exp_t;
  exp_t expq [$];
  real  theta = 0.0;          // phase of the next symbol, turns
  real  fturns = 0.0;         // frequency, turns per symbol
  int   n_out = 0;
  int   max_err = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      int ei, eq;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = expq[0];
        expq.delete(0);
        n_out++;
        ei = $rtoi(e.re >= 0 ? e.re + 0.5 : e.re - 0.5) - int'(out_i);
        eq = $rtoi(e.im >= 0 ? e.im + 0.5 : e.im - 0.5) - int'(out_q);
        if (ei < 0) ei = -ei;
        if (eq < 0) eq = -eq;
        if (ei > max_err) max_err = ei;
        if (eq > max_err) max_err = eq;
        // driven after edge n, taken at n+1, out after n+16, seen at n+17
        if (ei > 2 || eq > 2 || cycle - e.cyc != 17) begin
          failures++;
          if (failures < 10)
            $display("FAIL: out (%0d,%0d) expected (%f,%f) latency %0d",
                     out_i, out_q, e.re, e.im, cycle - e.cyc);
        end
      end
    end
  end

  task automatic send(input int a, input int b);
    exp_t e;
    real c, s;
    c = $cos(2.0 * PI * theta);
    s = $sin(2.0 * PI * theta);
    e.re = a * c + b * s;
    e.im = b * c - a * s;
    if (e.re > 511.0) e.re = 511.0;
    if (e.re < -512.0) e.re = -512.0;
    if (e.im > 511.0) e.im = 511.0;
    if (e.im < -512.0) e.im = -512.0;
    e.cyc = cycle;
    expq.push_back(e);
    theta = theta + fturns;
    theta = theta - $floor(theta);
    in_valid <= 1'b1;
    in_i <= W'(a);
    in_q <= W'(b);
    @(posedge clk);
    if ($urandom_range(0, 4) == 0) begin
      in_valid <= 1'b0;
      repeat ($urandom_range(1, 2)) @(posedge clk);
    end
  endtask

  task automatic load_est(input int v);
    in_valid  <= 1'b0;
    est_valid <= 1'b1;
    est       <= ANG_W'(v);
    @(posedge clk);
    est_valid <= 1'b0;
    fturns = fturns + real'(v) / 65536.0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // no offset: output equals input
    for (int n = 0; n < 30; n++)
      send(int'($urandom_range(0, 700)) - 350, int'($urandom_range(0, 700)) - 350);
    load_est(13107);          // +0.2 turn per symbol
    for (int n = 0; n < 300; n++)
      send(int'($urandom_range(0, 700)) - 350, int'($urandom_range(0, 700)) - 350);
    load_est(-20000);         // a correction in the other direction
    for (int n = 0; n < 300; n++)
      send(int'($urandom_range(0, 1000)) - 500, int'($urandom_range(0, 1000)) - 500);
    in_valid <= 1'b0;
    repeat (25) @(posedge clk);
    checks++;
    if (freq_word != PH_W'((13107 - 20000) * 256)) begin
      failures++;
      $display("FAIL: freq_word %0d", freq_word);
    end
    checks++;
    if (n_out != 630 || expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs, %0d missing", n_out, expq.size());
    end
    $display("max error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
