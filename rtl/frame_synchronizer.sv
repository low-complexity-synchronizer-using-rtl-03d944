// frame_synchronizer -- start-of-frame detector using the 1-span DPDI and
// 2-span DPDI terms of the D-GPDI metric.
//
// For every symbol the common autocorrelator delivers R(1) and R(2) of the
// 26-symbol window ending at that symbol.  The detection metric is
//     Lambda(m) = |R(1)| + |R(2)|,
// the first two span terms of D-GPDI (Lambda^D-GPDI = 2 sum_n |R(n)|, the
// constant factor 2 dropped).  Because each term is a product of a symbol
// and an earlier symbol, a carrier frequency offset only rotates R(k) and
// does not reduce Lambda.  The magnitudes use the multiplier-free estimate
// |z| ~= max(|re|,|im|) + 3/8 min(|re|,|im|) (error 0 to +6.8 %).
//
// A SOF is declared at window m-1 when the detector is enabled and
// Lambda(m-1) > threshold, Lambda(m-1) >= Lambda(m-2) and
// Lambda(m-1) > Lambda(m), i.e. at a local maximum above the threshold.  The
// threshold comes from the SNR estimator.
//
// Interface: corr_valid/r_re/r_im is the autocorrelator output (entry k-1 is
// R(k); entries beyond span 2 are ignored).  On detection sof pulses for one
// clock, one symbol after the window that holds the SOF (at the clock after
// the next corr_valid), together with that window's R values (peak_re/im)
// and its metric (peak_metric).  metric is also output every
// symbol.  The peak test and the magnitude estimate are this implementation's
// choices.
module frame_synchronizer
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned RW = 26,
  parameter int unsigned NS = NSPAN,
  parameter int unsigned MW = RW + 1,            // metric width
  parameter int unsigned TW = RW + 4             // threshold width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [TW-1:0]        threshold,
  input  logic                 corr_valid,
  input  logic signed [RW-1:0] r_re [NS],
  input  logic signed [RW-1:0] r_im [NS],
  output logic [MW-1:0]        metric,
  output logic                 sof,
  output logic signed [RW-1:0] peak_re [NS],
  output logic signed [RW-1:0] peak_im [NS],
  output logic [MW-1:0]        peak_metric
);

  // max + 3/8 min magnitude estimate
  function automatic logic [RW-1:0] cmag(input logic signed [RW-1:0] re,
                                         input logic signed [RW-1:0] im);
    logic [RW:0] a, b, mx, mn, s;
    a  = re[RW-1] ? (RW+1)'(-re) : (RW+1)'(re);
    b  = im[RW-1] ? (RW+1)'(-im) : (RW+1)'(im);
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    s  = mx + (mn >> 2) + (mn >> 3);
    // saturate (only reachable for full-scale corner values)
    return s[RW] ? {RW{1'b1}} : s[RW-1:0];
  endfunction

  logic [RW-1:0] mag1_now, mag2_now;
  logic [MW-1:0] metric_now;
  logic [MW-1:0] metric_c, metric_p;     // Lambda(m-1), Lambda(m-2)
  logic signed [RW-1:0] re_c [NS];
  logic signed [RW-1:0] im_c [NS];
  logic [1:0]    seen;                   // windows in the compare pipeline

  assign mag1_now   = cmag(r_re[0], r_im[0]);
  assign mag2_now   = cmag(r_re[1], r_im[1]);
  assign metric_now = MW'(mag1_now) + MW'(mag2_now);
  assign metric     = metric_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      metric_c    <= '0;
      metric_p    <= '0;
      seen        <= '0;
      sof         <= 1'b0;
      peak_metric <= '0;
      for (int k = 0; k < NS; k++) begin
        re_c[k]    <= '0;
        im_c[k]    <= '0;
        peak_re[k] <= '0;
        peak_im[k] <= '0;
      end
    end else begin
      sof <= 1'b0;
      if (corr_valid) begin
        if (enable && seen == 2'd2 &&
            TW'(metric_c) > threshold &&
            metric_c >= metric_p && metric_c > metric_now) begin
          sof         <= 1'b1;
          peak_metric <= metric_c;
          for (int k = 0; k < NS; k++) begin
            peak_re[k] <= re_c[k];
            peak_im[k] <= im_c[k];
          end
        end
        metric_p <= metric_c;
        metric_c <= metric_now;
        for (int k = 0; k < NS; k++) begin
          re_c[k] <= r_re[k];
          im_c[k] <= r_im[k];
        end
        if (seen != 2'd2) seen <= seen + 1'b1;
      end
    end
  end

endmodule
