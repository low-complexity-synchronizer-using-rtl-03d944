// common_autocorrelator -- sliding span-k autocorrelation of the received
// symbols against the 26-symbol DVB-S2 start of frame, shared by the frame
// synchronizer and the frequency synchronizer.
//
// With x_i = r_(m-25+i) c_i^* the SOF-derotated symbols of a 26-symbol window
// ending at symbol m, both synchronizers need
//     R_k(m) = sum_{i=k}^{25} x_i x_(i-k)^*,     k = 1 .. NSPAN,
// (the n-span DPDI terms of D-GPDI, and the correlations of the Mengali &
// Morelli estimator).  Each term factors into a received-signal part and a
// SOF part:  x_i x_(i-k)^* = [r_(m-25+i) r_(m-25+i-k)^*] * [c_i^* c_(i-k)].
// The received part d_k = r_m r_(m-k)^* is computed once per symbol with one
// complex multiplier per span and then shifted along a delay line; the SOF
// part is one of {+1, +j, -1, -j}, so it is applied with multiplexers and
// negations.  An adder tree per span sums the 26-k weighted taps.
//
// Interface: in_valid/in_i/in_q is the frequency-compensated symbol stream.
// r_re[k-1]/r_im[k-1] is R_k for the window ending at the most recent symbol.
// Timing: the window containing the symbol taken with in_valid at clock edge
// n is output, with out_valid high, during the cycle after edge n+1 (two-clock
// latency, one result per symbol).  out_valid rises only once LSOF symbols
// have been seen.
module common_autocorrelator
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned W     = SYM_W,
  parameter int unsigned L     = LSOF,
  parameter int unsigned NS    = NSPAN,
  parameter int unsigned DW    = 2 * W + 1,           // width of r_m r_(m-k)^*
  parameter int unsigned RW    = DW + $clog2(L)       // width of R_k
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_i,
  input  logic signed [W-1:0]  in_q,
  output logic                 out_valid,
  output logic signed [RW-1:0] r_re [NS],
  output logic signed [RW-1:0] r_im [NS]
);

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } dprod_t;

  // previous symbols r_(m-1) .. r_(m-NS)
  logic signed [W-1:0] hist_i [NS];
  logic signed [W-1:0] hist_q [NS];
  // d_k delay lines, index 0 newest (SOF position L-1)
  dprod_t              dline  [NS][L-1];
  dprod_t              dnew   [NS];
  logic [$clog2(L+1)-1:0] fill;
  logic                   shifted;

  // one complex multiplier per span: r_m * conj(r_(m-k))
  always_comb begin
    for (int k = 0; k < NS; k++) begin
      logic signed [2*W-1:0] p_ii, p_qq, p_qi, p_iq;
      p_ii = in_i * hist_i[k];
      p_qq = in_q * hist_q[k];
      p_qi = in_q * hist_i[k];
      p_iq = in_i * hist_q[k];
      dnew[k].re = DW'(p_ii) + DW'(p_qq);
      dnew[k].im = DW'(p_qi) - DW'(p_iq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) begin
        hist_i[k] <= '0;
        hist_q[k] <= '0;
        for (int t = 0; t < L - 1; t++) dline[k][t] <= '0;
      end
      fill    <= '0;
      shifted <= 1'b0;
    end else begin
      shifted <= in_valid;
      if (in_valid) begin
        hist_i[0] <= in_i;
        hist_q[0] <= in_q;
        for (int k = 1; k < NS; k++) begin
          hist_i[k] <= hist_i[k-1];
          hist_q[k] <= hist_q[k-1];
        end
        for (int k = 0; k < NS; k++) begin
          dline[k][0] <= dnew[k];
          for (int t = 1; t < L - 1; t++) dline[k][t] <= dline[k][t-1];
        end
        if (fill != ($clog2(L+1))'(L)) fill <= fill + 1'b1;
      end
    end
  end

  // multiply by j^q: 0 -> +1, 1 -> +j, 2 -> -1, 3 -> -j
  function automatic dprod_t quarter_rot(input dprod_t v, input logic [1:0] q);
    dprod_t o;
    unique case (q)
      2'd0: begin o.re =  v.re; o.im =  v.im; end
      2'd1: begin o.re = -v.im; o.im =  v.re; end
      2'd2: begin o.re = -v.re; o.im = -v.im; end
      default: begin o.re =  v.im; o.im = -v.re; end
    endcase
    return o;
  endfunction

  logic signed [RW-1:0] sum_re [NS];
  logic signed [RW-1:0] sum_im [NS];

  // weighted sums; SOF position i = L-1-t for delay tap t, used for i >= k
  always_comb begin
    for (int k = 0; k < NS; k++) begin
      sum_re[k] = '0;
      sum_im[k] = '0;
      for (int t = 0; t < L - 1; t++) begin
        if (L - 1 - t >= k + 1) begin
          dprod_t w;
          w = quarter_rot(dline[k][t], span_coef(L - 1 - t, k + 1));
          sum_re[k] = sum_re[k] + RW'(w.re);
          sum_im[k] = sum_im[k] + RW'(w.im);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < NS; k++) begin
        r_re[k] <= '0;
        r_im[k] <= '0;
      end
    end else begin
      out_valid <= shifted && (fill == ($clog2(L+1))'(L));
      for (int k = 0; k < NS; k++) begin
        r_re[k] <= sum_re[k];
        r_im[k] <= sum_im[k];
      end
    end
  end

endmodule
